// Testbench for enc_linear: ShiftRows+MixColumns and the last-round bypass,
// against the reference model on random states and a FIPS-197 column.
module tb_enc_linear;
  import aes_model_pkg::*;
  import aes_pkg::state_t;

  state_t d, q;
  logic last;
  int checks = 0, failures = 0;

  enc_linear dut (.d, .last, .q);

  task automatic check(input logic [127:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, q, exp);
    end
  endtask

  initial begin
    // MixColumns of column db 13 53 45 is 8e 4d a1 bc; columns chosen equal
    // so ShiftRows leaves the rows unchanged.
    d = {4{32'hdb135345}}; last = 0; #1;
    check({4{32'h8e4da1bc}}, "FIPS column");
    for (int n = 0; n < 200; n++) begin
      logic [127:0] v = {$urandom, $urandom, $urandom, $urandom};
      d = v; last = n[0]; #1;
      if (last) check(from_mat(shift_rows(to_mat(v), 0)), "ShiftRows only");
      else      check(from_mat(mix_columns(shift_rows(to_mat(v), 0), 0)), "ShiftRows+MixColumns");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
