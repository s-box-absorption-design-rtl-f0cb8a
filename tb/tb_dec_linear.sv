// Testbench for dec_linear: InvMixColumns+InvShiftRows and the first-round
// bypass, against the reference model on random states and a FIPS column.
module tb_dec_linear;
  import aes_model_pkg::*;
  import aes_pkg::state_t;

  state_t d, q;
  logic first;
  int checks = 0, failures = 0;

  dec_linear dut (.d, .first, .q);

  task automatic check(input logic [127:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, q, exp);
    end
  endtask

  initial begin
    d = {4{32'h8e4da1bc}}; first = 0; #1;
    check({4{32'hdb135345}}, "FIPS column");
    for (int n = 0; n < 200; n++) begin
      logic [127:0] v = {$urandom, $urandom, $urandom, $urandom};
      d = v; first = n[0]; #1;
      if (first) check(from_mat(shift_rows(to_mat(v), 1)), "InvShiftRows only");
      else       check(from_mat(shift_rows(mix_columns(to_mat(v), 1), 1)), "InvMixColumns+InvShiftRows");
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
