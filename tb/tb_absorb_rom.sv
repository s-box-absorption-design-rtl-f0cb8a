// Testbench for absorb_rom: reads every one of the 2816 words of an
// encryption ROM and a decryption ROM (for a FIPS-197 key and two byte
// positions) and compares them with the reference model's S-Box and key
// expansion. It also anchors the model with FIPS-197 values, checks the
// one-cycle read latency and that the output holds while the enable is low.
module tb_absorb_rom;
  import aes_model_pkg::*;

  localparam logic [127:0] K = 128'h000102030405060708090a0b0c0d0e0f;
  localparam int IE = 5, ID = 11;

  logic clk = 0, en = 0;
  logic [11:0] addr_e = 0, addr_d = 0;
  logic [7:0]  q_e, q_d;
  int checks = 0, failures = 0;

  absorb_rom #(.KEY(K), .BYTE_IDX(IE), .DECRYPT(1'b0)) dut_e (.clk, .en, .addr(addr_e), .dout(q_e));
  absorb_rom #(.KEY(K), .BYTE_IDX(ID), .DECRYPT(1'b1)) dut_d (.clk, .en, .addr(addr_d), .dout(q_d));

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  function automatic logic [7:0] kb(input rk_t rk, input int r, input int i);
    return rk[r][127 - 8*i -: 8];
  endfunction

  initial begin
    rk_t rk = expand(K);
    logic [7:0] exp_e, exp_d, held;
    // Model anchors (FIPS-197 Appendix C.1 last round key, S-Box samples).
    check(sbox(8'h00), 8'h63, "model sbox(00)");
    check(sbox(8'h53), 8'hed, "model sbox(53)");
    checks++; if (rk[10] !== 128'h13111d7fe3944a17f307a78b4d2b30c5) begin failures++; $display("FAIL model key expansion"); end

    for (int r = 0; r <= 10; r++) begin
      for (int b = 0; b < 256; b++) begin
        @(negedge clk);
        en = 1; addr_e = 12'(r*256 + b); addr_d = 12'(r*256 + b);
        exp_e = (r == 10) ? (8'(b) ^ kb(rk, 10, IE)) : sbox(8'(b) ^ kb(rk, r, IE));
        exp_d = (r == 0)  ? (8'(b) ^ kb(rk, 10, ID)) : (inv_sbox(8'(b)) ^ kb(rk, 10 - r, ID));
        @(posedge clk); #1;
        check(q_e, exp_e, $sformatf("ROM_E%0d[%0d]", IE, r*256+b));
        check(q_d, exp_d, $sformatf("ROM_D%0d[%0d]", ID, r*256+b));
      end
    end
    // Hold with enable low.
    held = q_e;
    @(negedge clk); en = 0; addr_e = 12'h000;
    repeat (3) @(posedge clk);
    #1 check(q_e, held, "hold while en=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
