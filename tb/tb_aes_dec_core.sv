// Testbench for aes_dec_core: FIPS-197 vectors for two keys, random blocks
// against the reference model, the 11-cycle latency, a result that holds
// until the next start, a start ignored while busy and back-to-back blocks.
module tb_aes_dec_core;
  import aes_model_pkg::*;
  import aes_pkg::state_t;

  localparam logic [127:0] KA = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] KB = 128'h000102030405060708090a0b0c0d0e0f;

  logic clk = 0, rst_n = 0;
  logic start_a = 0, start_b = 0;
  state_t din_a, din_b, dout_a, dout_b;
  logic busy_a, busy_b, done_a, done_b;
  int checks = 0, failures = 0;

  aes_dec_core #(.KEY(KA)) dut_a (.clk, .rst_n, .start(start_a), .din(din_a),
                               .busy(busy_a), .done(done_a), .dout(dout_a));
  aes_dec_core #(.KEY(KB)) dut_b (.clk, .rst_n, .start(start_b), .din(din_b),
                               .busy(busy_b), .done(done_b), .dout(dout_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [127:0] ref_model(input logic [127:0] k, input logic [127:0] x);
    return 1 ? decrypt(k, x) : encrypt(k, x);
  endfunction

  // One block on core A; returns the result. Start asserted at a negedge.
  task automatic run_a(input logic [127:0] x, input bit poke_busy, output logic [127:0] y);
    int cyc = 0;
    din_a = x; start_a = 1;
    @(negedge clk); start_a = 0; cyc = 1;
    while (!done_a) begin
      if (poke_busy && cyc == 4) begin
        start_a = 1; din_a = ~x;        // must be ignored
      end else start_a = 0;
      @(negedge clk); cyc++;
      check(cyc <= 11, "no result after 11 cycles");
      if (cyc > 12) break;
    end
    start_a = 0;
    check(cyc == 11, $sformatf("latency %0d cycles, expected 11", cyc));
    y = dout_a;
  endtask

  initial begin
    logic [127:0] y, x, fips_ct, fips_pt;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // FIPS-197 Appendix B.
    fips_pt = 128'h3243f6a8885a308d313198a2e0370734;
    fips_ct = 128'h3925841d02dc09fbdc118597196a0b32;
    run_a(fips_ct, 0, y);
    check(y == fips_pt, $sformatf("FIPS-197 B: got %032h", y));
    check(ref_model(KA, fips_ct) == fips_pt, "model agrees with FIPS-197 B");

    // Result holds while idle.
    repeat (5) @(negedge clk);
    check(dout_a == fips_pt, "result holds while idle");

    // FIPS-197 Appendix C.1 on core B.
    fips_pt = 128'h00112233445566778899aabbccddeeff;
    fips_ct = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    din_b = fips_ct; start_b = 1;
    @(negedge clk) start_b = 0;
    repeat (10) @(negedge clk);
    check(done_b && dout_b == fips_pt, $sformatf("FIPS-197 C.1: got %032h", dout_b));

    // Start while busy is ignored.
    x = {$urandom, $urandom, $urandom, $urandom};
    run_a(x, 1, y);
    check(y == ref_model(KA, x), "block with ignored start while busy");

    // Back-to-back random blocks: each next block starts in the done cycle.
    for (int n = 0; n < 20; n++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      run_a(x, 0, y);
      check(y == ref_model(KA, x), $sformatf("random block %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
