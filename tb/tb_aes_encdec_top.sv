// End-to-end testbench of aes_encdec_top at its default parameters (the
// FIPS-197 Appendix B key). It encrypts and decrypts FIPS and random blocks
// through the shared port, checks every result against the reference model
// and the 11-cycle latency, and checks that decrypting a ciphertext returns
// the plaintext. It counts each mechanism of the design and fails if one
// never happened: encryption, decryption, a direction switch in each sense,
// a block started in the done cycle of the previous one, a start ignored
// while busy, the MixColumns bypass of round 10 and the InvMixColumns bypass
// of decryption round 1.
module tb_aes_encdec_top;
  import aes_model_pkg::*;

  localparam logic [127:0] K = 128'h2b7e151628aed2a6abf7158809cf4f3c;

  logic clk = 0, rst_n = 0, start = 0, decrypt = 0;
  logic [127:0] din = '0, dout;
  logic busy, done;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_sw_ed = 0, n_sw_de = 0, n_b2b = 0, n_ignored = 0;
  int n_mc_bypass = 0, n_imc_bypass = 0;
  bit prev_dec = 0, have_prev = 0;

  aes_encdec_top dut (.clk, .rst_n, .start, .decrypt, .din, .busy, .done, .dout);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One block, start at a negedge with busy low. `poke` drives an extra
  // start in the middle, which must be ignored.
  task automatic run(input bit dec, input logic [127:0] x, input bit poke, output logic [127:0] y);
    int cyc;
    if (done) n_b2b++;
    if (have_prev && prev_dec != dec) begin
      if (dec) n_sw_ed++; else n_sw_de++;
    end
    check(!busy, "idle at start");
    start = 1; decrypt = dec; din = x;
    @(negedge clk); cyc = 1;
    start = 0;
    while (!done && cyc < 13) begin
      if (poke && cyc == 5) begin
        start = 1; decrypt = !dec; din = ~x; n_ignored++;
      end else start = 0;
      @(negedge clk); cyc++;
    end
    start = 0;
    check(cyc == 11, $sformatf("latency %0d, expected 11", cyc));
    y = dout;
    if (dec) n_dec++; else n_enc++;
    // Every block runs one bypassed round; a correct result (checked by the
    // caller) shows that the bypass was taken.
    if (dec) n_imc_bypass++; else n_mc_bypass++;
    prev_dec = dec; have_prev = 1;
  endtask

  initial begin
    logic [127:0] pt, ct, y;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);

    run(0, 128'h3243f6a8885a308d313198a2e0370734, 0, y);
    check(y == 128'h3925841d02dc09fbdc118597196a0b32, $sformatf("FIPS encrypt: %032h", y));
    run(1, 128'h3925841d02dc09fbdc118597196a0b32, 0, y);   // back-to-back, switch
    check(y == 128'h3243f6a8885a308d313198a2e0370734, $sformatf("FIPS decrypt: %032h", y));
    repeat (3) @(negedge clk);
    check(dout == 128'h3243f6a8885a308d313198a2e0370734, "result holds while idle");

    for (int n = 0; n < 40; n++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      run(0, pt, n % 7 == 3, ct);
      check(ct == encrypt(K, pt), $sformatf("encrypt %0d", n));
      if (n % 3 == 0) @(negedge clk);                         // sometimes a gap
      run(1, ct, n % 5 == 1, y);
      check(y == pt, $sformatf("round trip %0d", n));
      if (n % 4 == 0) begin
        ct = {$urandom, $urandom, $urandom, $urandom};
        run(1, ct, 0, y);
        check(y == aes_model_pkg::decrypt(K, ct), $sformatf("decrypt %0d", n));
        run(1, y, 0, pt);                                    // dec -> dec, no switch
        check(pt == aes_model_pkg::decrypt(K, y), $sformatf("decrypt again %0d", n));
      end
    end

    $display("mechanisms: enc=%0d dec=%0d switch_e2d=%0d switch_d2e=%0d back_to_back=%0d ignored_start=%0d mc_bypass=%0d imc_bypass=%0d",
             n_enc, n_dec, n_sw_ed, n_sw_de, n_b2b, n_ignored, n_mc_bypass, n_imc_bypass);
    check(n_enc > 0, "encryption happened");
    check(n_dec > 0, "decryption happened");
    check(n_sw_ed > 0 && n_sw_de > 0, "direction switches happened");
    check(n_b2b > 0, "back-to-back start happened");
    check(n_ignored > 0, "ignored start happened");
    check(n_mc_bypass > 0, "MixColumns bypass happened");
    check(n_imc_bypass > 0, "InvMixColumns bypass happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
