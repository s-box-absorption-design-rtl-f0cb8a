// Workload testbench at default parameters: the power-measurement run of
// the design's evaluation, ten passes of 1000 plaintext blocks encrypted
// back to back through aes_encdec_top (10,000 blocks). Every ciphertext is
// checked against the reference model, and the total cycle count must be
// 11 cycles per block.
module tb_power_workload;
  import aes_model_pkg::*;

  localparam logic [127:0] K = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam int PASSES = 10, BLOCKS = 1000;

  logic clk = 0, rst_n = 0, start = 0, decrypt = 0;
  logic [127:0] din = '0, dout;
  logic busy, done;
  int checks = 0, failures = 0;
  longint cycles = 0;

  aes_encdec_top dut (.clk, .rst_n, .start, .decrypt, .din, .busy, .done, .dout);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    logic [127:0] pt, exp_ct;
    longint c0;
    int bad = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    c0 = cycles;
    for (int p = 0; p < PASSES; p++) begin
      for (int b = 0; b < BLOCKS; b++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        exp_ct = encrypt(K, pt);
        start = 1; din = pt;
        @(negedge clk) start = 0;
        while (!done) @(negedge clk);
        checks++;
        if (dout != exp_ct) begin
          failures++;
          if (bad++ < 5) $display("FAIL pass %0d block %0d: %032h expected %032h", p, b, dout, exp_ct);
        end
      end
    end
    checks++;
    if (cycles - c0 != longint'(PASSES * BLOCKS * 11)) begin
      failures++;
      $display("FAIL %0d cycles for %0d blocks, expected 11 per block", cycles - c0, PASSES * BLOCKS);
    end
    $display("%0d blocks in %0d cycles", PASSES * BLOCKS, cycles - c0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PASSES * BLOCKS * 11 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
