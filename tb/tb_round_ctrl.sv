// Testbench for round_ctrl: the round-number sequence 0..10 with load in
// round 0, the first/last flags, busy, the done pulse 11 cycles after start,
// starts ignored while busy and a back-to-back start in the done cycle.
module tb_round_ctrl;
  logic clk = 0, rst_n = 0, start = 0;
  logic load, rom_en, first, last, busy, done;
  logic [3:0] round;
  int checks = 0, failures = 0;

  round_ctrl dut (.clk, .rst_n, .start, .load, .rom_en, .round, .first, .last, .busy, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Runs one block; start is held `hold` cycles (extra ones are ignored).
  task automatic run_block(input int hold);
    @(negedge clk);
    check(!busy, "idle before start");
    start = 1;
    #1 check(load && rom_en && round == 0, "round 0 with load");
    for (int r = 1; r <= 10; r++) begin
      @(negedge clk);
      if (r >= hold) start = 0;
      check(busy && rom_en && !load, $sformatf("busy in round %0d", r));
      check(round == 4'(r), $sformatf("round number %0d (got %0d)", r, round));
      check(first == (r == 1) && last == (r == 10), $sformatf("flags in round %0d", r));
      check(!done, "no early done");
    end
    @(negedge clk);
    check(done && !busy, "done 11 cycles after start");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1 check(!busy && !done && !rom_en, "reset state");
    run_block(1);
    @(negedge clk);
    check(!done && !rom_en, "done is a single pulse; idle");
    run_block(5);          // start held for 5 cycles: extra cycles ignored
    // back-to-back: start in the done cycle
    start = 1;
    #1 check(load && round == 0, "start accepted in done cycle");
    @(negedge clk) start = 0;
    check(busy && round == 1, "second block running");
    repeat (9) @(negedge clk);
    @(negedge clk) check(done, "second block done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
