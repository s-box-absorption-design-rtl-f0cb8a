// Round controller of the loop AES cores.
//
// It sequences the eleven ROM accesses of one AES-128 block: round number 0
// (the initial AddRoundKey, with the input block on the ROM addresses) and
// rounds 1..10 (with the looped-back state). The round number forms the upper
// four bits of every ROM address.
//
// Interface and timing: `start` is sampled at a rising edge while `busy` is
// low; that edge performs the round-0 read (`load` is high in that cycle, so
// the core puts the input block on the addresses). The ten following edges
// perform rounds 1..10 with `busy` high. After the round-10 edge the result
// is in the ROM output registers, `done` is high for one cycle and `busy` is
// low again, so a new block may start in that very cycle: 11 clock cycles
// per block. `start` while busy is ignored. `last` (round 10) and `first`
// (round 1) tell the round logic which step to bypass.
//
// Eleven accesses from round 0 to 10 follow the design description; the
// start/busy/done handshake and the active-low synchronous reset are this
// design's choices.
module round_ctrl
  import aes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             load,     // this cycle reads round 0 with the input block
  output logic             rom_en,   // ROM read enable
  output logic [RND_W-1:0] round,    // round number on the ROM addresses
  output logic             first,    // round == 1
  output logic             last,     // round == 10
  output logic             busy,
  output logic             done
);

  logic [RND_W-1:0] cnt;

  assign load   = start && !busy;
  assign rom_en = load || busy;
  assign round  = busy ? cnt : '0;
  assign first  = busy && (cnt == RND_W'(1));
  assign last   = busy && (cnt == RND_W'(NR));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        cnt  <= RND_W'(1);
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt == RND_W'(NR)) begin
          busy <= 1'b0;
          done <= 1'b1;
          cnt  <= '0;
        end else begin
          cnt <= cnt + RND_W'(1);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && busy) a_round_range: assert (cnt >= RND_W'(1) && cnt <= RND_W'(NR))
      else $error("round_ctrl: round counter %0d out of range", cnt);
  end

endmodule
