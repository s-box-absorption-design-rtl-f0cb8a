// Key-specific AES-128 encryption core with S-Box absorption
// ("XOR&S-Box_by_ROM" loop architecture).
//
// The key is fixed when the circuit is built (parameter KEY), so every round
// key is a constant. Sixteen byte ROMs then replace the key expansion, the
// AddRoundKey XOR and the S-Box of the following SubBytes step: ROM_i maps
// {round, byte} to SBox(byte ^ RKey[round][i]) for rounds 0..9 and to
// byte ^ RKey[10][i] for round 10. The only logic left in the loop is
// ShiftRows and MixColumns (bypassed for round 10) and the input selector.
//
// Data flow per block (one ROM access per clock):
//   round 0 : ROM address byte = plaintext byte         -> reg = SB(P ^ K0)
//   round r : ROM address byte = MC(SR(reg)), r = 1..9  -> reg = SB(state_r)
//   round 10: ROM address byte = SR(reg)                -> reg = ciphertext
// The ROM output registers are the state register.
//
// Interface/timing (see round_ctrl): pulse or hold `start` with the
// plaintext on `din` while `busy` is low; 11 cycles later `done` pulses and
// `dout` holds the ciphertext until the next block is started. The ROM
// contents and the loop structure follow the design description; the
// handshake, reset and the default KEY are this design's choices.
module aes_enc_core
  import aes_pkg::*;
#(
  parameter logic [127:0] KEY = DEFAULT_KEY
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t din,     // plaintext
  output logic   busy,
  output logic   done,
  output state_t dout     // ciphertext, valid from `done` on
);

  logic             load, rom_en, first, last;
  logic [RND_W-1:0] round;
  state_t           lin, addr_byte;

  round_ctrl u_ctrl (
    .clk, .rst_n, .start, .load, .rom_en, .round, .first, .last, .busy, .done
  );

  // ShiftRows + MixColumns on the registered state.
  enc_linear u_lin (.d(dout), .last(last), .q(lin));

  // Input selector: new block or looped-back state.
  assign addr_byte = load ? din : lin;

  for (genvar i = 0; i < NBYTES; i++) begin : g_rom
    absorb_rom #(.KEY(KEY), .BYTE_IDX(i), .DECRYPT(1'b0)) u_rom (
      .clk  (clk),
      .en   (rom_en),
      .addr ({round, addr_byte[i]}),
      .dout (dout[i])
    );
  end

  // `first` is used by the decryption loop only.
  logic unused_first;
  assign unused_first = first;

endmodule
