// Key-specific AES-128 decryption core with S-Box absorption.
//
// The inverse cipher is run in the same loop style as the encryption core.
// InvSubBytes is absorbed into the AddRoundKey that follows it, so ROM_i maps
// {round, byte} to byte ^ RKey[10][i] for round 0 (the first AddRoundKey,
// applied to the ciphertext) and to InvSBox(byte) ^ RKey[10-round][i] for
// rounds 1..10. The logic left in the loop is InvMixColumns (bypassed in
// round 1), InvShiftRows and the input selector.
//
// Data flow per block (one ROM access per clock):
//   round 0 : ROM address byte = ciphertext byte         -> reg = C ^ K10
//   round 1 : ROM address byte = ISR(reg)                -> reg = ISB(ISR(.)) ^ K9
//   round r : ROM address byte = ISR(IMC(reg)), r = 2..10 -> reg = ... ^ K(10-r)
// After round 10 the ROM output registers hold the plaintext.
//
// Interface/timing are those of aes_enc_core: `start` with the ciphertext on
// `din` while `busy` is low, `done` pulses 11 cycles later and `dout` holds
// the plaintext. The ROM contents follow the design description; the
// handshake, reset and the default KEY are this design's choices.
module aes_dec_core
  import aes_pkg::*;
#(
  parameter logic [127:0] KEY = DEFAULT_KEY
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t din,     // ciphertext
  output logic   busy,
  output logic   done,
  output state_t dout     // plaintext, valid from `done` on
);

  logic             load, rom_en, first, last;
  logic [RND_W-1:0] round;
  state_t           lin, addr_byte;

  round_ctrl u_ctrl (
    .clk, .rst_n, .start, .load, .rom_en, .round, .first, .last, .busy, .done
  );

  // InvMixColumns (skipped in round 1) + InvShiftRows on the registered state.
  dec_linear u_lin (.d(dout), .first(first), .q(lin));

  assign addr_byte = load ? din : lin;

  for (genvar i = 0; i < NBYTES; i++) begin : g_rom
    absorb_rom #(.KEY(KEY), .BYTE_IDX(i), .DECRYPT(1'b1)) u_rom (
      .clk  (clk),
      .en   (rom_en),
      .addr ({round, addr_byte[i]}),
      .dout (dout[i])
    );
  end

  // `last` is used by the encryption loop only.
  logic unused_last;
  assign unused_last = last;

endmodule
