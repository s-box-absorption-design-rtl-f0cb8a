// Key-specific AES-128 encryption/decryption circuit with S-Box absorption.
//
// The absorbed ROM contents differ between encryption (S-Box after the key
// XOR) and decryption (inverse S-Box before it), so the two directions
// cannot share their ROMs: this circuit holds a complete encryption core and
// a complete decryption core, 2 x 16 byte ROMs of 2816 x 8 bits, both built
// for the same fixed KEY.
//
// Interface/timing: while `busy` is low, `start` with `decrypt` and the input
// block on `din` starts one block in the selected direction (decrypt = 0:
// din is plaintext; decrypt = 1: din is ciphertext). Eleven cycles later
// `done` pulses and `dout` carries the result; it stays there until the next
// start. The direction of the last started block selects which core drives
// `dout`. Two separate ROM sets follow the design description; the single
// shared port with a direction input is this design's choice.
module aes_encdec_top
  import aes_pkg::*;
#(
  parameter logic [127:0] KEY = DEFAULT_KEY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         decrypt,
  input  logic [127:0] din,
  output logic         busy,
  output logic         done,
  output logic [127:0] dout
);

  logic   enc_start, dec_start, enc_busy, dec_busy, enc_done, dec_done;
  state_t enc_out, dec_out;
  logic   mode_dec;   // direction of the block in flight / last finished

  assign busy      = enc_busy || dec_busy;
  assign enc_start = start && !busy && !decrypt;
  assign dec_start = start && !busy &&  decrypt;

  always_ff @(posedge clk) begin
    if (!rst_n)              mode_dec <= 1'b0;
    else if (start && !busy) mode_dec <= decrypt;
  end

  aes_enc_core #(.KEY(KEY)) u_enc (
    .clk, .rst_n, .start(enc_start), .din(state_t'(din)),
    .busy(enc_busy), .done(enc_done), .dout(enc_out)
  );

  aes_dec_core #(.KEY(KEY)) u_dec (
    .clk, .rst_n, .start(dec_start), .din(state_t'(din)),
    .busy(dec_busy), .done(dec_done), .dout(dec_out)
  );

  assign done = enc_done || dec_done;
  assign dout = mode_dec ? dec_out : enc_out;

  always_ff @(posedge clk) begin
    if (rst_n) a_one_core: assert (!(enc_busy && dec_busy))
      else $error("aes_encdec_top: both cores busy");
  end

endmodule
