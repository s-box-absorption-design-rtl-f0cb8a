// One of the sixteen byte ROMs of the key-specific AES circuit with S-Box
// absorption (ROM_0 .. ROM_15).
//
// ROM_i replaces, for state byte i, both the round-key XOR of AddRoundKey and
// the S-Box of the SubBytes step that follows it. The 12-bit address is
// {round number (4 bits), input byte (8 bits)}; rounds 0..10 give
// 11 x 256 = 2816 words of 8 bits. The contents are computed at elaboration
// from the fixed KEY:
//
//   encryption (DECRYPT = 0):
//     ROM[r*256+b] = SBox(b ^ RKey[r][i])      for r = 0..9
//     ROM[r*256+b] = b ^ RKey[10][i]           for r = 10 (last AddRoundKey)
//   decryption (DECRYPT = 1):
//     ROM[r*256+b] = b ^ RKey[10][i]           for r = 0 (first AddRoundKey)
//     ROM[r*256+b] = InvSBox(b) ^ RKey[10-r][i] for r = 1..10
//
// Timing: one synchronous read port with enable, like a block RAM; the word
// at `addr` appears on `dout` after the clock edge at which `en` is high, and
// `dout` holds otherwise. The AES cores use this output register as their
// state register. Contents and address layout follow the design
// description; the synchronous read (block-RAM style) is the configuration
// the description reports as its best, and the enable is this design's
// choice.
module absorb_rom
  import aes_pkg::*;
#(
  parameter logic [127:0] KEY      = DEFAULT_KEY,
  parameter int unsigned  BYTE_IDX = 0,    // which state byte, 0..15
  parameter bit           DECRYPT  = 1'b0
) (
  input  logic              clk,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output byte_t             dout
);

  typedef byte_t rom_t [ROM_DEPTH];

  function automatic rom_t gen_rom(input logic [127:0] key, input int idx, input bit dec);
    rom_t   t;
    rkeys_t rk = key_expand(key);
    byte_t  sb [256];
    for (int v = 0; v < 256; v++)
      sb[v] = dec ? inv_sbox_calc(byte_t'(v)) : sbox_calc(byte_t'(v));
    for (int r = 0; r <= NR; r++) begin
      for (int b = 0; b < 256; b++) begin
        if (!dec)
          t[r*256+b] = (r == NR) ? (byte_t'(b) ^ rkey_byte(rk, NR, idx))
                                 : sb[byte_t'(b) ^ rkey_byte(rk, r, idx)];
        else
          t[r*256+b] = (r == 0)  ? (byte_t'(b) ^ rkey_byte(rk, NR, idx))
                                 : (sb[b] ^ rkey_byte(rk, NR - r, idx));
      end
    end
    return t;
  endfunction

  localparam rom_t ROM = gen_rom(KEY, BYTE_IDX, DECRYPT);

  always_ff @(posedge clk) begin
    if (en) dout <= ROM[addr];
  end

endmodule
