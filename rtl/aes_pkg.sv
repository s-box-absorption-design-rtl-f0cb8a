// Shared types, constants and elaboration-time functions for the key-specific
// AES-128 circuits with S-Box absorption.
//
// The 128-bit AES state is held as sixteen bytes, state[0] being the most
// significant byte (the first byte of a FIPS-197 block). Byte i sits in row
// i%4 and column i/4 of the 4x4 AES state matrix.
//
// Everything that depends on the fixed key is computed here by constant
// functions at elaboration time: the S-Box and its inverse (from the GF(2^8)
// inverse and the affine map, so no table is typed in), the AES-128 key
// expansion and, from these, the contents of the absorbed ROMs. The ROM
// formulas follow the design description; the way of computing the S-Box is
// this implementation's own choice.
package aes_pkg;

  typedef logic [7:0]        byte_t;
  typedef logic [0:15][7:0]  state_t;     // state[0] = bits 127:120
  typedef logic [0:10][127:0] rkeys_t;    // round keys 0 (initial) .. 10

  localparam int unsigned NR        = 10;                 // rounds, 128-bit key
  localparam int unsigned NBYTES    = 16;                 // bytes per block
  localparam int unsigned RND_W     = 4;                  // round-number bits
  localparam int unsigned ADDR_W    = RND_W + 8;          // 12-bit ROM address
  localparam int unsigned ROM_DEPTH = (NR + 1) * 256;     // 11 x 256 = 2816

  // FIPS-197 Appendix B key; only a default, every user overrides it.
  localparam logic [127:0] DEFAULT_KEY = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;

  // Multiplication by x in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gmul(input byte_t a, input byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int k = 0; k < 8; k++) begin
      if (b[k]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic byte_t ginv(input byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int k = 1; k < 8; k++) begin   // 254 = 0b1111_1110
      sq = gmul(sq, sq);
      r  = gmul(r, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(input byte_t a, input int n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic byte_t sbox_calc(input byte_t a);
    byte_t i = ginv(a);
    return i ^ rotl8(i, 1) ^ rotl8(i, 2) ^ rotl8(i, 3) ^ rotl8(i, 4) ^ 8'h63;
  endfunction

  function automatic byte_t inv_sbox_calc(input byte_t a);
    return ginv(rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05);
  endfunction

  // AES-128 key expansion: the eleven round keys of a fixed key.
  function automatic rkeys_t key_expand(input logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    byte_t       rcon = 8'h01;
    rkeys_t      rk;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};                              // RotWord
        t = {sbox_calc(t[31:24]), sbox_calc(t[23:16]),
             sbox_calc(t[15:8]),  sbox_calc(t[7:0])};         // SubWord
        t[31:24] ^= rcon;
        rcon = xtime(rcon);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r <= NR; r++)
      rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  // Byte `idx` of round key `r`.
  function automatic byte_t rkey_byte(input rkeys_t rk, input int r, input int idx);
    return rk[r][127 - 8*idx -: 8];
  endfunction

endpackage
