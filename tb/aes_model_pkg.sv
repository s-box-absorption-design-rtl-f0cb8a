// Reference model of AES-128 for the testbenches, written independently of
// the RTL package: the S-Box is built from exp/log tables of the generator 03
// (instead of a^254), and encryption and decryption follow FIPS-197
// step by step on a 4x4 byte matrix. Blocks are 128-bit vectors whose most
// significant byte is byte 0 (row 0, column 0).
package aes_model_pkg;

  typedef logic [7:0] u8;
  typedef u8 mat_t [4][4];   // [row][col]

  function automatic u8 mul2(input u8 a);
    return (a << 1) ^ ((a & 8'h80) != 0 ? 8'h1b : 8'h00);
  endfunction

  function automatic u8 mul(input u8 a, input u8 b);
    u8 p = 0;
    for (int k = 0; k < 8; k++) begin
      if (((b >> k) & 1) != 0) p = p ^ a;
      a = mul2(a);
    end
    return p;
  endfunction

  // S-Box and inverse from exp/log tables of generator 03, built on first use.
  u8  sb_tab  [256];
  u8  isb_tab [256];
  bit tab_ok = 1'b0;

  function automatic void build_tables();
    u8 ex [256];
    int lg [256];
    u8 inv, s;
    u8 g = 1;
    for (int k = 0; k < 255; k++) begin
      ex[k] = g;
      lg[g] = k;
      g = mul(g, 8'h03);
    end
    for (int x = 0; x < 256; x++) begin
      inv = (x == 0) ? 8'h00 : ex[(255 - lg[x]) % 255];
      s = 8'h63;
      for (int k = 0; k < 5; k++) s ^= u8'((inv << k) | (inv >> (8 - k)));
      sb_tab[x] = s;
      isb_tab[s] = u8'(x);
    end
    tab_ok = 1'b1;
  endfunction

  function automatic u8 sbox(input u8 x);
    if (!tab_ok) build_tables();
    return sb_tab[x];
  endfunction

  function automatic u8 inv_sbox(input u8 y);
    if (!tab_ok) build_tables();
    return isb_tab[y];
  endfunction

  function automatic mat_t to_mat(input logic [127:0] b);
    mat_t m;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        m[r][c] = b[127 - 8*(4*c + r) -: 8];
    return m;
  endfunction

  function automatic logic [127:0] from_mat(input mat_t m);
    logic [127:0] b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        b[127 - 8*(4*c + r) -: 8] = m[r][c];
    return b;
  endfunction

  typedef logic [127:0] rk_t [11];

  function automatic rk_t expand(input logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    u8 rc = 1;
    rk_t rk;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0]), sbox(t[31:24])};
        t = t ^ {rc, 24'h0};
        rc = mul2(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic mat_t sub_bytes(input mat_t m, input bit inv);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        m[r][c] = inv ? inv_sbox(m[r][c]) : sbox(m[r][c]);
    return m;
  endfunction

  function automatic mat_t shift_rows(input mat_t m, input bit inv);
    mat_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[r][c] = m[r][(c + r) % 4];
        else      o[r][(c + r) % 4] = m[r][c];
    return o;
  endfunction

  function automatic mat_t mix_columns(input mat_t m, input bit inv);
    mat_t o;
    u8 k0, k1, k2, k3;
    k0 = inv ? 8'h0e : 8'h02;  k1 = inv ? 8'h0b : 8'h03;
    k2 = inv ? 8'h0d : 8'h01;  k3 = inv ? 8'h09 : 8'h01;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[r][c] = mul(m[r][c], k0) ^ mul(m[(r+1)%4][c], k1)
                ^ mul(m[(r+2)%4][c], k2) ^ mul(m[(r+3)%4][c], k3);
    return o;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    rk_t rk = expand(key);
    logic [127:0] s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      mat_t m = to_mat(s);
      m = sub_bytes(m, 0);
      m = shift_rows(m, 0);
      if (r != 10) m = mix_columns(m, 0);
      s = from_mat(m) ^ rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] key, input logic [127:0] ct);
    rk_t rk = expand(key);
    logic [127:0] s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      mat_t m = to_mat(s);
      m = shift_rows(m, 1);
      m = sub_bytes(m, 1);
      s = from_mat(m) ^ rk[r];
      if (r != 0) s = from_mat(mix_columns(to_mat(s), 1));
    end
    return s;
  endfunction

endpackage
