// Linear part of an encryption round: ShiftRows followed by MixColumns, with
// a bypass of MixColumns for the last round.
//
// In the S-Box-absorbing loop the state register already holds SubBytes'
// output (the S-Box sits inside the ROMs), so only these two steps remain in
// logic between the register and the ROM address inputs. `last` is high when
// the result feeds round 10, where AES skips MixColumns; the bypass
// multiplexer selects the ShiftRows output directly.
//
// Purely combinational. Byte i of the state is row i%4, column i/4.
module enc_linear
  import aes_pkg::*;
(
  input  state_t d,
  input  logic   last,
  output state_t q
);

  state_t sr, mc;

  // ShiftRows: row r is rotated left by r columns.
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[4*c + r] = d[4*((c + r) % 4) + r];
  end

  // MixColumns: each column is multiplied by {02 03 01 01} circulant.
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        mc[4*c + r] = xtime(sr[4*c + r])
                    ^ xtime(sr[4*c + (r+1)%4]) ^ sr[4*c + (r+1)%4]
                    ^ sr[4*c + (r+2)%4]
                    ^ sr[4*c + (r+3)%4];
      end
    end
  end

  assign q = last ? sr : mc;

endmodule
