// Linear part of a decryption round: InvMixColumns, bypassed in the first
// round, followed by InvShiftRows.
//
// The state register of the decryption loop holds the output of an
// AddRoundKey. The next round first undoes MixColumns (not after the first
// AddRoundKey, where `first` selects the bypass) and then InvShiftRows. The
// InvSubBytes step that follows in AES is held in the ROMs, so the result
// goes straight to the ROM address inputs.
//
// Purely combinational. Byte i of the state is row i%4, column i/4.
module dec_linear
  import aes_pkg::*;
(
  input  state_t d,
  input  logic   first,
  output state_t q
);

  state_t imc, mc_in;

  // InvMixColumns: circulant {0e 0b 0d 09}.
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        imc[4*c + r] = gmul(d[4*c + r],       8'h0e)
                     ^ gmul(d[4*c + (r+1)%4], 8'h0b)
                     ^ gmul(d[4*c + (r+2)%4], 8'h0d)
                     ^ gmul(d[4*c + (r+3)%4], 8'h09);
      end
    end
  end

  assign mc_in = first ? d : imc;

  // InvShiftRows: row r is rotated right by r columns.
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        q[4*c + r] = mc_in[4*((c + 4 - r) % 4) + r];
  end

endmodule
