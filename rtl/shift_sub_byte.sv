// shift_sub_byte: ShiftRows followed by SubBytes (encryption) or
// InvShiftRows followed by InvSubBytes (decryption) on the 128-bit state.
// Both steps act on bytes independently, so they are merged: output byte
// (row r, column c) is the S-box image of input byte (r, c+r mod 4) when
// encrypting and (r, c-r mod 4) when decrypting. Byte (r,c) of the state is
// bits [127-8*(4c+r) -: 8] (FIPS-197 input order). 16 sub_byte units;
// combinational.
module shift_sub_byte
  import aes_pkg::*;
(
  input  aes_mode_e mode,
  input  block_t    din,
  output block_t    dout
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int CE = (c + r) % 4;      // source column, encryption
      localparam int CD = (c + 4 - r) % 4;  // source column, decryption
      logic [7:0] src;
      assign src = (mode == DECRYPT) ? din[127 - 8*(4*CD + r) -: 8]
                                     : din[127 - 8*(4*CE + r) -: 8];
      sub_byte u_sb (.mode(mode), .din(src), .dout(dout[127 - 8*(4*c + r) -: 8]));
    end
  end
endmodule
