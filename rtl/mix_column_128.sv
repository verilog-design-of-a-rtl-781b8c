// mix_column_128: MixColumn / InvMixColumn of the whole 128-bit state, four
// mix_column_word units, column 0 in bits [127:96]. Combinational.
module mix_column_128
  import aes_pkg::*;
(
  input  aes_mode_e mode,
  input  block_t    din,
  output block_t    dout
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    mix_column_word u_w (.mode(mode), .din(din[127 - 32*c -: 32]), .dout(dout[127 - 32*c -: 32]));
  end
endmodule
