// sbox_word: SubWord / InvSubWord, four sub_byte units side by side on a
// 32-bit word. Used by the key expander (forward mode) and, byte by byte,
// the same unit is used in the round datapath. Combinational.
module sbox_word
  import aes_pkg::*;
(
  input  aes_mode_e mode,
  input  word_t     din,
  output word_t     dout
);
  for (genvar i = 0; i < 4; i++) begin : g_byte
    sub_byte u_sb (.mode(mode), .din(din[8*i +: 8]), .dout(dout[8*i +: 8]));
  end
endmodule
