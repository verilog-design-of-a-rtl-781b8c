// mix_column_word: MixColumn / InvMixColumn of one 32-bit state column
// (row 0 in bits [31:24]). Output row r is mix_column_byte applied to rows
// r, r+1, r+2, r+3 (mod 4). Combinational.
module mix_column_word
  import aes_pkg::*;
(
  input  aes_mode_e mode,
  input  word_t     din,
  output word_t     dout
);
  logic [7:0] s [4];
  for (genvar r = 0; r < 4; r++) begin : g_row
    assign s[r] = din[31 - 8*r -: 8];
    mix_column_byte u_b (
      .mode(mode), .a(s[r]), .b(s[(r+1)%4]), .c(s[(r+2)%4]), .d(s[(r+3)%4]),
      .y(dout[31 - 8*r -: 8])
    );
  end
endmodule
