// mix_column_byte: one output byte of MixColumn or InvMixColumn.
//   encryption: {02}a ^ {03}b ^ c ^ d
//   decryption: {0e}a ^ {0b}b ^ {0d}c ^ {09}d
// a is the byte in the output's own row, b, c, d the next rows of the same
// column (cyclically). Each input goes through a chain of three xtime units
// giving {02}, {04} and {08} multiples, and the coefficients are sums of
// those. Combinational.
module mix_column_byte
  import aes_pkg::*;
(
  input  aes_mode_e  mode,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [7:0] c,
  input  logic [7:0] d,
  output logic [7:0] y
);
  logic [7:0] v [4];
  logic [7:0] x2 [4];
  logic [7:0] x4 [4];
  logic [7:0] x8 [4];

  assign v[0] = a;
  assign v[1] = b;
  assign v[2] = c;
  assign v[3] = d;

  for (genvar k = 0; k < 4; k++) begin : g_x
    xtime u_x2 (.din(v[k]),  .dout(x2[k]));
    xtime u_x4 (.din(x2[k]), .dout(x4[k]));
    xtime u_x8 (.din(x4[k]), .dout(x8[k]));
  end

  always_comb begin
    if (mode == ENCRYPT)
      y = x2[0] ^ (x2[1] ^ v[1]) ^ v[2] ^ v[3];
    else
      y = (x8[0] ^ x4[0] ^ x2[0]) ^ (x8[1] ^ x2[1] ^ v[1])
        ^ (x8[2] ^ x4[2] ^ v[2])  ^ (x8[3] ^ v[3]);
  end
endmodule
