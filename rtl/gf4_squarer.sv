// gf4_squarer: squaring in GF(2^4) with field polynomial x^4+x+1.
// Squaring is linear over GF(2): (a3 x^3 + a2 x^2 + a1 x + a0)^2
// = a3 x^6 + a2 x^4 + a1 x^2 + a0, reduced with x^4 = x+1, x^6 = x^3+x^2.
// Purely combinational, four XOR-level outputs.
module gf4_squarer (
  input  logic [3:0] a,
  output logic [3:0] y
);
  assign y[3] = a[3];
  assign y[2] = a[1] ^ a[3];
  assign y[1] = a[2];
  assign y[0] = a[0] ^ a[2];
endmodule
