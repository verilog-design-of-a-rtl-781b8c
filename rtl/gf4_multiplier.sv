// gf4_multiplier: multiplication in GF(2^4), field polynomial x^4+x+1.
// Step 1 forms the 7-bit carry-less product of the two operands; step 2
// folds bits 6..4 back into the low nibble using x^4 = x+1. Combinational.
module gf4_multiplier (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] y
);
  logic [6:0] p;

  always_comb begin
    p = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p = p ^ (7'(a) << i);
  end

  // x^4 = x+1, x^5 = x^2+x, x^6 = x^3+x^2
  assign y[0] = p[0] ^ p[4];
  assign y[1] = p[1] ^ p[4] ^ p[5];
  assign y[2] = p[2] ^ p[5] ^ p[6];
  assign y[3] = p[3] ^ p[6];
endmodule
