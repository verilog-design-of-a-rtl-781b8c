// gf4_inverter: multiplicative inverse in GF(2^4), field polynomial x^4+x+1.
// A 16-entry table (0 maps to 0), the small lookup used inside the
// composite-field S-box. Purely combinational. The table values are the
// inverses for x^4+x+1, which is this design's choice of sub-field.
module gf4_inverter (
  input  logic [3:0] a,
  output logic [3:0] y
);
  always_comb begin
    unique case (a)
      4'h0: y = 4'h0;  4'h1: y = 4'h1;  4'h2: y = 4'h9;  4'h3: y = 4'he;
      4'h4: y = 4'hd;  4'h5: y = 4'hb;  4'h6: y = 4'h7;  4'h7: y = 4'h6;
      4'h8: y = 4'hf;  4'h9: y = 4'h2;  4'ha: y = 4'hc;  4'hb: y = 4'h5;
      4'hc: y = 4'ha;  4'hd: y = 4'h4;  4'he: y = 4'h3;  4'hf: y = 4'h8;
      default: y = 4'h0;
    endcase
  end
endmodule
