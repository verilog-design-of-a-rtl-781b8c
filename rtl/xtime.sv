// xtime: multiplication of a byte by {02} in GF(2^8) modulo the AES
// polynomial x^8+x^4+x^3+x+1: shift left, and XOR 1b when bit 7 fell out.
module xtime (
  input  logic [7:0] din,
  output logic [7:0] dout
);
  assign dout = {din[6:0], 1'b0} ^ (din[7] ? 8'h1b : 8'h00);
endmodule
