// rcon: AES round constant for key-expansion step j = i/Nk. The value is
// x^(j-1) in GF(2^8) (01, 02, 04, ... 80, 1b, 36 for j = 1..10), the FIPS-197
// table; the full Rcon word is {rcon_byte, 24'h0}. Indices outside 1..10 are
// never used and give 00. Combinational.
module rcon (
  input  logic [3:0] idx,
  output logic [7:0] rcon_byte
);
  always_comb begin
    unique case (idx)
      4'd1:  rcon_byte = 8'h01;
      4'd2:  rcon_byte = 8'h02;
      4'd3:  rcon_byte = 8'h04;
      4'd4:  rcon_byte = 8'h08;
      4'd5:  rcon_byte = 8'h10;
      4'd6:  rcon_byte = 8'h20;
      4'd7:  rcon_byte = 8'h40;
      4'd8:  rcon_byte = 8'h80;
      4'd9:  rcon_byte = 8'h1b;
      4'd10: rcon_byte = 8'h36;
      default: rcon_byte = 8'h00;
    endcase
  end
endmodule
