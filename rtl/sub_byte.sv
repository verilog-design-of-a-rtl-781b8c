// sub_byte: AES SubByte / InvSubByte of one byte.
// The multiplicative inverse in GF(2^8) is computed in the composite field
// GF((2^4)^2) rather than read from a 256-entry table: the byte is mapped by
// a fixed linear isomorphism to a pair (ah, al) over GF(2^4), inverted as
//   d = lambda*ah^2 + ah*al + al^2,  inverse = (ah*d^-1, (ah+al)*d^-1),
// and mapped back. The sub-field uses x^4+x+1 and the extension
// y^2+y+lambda with lambda = {1110}; the isomorphism matrices below were
// derived from a root of the AES polynomial in that field (this design's
// choice of field representation). Encryption applies the FIPS-197 affine
// transform after the inversion; decryption applies the inverse affine
// transform before it, so one inverter serves both modes.
// Interface: mode (ENCRYPT/DECRYPT), din, dout. Purely combinational.
module sub_byte
  import aes_pkg::*;
(
  input  aes_mode_e  mode,
  input  logic [7:0] din,
  output logic [7:0] dout
);
  // Row j of each matrix selects the input bits XORed into output bit j.
  localparam logic [7:0] ISO [8] = '{8'h01, 8'hd4, 8'h2e, 8'hb4,
                                     8'h70, 8'hd2, 8'hac, 8'ha0};
  localparam logic [7:0] INV_ISO [8] = '{8'h01, 8'hb0, 8'h92, 8'h52,
                                         8'h1a, 8'h74, 8'h7e, 8'hf4};

  function automatic logic [7:0] lin_map(logic [7:0] v, logic [7:0] m [8]);
    logic [7:0] r;
    for (int j = 0; j < 8; j++) r[j] = ^(v & m[j]);
    return r;
  endfunction

  function automatic logic [7:0] affine(logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_affine(logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r ^ 8'h05;
  endfunction

  logic [7:0] inv_in, comp, comp_inv, inv_out;
  logic [3:0] ah, al, ah_sq, al_sq, ah_sq_l, ah_al, d, d_inv, out_h, out_l;

  assign inv_in = (mode == DECRYPT) ? inv_affine(din) : din;
  assign comp   = lin_map(inv_in, ISO);
  assign ah     = comp[7:4];
  assign al     = comp[3:0];

  gf4_squarer    u_sq_h  (.a(ah), .y(ah_sq));
  gf4_squarer    u_sq_l  (.a(al), .y(al_sq));
  gf4_multiplier u_mul_l (.a(ah_sq), .b(4'he), .y(ah_sq_l));
  gf4_multiplier u_mul_hl(.a(ah), .b(al), .y(ah_al));

  assign d = ah_sq_l ^ ah_al ^ al_sq;

  gf4_inverter   u_inv   (.a(d), .y(d_inv));
  gf4_multiplier u_mul_oh(.a(ah), .b(d_inv), .y(out_h));
  gf4_multiplier u_mul_ol(.a(ah ^ al), .b(d_inv), .y(out_l));

  assign comp_inv = {out_h, out_l};
  assign inv_out  = lin_map(comp_inv, INV_ISO);
  assign dout     = (mode == DECRYPT) ? inv_out : affine(inv_out);
endmodule
