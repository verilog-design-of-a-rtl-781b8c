// key_module: one step of the AES key expansion (FIPS-197 Sec 5.2):
//   w[i] = w[i-Nk] ^ temp, temp = SubWord(RotWord(w[i-1])) ^ Rcon[i/Nk]
//   when i mod Nk = 0, SubWord(w[i-1]) when Nk = 8 and i mod Nk = 4, and
//   w[i-1] otherwise.
// RotWord ([a0,a1,a2,a3] -> [a1,a2,a3,a0], a0 the most significant byte) is
// pure rewiring and is done here on the bus. The caller decodes i into
// do_rot_sub, do_sub and rcon_idx. Combinational.
module key_module
  import aes_pkg::*;
(
  input  word_t      prev,        // w[i-1]
  input  word_t      back,        // w[i-Nk]
  input  logic [3:0] rcon_idx,    // i / Nk
  input  logic       do_rot_sub,  // i mod Nk == 0
  input  logic       do_sub,      // AES256 and i mod 8 == 4
  output word_t      wout         // w[i]
);
  word_t rotated, sub_in, subbed, temp;
  logic [7:0] rc;

  assign rotated = {prev[23:0], prev[31:24]};
  assign sub_in = do_rot_sub ? rotated : prev;
  sbox_word u_sub  (.mode(ENCRYPT), .din(sub_in), .dout(subbed));
  rcon      u_rcon (.idx(rcon_idx), .rcon_byte(rc));

  always_comb begin
    if (do_rot_sub)  temp = subbed ^ {rc, 24'h0};
    else if (do_sub) temp = subbed;
    else             temp = prev;
  end

  assign wout = back ^ temp;
endmodule
