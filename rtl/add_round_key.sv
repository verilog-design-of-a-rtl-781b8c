// add_round_key: AddRoundKey, the bitwise XOR of the 128-bit state and the
// 128-bit round key. Combinational; the state register is in the
// transformer.
module add_round_key
  import aes_pkg::*;
(
  input  block_t state,
  input  block_t round_key,
  output block_t dout
);
  assign dout = state ^ round_key;
endmodule
