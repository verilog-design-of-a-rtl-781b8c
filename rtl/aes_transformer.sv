// aes_transformer: the AES round datapath, iterative with one full round per
// clock around a 128-bit state register.
//   ctrl.load : state <= data_in ^ round_key            (initial AddRoundKey)
//   ctrl.round, encryption : state <= MixColumn(ShiftSub(state)) ^ round_key
//   ctrl.round, decryption : state <= InvMixColumn(InvShiftSub(state) ^ round_key)
//   ctrl.round with ctrl.last : state <= ShiftSub(state) ^ round_key (no MixColumn)
// Decryption is the FIPS-197 inverse cipher, so it uses the unmodified round
// keys in reverse order. Two add_round_key instances (one before and one after
// the MixColumn unit) keep the datapath free of combinational loops.
// state_out is the state register; the round key must be valid in the cycle
// the control vector is applied.
module aes_transformer
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  block_t   data_in,
  input  block_t   round_key,
  input  tr_ctrl_t ctrl,
  output block_t   state_out
);
  block_t state_q, ss, ark1_in, ark1, mc_in, mc, ark2, state_d;

  shift_sub_byte u_ssb (.mode(ctrl.mode), .din(state_q), .dout(ss));

  assign ark1_in = ctrl.load ? data_in : ss;
  add_round_key  u_ark1 (.state(ark1_in), .round_key(round_key), .dout(ark1));

  assign mc_in = (ctrl.mode == DECRYPT) ? ark1 : ss;
  mix_column_128 u_mc (.mode(ctrl.mode), .din(mc_in), .dout(mc));

  add_round_key  u_ark2 (.state(mc), .round_key(round_key), .dout(ark2));

  always_comb begin
    if (ctrl.load || ctrl.last)      state_d = ark1;
    else if (ctrl.mode == ENCRYPT)   state_d = ark2;
    else                             state_d = mc;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                        state_q <= '0;
    else if (ctrl.load || ctrl.round)  state_q <= state_d;

  assign state_out = state_q;
endmodule
