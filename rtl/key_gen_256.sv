// key_gen_256: AES key expander for 256-bit (AES256, Nk=8, 60 words) and
// 128-bit (AES128, Nk=4, 44 words) cipher keys.
// On ctrl.load the cipher key is latched (an AES128 key sits in
// key_in[255:128]). Then, for each cycle with ctrl.en, it produces key word
// w[ctrl.idx]: the first Nk words are the cipher key itself, every later one
// comes from key_module using w[i-1] and w[i-Nk] taken from a window of eight
// reg_32 registers that shifts by one word per step. Each word is written to
// the key RAM in the same cycle (row i/4, column i mod 4), so a full schedule
// takes 4*(Nr+1) clocks: 60 for AES256, 44 for AES128. Word-serial
// expansion is this design's choice.
module key_gen_256
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  key_t       key_in,
  input  ke_ctrl_t   ctrl,
  output logic       ram_we,
  output logic [3:0] ram_waddr,
  output logic [1:0] ram_wword,
  output word_t      ram_wdata
);
  key_t  key_q;
  word_t win [8];     // win[k] = w[i-1-k]
  word_t w_new, w_calc, back;
  logic [3:0] nk, rcon_idx;
  logic [2:0] i_mod;
  logic       do_rot_sub, do_sub;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         key_q <= '0;
    else if (ctrl.load) key_q <= key_in;

  assign nk       = num_key_words(ctrl.spec);
  assign i_mod    = (ctrl.spec == AES256) ? ctrl.idx[2:0] : {1'b0, ctrl.idx[1:0]};
  assign rcon_idx = (ctrl.spec == AES256) ? {1'b0, ctrl.idx[5:3]} : ctrl.idx[5:2];
  assign do_rot_sub = (i_mod == 3'd0);
  assign do_sub     = (ctrl.spec == AES256) && (i_mod == 3'd4);
  assign back       = (ctrl.spec == AES256) ? win[7] : win[3];

  key_module u_key (
    .prev(win[0]), .back(back), .rcon_idx(rcon_idx),
    .do_rot_sub(do_rot_sub), .do_sub(do_sub), .wout(w_calc)
  );

  assign w_new = ({2'b00, ctrl.idx} < 8'(nk)) ? key_q[255 - 32*ctrl.idx[2:0] -: 32] : w_calc;

  word_t win_d [8];
  assign win_d[0] = w_new;
  for (genvar k = 0; k < 8; k++) begin : g_win
    if (k > 0) begin : g_shift
      assign win_d[k] = win[k-1];
    end
    reg_32 u_reg (.clk(clk), .rst_n(rst_n), .en(ctrl.en), .d(win_d[k]), .q(win[k]));
  end

  assign ram_we    = ctrl.en;
  assign ram_waddr = ctrl.idx[5:2];
  assign ram_wword = ctrl.idx[1:0];
  assign ram_wdata = w_new;
endmodule
