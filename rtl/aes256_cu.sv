// aes256_cu: control unit of the crypto core.
// FSM states:
//   S_IDLE   : waits for a key (key_valid) or, once round keys exist, a data
//              block (din_valid). A key wins if both are offered. Accepting a
//              block also applies the initial AddRoundKey (tr_ctrl.load).
//   S_KEYEXP : steps the key expander through word 0 .. 4*(Nr+1)-1.
//   S_ROUND  : applies rounds 1..Nr, the last one flagged tr_ctrl.last.
//   S_DONE   : holds dout_valid until dout_ready.
// The key RAM read row rk_addr counts up for encryption and down from Nr for
// decryption. Handshakes are valid/ready: a transfer happens in a cycle where
// both are high. key_ready is high in S_IDLE; din_ready is high in S_IDLE when
// a key schedule is loaded and no key is being offered. Latency of a block is
// Nr+1 clocks from acceptance to dout_valid (15 for AES256, 11 for AES128).
// The state encoding, the handshake and the key priority are this design's
// choices. Lint reports rst_n as used both asynchronously (flip-flop reset)
// and synchronously: the synchronous use is only the 'disable iff' of the
// handshake assertions, which do not synthesize.
module aes256_cu
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       key_valid,
  output logic       key_ready,
  input  aes_spec_e  aes_spec,
  input  logic       din_valid,
  output logic       din_ready,
  input  aes_mode_e  mode,
  output logic       dout_valid,
  input  logic       dout_ready,
  output logic       key_loaded,
  output ke_ctrl_t   ke_ctrl,
  output tr_ctrl_t   tr_ctrl,
  output logic [3:0] rk_addr
);
  typedef enum logic [1:0] {S_IDLE, S_KEYEXP, S_ROUND, S_DONE} state_e;

  state_e     state_q;
  aes_spec_e  spec_q;
  aes_mode_e  mode_q;
  logic [5:0] cnt_q;
  logic       loaded_q;
  logic [3:0] nr;
  logic [5:0] last_word;
  logic       key_fire, din_fire;

  assign nr        = num_rounds(spec_q);
  assign last_word = {nr, 2'b11};  // 4*(Nr+1)-1

  assign key_ready = (state_q == S_IDLE);
  assign din_ready = (state_q == S_IDLE) && loaded_q && !key_valid;
  assign key_fire  = key_valid && key_ready;
  assign din_fire  = din_valid && din_ready;
  assign dout_valid = (state_q == S_DONE);
  assign key_loaded = loaded_q;

  always_comb begin
    ke_ctrl.load = key_fire;
    ke_ctrl.en   = (state_q == S_KEYEXP);
    ke_ctrl.idx  = cnt_q;
    ke_ctrl.spec = spec_q;

    tr_ctrl.load  = din_fire;
    tr_ctrl.round = (state_q == S_ROUND);
    tr_ctrl.last  = (state_q == S_ROUND) && (cnt_q[3:0] == nr);
    tr_ctrl.mode  = (state_q == S_IDLE) ? mode : mode_q;

    if (state_q == S_IDLE)
      rk_addr = (mode == DECRYPT) ? nr : 4'd0;
    else if (mode_q == DECRYPT)
      rk_addr = nr - cnt_q[3:0];
    else
      rk_addr = cnt_q[3:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      spec_q   <= AES256;
      mode_q   <= ENCRYPT;
      cnt_q    <= '0;
      loaded_q <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (key_fire) begin
            spec_q   <= aes_spec;
            loaded_q <= 1'b0;
            cnt_q    <= '0;
            state_q  <= S_KEYEXP;
          end else if (din_fire) begin
            mode_q  <= mode;
            cnt_q   <= 6'd1;
            state_q <= S_ROUND;
          end
        end
        S_KEYEXP: begin
          if (cnt_q == last_word) begin
            loaded_q <= 1'b1;
            state_q  <= S_IDLE;
          end
          cnt_q <= cnt_q + 6'd1;
        end
        S_ROUND: begin
          if (cnt_q[3:0] == nr) state_q <= S_DONE;
          cnt_q <= cnt_q + 6'd1;
        end
        S_DONE: if (dout_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Handshake rules: an offered transfer stays offered until taken, and the
  // result stays valid until taken.
  a_key_hold:  assert property (@(posedge clk) disable iff (!rst_n)
                 key_valid && !key_ready |=> key_valid);
  a_din_hold:  assert property (@(posedge clk) disable iff (!rst_n)
                 din_valid && !din_ready && !key_valid |=> din_valid);
  a_dout_hold: assert property (@(posedge clk) disable iff (!rst_n)
                 dout_valid && !dout_ready |=> dout_valid);
endmodule
