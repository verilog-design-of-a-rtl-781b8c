// utm_crypto256: AES crypto processor core, 128-bit blocks with 256-bit
// (AES256) or 128-bit (AES128) keys, encryption and decryption.
// A control unit (aes256_cu) accepts a key over a valid/ready handshake and
// runs the word-serial key expander (key_gen_256), which fills the round-key
// RAM (key_ram). The schedule is then reused for any number of blocks: each
// block is accepted over a second valid/ready handshake, passed through the
// iterative round datapath (aes_transformer, one round per clock) with round
// keys read forward (encrypt) or backward (decrypt), and presented on
// data_out with dout_valid until dout_ready.
// Timing: key load 1 clock + 60 (AES256) or 44 (AES128) clocks of expansion;
// a block takes Nr+1 clocks from acceptance to dout_valid and at least Nr+2
// clocks per block back to back. aes_spec: 0 AES256, 1 AES128 (the AES128 key
// in key_in[255:128]); mode: 0 encrypt, 1 decrypt. Byte 0 of a block or key is
// its most significant byte.
module utm_crypto256
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // key channel
  input  logic [255:0] key_in,
  input  logic         aes_spec,
  input  logic         key_valid,
  output logic         key_ready,
  // data input channel
  input  logic [127:0] data_in,
  input  logic         mode,
  input  logic         din_valid,
  output logic         din_ready,
  // result channel
  output logic [127:0] data_out,
  output logic         dout_valid,
  input  logic         dout_ready,
  output logic         key_loaded
);
  ke_ctrl_t   ke_ctrl;
  tr_ctrl_t   tr_ctrl;
  logic [3:0] rk_addr;
  logic       ram_we;
  logic [3:0] ram_waddr;
  logic [1:0] ram_wword;
  word_t      ram_wdata;
  block_t     round_key;

  aes256_cu u_cu (
    .clk(clk), .rst_n(rst_n),
    .key_valid(key_valid), .key_ready(key_ready), .aes_spec(aes_spec_e'(aes_spec)),
    .din_valid(din_valid), .din_ready(din_ready), .mode(aes_mode_e'(mode)),
    .dout_valid(dout_valid), .dout_ready(dout_ready), .key_loaded(key_loaded),
    .ke_ctrl(ke_ctrl), .tr_ctrl(tr_ctrl), .rk_addr(rk_addr)
  );

  key_gen_256 u_keygen (
    .clk(clk), .rst_n(rst_n), .key_in(key_in), .ctrl(ke_ctrl),
    .ram_we(ram_we), .ram_waddr(ram_waddr), .ram_wword(ram_wword), .ram_wdata(ram_wdata)
  );

  key_ram u_ram (  // default 15 rows: the AES256 schedule
    .clk(clk), .we(ram_we), .waddr(ram_waddr), .wword(ram_wword), .wdata(ram_wdata),
    .raddr(rk_addr), .rdata(round_key)
  );

  aes_transformer u_tr (
    .clk(clk), .rst_n(rst_n), .data_in(data_in), .round_key(round_key),
    .ctrl(tr_ctrl), .state_out(data_out)
  );
endmodule
