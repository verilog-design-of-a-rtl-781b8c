// tb_aes256_cu: exercises the control unit alone. Checks the handshake
// readiness rules (no data accepted before a key schedule exists; a key wins
// over a block offered at the same time), the key-expansion sequence (one
// load pulse, then word indices 0 .. 4*(Nr+1)-1 on consecutive clocks, 60 for
// AES256 and 44 for AES128), the round sequence (initial load, rounds 1..Nr
// with 'last' only on round Nr), the key RAM row order (0..Nr to encrypt,
// Nr..0 to decrypt), the block latency of Nr+1 clocks, and that dout_valid
// holds while dout_ready is low.
module tb_aes256_cu;
  import aes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst_n = 1'b1, key_valid = 1'b0, din_valid = 1'b0, dout_ready = 1'b0;
  logic key_ready, din_ready, dout_valid, key_loaded;
  aes_spec_e spec = AES256;
  aes_mode_e mode = ENCRYPT;
  ke_ctrl_t ke;
  tr_ctrl_t tr;
  logic [3:0] rk_addr;
  aes256_cu dut (.clk(clk), .rst_n(rst_n), .key_valid(key_valid), .key_ready(key_ready),
                 .aes_spec(spec), .din_valid(din_valid), .din_ready(din_ready), .mode(mode),
                 .dout_valid(dout_valid), .dout_ready(dout_ready), .key_loaded(key_loaded),
                 .ke_ctrl(ke), .tr_ctrl(tr), .rk_addr(rk_addr));

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic key_seq(aes_spec_e s);
    int nw = (s == AES256) ? 60 : 44;
    @(negedge clk);
    spec = s; key_valid = 1'b1; #1;
    chk("key_ready in idle", key_ready);
    chk("load pulse", ke.load && !ke.en);
    @(negedge clk);
    key_valid = 1'b0;
    spec = (s == AES256) ? AES128 : AES256;  // must have been latched
    for (int i = 0; i < nw; i++) begin
      #1;
      chk("expansion step", ke.en && !ke.load && ke.idx == 6'(i) && ke.spec == s && !key_ready && !key_loaded);
      @(negedge clk);
    end
    #1;
    chk("expansion ends", !ke.en && key_loaded && key_ready && din_ready);
  endtask

  task automatic block_seq(int nr, aes_mode_e md, int stall);
    @(negedge clk);
    mode = md; din_valid = 1'b1; #1;
    chk("din_ready", din_ready);
    chk("initial load", tr.load && !tr.round && tr.mode == md && rk_addr == ((md == DECRYPT) ? 4'(nr) : 4'd0));
    @(negedge clk);
    din_valid = 1'b0;
    mode = (md == DECRYPT) ? ENCRYPT : DECRYPT;
    for (int r = 1; r <= nr; r++) begin
      #1;
      chk("round step", tr.round && !tr.load && tr.mode == md && (tr.last == (r == nr)) &&
          rk_addr == ((md == DECRYPT) ? 4'(nr - r) : 4'(r)) && !dout_valid && !din_ready);
      @(negedge clk);
    end
    // dout_valid is now up: nr+1 clocks after acceptance
    for (int i = 0; i < stall; i++) begin
      #1; chk("dout_valid held", dout_valid && !tr.round && !din_ready);
      @(negedge clk);
    end
    dout_ready = 1'b1; #1;
    chk("dout_valid", dout_valid);
    @(negedge clk);
    dout_ready = 1'b0; #1;
    chk("back to idle", !dout_valid && din_ready);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1;
    chk("reset: no key", key_ready && !din_ready && !key_loaded && !dout_valid);
    @(negedge clk); rst_n = 1'b1;
    #1;
    chk("no block before key", !din_ready && !tr.load && !tr.round);
    key_seq(AES256);
    block_seq(14, ENCRYPT, 3);
    block_seq(14, DECRYPT, 0);
    // key and block together: key wins
    @(negedge clk);
    din_valid = 1'b1; #1;
    chk("block alone ready", din_ready);
    din_valid = 1'b0;
    key_seq(AES128);
    block_seq(10, DECRYPT, 2);
    block_seq(10, ENCRYPT, 0);
    @(negedge clk);
    din_valid = 1'b1; key_valid = 1'b1; #1;
    chk("key priority", key_ready && !din_ready && ke.load && !tr.load);
    @(negedge clk);
    key_valid = 1'b0; din_valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
