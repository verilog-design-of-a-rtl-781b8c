// tb_key_gen_256: drives the key expander as the control unit does (load,
// then idx = 0 .. 4*(Nr+1)-1 with en), records every key RAM write and
// compares the words, their row/column addresses and their number with the
// reference key schedule. Covers the FIPS-197 Appendix A.1 (AES128, last word
// b6630ca6) and A.3 (AES256, last word 706c631e) keys and random keys of
// both lengths.
module tb_key_gen_256;
  import aes_pkg::*;
  import aes_ref_pkg::*;
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
  logic       rst_n = 1'b1;
  key_t       key_in = '0;
  ke_ctrl_t   ctrl;
  logic       we;
  logic [3:0] waddr;
  logic [1:0] wword;
  word_t      wdata;
  key_gen_256 dut (.clk(clk), .rst_n(rst_n), .key_in(key_in), .ctrl(ctrl),
                   .ram_we(we), .ram_waddr(waddr), .ram_wword(wword), .ram_wdata(wdata));

  task automatic expand_check(key_t k, bit a128, logic [31:0] last_exp, bit check_last);
    words_t w = expand(k, a128);
    int nw = a128 ? 44 : 60;
    int writes = 0;
    @(negedge clk);
    key_in = k; ctrl = '{load: 1'b1, en: 1'b0, idx: 6'd0, spec: a128 ? AES128 : AES256};
    @(negedge clk);
    ctrl.load = 1'b0;
    key_in = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < nw; i++) begin
      ctrl.en = 1'b1; ctrl.idx = 6'(i); #1;
      if (we) writes++;
      checks++;
      if (!we || wdata != w[i] || waddr != 4'(i / 4) || wword != 2'(i % 4)) begin
        failures++;
        $display("FAIL word %0d: we=%0d row=%0d col=%0d %h exp %h", i, we, waddr, wword, wdata, w[i]);
      end
      if (check_last && i == nw - 1) begin
        checks++;
        if (wdata != last_exp) begin failures++; $display("FAIL last word %h", wdata); end
      end
      @(negedge clk);
    end
    ctrl.en = 1'b0; #1;
    checks++;
    if (we || writes != nw) begin failures++; $display("FAIL write count %0d", writes); end
  endtask

  initial begin
    ctrl = '0;
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    expand_check({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, 1'b1, 32'hb6630ca6, 1'b1);
    expand_check(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4, 1'b0, 32'h706c631e, 1'b1);
    for (int n = 0; n < 8; n++)
      expand_check({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
                   1'(n % 2), 32'h0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
