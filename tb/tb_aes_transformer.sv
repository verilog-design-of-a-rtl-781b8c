// tb_aes_transformer: runs whole encryptions and decryptions through the
// round datapath, supplying round keys from the reference key schedule in
// the order the control unit uses (forward to encrypt, backward to decrypt).
// The state after every round is compared with the reference round function,
// the result with the reference cipher, for AES128 and AES256, including the
// FIPS-197 Appendix B example (round 1 state a49c7ff2..., ciphertext
// 3925841d...). Also checks that the state holds when no control is given.
module tb_aes_transformer;
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
  logic     rst_n = 1'b1;
  block_t   data_in = '0, rk_in = '0, state_out;
  tr_ctrl_t ctrl;
  aes_transformer dut (.clk(clk), .rst_n(rst_n), .data_in(data_in), .round_key(rk_in),
                       .ctrl(ctrl), .state_out(state_out));

  task automatic run(logic [127:0] blk, logic [255:0] k, bit a128, bit dec, output logic [127:0] res);
    words_t w = expand(k, a128);
    int nr = a128 ? 10 : 14;
    logic [127:0] s;
    @(negedge clk);
    data_in = blk; rk_in = round_key_of(w, dec ? nr : 0);
    ctrl = '{load: 1'b1, round: 1'b0, last: 1'b0, mode: dec ? DECRYPT : ENCRYPT};
    s = blk ^ rk_in;
    @(negedge clk);
    data_in = {$urandom, $urandom, $urandom, $urandom};
    checks++; if (state_out != s) begin failures++; $display("FAIL initial ARK"); end
    for (int r = 1; r <= nr; r++) begin
      rk_in = round_key_of(w, dec ? nr - r : r);
      ctrl = '{load: 1'b0, round: 1'b1, last: (r == nr), mode: dec ? DECRYPT : ENCRYPT};
      if (r == nr)  s = sub_shift(s, dec) ^ rk_in;
      else if (dec) s = mix(sub_shift(s, 1'b1) ^ rk_in, 1'b1);
      else          s = mix(sub_shift(s, 1'b0), 1'b0) ^ rk_in;
      @(negedge clk);
      checks++;
      if (state_out != s) begin failures++; $display("FAIL dec=%0d round %0d: %h exp %h", dec, r, state_out, s); end
    end
    ctrl = '0;
    repeat (2) @(negedge clk);
    checks++; if (state_out != s) begin failures++; $display("FAIL hold"); end
    res = state_out;
  endtask

  function automatic logic [127:0] round_key_of(words_t w, int r);
    return round_key(w, r);
  endfunction

  logic [127:0] pt, res;
  logic [255:0] k;
  initial begin
    ctrl = '0;
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    k = {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0};
    pt = 128'h3243f6a8885a308d313198a2e0370734;
    run(pt, k, 1'b1, 1'b0, res);
    checks++; if (res != 128'h3925841d02dc09fbdc118597196a0b32) begin failures++; $display("FAIL B ct %h", res); end
    run(res, k, 1'b1, 1'b1, res);
    checks++; if (res != pt) begin failures++; $display("FAIL B pt %h", res); end
    for (int n = 0; n < 12; n++) begin
      bit a128 = 1'(n % 2);
      bit dec = 1'(n / 2 % 2);
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      pt = {$urandom, $urandom, $urandom, $urandom};
      run(pt, k, a128, dec, res);
      checks++;
      if (res != (dec ? decrypt(pt, k, a128) : encrypt(pt, k, a128))) begin
        failures++; $display("FAIL random %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
