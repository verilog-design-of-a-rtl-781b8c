// tb_key_module: one key-expansion step for random words in each of its
// three cases (RotWord+SubWord+Rcon, SubWord only, plain XOR), against the
// FIPS-197 formula evaluated with the reference S-box, plus the FIPS-197
// Appendix A.1 step i=4 (w3 = 09cf4f3c, w0 = 2b7e1516 -> a0fafe17).
module tb_key_module;
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
  logic [31:0] prev, back, wout, t, exp;
  logic [3:0]  ridx;
  logic        drs, ds;
  logic [7:0]  rc;
  key_module dut (.prev(prev), .back(back), .rcon_idx(ridx), .do_rot_sub(drs), .do_sub(ds), .wout(wout));
  initial begin
    prev = 32'h09cf4f3c; back = 32'h2b7e1516; ridx = 4'd1; drs = 1'b1; ds = 1'b0; #1;
    checks++; if (wout != 32'ha0fafe17) begin failures++; $display("FAIL A.1 w4 %h", wout); end
    for (int i = 0; i < 600; i++) begin
      prev = $urandom; back = $urandom; ridx = 4'($urandom_range(1, 10));
      drs = (i % 3 == 0); ds = (i % 3 == 1); #1;
      rc = 8'h01;
      for (int j = 1; j < ridx; j++) rc = gmul(rc, 8'h02);
      t = prev;
      if (drs) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rc, 24'h0};
      end else if (ds) t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
      exp = back ^ t;
      checks++;
      if (wout != exp) begin failures++; $display("FAIL case %0d: %h exp %h", i % 3, wout, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
