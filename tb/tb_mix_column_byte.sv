// tb_mix_column_byte: random byte quadruples in both modes against
// {02}a^{03}b^c^d and {0e}a^{0b}b^{0d}c^{09}d from the reference multiplier.
module tb_mix_column_byte;
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
  aes_mode_e m;
  logic [7:0] a, b, c, d, y, exp;
  mix_column_byte dut (.mode(m), .a(a), .b(b), .c(c), .d(d), .y(y));
  initial begin
    for (int i = 0; i < 1000; i++) begin
      m = aes_mode_e'(i % 2); {a, b, c, d} = $urandom; #1;
      exp = (m == DECRYPT) ? gmul(8'h0e, a) ^ gmul(8'h0b, b) ^ gmul(8'h0d, c) ^ gmul(8'h09, d)
                           : gmul(8'h02, a) ^ gmul(8'h03, b) ^ c ^ d;
      checks++;
      if (y != exp) begin failures++; $display("FAIL mode %0d %h%h%h%h -> %h exp %h", m, a, b, c, d, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
