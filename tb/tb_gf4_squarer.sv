// tb_gf4_squarer: exhaustive test of GF(2^4) squaring against a
// shift-and-add multiplication a*a modulo x^4+x+1.
module tb_gf4_squarer;
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
  function automatic logic [3:0] m4(logic [3:0] a, logic [3:0] b);
    logic [3:0] r = 0, x = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r ^= x;
      x = {x[2:0], 1'b0} ^ (x[3] ? 4'h3 : 4'h0);
    end
    return r;
  endfunction
  logic [3:0] a, y;
  gf4_squarer dut (.a(a), .y(y));
  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 4'(i); #1;
      checks++;
      if (y != m4(a, a)) begin failures++; $display("FAIL sq(%h)=%h", a, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
