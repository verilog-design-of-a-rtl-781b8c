// tb_gf4_multiplier: all 256 operand pairs against a shift-and-add
// multiplier modulo x^4+x+1.
module tb_gf4_multiplier;
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
  logic [3:0] a, b, y;
  gf4_multiplier dut (.a(a), .b(b), .y(y));
  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i); #1;
      checks++;
      if (y != m4(a, b)) begin failures++; $display("FAIL %h*%h=%h", a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
