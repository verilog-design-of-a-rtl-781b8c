// tb_reg_32: reset value, load on enable and hold without it, against a
// model register, over random enable and data sequences.
module tb_reg_32;
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
  logic rst_n = 1'b1, en = 1'b0;
  logic [31:0] d = '0, q, model;
  reg_32 dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));
  initial begin
    #1 rst_n = 1'b0;
    #1;
    checks++; if (q != 0) begin failures++; $display("FAIL reset value %h", q); end
    @(negedge clk); rst_n = 1'b1; model = '0;
    for (int i = 0; i < 300; i++) begin
      en = 1'($urandom); d = $urandom;
      @(posedge clk); if (en) model = d;
      @(negedge clk);
      checks++;
      if (q != model) begin failures++; $display("FAIL q=%h exp %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
