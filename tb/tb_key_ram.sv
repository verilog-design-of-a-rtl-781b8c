// tb_key_ram: fills all 15 rows with random words written in random order,
// one 32-bit word per clock, then reads every row back and compares it with
// a model array; also checks that a later write to one word leaves the other
// three words of that row unchanged.
module tb_key_ram;
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
  logic        we = 1'b0;
  logic [3:0]  waddr = '0, raddr = '0;
  logic [1:0]  wword = '0;
  logic [31:0] wdata = '0;
  logic [127:0] rdata;
  logic [31:0] model [15][4];
  int order [60];
  key_ram dut (.clk(clk), .we(we), .waddr(waddr), .wword(wword), .wdata(wdata), .raddr(raddr), .rdata(rdata));
  initial begin
    for (int i = 0; i < 60; i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(order[i] / 4); wword = 2'(order[i] % 4); wdata = $urandom;
      model[order[i] / 4][order[i] % 4] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int r = 0; r < 15; r++) begin
      raddr = 4'(r); #1;
      checks++;
      if (rdata != {model[r][0], model[r][1], model[r][2], model[r][3]}) begin
        failures++; $display("FAIL row %0d: %h", r, rdata);
      end
    end
    @(negedge clk); we = 1'b1; waddr = 4'd7; wword = 2'd2; wdata = 32'hdeadbeef; model[7][2] = wdata;
    @(negedge clk); we = 1'b0; raddr = 4'd7; #1;
    checks++;
    if (rdata != {model[7][0], model[7][1], model[7][2], model[7][3]}) begin
      failures++; $display("FAIL word write row 7: %h", rdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
