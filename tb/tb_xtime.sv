// tb_xtime: all 256 bytes against GF(2^8) multiplication by 02 from the
// reference multiplier, and FIPS-197 examples 57 -> ae, ae -> 47.
module tb_xtime;
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
  logic [7:0] din, dout;
  xtime dut (.din(din), .dout(dout));
  initial begin
    din = 8'h57; #1; checks++; if (dout != 8'hae) begin failures++; $display("FAIL 57"); end
    din = 8'hae; #1; checks++; if (dout != 8'h47) begin failures++; $display("FAIL ae"); end
    for (int i = 0; i < 256; i++) begin
      din = 8'(i); #1;
      checks++;
      if (dout != gmul(din, 8'h02)) begin failures++; $display("FAIL %h -> %h", din, dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
