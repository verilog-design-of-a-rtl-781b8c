// tb_mix_column_word: the known column db135345 -> 8e4da1bc, random columns
// in both modes against the reference, and inverse(forward(x)) = x.
module tb_mix_column_word;
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
  word_t din, dout, x;
  mix_column_word dut (.mode(m), .din(din), .dout(dout));
  initial begin
    m = ENCRYPT; din = 32'hdb135345; #1;
    checks++; if (dout != 32'h8e4da1bc) begin failures++; $display("FAIL known %h", dout); end
    m = DECRYPT; din = 32'h8e4da1bc; #1;
    checks++; if (dout != 32'hdb135345) begin failures++; $display("FAIL known inverse %h", dout); end
    for (int i = 0; i < 300; i++) begin
      x = $urandom;
      m = ENCRYPT; din = x; #1;
      checks++; if (dout != mix_word(x, 1'b0)) begin failures++; $display("FAIL enc %h", x); end
      m = DECRYPT; din = dout; #1;
      checks++; if (dout != x) begin failures++; $display("FAIL round trip %h", x); end
      din = x; #1;
      checks++; if (dout != mix_word(x, 1'b1)) begin failures++; $display("FAIL dec %h", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
