// tb_sbox_word: random words in both modes against the reference S-box
// applied byte by byte.
module tb_sbox_word;
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
  logic [31:0] din, dout, exp;
  sbox_word dut (.mode(m), .din(din), .dout(dout));
  initial begin
    for (int i = 0; i < 400; i++) begin
      m = aes_mode_e'(i % 2); din = $urandom; #1;
      for (int b = 0; b < 4; b++)
        exp[8*b +: 8] = (m == DECRYPT) ? inv_sbox(din[8*b +: 8]) : sbox(din[8*b +: 8]);
      checks++;
      if (dout != exp) begin failures++; $display("FAIL %h -> %h exp %h", din, dout, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
