// tb_mix_column_128: random states in both modes against the reference,
// and the FIPS-197 Appendix B round-1 MixColumns (d4bf5d30... -> 046681e5...).
module tb_mix_column_128;
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
  block_t din, dout;
  mix_column_128 dut (.mode(m), .din(din), .dout(dout));
  initial begin
    m = ENCRYPT; din = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1;
    checks++; if (dout != 128'h046681e5e0cb199a48f8d37a2806264c) begin failures++; $display("FAIL B %h", dout); end
    for (int i = 0; i < 200; i++) begin
      m = aes_mode_e'(i % 2); din = {$urandom, $urandom, $urandom, $urandom}; #1;
      checks++;
      if (dout != mix(din, m == DECRYPT)) begin failures++; $display("FAIL mode %0d %h", m, din); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
