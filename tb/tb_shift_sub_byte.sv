// tb_shift_sub_byte: random states in both modes against the reference
// ShiftRows+SubBytes / InvShiftRows+InvSubBytes, and that the decryption
// mode undoes the encryption mode.
module tb_shift_sub_byte;
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
  block_t din, dout, first;
  shift_sub_byte dut (.mode(m), .din(din), .dout(dout));
  initial begin
    for (int i = 0; i < 200; i++) begin
      m = aes_mode_e'(i % 2); din = {$urandom, $urandom, $urandom, $urandom}; #1;
      checks++;
      if (dout != sub_shift(din, m == DECRYPT)) begin failures++; $display("FAIL mode %0d %h -> %h", m, din, dout); end
    end
    // FIPS-197 Appendix B, round 1: 193de3be... -> d42711ae...
    m = ENCRYPT; din = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    checks++; if (dout != 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin failures++; $display("FAIL B round 1 %h", dout); end
    first = dout; m = DECRYPT; din = first; #1;
    checks++; if (dout != 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin failures++; $display("FAIL inverse %h", dout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
