// tb_sub_byte: all 256 bytes in both modes against the S-box computed from
// its definition (exhaustive inverse search plus affine transform), and the
// FIPS-197 example S(53) = ed.
module tb_sub_byte;
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
  logic [7:0] din, dout;
  sub_byte dut (.mode(m), .din(din), .dout(dout));
  initial begin
    m = ENCRYPT; din = 8'h53; #1;
    checks++; if (dout != 8'hed) begin failures++; $display("FAIL S(53)=%h", dout); end
    for (int i = 0; i < 512; i++) begin
      m = aes_mode_e'(i / 256); din = 8'(i); #1;
      checks++;
      if (dout != (m == DECRYPT ? inv_sbox(din) : sbox(din))) begin
        failures++; $display("FAIL mode %0d S(%h)=%h", m, din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
