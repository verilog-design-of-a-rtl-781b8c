// tb_add_round_key: FIPS-197 Appendix B round 1 (046681e5... xor
// a0fafe17... = a49c7ff2...) and random state/key pairs.
module tb_add_round_key;
  import aes_pkg::*;
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
  block_t s, k, y;
  add_round_key dut (.state(s), .round_key(k), .dout(y));
  initial begin
    s = 128'h046681e5e0cb199a48f8d37a2806264c; k = 128'ha0fafe1788542cb123a339392a6c7605; #1;
    checks++; if (y != 128'ha49c7ff2689f352b6b5bea43026a5049) begin failures++; $display("FAIL B %h", y); end
    for (int i = 0; i < 100; i++) begin
      s = {$urandom, $urandom, $urandom, $urandom}; k = {$urandom, $urandom, $urandom, $urandom}; #1;
      checks++;
      for (int b = 0; b < 128; b++) if (y[b] != (s[b] != k[b])) begin failures++; break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
