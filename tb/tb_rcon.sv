// tb_rcon: round constants for j = 1..10 against x^(j-1) computed by
// repeated GF(2^8) doubling, and 00 for unused indices.
module tb_rcon;
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
  logic [3:0] idx;
  logic [7:0] rc, exp;
  rcon dut (.idx(idx), .rcon_byte(rc));
  initial begin
    exp = 8'h01;
    for (int j = 0; j < 16; j++) begin
      idx = 4'(j); #1;
      checks++;
      if (j >= 1 && j <= 10) begin
        if (rc != exp) begin failures++; $display("FAIL rcon(%0d)=%h exp %h", j, rc, exp); end
        exp = gmul(exp, 8'h02);
      end else if (rc != 8'h00) begin
        failures++; $display("FAIL rcon(%0d)=%h exp 00", j, rc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
