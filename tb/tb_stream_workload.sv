// tb_stream_workload: throughput run of the crypto core at its default
// parameters. For each key length (AES256, then AES128) it loads one key,
// encrypts a stream of NBLK random blocks with din_valid and dout_ready held
// high, then decrypts the resulting ciphertexts, and checks every result
// against the aes_ref_pkg model and the round trip against the plaintext.
// It also measures the steady-state rate, which must be exactly Nr+2 clocks
// per block (16 for AES256, 12 for AES128): one clock to accept the block
// with the initial AddRoundKey, Nr round clocks, one clock to hand over the
// result.
module tb_stream_workload;
  import aes_ref_pkg::*;

  localparam int NBLK = 32;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n = 1'b1;
  logic [255:0] key_in = '0;
  logic         aes_spec = 1'b0, key_valid = 1'b0, key_ready;
  logic [127:0] data_in = '0, data_out;
  logic         mode = 1'b0, din_valid = 1'b0, din_ready;
  logic         dout_valid, dout_ready = 1'b1, key_loaded;

  utm_crypto256 dut (.*);

  logic [127:0] src [NBLK];
  logic [127:0] got [NBLK];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Feed NBLK blocks; collect results as they come out.
  task automatic stream(bit dec, output int clocks);
    int nin = 0, nout = 0, t_first = 0;
    @(negedge clk);
    din_valid = 1'b1; mode = dec; data_in = src[0];
    while (nout < NBLK) begin
      @(posedge clk);
      if (din_valid && din_ready) begin
        if (nin == 0) t_first = cycle;
        nin++;
      end
      if (dout_valid && dout_ready) begin got[nout] = data_out; nout++; end
      @(negedge clk);
      din_valid = (nin < NBLK);
      if (nin < NBLK) data_in = src[nin];
    end
    din_valid = 1'b0;
    // clocks from the first acceptance to the last result, plus one
    clocks = cycle - t_first;
  endtask

  task automatic run_spec(bit a128);
    logic [255:0] k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    logic [127:0] pt [NBLK];
    int clocks, nr = a128 ? 10 : 14;
    @(negedge clk);
    key_in = k; aes_spec = a128; key_valid = 1'b1;
    do @(posedge clk); while (!key_ready);
    @(negedge clk); key_valid = 1'b0;
    do @(posedge clk); while (!key_loaded);
    for (int i = 0; i < NBLK; i++) begin
      pt[i] = {$urandom, $urandom, $urandom, $urandom};
      src[i] = pt[i];
    end
    stream(1'b0, clocks);
    checks++;
    if (clocks != NBLK * (nr + 2)) begin
      failures++; $display("FAIL encrypt rate: %0d clocks for %0d blocks", clocks, NBLK);
    end
    $display("AES%0d: %0d blocks encrypted in %0d clocks (%0d clocks/block)", a128 ? 128 : 256, NBLK, clocks, clocks / NBLK);
    for (int i = 0; i < NBLK; i++) begin
      checks++;
      if (got[i] != encrypt(pt[i], k, a128)) begin failures++; $display("FAIL enc block %0d", i); end
      src[i] = got[i];
    end
    stream(1'b1, clocks);
    checks++;
    if (clocks != NBLK * (nr + 2)) begin
      failures++; $display("FAIL decrypt rate: %0d clocks for %0d blocks", clocks, NBLK);
    end
    for (int i = 0; i < NBLK; i++) begin
      checks++;
      if (got[i] != pt[i]) begin failures++; $display("FAIL round trip block %0d", i); end
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run_spec(1'b0);
    run_spec(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
