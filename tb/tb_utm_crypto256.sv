// tb_utm_crypto256: end-to-end test of the crypto core at its default
// parameters. Acts as the host: loads keys over the key handshake, sends
// blocks, and takes results with randomly delayed dout_ready.
// Checks: FIPS-197 Appendix C known answers for AES128 and AES256 in both
// directions; random keys and blocks against the aes_ref_pkg model for both
// key lengths and both modes; key expansion time 4*(Nr+1) clocks; block
// latency Nr+1 clocks. Each mechanism (AES256 and AES128 expansion,
// encryption, decryption, key reuse over several blocks, a mode switch under
// one key, output stall, key offered together with a block) is counted and
// must occur at least once.
module tb_utm_crypto256;
  import aes_ref_pkg::*;

  localparam int NRAND = 24;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic [255:0] key_in = '0;
  logic         aes_spec = 1'b0;
  logic         key_valid = 1'b0;
  logic         key_ready;
  logic [127:0] data_in = '0;
  logic         mode = 1'b0;
  logic         din_valid = 1'b0;
  logic         din_ready;
  logic [127:0] data_out;
  logic         dout_valid;
  logic         dout_ready = 1'b0;
  logic         key_loaded;

  utm_crypto256 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_exp256 = 0, n_exp128 = 0, n_enc = 0, n_dec = 0, n_reuse = 0;
  int n_switch = 0, n_stall = 0, n_keyprio = 0;
  int blocks_this_key = 0;
  logic last_mode = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (dout_valid && !dout_ready) n_stall <= n_stall + 1;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic load_key(logic [255:0] k, bit aes128);
    int t0;
    @(negedge clk);
    key_in = k; aes_spec = aes128; key_valid = 1'b1;
    do @(posedge clk); while (!key_ready);
    t0 = cycle;
    @(negedge clk);
    key_valid = 1'b0;
    key_in = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    do @(posedge clk); while (!key_loaded);
    check_int("key expansion clocks", cycle - t0 - 1, aes128 ? 44 : 60);
    if (aes128) n_exp128++; else n_exp256++;
    blocks_this_key = 0;
  endtask

  task automatic run_block(logic [127:0] d, bit dec, output logic [127:0] res, input bit aes128);
    int t0, wait_n;
    @(negedge clk);
    data_in = d; mode = dec; din_valid = 1'b1;
    do @(posedge clk); while (!din_ready);
    t0 = cycle;
    @(negedge clk);
    din_valid = 1'b0;
    data_in = {$urandom, $urandom, $urandom, $urandom};
    mode = 1'($urandom);
    wait_n = $urandom_range(0, 3);
    do @(posedge clk); while (!dout_valid);
    check_int("block latency", cycle - t0, aes128 ? 11 : 15);
    repeat (wait_n) @(negedge clk);
    @(negedge clk);
    dout_ready = 1'b1;
    @(posedge clk);
    res = data_out;
    @(negedge clk);
    dout_ready = 1'b0;
    if (dec) n_dec++; else n_enc++;
    blocks_this_key++;
    if (blocks_this_key == 2) n_reuse++;
    if (blocks_this_key >= 2 && dec != last_mode) n_switch++;
    last_mode = dec;
  endtask

  logic [255:0] k;
  logic [127:0] pt, ct, res;
  bit a128;

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // FIPS-197 C.1: AES-128
    k  = {128'h000102030405060708090a0b0c0d0e0f, 128'h0};
    pt = 128'h00112233445566778899aabbccddeeff;
    load_key(k, 1'b1);
    run_block(pt, 1'b0, res, 1'b1);
    check("C.1 encrypt", res, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run_block(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1'b1, res, 1'b1);
    check("C.1 decrypt", res, pt);

    // FIPS-197 C.3: AES-256
    k = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    load_key(k, 1'b0);
    run_block(pt, 1'b0, res, 1'b0);
    check("C.3 encrypt", res, 128'h8ea2b7ca516745bfeafc49904b496089);
    run_block(128'h8ea2b7ca516745bfeafc49904b496089, 1'b1, res, 1'b0);
    check("C.3 decrypt", res, pt);

    // A key and a block offered in the same cycle: the key must win.
    @(negedge clk);
    data_in = pt; mode = 1'b0; din_valid = 1'b1;
    key_in = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
    aes_spec = 1'b0; key_valid = 1'b1;
    @(posedge clk);
    checks++;
    if (!(key_ready && !din_ready)) begin failures++; $display("FAIL key priority"); end
    else n_keyprio++;
    @(negedge clk);
    key_valid = 1'b0;
    do @(posedge clk); while (!key_loaded);
    while (!din_ready) @(posedge clk);
    @(negedge clk);
    din_valid = 1'b0;
    do @(posedge clk); while (!dout_valid);
    @(negedge clk); dout_ready = 1'b1; @(posedge clk);
    check("key-priority block", data_out,
          encrypt(pt, 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4, 1'b0));
    @(negedge clk); dout_ready = 1'b0;

    // Random keys and blocks, both key lengths, both directions.
    for (int n = 0; n < NRAND; n++) begin
      a128 = 1'(n % 2);
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      if (a128) k[127:0] = {$urandom, $urandom, $urandom, $urandom};  // ignored half
      load_key(k, a128);
      for (int b = 0; b < 3; b++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        ct = encrypt(pt, k, a128);
        if ($urandom_range(0, 1) == 0) begin
          run_block(pt, 1'b0, res, a128);
          check("random encrypt", res, ct);
        end else begin
          run_block(ct, 1'b1, res, a128);
          check("random decrypt", res, pt);
        end
      end
    end

    $display("mechanisms: exp256=%0d exp128=%0d enc=%0d dec=%0d reuse=%0d switch=%0d stall=%0d keyprio=%0d",
             n_exp256, n_exp128, n_enc, n_dec, n_reuse, n_switch, n_stall, n_keyprio);
    checks++; if (n_exp256 == 0) begin failures++; $display("FAIL no AES256 expansion"); end
    checks++; if (n_exp128 == 0) begin failures++; $display("FAIL no AES128 expansion"); end
    checks++; if (n_enc == 0)    begin failures++; $display("FAIL no encryption"); end
    checks++; if (n_dec == 0)    begin failures++; $display("FAIL no decryption"); end
    checks++; if (n_reuse == 0)  begin failures++; $display("FAIL no key reuse"); end
    checks++; if (n_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    checks++; if (n_stall == 0)  begin failures++; $display("FAIL no output stall"); end
    checks++; if (n_keyprio == 0) begin failures++; $display("FAIL no key priority case"); end

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
