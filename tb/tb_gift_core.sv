// tb_gift_core: end-to-end test of the bit-serial GIFT-64-128 core.
// Checks the reference model against published GIFT-64 test vectors, then
// encrypts those and random blocks on the core and compares with the model, and
// decrypts every ciphertext again (key input: the round-28 key state), comparing
// with the original plaintext and with the reference decryption. Checks the block
// latency: 1920 cycles for encryption, 1984 for decryption.
`timescale 1ns/1ps
module tb_gift_core;
  import gift_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, dec = 0, kin = 0, din = 0;
  logic key_take, data_take, dout, dout_valid, done, busy;
  int checks = 0, failures = 0, n_blocks = 0, n_dec = 0;
  gift_core dut (.*);
  always #5 clk = ~clk;
  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input logic [127:0] key, input logic [63:0] data,
                           output logic [63:0] res, output int cycles, input logic d = 1'b0);
    int ki, di, oi;
    ki = 0; di = 0; oi = 0; cycles = 0; res = '0;
    @(negedge clk); start = 1; dec = d;
    @(negedge clk); start = 0;
    while (1) begin
      kin = key[127 - ki];
      din = data[63 - di];
      #1;
      if (busy) cycles++;
      @(posedge clk);
      if (key_take) ki++;
      if (data_take) di++;
      if (dout_valid) begin res[63 - oi] = dout; oi++; end
      if (done) break;
      @(negedge clk);
    end
  endtask

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [127:0] keys [3];
    logic [63:0] pts [3], kat [3];
    logic [63:0] ct, pt;
    int cyc;
    keys[0] = '0; pts[0] = '0; kat[0] = 64'hf62bc3ef34f775ac;
    keys[1] = 128'hfedcba9876543210fedcba9876543210; pts[1] = 64'hfedcba9876543210; kat[1] = 64'hc1b71f66160ff587;
    keys[2] = 128'hbd91731eb6bc2713a1f9f6ffc75044e7; pts[2] = 64'hc450c7727a9b8a7d; kat[2] = 64'he3272885fa94ba8b;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      check("reference model vs published vector", g_encrypt(pts[t], keys[t]), kat[t]);
      run_block(keys[t], pts[t], ct, cyc); n_blocks++;
      check("encrypt published vector", ct, kat[t]);
      checks++; if (cyc != 1920) begin failures++; $display("FAIL cycles %0d", cyc); end
      check("reference decryption", g_decrypt(ct, keys[t]), pts[t]);
      run_block(g_last_key(keys[t]), ct, pt, cyc, 1'b1); n_dec++;
      check("decrypt published vector", pt, pts[t]);
      checks++; if (cyc != 1984) begin failures++; $display("FAIL decryption cycles %0d", cyc); end
    end
    for (int t = 0; t < 3; t++) begin
      logic [127:0] k;
      logic [63:0] p;
      k = {$urandom(), $urandom(), $urandom(), $urandom()};
      p = {$urandom(), $urandom()};
      run_block(k, p, ct, cyc); n_blocks++;
      check("encrypt random", ct, g_encrypt(p, k));
      run_block(g_last_key(k), ct, pt, cyc, 1'b1); n_dec++;
      check("decrypt random", pt, p);
    end
    checks++; if (n_blocks == 0 || n_dec == 0) begin failures++; $display("FAIL mode not exercised"); end
    $display("blocks=%0d", n_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
