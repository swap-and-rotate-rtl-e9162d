// tb_present_core: end-to-end test of the bit-serial PRESENT-80 core.
// Encrypts the four published PRESENT-80 test vectors and random blocks, decrypts
// the results again, and compares with a word-level reference model. Checks that a
// block takes exactly 2128 cycles from the first load cycle to the last output bit,
// in both modes.
`timescale 1ns/1ps
module tb_present_core;
  import present_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, dec = 0, kin = 0, din = 0;
  logic key_take, data_take, dout, dout_valid, done, busy;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0;

  present_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  task automatic run_block(input logic d, input logic [79:0] key, input logic [63:0] data,
                           output logic [63:0] res, output int cycles);
    int ki, di, oi;
    ki = 0; di = 0; oi = 0; cycles = 0; res = '0;
    @(negedge clk);
    dec = d; start = 1;
    @(negedge clk);
    start = 0;
    while (1) begin
      // inputs for this cycle
      kin = d ? key[ki] : key[79 - ki];
      din = d ? data[di] : data[63 - di];
      #1;
      if (key_take) cycles++;
      else if (busy) cycles++;
      @(posedge clk);
      if (key_take) ki++;
      if (data_take) di++;
      if (dout_valid) begin
        if (d) res[oi] = dout; else res[63 - oi] = dout;
        oi++;
      end
      if (done) break;
      @(negedge clk);
    end
  endtask

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [79:0] keys [4];
    logic [63:0] pts [4];
    logic [63:0] kat [4];
    logic [63:0] ct, pt;
    logic [79:0] k;
    logic [63:0] p;
    int cyc;
    keys[0] = '0;  pts[0] = '0;  kat[0] = 64'h5579C1387B228445;
    keys[1] = '1;  pts[1] = '0;  kat[1] = 64'hE72C46C0F5945049;
    keys[2] = '0;  pts[2] = '1;  kat[2] = 64'hA112FFC72F68417B;
    keys[3] = '1;  pts[3] = '1;  kat[3] = 64'h3333DCD3213210D2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      check("reference model vs published vector", ref_encrypt(pts[t], keys[t]), kat[t]);
      run_block(0, keys[t], pts[t], ct, cyc);
      n_enc++;
      check("encrypt published vector", ct, kat[t]);
      checks++; if (cyc != 2128) begin failures++; $display("FAIL enc cycles %0d", cyc); end
      run_block(1, ref_last_key(keys[t]), ct, pt, cyc);
      n_dec++;
      check("decrypt published vector", pt, pts[t]);
      checks++; if (cyc != 2128) begin failures++; $display("FAIL dec cycles %0d", cyc); end
    end
    for (int t = 0; t < 4; t++) begin
      k = 80'({$urandom(), $urandom(), $urandom()});
      p = {$urandom(), $urandom()};
      run_block(0, k, p, ct, cyc); n_enc++;
      check("encrypt random", ct, ref_encrypt(p, k));
      run_block(1, ref_last_key(k), ct, pt, cyc); n_dec++;
      check("decrypt random", pt, p);
    end
    checks++; if (n_enc == 0 || n_dec == 0) begin failures++; $display("FAIL mode not exercised"); end
    $display("blocks: enc=%0d dec=%0d", n_enc, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
