// tb_flip_shuffle_quad: runs complete Knuth shuffles of a 530-bit key through the
// rotate-based register and compares the result with a reference shuffle of the
// same key using the same indices. Index patterns: random j, j = i throughout
// (only r operations), j = 0 throughout (longest v/u runs) and random j with random
// gaps in j_valid. Checks the cycle count of each shuffle against the operation
// count max(1, 2*Delta-1) per step plus the final r (and any cycles the index was withheld), the single done pulse, and counts the step kinds
// Delta = 0, Delta = 1 and Delta > 1, failing if any never occurred.
// The operation sequence checked (v, u, r runs) follows the document; the index
// handshake being exercised is this design's own interface.
`timescale 1ns/1ps
module tb_flip_shuffle_quad;
  localparam int N = 530, IW = 10;
  logic clk = 0, rst_n = 0, load = 0, start = 0, j_valid = 0;
  logic [N-1:0] key = '0;
  logic [IW-1:0] j = '0;
  logic j_ready, busy, done;
  logic [IW-1:0] i_cur;
  logic [N-1:0] state;
  int checks = 0, failures = 0;
  int n_d0 = 0, n_d1 = 0, n_dbig = 0;
  int busy_cycles = 0, dones = 0;
  flip_shuffle_quad dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (busy) busy_cycles++;
    if (done) dones++;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_shuffle(input int mode);
    logic [N-1:0] model;
    int expect_cycles, stalls;
    for (int k = 0; k < N; k++) model[k] = 1'($urandom());
    @(negedge clk);
    load = 1; key = model;
    @(negedge clk);
    load = 0; start = 1;
    busy_cycles = 0; dones = 0;
    @(negedge clk);
    start = 0;
    expect_cycles = 1;   // final r
    stalls = 0;
    for (int ii = N - 1; ii >= 1; ii--) begin
      int jj, d;
      case (mode)
        1: jj = ii;
        2: jj = 0;
        default: jj = $urandom_range(ii, 0);
      endcase
      d = ii - jj;
      expect_cycles += (d == 0) ? 1 : 2 * d - 1;
      if (d == 0) n_d0++; else if (d == 1) n_d1++; else n_dbig++;
      begin
        logic t;
        t = model[ii]; model[ii] = model[jj]; model[jj] = t;
      end
      // Offer j until the circuit takes it; in mode 3 j_valid is withheld at random.
      j = IW'(jj);
      forever begin
        j_valid = !(mode == 3 && $urandom_range(3, 0) == 0);
        #1;
        if (j_ready && !j_valid) stalls++;
        if (j_ready && j_valid) begin
          checks++;
          if (i_cur !== IW'(ii)) begin failures++; $display("FAIL i_cur %0d expected %0d", i_cur, ii); end
          @(negedge clk);
          break;
        end
        @(negedge clk);
      end
      j_valid = 0;
    end
    // Wait for the final r.
    while (busy) @(negedge clk);
    checks++;
    if (state !== model) begin failures++; $display("FAIL shuffle mode %0d result", mode); end
    checks++;
    if (busy) begin failures++; $display("FAIL still busy after done"); end
    checks++;
    if (busy_cycles != expect_cycles + stalls) begin
      failures++;
      $display("FAIL mode %0d took %0d cycles, expected %0d", mode, busy_cycles, expect_cycles + stalls);
    end
    checks++;
    if (dones != 1) begin failures++; $display("FAIL %0d done pulses", dones); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) run_shuffle(m);
    run_shuffle(0);
    checks += 3;
    if (n_d0 == 0) begin failures++; $display("FAIL no Delta = 0 step"); end
    if (n_d1 == 0) begin failures++; $display("FAIL no Delta = 1 step"); end
    if (n_dbig == 0) begin failures++; $display("FAIL no Delta > 1 step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
