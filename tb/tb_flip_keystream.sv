// tb_flip_keystream: the FLIP(42,128,8x9) keystream workload on both shuffle
// circuits. A random 530-bit key of Hamming weight 265 is loaded once into the
// linear-time register and the rotate-based register, and 64 keystream bits are
// produced by 64 chained Knuth shuffles (each continues from the previous register
// contents), the two circuits being fed the same random indices. After every
// shuffle both filter outputs are compared with a word-level reference shuffle
// and filter, and both registers with the reference register.
// Cycle counts: the linear circuit must take 1 load cycle plus 529 per bit; the
// rotate-based circuit must take exactly its operation count per shuffle
// (max(1, 2*Delta-1) per step plus the final r). Both totals are printed.
// The weight-265 key, the chaining of the shuffles and the per-bit cycle counts
// follow the document; the index handshake and the shared index stream are this
// design's own.
`timescale 1ns/1ps
module tb_flip_keystream;
  import flip_ref_pkg::*;
  localparam int N = 530, IW = 10, BITS = 64;
  logic clk = 0, rst_n = 0;
  // linear-time register
  logic l_load = 0, l_step = 0;
  logic [N-1:0] l_key = '0, l_state;
  logic [IW-1:0] l_i = '0, l_j = '0;
  logic l_z;
  // rotate-based register
  logic q_load = 0, q_start = 0, q_j_valid = 0;
  logic [N-1:0] q_key = '0, q_state;
  logic [IW-1:0] q_j = '0, q_i;
  logic q_j_ready, q_busy, q_done, q_z;
  int checks = 0, failures = 0;
  int lin_cycles, quad_cycles, quad_expect, quad_dones;

  flip_shuffle_lin #(.N(N)) u_lin (
    .clk, .load(l_load), .key(l_key), .step(l_step), .i(l_i), .j(l_j), .state(l_state)
  );
  flip_filter u_lin_f (.x(l_state), .z(l_z));
  flip_shuffle_quad #(.N(N)) u_quad (
    .clk, .rst_n, .load(q_load), .key(q_key), .start(q_start), .j_valid(q_j_valid), .j(q_j),
    .j_ready(q_j_ready), .i_cur(q_i), .busy(q_busy), .done(q_done), .state(q_state)
  );
  flip_filter u_quad_f (.x(q_state), .z(q_z));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (q_busy) quad_cycles <= quad_cycles + 1;
    if (q_done) quad_dones <= quad_dones + 1;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] model;
    int js [1:N-1];
    // Key of weight 265: half ones, then a reference Knuth shuffle.
    for (int k = 0; k < N; k++) model[k] = (k < N / 2);
    for (int k = N - 1; k >= 1; k--) begin
      int unsigned r;
      logic t;
      r = $urandom_range(k, 0);
      t = model[k]; model[k] = model[r]; model[r] = t;
    end
    checks++;
    if ($countones(model) != 265) begin failures++; $display("FAIL key weight"); end
    lin_cycles = 0; quad_cycles = 0; quad_expect = 0; quad_dones = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    l_load = 1; l_key = model; q_load = 1; q_key = model;
    @(negedge clk);
    l_load = 0; q_load = 0;
    lin_cycles = 1;
    for (int b = 0; b < BITS; b++) begin
      for (int ii = N - 1; ii >= 1; ii--) begin
        logic t;
        js[ii] = $urandom_range(ii, 0);
        t = model[ii]; model[ii] = model[js[ii]]; model[js[ii]] = t;
        quad_expect += (ii == js[ii]) ? 1 : 2 * (ii - js[ii]) - 1;
      end
      quad_expect += 1;   // final r
      // Linear-time register: one swap per cycle.
      for (int ii = N - 1; ii >= 1; ii--) begin
        l_i = IW'(ii); l_j = IW'(js[ii]); l_step = 1;
        @(negedge clk); lin_cycles++;
      end
      l_step = 0;
      // Rotate-based register: same indices, offered as soon as asked for.
      q_start = 1;
      @(negedge clk);
      q_start = 0;
      for (int ii = N - 1; ii >= 1; ii--) begin
        q_j = IW'(js[ii]); q_j_valid = 1;
        #1;
        while (!q_j_ready) begin @(negedge clk); #1; end
        checks++;
        if (q_i !== IW'(ii)) begin failures++; $display("FAIL bit %0d index %0d, expected %0d", b, q_i, ii); end
        @(negedge clk);
      end
      q_j_valid = 0;
      while (q_busy) @(negedge clk);
      checks += 4;
      if (l_state !== model) begin failures++; $display("FAIL bit %0d linear register", b); end
      if (q_state !== model) begin failures++; $display("FAIL bit %0d rotate-based register", b); end
      if (l_z !== ref_filter(model)) begin failures++; $display("FAIL keystream bit %0d (linear)", b); end
      if (q_z !== ref_filter(model)) begin failures++; $display("FAIL keystream bit %0d (rotate-based)", b); end
      checks++;
      if (quad_cycles != quad_expect) begin
        failures++;
        $display("FAIL bit %0d rotate-based cycles %0d, expected %0d", b, quad_cycles, quad_expect);
      end
    end
    checks++;
    if (quad_dones != BITS) begin failures++; $display("FAIL %0d done pulses", quad_dones); end
    checks++;
    if (lin_cycles != 1 + BITS * (N - 1)) begin
      failures++;
      $display("FAIL linear cycles %0d, expected %0d", lin_cycles, 1 + BITS * (N - 1));
    end
    $display("64 keystream bits: linear-time circuit %0d cycles, rotate-based circuit %0d cycles (+1 load)",
             lin_cycles, quad_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
