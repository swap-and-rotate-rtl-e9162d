// tb_flip_filter: checks the FLIP(42,128,8x9) filter against a reference written
// from the monomial offsets (the degree-d monomial of a triangular function starts
// at variable d(d-1)/2), on hand-picked vectors (single linear, quadratic and
// triangular variables, complete monomials) and on random vectors with varied
// densities so that high-degree monomials are also hit. Combinational block: no latency.
// The filter structure follows the document; the choice of vectors is this bench's own.
`timescale 1ns/1ps
module tb_flip_filter;
  localparam int NL = 42, NQ = 128, NT = 8, KT = 9, TV = 45, N = 530;
  logic [N-1:0] x;
  logic z;
  int checks = 0, failures = 0;
  int n_lin = 0, n_quad = 0, n_tri_hi = 0;
  flip_filter dut (.*);

  function automatic logic ref_f(input logic [N-1:0] v);
    logic r;
    r = 1'b0;
    for (int k = 0; k < NL; k++) r ^= v[k];
    for (int k = 0; k < NQ; k += 2) r ^= v[NL+k] & v[NL+k+1];
    for (int t = 0; t < NT; t++)
      for (int d = 1; d <= KT; d++) begin
        logic m;
        m = 1'b1;
        for (int e = 0; e < d; e++) m &= v[NL + NQ + t*TV + d*(d-1)/2 + e];
        r ^= m;
      end
    return r;
  endfunction

  task automatic check(input logic [N-1:0] v, input string what);
    x = v;
    #1;
    checks++;
    if (z !== ref_f(v)) begin
      failures++;
      $display("FAIL %s: z=%b expected %b", what, z, ref_f(v));
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] v;
    check('0, "all zero");
    check('1, "all one");
    // Each linear variable alone gives 1.
    for (int k = 0; k < NL; k++) begin
      v = '0; v[k] = 1'b1; check(v, "linear"); n_lin++;
      if (z !== 1'b1) begin failures++; $display("FAIL linear bit %0d", k); end
    end
    // Each quadratic pair alone gives 1, one of its variables alone gives 0.
    for (int k = 0; k < NQ; k += 2) begin
      v = '0; v[NL+k] = 1'b1; v[NL+k+1] = 1'b1; check(v, "quad pair"); n_quad++;
      if (z !== 1'b1) begin failures++; $display("FAIL quad pair %0d", k); end
      v[NL+k+1] = 1'b0; check(v, "quad single");
      if (z !== 1'b0) begin failures++; $display("FAIL quad single %0d", k); end
    end
    // Each complete triangular monomial alone gives 1.
    for (int t = 0; t < NT; t++)
      for (int d = 1; d <= KT; d++) begin
        v = '0;
        for (int e = 0; e < d; e++) v[NL + NQ + t*TV + d*(d-1)/2 + e] = 1'b1;
        check(v, "tri monomial");
        if (d >= 5) n_tri_hi++;
        if (z !== 1'b1) begin failures++; $display("FAIL monomial t=%0d d=%0d", t, d); end
      end
    // Random vectors, ones density from 1/2 to 15/16.
    for (int r = 0; r < 400; r++) begin
      int dens;
      dens = r % 4;
      for (int k = 0; k < N; k++) begin
        logic b;
        b = 1'b1;
        for (int q = 0; q <= dens; q++) b &= $urandom_range(1, 0) == 1;
        v[k] = ~b;   // probability of a one 1 - 2^-(dens+1)
      end
      check(v, "random");
    end
    checks += 3;
    if (n_lin == 0) begin failures++; $display("FAIL no linear case"); end
    if (n_quad == 0) begin failures++; $display("FAIL no quadratic case"); end
    if (n_tri_hi == 0) begin failures++; $display("FAIL no high-degree case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
