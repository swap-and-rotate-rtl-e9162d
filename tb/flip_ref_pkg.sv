// flip_ref_pkg: word-level reference for the FLIP(42,128,8x9) filter, used by the
// testbenches. The filter is recomputed from the monomial offsets: variable e of the
// degree-d monomial of triangular function t is register bit
// 42 + 128 + 45*t + d(d-1)/2 + e.
// The split into 42 linear, 128 quadratic and 8 triangular degree-9 variables
// follows the document; the bit assignment and inner-product form are this
// design's own choices, mirrored here.
package flip_ref_pkg;
  localparam int FN = 530;
  function automatic logic ref_filter(input logic [FN-1:0] v);
    logic r;
    r = 1'b0;
    for (int k = 0; k < 42; k++) r ^= v[k];
    for (int k = 0; k < 128; k += 2) r ^= v[42+k] & v[43+k];
    for (int t = 0; t < 8; t++)
      for (int d = 1; d <= 9; d++) begin
        logic m;
        m = 1'b1;
        for (int e = 0; e < d; e++) m &= v[170 + t*45 + d*(d-1)/2 + e];
        r ^= m;
      end
    return r;
  endfunction
endpackage
