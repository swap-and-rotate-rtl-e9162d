// flip_filter: the Boolean filter function F of FLIP(nL, nQ, nT x Delta_k).
//
// After each shuffle the keystream bit is F applied to the N = nL + nQ + nT*k(k+1)/2
// register bits. F is the XOR of three direct sums:
//   linear part     x_0 ^ ... ^ x_(nL-1)
//   quadratic part  x_a x_(a+1) ^ x_(a+2) x_(a+3) ^ ...      (nQ variables)
//   nT triangular functions of degree k, each
//                   y_0 ^ y_1 y_2 ^ y_3 y_4 y_5 ^ ...        (k(k+1)/2 variables)
// Defaults FLIP(42, 128, 8 x Delta_9): N = 530, 64 AND2 gates for the quadratic part
// and 8 x 36 AND inputs for the triangular part, all followed by one XOR tree.
// Interface: purely combinational, z = F(x).
// Following the document: the three parts, their sizes and F = L + Q + T. This
// design's own: which register bits feed which part (bits 0.. for the linear part,
// then the quadratic pairs in order, then the triangular functions one after the
// other, each using its variables monomial by monomial).
module flip_filter #(
  parameter int unsigned NL = 42,
  parameter int unsigned NQ = 128,
  parameter int unsigned NT = 8,
  parameter int unsigned KT = 9,
  localparam int unsigned TV = KT * (KT + 1) / 2,
  localparam int unsigned N  = NL + NQ + NT * TV
) (
  input  logic [N-1:0] x,
  output logic         z
);
  logic lin, quad, trg;

  always_comb begin
    int unsigned b;
    logic mono;
    lin = ^x[NL-1:0];
    quad = 1'b0;
    for (int unsigned q = 0; q < NQ / 2; q++) quad ^= x[NL + 2*q] & x[NL + 2*q + 1];
    trg = 1'b0;
    b = NL + NQ;
    for (int unsigned t = 0; t < NT; t++) begin
      for (int unsigned d = 1; d <= KT; d++) begin
        mono = 1'b1;
        for (int unsigned m = 0; m < d; m++) begin
          mono &= x[b];
          b++;
        end
        trg ^= mono;
      end
    end
    z = lin ^ quad ^ trg;
  end
endmodule
