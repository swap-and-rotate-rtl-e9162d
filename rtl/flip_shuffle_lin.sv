// flip_shuffle_lin: linear-time Knuth-shuffle register for the FLIP stream cipher
// (one swap per clock cycle).
//
// FLIP keeps its secret key in an N-bit register and permutes it between keystream
// bits. A Knuth shuffle swaps b_i and b_j for i = N-1 down to 1 with a random
// j <= i. Swapping two bits only changes anything when they differ, and then it is
// the same as inverting both. So each flip-flop has an enable and a data input
// that is either its key bit (load) or its own inverted output:
//   c    = b_i XOR b_j                 (two N:1 mux banks)
//   en_t = ((t == i) XOR (t == j)) AND c AND step, OR load
//   d_t  = load ? key_t : NOT b_t
// i = j or b_i = b_j leave the register unchanged. One cycle for the key load plus
// one per swap: N cycles per shuffle (530 for FLIP(42,128,8x9)).
// Interface: `load` takes `key` in parallel in one cycle; with `step` high the swap
// (i, j) is performed at the next clock edge. The index sequence (i counting down,
// j random) comes from outside. Following the document: the enable equation, the
// toggling flip-flops and the decoders. This design's own: the `step` qualifier that
// lets the register idle between swaps.
module flip_shuffle_lin #(
  parameter int unsigned N  = 530,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          load,
  input  logic [N-1:0]  key,
  input  logic          step,
  input  logic [IW-1:0] i,
  input  logic [IW-1:0] j,
  output logic [N-1:0]  state
);
  logic c;
  logic [N-1:0] en;

  assign c = state[i] ^ state[j];

  always_comb begin
    for (int t = 0; t < N; t++) begin
      en[t] = ((IW'(t) == i) ^ (IW'(t) == j)) & c & step | load;
    end
  end

  always_ff @(posedge clk) begin
    for (int t = 0; t < N; t++) begin
      if (en[t]) state[t] <= load ? key[t] : ~state[t];
    end
  end
endmodule
