// flip_shuffle_quad: quadratic-time Knuth-shuffle register for FLIP, built from a
// shift register that can rotate both ways.
//
// The N flip-flops b_(N-1)..b_0 each have a 2:1 mux (`Sel`) choosing the right or
// the left neighbour, and two extra muxes sit in front of b_(N-1) (S1) and b_0 (S2).
// The three operations used are
//   r (Sel,S1,S2 = 0,1,1): rotate up, b_p -> b_(p+1), b_(N-1) -> b_0;
//   v (0,0,0): b_(N-1) stays, b_(N-2) -> b_0, the rest move up;
//   u (1,x,x): b_0 stays, b_1 -> b_(N-1), the rest move down.
// With Delta_i = i - j_i, the swap of step i of the Knuth shuffle is v^Delta then
// u^(Delta-1) (a single r if Delta = 0), taken for i = N-1 down to 1, and one
// final r completes the shuffle. A step costs 2*Delta-1 cycles, about N^2/4 cycles
// per shuffle on average.
// Interface: `load` takes `key` in parallel. `start` begins a shuffle; whenever
// `j_ready` is high the circuit accepts `j` (the random index for the current i,
// 0 <= j <= i) if `j_valid` is high, and begins that step in the same cycle.
// `done` pulses in the cycle of the final r. Following the document: the three
// operations, their mux settings and the operation sequence. This design's own: the
// parallel key load, the index handshake and the sequencer.
module flip_shuffle_quad #(
  parameter int unsigned N  = 530,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [N-1:0]  key,
  input  logic          start,
  input  logic          j_valid,
  input  logic [IW-1:0] j,
  output logic          j_ready,
  output logic [IW-1:0] i_cur,
  output logic          busy,
  output logic          done,
  output logic [N-1:0]  state
);
  typedef enum logic [2:0] {Q_IDLE, Q_STEP, Q_V, Q_U, Q_FINAL} qstate_e;
  typedef enum logic [1:0] {OP_HOLD, OP_R, OP_U, OP_V} op_e;

  qstate_e q;
  op_e op;
  logic [IW-1:0] i_q, cnt;
  logic [IW-1:0] delta, delta_q;
  logic sel, s1, s2;

  assign delta   = i_q - j;
  assign j_ready = (q == Q_STEP);
  assign i_cur   = i_q;
  assign busy    = (q != Q_IDLE);
  assign done    = (q == Q_FINAL);

  // Operation of this cycle.
  always_comb begin
    op = OP_HOLD;
    unique case (q)
      Q_STEP:  if (j_valid) op = (delta == '0) ? OP_R : OP_V;
      Q_V:     op = OP_V;
      Q_U:     op = OP_U;
      Q_FINAL: op = OP_R;
      default: op = OP_HOLD;
    endcase
    sel = (op == OP_U);
    s1  = (op == OP_R);
    s2  = (op == OP_R);
  end

  // Sequencer: i counts N-1 down to 1; cnt counts the remaining v or u operations.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= Q_IDLE;
      i_q <= '0;
      cnt <= '0;
    end else begin
      unique case (q)
        Q_IDLE: if (start) begin
          q   <= Q_STEP;
          i_q <= IW'(N - 1);
        end
        Q_STEP: if (j_valid) begin
          if (delta <= IW'(1)) begin
            // Delta = 0: single r. Delta = 1: single v, no u.
            if (i_q == IW'(1)) q <= Q_FINAL;
            else i_q <= i_q - IW'(1);
          end else begin
            q   <= Q_V;
            cnt <= delta - IW'(1);   // v operations still to do
          end
        end
        Q_V: begin
          if (cnt == IW'(1)) begin
            q   <= Q_U;
            cnt <= delta_q - IW'(1);   // u operations: Delta-1
          end else begin
            cnt <= cnt - IW'(1);
          end
        end
        Q_U: begin
          if (cnt == IW'(1)) begin
            if (i_q == IW'(1)) q <= Q_FINAL;
            else begin
              q   <= Q_STEP;
              i_q <= i_q - IW'(1);
            end
          end else begin
            cnt <= cnt - IW'(1);
          end
        end
        Q_FINAL: q <= Q_IDLE;
        default: q <= Q_IDLE;
      endcase
    end
  end

  // Delta of the current step, kept for the length of its u run.
  always_ff @(posedge clk) if (q == Q_STEP && j_valid) delta_q <= delta;

  // The register with its neighbour muxes.
  always_ff @(posedge clk) begin
    if (load) begin
      state <= key;
    end else if (op != OP_HOLD) begin
      for (int p = 1; p < N - 1; p++) state[p] <= sel ? state[p+1] : state[p-1];
      state[N-1] <= sel ? state[1] : (s1 ? state[N-2] : state[N-1]);
      state[0]   <= sel ? state[0] : (s2 ? state[N-1] : state[N-2]);
    end
  end

  a_j_range: assert property (@(posedge clk) (q == Q_STEP && j_valid) |-> (j <= i_q));
endmodule
