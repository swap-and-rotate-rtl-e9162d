// swap_rotate_top: the three lightweight-linear-layer circuits side by side.
//
//   pr_*  bit-serial PRESENT-80 encryption/decryption core. The state is a 64-bit
//         ring that rotates by one position per cycle; six swap pairs, switched on
//         in fixed cycles, turn the rotation into the PRESENT bit permutation.
//         2128 cycles per block (80 load, 31 rounds of 64, 64 output).
//   gf_*  bit-serial GIFT-64-128 encryption/decryption core, same idea with eight
//         other swap pairs (six used per direction); 1920 cycles per encryption
//         (128 load, 27 rounds of 64, 64 output), 1984 per decryption (one more
//         pass for the last inverse S-box layer).
//   fl_*  FLIP(42,128,8x9) key register with the linear-time shuffle (one swap of
//         b_i and b_j per cycle by toggling both when they differ) and the filter;
//         fl_z is the filter output on the current register.
//   fq_*  the same register built as a bidirectional rotator, shuffled with
//         rotations only (quadratic time), with its own filter output fq_z.
// The four circuits share only clk and rst_n. See the sub-modules for the
// interface timing of each port group.
// Following the document: the circuits and their cycle counts. This design's own:
// putting them under one top, the port naming, and leaving the random index source
// of the FLIP shuffles outside (fl_i/fl_j and fq_j are inputs).
module swap_rotate_top #(
  parameter int unsigned FLIP_NL = 42,
  parameter int unsigned FLIP_NQ = 128,
  parameter int unsigned FLIP_NT = 8,
  parameter int unsigned FLIP_KT = 9,
  localparam int unsigned FLIP_N  = FLIP_NL + FLIP_NQ + FLIP_NT * (FLIP_KT * (FLIP_KT + 1) / 2),
  localparam int unsigned FLIP_IW = $clog2(FLIP_N)
) (
  input  logic                clk,
  input  logic                rst_n,
  // PRESENT-80
  input  logic                pr_start,
  input  logic                pr_dec,
  input  logic                pr_kin,
  input  logic                pr_din,
  output logic                pr_key_take,
  output logic                pr_data_take,
  output logic                pr_dout,
  output logic                pr_dout_valid,
  output logic                pr_done,
  output logic                pr_busy,
  // GIFT-64-128
  input  logic                gf_start,
  input  logic                gf_dec,
  input  logic                gf_kin,
  input  logic                gf_din,
  output logic                gf_key_take,
  output logic                gf_data_take,
  output logic                gf_dout,
  output logic                gf_dout_valid,
  output logic                gf_done,
  output logic                gf_busy,
  // FLIP, linear-time shuffle
  input  logic                fl_load,
  input  logic [FLIP_N-1:0]   fl_key,
  input  logic                fl_step,
  input  logic [FLIP_IW-1:0]  fl_i,
  input  logic [FLIP_IW-1:0]  fl_j,
  output logic                fl_z,
  // FLIP, quadratic-time shuffle
  input  logic                fq_load,
  input  logic [FLIP_N-1:0]   fq_key,
  input  logic                fq_start,
  input  logic                fq_j_valid,
  input  logic [FLIP_IW-1:0]  fq_j,
  output logic                fq_j_ready,
  output logic [FLIP_IW-1:0]  fq_i,
  output logic                fq_busy,
  output logic                fq_done,
  output logic                fq_z
);
  present_core u_present (
    .clk, .rst_n,
    .start(pr_start), .dec(pr_dec), .kin(pr_kin), .din(pr_din),
    .key_take(pr_key_take), .data_take(pr_data_take), .dout(pr_dout),
    .dout_valid(pr_dout_valid), .done(pr_done), .busy(pr_busy)
  );

  gift_core u_gift (
    .clk, .rst_n,
    .start(gf_start), .dec(gf_dec), .kin(gf_kin), .din(gf_din),
    .key_take(gf_key_take), .data_take(gf_data_take), .dout(gf_dout),
    .dout_valid(gf_dout_valid), .done(gf_done), .busy(gf_busy)
  );

  logic [FLIP_N-1:0] fl_state, fq_state;

  flip_shuffle_lin #(.N(FLIP_N)) u_flip_lin (
    .clk, .load(fl_load), .key(fl_key), .step(fl_step), .i(fl_i), .j(fl_j),
    .state(fl_state)
  );

  flip_filter #(.NL(FLIP_NL), .NQ(FLIP_NQ), .NT(FLIP_NT), .KT(FLIP_KT)) u_filter_lin (
    .x(fl_state), .z(fl_z)
  );

  flip_shuffle_quad #(.N(FLIP_N)) u_flip_quad (
    .clk, .rst_n, .load(fq_load), .key(fq_key), .start(fq_start),
    .j_valid(fq_j_valid), .j(fq_j), .j_ready(fq_j_ready), .i_cur(fq_i),
    .busy(fq_busy), .done(fq_done), .state(fq_state)
  );

  flip_filter #(.NL(FLIP_NL), .NQ(FLIP_NQ), .NT(FLIP_NT), .KT(FLIP_KT)) u_filter_quad (
    .x(fq_state), .z(fq_z)
  );
endmodule
