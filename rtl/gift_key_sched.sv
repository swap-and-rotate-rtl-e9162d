// gift_key_sched: 128-bit GIFT key register organised as eight 16-bit columns.
//
// Column c holds key bits 16c+15..16c (bit 16c at the bottom). Loading: all columns
// form one 128-bit shift chain (key enters at bit 0, leaves column c's top into
// column c+1's bottom), so the first bit loaded (k127) ends in bit 127.
// Running: each column has its own enable (in silicon a gated clock per column;
// here a clock enable) and, when enabled, rotates internally by one: every bit
// moves up, the top bit wraps to the bottom.
// Columns 2m+1 and 2m form the 32-bit block M_m = (U, V) that supplies the round key
// of rounds 4t+m+1. The round-key bits are read from the top flip-flops of the two
// columns of block `use_blk` through a 4:1 mux: U first (state bit 4i+1), V next
// (state bit 4i), one pair per nibble, then both columns rotate by one; after 16
// nibbles they are back where they started. The key update is done on the block
// used in the previous round (`upd_blk`, when `upd_en`): its U column rotates 14
// times (U >>> 2) and its V column 4 times (V >>> 12) during the round. The
// 32-bit rotation of the GIFT key schedule needs no data movement: it is the
// change of the selected block from round to round.
// Decryption (`dec`): the register is loaded with the key state of the last round
// and the update is undone before a block is used: U rotates 2 times (U <<< 2) and
// V 12 times (V <<< 12); the core selects the blocks in reverse order.
// Interface: `count` is the cycle within the round (0..63); the core XORs `u_bit`
// at count mod 4 = 2 and `v_bit` at count mod 4 = 3.
module gift_key_sched
  import gift_pkg::*;
(
  input  logic       clk,
  input  logic       dec,
  input  logic       load,
  input  logic       kin,
  input  logic       run,
  input  logic [5:0] count,
  input  logic [1:0] use_blk,
  input  logic       upd_en,
  input  logic [1:0] upd_blk,
  output logic       u_bit,
  output logic       v_bit
);
  logic [KEY_BITS-1:0] k;
  logic [7:0] col_en;

  // Column enables ("clock gating" control).
  always_comb begin
    col_en = '0;
    if (run) begin
      if (count[1:0] == 2'd3) begin
        col_en[2*use_blk]     = 1'b1;
        col_en[2*use_blk + 1] = 1'b1;
      end
      if (upd_en) begin
        if (count < (dec ? 6'd2 : 6'd14)) col_en[2*upd_blk + 1] = 1'b1;
        if (count < (dec ? 6'd12 : 6'd4)) col_en[2*upd_blk]     = 1'b1;
      end
    end
  end

  assign u_bit = k[32*use_blk + 31];
  assign v_bit = k[32*use_blk + 15];

  always_ff @(posedge clk) begin
    if (load) begin
      k <= {k[KEY_BITS-2:0], kin};
    end else begin
      for (int c = 0; c < 8; c++) begin
        if (col_en[c]) k[16*c +: 16] <= {k[16*c +: 15], k[16*c + 15]};
      end
    end
  end
endmodule
