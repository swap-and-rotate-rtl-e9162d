// present_state_pipe: the 64-bit state ring of the bit-serial PRESENT core.
//
// Every enabled cycle all bits move one position up (position p to p+1, 63 to 0).
// Before the move, each enabled swap pair (SWAP_X[k], SWAP_Y[k]) exchanges its two
// bits; the hardware cost is one 2:1 mux in front of each of the flip-flops
// SWAP_X[k]+1 and SWAP_Y[k]+1 (twelve scan flip-flops for six pairs).
//
// Encryption: bits leave at position 63 (`exit_bit`) and the new bit `enter_bit`
// enters at position 0. When `nib_wr` is high (every fourth cycle) the nibble formed
// by positions 2..0 and the entering bit is replaced by `nib_in`, the S-box output,
// written into positions 3..0 at once.
// Decryption: the ring runs in the same direction but bits leave at 52 and enter at
// 53. With `nib_wr` the nibble waiting at positions 49..52 (LSB at 52) is replaced by
// the inverse S-box output: its bits 3..1 go to positions 50..52; its bit 0 is the
// bit leaving in this cycle, which the core takes straight from the S-box output.
// While `load` is high the ring is a plain shift register fed by `enter_bit`.
// Swap pairs never touch positions 0..2 or 49..52, so the S-box writes and the
// swaps never act on the same flip-flop in one cycle.
// The swap pairs, schedules and entry/exit positions follow the document; the
// nibble write positions and the load mode are this design's own choices.
module present_state_pipe
  import present_pkg::*;
(
  input  logic             clk,
  input  logic             en,         // shift this cycle
  input  logic             dec,        // 1: decryption entry/exit positions
  input  logic [NSWAP-1:0] swap_en,
  input  logic             enter_bit,
  input  logic             nib_wr,
  input  logic [3:0]       nib_in,
  output logic             exit_bit,   // bit at the exit position, after swaps
  output logic [2:0]       enc_nib,    // positions 2..0 (older bits of the entering nibble)
  output logic [3:0]       dec_nib     // positions 49,50,51,52 as MSB..LSB
);
  logic [STATE_BITS-1:0] st, sw, nxt;

  // Apply the enabled swaps.
  always_comb begin
    sw = st;
    for (int k = 0; k < NSWAP; k++) begin
      if (swap_en[k]) begin
        sw[SWAP_X[k]] = st[SWAP_Y[k]];
        sw[SWAP_Y[k]] = st[SWAP_X[k]];
      end
    end
  end

  assign exit_bit = dec ? sw[DEC_EXIT] : sw[ENC_EXIT];
  assign enc_nib  = sw[2:0];
  assign dec_nib  = {sw[49], sw[50], sw[51], sw[52]};

  // Rotate by one, then overwrite the entry position and the S-box nibble.
  always_comb begin
    nxt = {sw[STATE_BITS-2:0], sw[STATE_BITS-1]};
    if (!dec) begin
      nxt[ENC_ENTRY] = enter_bit;
      if (nib_wr) nxt[3:0] = nib_in;
    end else begin
      nxt[DEC_ENTRY] = enter_bit;
      if (nib_wr) {nxt[50], nxt[51], nxt[52]} = nib_in[3:1];
    end
  end

  always_ff @(posedge clk) begin
    if (en) st <= nxt;
  end
endmodule
