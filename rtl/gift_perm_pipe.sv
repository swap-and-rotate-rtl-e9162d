// gift_perm_pipe: the 64-bit state ring of the bit-serial GIFT-64 core, for
// encryption and decryption.
//
// Each enabled cycle, the enabled swap pairs (SWAP_X[k], SWAP_Y[k]) exchange their
// bits, then the ring moves one position up (p to p+1, 63 to 0). The bit at the
// exit flip-flop (`exit_bit`, read after the swaps) leaves and `enter_bit` takes
// the place of the entry flip-flop: exit 63 / entry 0 for encryption, exit 60 /
// entry 61 for decryption.
// Encryption: with `nib_wr` the nibble formed by positions 2..0 and the entering
// bit is replaced by `nib_in` (the S-box output) in positions 3..0. The swap
// positions never reach below 12, so a nibble is complete before a swap moves one
// of its bits.
// Decryption: `dec_nib` is the nibble about to leave, positions 60..57 (60 leaves
// now, 57 in three cycles; no swap touches 57..60). With `nib_wr`, nib_in[2:0]
// replaces the three bits that have not yet left, which land in 60..58.
// Fed with the published schedules, a word streamed in most significant bit first
// comes out 64 cycles later, most significant bit first, permuted by the GIFT-64
// bit permutation (encryption) or its inverse (decryption). Each swap costs one 2:1
// mux in front of flip-flops SWAP_X[k]+1 and SWAP_Y[k]+1.
// The swap pairs, schedules and encryption entry/exit follow the document; the
// decryption entry/exit and nibble positions are this design's own reading.
module gift_perm_pipe
  import gift_pkg::*;
(
  input  logic             clk,
  input  logic             en,
  input  logic             dec,
  input  logic [NSWAP-1:0] swap_en,
  input  logic             enter_bit,
  input  logic             nib_wr,
  input  logic [3:0]       nib_in,
  output logic             exit_bit,
  output logic [2:0]       enc_nib,
  output logic [3:0]       dec_nib
);
  logic [STATE_BITS-1:0] st, sw, nxt;

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
  assign dec_nib  = sw[DEC_EXIT -: 4];

  always_comb begin
    nxt = {sw[STATE_BITS-2:0], sw[STATE_BITS-1]};
    if (!dec) begin
      nxt[ENC_ENTRY] = enter_bit;
      if (nib_wr) nxt[3:0] = nib_in;
    end else begin
      nxt[DEC_ENTRY] = enter_bit;
      if (nib_wr) nxt[DEC_EXIT -: 3] = nib_in[2:0];
    end
  end

  always_ff @(posedge clk) begin
    if (en) st <= nxt;
  end
endmodule
