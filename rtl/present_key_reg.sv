// present_key_reg: the 80-bit key pipeline of the bit-serial PRESENT core.
//
// The key is shifted in one bit per cycle at position 0 and moves towards position
// 79. Each round it supplies the 64 round-key bits, one per cycle, and performs the
// key update in the same 64 cycles:
//  * It shifts during the first 61 cycles of a round and holds still during the
//    last three, so it ends each round rotated by 61 positions. The three round-key
//    bits needed while it holds still are taken from positions further down
//    (`rd_sel` = 1, 2), a small mux instead of extra shift cycles.
//  * Encryption keeps the key in natural order (position p holds k_p); the 61-step
//    shift is the left rotation by 61 of the key schedule. The counter XOR into
//    k19..k15 is applied in the last (held) cycle; the S-box on k79..k76 is applied
//    in cycle 0 of the next round, when the S-box is free, and the S-box's top bit
//    is the round-key bit of that cycle.
//  * Decryption loads the key (the final key-register value of an encryption)
//    reversed, k0 first, so position p holds k_(79-p). The same 61-step shift is
//    then the right rotation by 61 of the inverse key schedule, and the round-key
//    bits come out least significant first, as the state does. The counter XOR and
//    the inverse S-box are applied in the last held cycle of a round, at the
//    positions the affected key bits occupy after the rotation (41..45 and 61..64).
// Following the document: the key pipeline halts for three cycles per round and a
// mux picks the round-key bit meanwhile. This design's own choice: the exact
// positions read and the cycles at which the S-box and counter are applied.
module present_key_reg
  import present_pkg::*;
(
  input  logic       clk,
  input  logic       dec,
  input  logic       shift,      // load or rotate by one this cycle
  input  logic       kin,        // serial key input during load
  input  logic       load,       // take kin into position 0 while shifting
  input  logic [1:0] rd_sel,     // round-key bit comes from 0, 1 or 2 positions below the top
  input  logic       sbox_wr,    // apply the (inverse) S-box output to the key nibble
  input  logic [3:0] sbox_out,
  input  logic       rc_wr,      // XOR the round counter into the key
  input  logic [4:0] rc,
  output logic [3:0] nib,        // key nibble to the S-box (k79..k76 of the updated key)
  output logic       key_bit,    // round-key bit for this cycle
  output logic       key_tap     // same tap before the S-box (never needs the S-box output)
);
  logic [KEY_BITS-1:0] k, nxt;
  logic [6:0] top;

  assign top = dec ? 7'd63 : 7'd79;
  assign nib = dec ? {k[61], k[62], k[63], k[64]} : k[79:76];

  assign key_tap = k[top - 7'(rd_sel)];
  assign key_bit = (!dec && sbox_wr) ? sbox_out[3] : key_tap;

  always_comb begin
    nxt = k;
    if (shift) nxt = {k[KEY_BITS-2:0], load ? kin : k[KEY_BITS-1]};
    if (sbox_wr) begin
      if (!dec) {nxt[0], nxt[79:77]} = sbox_out;       // shifting in this cycle
      else      {nxt[61], nxt[62], nxt[63], nxt[64]} = sbox_out;
    end
    if (rc_wr) begin
      if (!dec) nxt[19:15] = k[19:15] ^ rc;
      else      {nxt[41], nxt[42], nxt[43], nxt[44], nxt[45]} =
                  {k[41], k[42], k[43], k[44], k[45]} ^ rc;
    end
  end

  always_ff @(posedge clk) k <= nxt;
endmodule
