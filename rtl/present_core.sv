// present_core: bit-serial PRESENT-80, encryption and decryption, 64 cycles per round.
//
// The 64-bit state streams through a ring of flip-flops (present_state_pipe). Each
// cycle one state bit leaves the ring, is XORed with one round-key bit from the key
// pipeline (present_key_reg) and re-enters; every fourth cycle the S-box (or, for
// decryption, the inverse S-box) rewrites a whole nibble in place. Six swap pairs
// in the ring, fired on a fixed schedule (present_ctrl), move each bit to its
// permuted position while it travels, so key addition, S-box and bit permutation
// all proceed in the same 64 cycles and no cycle is spent on the permutation.
//
// Encryption: bits enter at ring position 0 and leave at 63; key addition, S-box,
// permutation per round. Decryption uses the same ring and the same six swap
// pairs with another schedule; bits enter at 53 and leave at 52, the inverse S-box
// acts on the nibble about to leave, then the round key is added.
//
// Interface and timing (all serial, one bit per clock):
//  * Pulse `start` (with `dec` set; hold `dec` for the whole block). For the next 80
//    cycles (`key_take`) the core reads `kin`: encryption k79 first, decryption k0
//    first. Decryption expects the key register value after the last encryption
//    round (the key that supplies the final round key). In the last 64 of these
//    cycles (`data_take`) it reads `din`: plaintext bit 63 first (encryption) or
//    ciphertext bit 0 first (decryption).
//  * 31 rounds of 64 cycles follow, then 64 cycles with `dout_valid` high carrying
//    the result: ciphertext bit 63 first, or plaintext bit 0 first. `done` pulses
//    with the last bit. 2128 cycles per block from the first load cycle.
// The swap pairs, schedules, entry/exit positions, load order and cycle counts
// follow the document. The load protocol, the handling of the round counter, the
// key-bit taps and the use of one shared S-box are this design's own choices.
module present_core
  import present_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic dec,
  input  logic kin,
  input  logic din,
  output logic key_take,
  output logic data_take,
  output logic dout,
  output logic dout_valid,
  output logic done,
  output logic busy
);
  phase_e           phase;
  logic [NSWAP-1:0] swap_en;
  logic st_sbox_wr, key_sbox_wr, rc_wr, key_shift, feed;
  logic [4:0] rc;
  logic [1:0] key_rd_sel;
  logic       exit_bit, key_bit, key_tap, left_bit, sxd, enter_bit;
  logic [2:0] enc_nib;
  logic [3:0] dec_nib, key_nib, sb_in, sb_out;
  logic [5:0] ctl_round, ctl_count;

  present_ctrl u_ctrl (
    .clk, .rst_n, .start, .dec, .phase, .round(ctl_round), .count(ctl_count), .key_take, .data_take,
    .swap_en, .st_sbox_wr, .key_sbox_wr, .rc_wr, .rc, .key_shift, .key_rd_sel,
    .feed, .out_valid(dout_valid), .done
  );

  present_key_reg u_key (
    .clk, .dec, .shift(key_shift), .kin, .load(key_take), .rd_sel(key_rd_sel),
    .sbox_wr(key_sbox_wr), .sbox_out(sb_out), .rc_wr, .rc, .nib(key_nib), .key_bit, .key_tap
  );

  // Operand logic: the leaving bit (after the inverse S-box when decrypting),
  // key addition, and the bit that enters the ring.
  assign left_bit  = (dec && st_sbox_wr) ? sb_out[0] : exit_bit;
  assign sxd       = left_bit ^ key_bit;
  assign enter_bit = data_take ? din : sxd;
  assign dout      = sxd;

  // One S-box for state and key; the two never need it in the same cycle. The
  // encryption nibble uses the raw key tap: the tap differs from the round-key bit
  // only while the key owns the S-box, and this keeps the S-box out of its own
  // input path.
  always_comb begin
    if (key_sbox_wr) sb_in = key_nib;
    else if (dec)    sb_in = dec_nib;
    else             sb_in = {enc_nib, exit_bit ^ key_tap};
  end

  present_sbox u_sbox (.dec, .din(sb_in), .dout(sb_out));

  present_state_pipe u_state (
    .clk, .en(data_take || feed || dout_valid), .dec, .swap_en, .enter_bit,
    .nib_wr(st_sbox_wr), .nib_in(sb_out), .exit_bit, .enc_nib, .dec_nib
  );

  assign busy = (phase != PH_IDLE);

  // The shared S-box must never be claimed by state and key in the same cycle.
  a_sbox_share: assert property (@(posedge clk) !(key_sbox_wr && st_sbox_wr));
  // State nibbles are written on the last (encryption) or first (decryption) bit of a nibble.
  a_sbox_slot: assert property (@(posedge clk)
    st_sbox_wr |-> (ctl_count[1:0] == (dec ? 2'd0 : 2'd3)) && ctl_round != '0);
  // The key nibble goes through the S-box at count 0 (encryption) or 63 (decryption).
  a_key_slot: assert property (@(posedge clk)
    key_sbox_wr |-> ctl_count == (dec ? 6'd63 : 6'd0));
endmodule
