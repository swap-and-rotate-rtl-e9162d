// gift_core: bit-serial GIFT-64-128, encryption and decryption, 64 cycles per round.
//
// The state streams through gift_perm_pipe one bit per clock. In encryption a bit
// leaving the ring has already been moved to its GIFT-permuted position by the
// swap pairs; it gets its round-key and round-constant bits and re-enters, and
// every fourth cycle the S-box of the next round rewrites the nibble that has just
// entered. Key addition, S-box and permutation thus share the same 64 cycles.
// Decryption runs the inverse round (add round key, inverse permutation, inverse
// S-box) on the same ring with the decryption schedule: the inverse S-box rewrites
// the nibble that is about to leave, the leaving bit gets its round-key bit and
// re-enters, and the inverse permutation happens while it travels.
//
// Timing: `start` in idle (with `dec`, held for the block) begins a 128-cycle load
// (`key_take`): `kin` delivers the key k127 first. In the last 64 of these cycles
// (`data_take`) `din` delivers the data bit 63 first.
//  * Encryption: the plaintext passes the first S-box layer as it enters and the
//    first permutation while it travels. 28 passes of 64 cycles follow; pass r adds
//    round key r to the leaving bits, in pass 28 these are the ciphertext on `dout`
//    (`dout_valid`, bit 63 first). 128 + 28*64 = 1920 cycles.
//  * Decryption: `kin` is the key state of round 28 (the user key after 27 key
//    updates). The ciphertext is loaded unchanged. Pass 1 adds round key 28; passes
//    2..28 apply the inverse S-box and add round keys 27..1; pass 29 applies the
//    last inverse S-box while the plaintext leaves on `dout`, bit 63 first.
//    128 + 29*64 = 1984 cycles.
// `done` pulses with the last output bit.
//
// Round key (GIFT-64): U = key word 1 is added to state bits 4i+1, V = key word 0
// to bits 4i, the round constant c5..c0 to bits 23,19,15,11,7,3 and 1 to bit 63.
// Following the document: the ring, the swap pairs and schedules, the load sequence,
// the 1920 encryption cycles, the extra 64 cycles of decryption and the column-wise
// key register. This design's own: the decryption entry/exit positions, the round
// constant logic (from the GIFT definition), the load protocol and handshake.
module gift_core
  import gift_pkg::*;
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
  gift_phase_e phase;
  logic [11:0] rcnt;              // Round & Count; counts 0..127 while loading
  logic [5:0]  round, count;
  logic [5:0]  rcon;              // round constant of the current round
  logic [5:0]  last;              // number of passes: 28 (encryption) or 29
  logic        run, cur, prv, keyed_pass;
  logic [NSWAP-1:0] swap_en;
  logic        exit_bit, left_bit, u_bit, v_bit, kbit, cbit, keyed, enter_bit, nib_wr;
  logic [1:0]  use_blk, upd_blk;
  logic        upd_en, enc_in;
  logic [2:0]  enc_nib;
  logic [3:0]  dec_nib, sb_in, sb_out;

  assign round = rcnt[11:6];
  assign count = rcnt[5:0];
  assign run   = (phase == GPH_RUN);
  assign last  = dec ? 6'(DEC_PASSES) : 6'(ROUNDS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= GPH_IDLE;
      rcnt  <= '0;
      rcon  <= '0;
    end else begin
      unique case (phase)
        GPH_IDLE: if (start) begin
          phase <= GPH_LOAD;
          rcnt  <= '0;
        end
        GPH_LOAD: begin
          if (rcnt == 12'(LOAD_CYCLES - 1)) begin
            phase <= GPH_RUN;
            rcnt  <= {6'd1, 6'd0};
            rcon  <= dec ? gift_rc_last() : gift_rc_next(6'd0);
          end else begin
            rcnt <= rcnt + 12'd1;
          end
        end
        GPH_RUN: begin
          if (rcnt == {last, 6'd63}) phase <= GPH_IDLE;
          if (count == 6'd63) rcon <= dec ? gift_rc_prev(rcon) : gift_rc_next(rcon);
          rcnt <= rcnt + 12'd1;
        end
        default: phase <= GPH_IDLE;
      endcase
    end
  end

  assign key_take  = (phase == GPH_LOAD);
  assign data_take = key_take && (rcnt >= 12'(LOAD_CYCLES - STATE_BITS));
  // Swap lists: the current-pass list is on while new bits enter (for encryption
  // also during the data load), the previous-pass list from the pass after that.
  assign cur = dec ? (run && round <= 6'(ROUNDS)) : (data_take || (run && round <= 6'(ROUNDS - 1)));
  assign prv = dec ? (run && round >= 6'd2) : run;
  assign swap_en = gift_swap_enables(dec, count, cur, prv);

  // Key blocks. Encryption, round r = pass: use block (r-1) mod 4, update the block
  // used in the previous round. Decryption, pass p is cipher round 29-p: use block
  // (29-p) mod 4, and undo the update of the block needed in the next pass.
  assign use_blk = dec ? 2'(6'd1 - round) : 2'(round - 6'd1);
  assign upd_blk = dec ? 2'(6'd0 - round) : 2'(round - 6'd2);
  assign upd_en  = run && (dec ? (round <= 6'(ROUNDS - 1)) : (round >= 6'd2));

  gift_key_sched u_key (
    .clk, .dec, .load(key_take), .kin, .run, .count, .use_blk, .upd_en, .upd_blk,
    .u_bit, .v_bit
  );

  // Round key and round constant bits for the bit leaving now (state bit 63-count).
  assign keyed_pass = !dec || (round <= 6'(ROUNDS));
  always_comb begin
    kbit = 1'b0;
    if (count[1:0] == 2'd2) kbit = u_bit;
    if (count[1:0] == 2'd3) kbit = v_bit;
    cbit = 1'b0;
    if (count == 6'd0) cbit = 1'b1;
    else if (count >= 6'd40 && count[1:0] == 2'd0) cbit = rcon[3'(4'd15 - count[5:2])];
  end

  // Encryption: S-box on the nibble whose last bit enters now. Decryption: inverse
  // S-box on the nibble whose first bit leaves now (not in pass 1), the leaving bit
  // taken from its output.
  assign nib_wr    = dec ? (run && round >= 6'd2 && count[1:0] == 2'd0)
                         : (cur && count[1:0] == 2'd3);
  assign left_bit  = (dec && nib_wr) ? sb_out[3] : exit_bit;
  assign keyed     = keyed_pass ? (left_bit ^ kbit ^ cbit) : left_bit;
  assign enter_bit = data_take ? din : keyed;
  // Encryption S-box input taken before the decryption path so that the shared
  // S-box forms no combinational loop through left_bit.
  assign enc_in    = data_take ? din : (exit_bit ^ kbit ^ cbit);
  assign sb_in     = dec ? dec_nib : {enc_nib, enc_in};

  gift_sbox u_sbox (.dec, .din(sb_in), .dout(sb_out));

  gift_perm_pipe u_state (
    .clk, .en(data_take || run), .dec, .swap_en, .enter_bit, .nib_wr, .nib_in(sb_out),
    .exit_bit, .enc_nib, .dec_nib
  );

  assign dout       = keyed;
  assign dout_valid = run && (round == last);
  assign done       = dout_valid && (count == 6'd63);
  assign busy       = (phase != GPH_IDLE);
endmodule
