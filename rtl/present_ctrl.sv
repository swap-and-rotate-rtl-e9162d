// present_ctrl: sequencer of the bit-serial PRESENT core.
//
// One 12-bit counter, read as Round (upper six bits) and Count (lower six bits),
// drives everything; during the 80-cycle load it simply counts 0..79. A block takes
// 80 load cycles followed by 32 passes of 64 cycles: passes 1..31 are full rounds
// (key addition, S-box and permutation), pass 32 adds the last round key while the
// result streams out. Total: 80 + 32*64 = 2128 cycles.
//
// Decoded per cycle:
//  * swap enables from the published schedule (present_pkg::swap_enables). Entries
//    for bits entering in this pass are off in pass 32 (nothing enters); entries for
//    bits that entered in the previous pass are off in pass 1 (the loaded state is
//    not permuted).
//  * state S-box write: encryption at Count mod 4 = 3 in passes 1..31 (nibble just
//    entered); decryption at Count mod 4 = 0 in passes 2..32 (nibble about to leave).
//  * key S-box write: encryption at Count 0 of passes 2..32, decryption at Count 63
//    of passes 1..31. Round-counter XOR at Count 63 of passes 1..31, with counter
//    value Round (encryption) or 32 - Round (decryption).
//  * key shift in Counts 0..60 only (61 per round); round-key bit selection.
// Interface: `start` in idle begins a load in the next cycle; `key_take`/`data_take`
// mark the cycles in which the core samples its serial key and data inputs;
// `out_valid` marks the 64 result cycles; `done` pulses in the last of them.
module present_ctrl
  import present_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             dec,
  output phase_e           phase,
  output logic [5:0]       round,
  output logic [5:0]       count,
  output logic             key_take,
  output logic             data_take,
  output logic [NSWAP-1:0] swap_en,
  output logic             st_sbox_wr,
  output logic             key_sbox_wr,
  output logic             rc_wr,
  output logic [4:0]       rc,
  output logic             key_shift,
  output logic [1:0]       key_rd_sel,
  output logic             feed,        // passes 1..31: the transformed bit re-enters
  output logic             out_valid,
  output logic             done
);
  logic [11:0] rc_cnt;   // Round & Count
  logic run, cur, prv;

  assign round = rc_cnt[11:6];
  assign count = rc_cnt[5:0];
  assign run   = (phase == PH_RUN);
  assign cur   = run && (round <= 6'd31);
  assign prv   = run && (round >= 6'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= PH_IDLE;
      rc_cnt <= '0;
    end else begin
      unique case (phase)
        PH_IDLE: if (start) begin
          phase  <= PH_LOAD;
          rc_cnt <= '0;
        end
        PH_LOAD: begin
          if (rc_cnt == 12'(LOAD_CYCLES - 1)) begin
            phase  <= PH_RUN;
            rc_cnt <= {6'd1, 6'd0};
          end else begin
            rc_cnt <= rc_cnt + 12'd1;
          end
        end
        PH_RUN: begin
          if (rc_cnt == {6'(ROUNDS), 6'd63}) phase <= PH_IDLE;
          rc_cnt <= rc_cnt + 12'd1;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  assign key_take    = (phase == PH_LOAD);
  assign data_take   = (phase == PH_LOAD) && (rc_cnt >= 12'(LOAD_CYCLES - STATE_BITS));
  assign swap_en     = swap_enables(dec, count, cur, prv);
  assign feed        = cur;
  assign st_sbox_wr  = dec ? (prv && count[1:0] == 2'd0) : (cur && count[1:0] == 2'd3);
  assign key_sbox_wr = dec ? (cur && count == 6'd63) : (prv && count == 6'd0);
  assign rc_wr       = cur && (count == 6'd63);
  assign rc          = dec ? 5'(6'd32 - round) : round[4:0];
  assign key_shift   = key_take || (run && count <= 6'd60);
  assign key_rd_sel  = (count == 6'd62) ? 2'd1 : (count == 6'd63) ? 2'd2 : 2'd0;
  assign out_valid   = run && (round == 6'(ROUNDS));
  assign done        = out_valid && (count == 6'd63);
endmodule
