// gift_pkg: constants and functions shared by the bit-serial GIFT-64 core.
//
// Like the PRESENT core, the GIFT-64 core streams its state through a 64-flip-flop
// ring in which fixed position pairs can be exchanged as the ring shifts. The
// published encryption schedule uses six pairs and makes each bit leave the ring
// (at flip-flop 63) at its GIFT-permuted position after one 64-cycle pass. The
// published decryption schedule uses six pairs too, four of them shared with
// encryption, so the combined circuit has eight. With bits entering at flip-flop
// 61 and leaving at 60, most significant bit first, it applies the inverse
// permutation. The entry/exit positions for decryption are this design's reading:
// they were found, and both schedules checked, with a bit-accurate pipeline model.
package gift_pkg;

  localparam int unsigned STATE_BITS  = 64;
  localparam int unsigned KEY_BITS    = 128;
  localparam int unsigned ROUNDS      = 28;
  localparam int unsigned NSWAP       = 8;   // 6 for encryption, 6 for decryption, 4 shared
  localparam int unsigned LOAD_CYCLES = 128;

  // Pairs 0..5 serve encryption, pairs 2..7 decryption.
  localparam int unsigned SWAP_X [NSWAP] = '{24, 37, 50, 61, 62, 63, 56, 55};
  localparam int unsigned SWAP_Y [NSWAP] = '{12, 13, 14, 45, 30, 15, 44, 31};

  // Entry and exit flip-flops of the ring. Both directions stream most significant
  // bit first.
  localparam int unsigned ENC_ENTRY = 0;
  localparam int unsigned ENC_EXIT  = 63;
  localparam int unsigned DEC_ENTRY = 61;
  localparam int unsigned DEC_EXIT  = 60;
  localparam int unsigned DEC_PASSES = ROUNDS + 1;  // final inverse S-box needs one more pass

  typedef enum logic [1:0] {
    GPH_IDLE = 2'd0,
    GPH_LOAD = 2'd1,
    GPH_RUN  = 2'd2
  } gift_phase_e;

  // GIFT S-box.
  function automatic logic [3:0] gift_sbox(input logic [3:0] x);
    case (x)
      4'h0: return 4'h1;  4'h1: return 4'hA;  4'h2: return 4'h4;  4'h3: return 4'hC;
      4'h4: return 4'h6;  4'h5: return 4'hF;  4'h6: return 4'h3;  4'h7: return 4'h9;
      4'h8: return 4'h2;  4'h9: return 4'hD;  4'hA: return 4'hB;  4'hB: return 4'h7;
      4'hC: return 4'h5;  4'hD: return 4'h0;  4'hE: return 4'h8;  default: return 4'hE;
    endcase
  endfunction

  // Swap enables for one cycle. `cur` enables the entries acting on bits that
  // entered in the current pass, `prv` those acting on bits that entered in the
  // previous pass. Bit k of the result enables pair k.
  function automatic logic [NSWAP-1:0] gift_swap_enables(input logic dec, input logic [5:0] c,
                                                         input logic cur, input logic prv);
    logic [NSWAP-1:0] a, b;
    a = '0;
    b = '0;
    if (dec) begin
      b[2] = c inside {2, 3, 4, 5};
      a[3] = c inside {49, 53, 57, 61};
      a[4] = c inside {37, 41, 45, 49, 51, 55, 59, 63};
      a[5] = c inside {21, 25, 29, 33, 35, 39, 43, 47, 53, 57, 61};
      b[5] = c inside {1};
      b[6] = c inside {0, 1, 2, 3, 20, 21, 22, 23, 40, 41, 42, 43};
      b[7] = c inside {3, 4, 5, 6, 23, 24, 25, 26};
      return (cur ? a : '0) | (prv ? b : '0);
    end
    a[0] = c inside {29, 30, 31, 32, 49, 50, 51, 52};
    b[0] = c inside {5, 6, 7, 8};
    a[1] = c inside {46, 47, 48, 49};
    b[1] = c inside {2, 3, 4, 5};
    a[2] = c inside {63};
    b[2] = c inside {0, 1, 2};
    b[3] = c inside {0, 4, 8, 12, 14, 18, 22, 26, 32, 36, 40, 44};
    b[4] = c inside {2, 6, 10, 14, 16, 20, 24, 28};
    b[5] = c inside {0, 4, 8, 12};
    return (cur ? a : '0) | (prv ? b : '0);
  endfunction

  // GIFT inverse S-box.
  function automatic logic [3:0] gift_inv_sbox(input logic [3:0] y);
    case (y)
      4'h0: return 4'hD;  4'h1: return 4'h0;  4'h2: return 4'h8;  4'h3: return 4'h6;
      4'h4: return 4'h2;  4'h5: return 4'hC;  4'h6: return 4'h4;  4'h7: return 4'hB;
      4'h8: return 4'hE;  4'h9: return 4'h7;  4'hA: return 4'h1;  4'hB: return 4'hA;
      4'hC: return 4'h3;  4'hD: return 4'h9;  4'hE: return 4'hF;  default: return 4'h5;
    endcase
  endfunction

  // Next and previous value of the 6-bit round-constant LFSR of GIFT.
  function automatic logic [5:0] gift_rc_next(input logic [5:0] c);
    return {c[4:0], c[5] ^ c[4] ^ 1'b1};
  endfunction

  function automatic logic [5:0] gift_rc_prev(input logic [5:0] c);
    return {c[5] ^ c[0] ^ 1'b1, c[5:1]};
  endfunction

  // Round constant of the last round (decryption starts from it).
  function automatic logic [5:0] gift_rc_last();
    logic [5:0] c;
    c = '0;
    for (int r = 0; r < ROUNDS; r++) c = gift_rc_next(c);
    return c;
  endfunction

endpackage
