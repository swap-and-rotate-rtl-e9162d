// present_pkg: constants, types and functions shared by the bit-serial PRESENT-80
// encryption/decryption core.
//
// The core streams the 64-bit state through a ring of 64 flip-flops, one bit per
// clock. Six fixed pairs of ring positions can be exchanged ("swap-then-rotate")
// in the same cycle as the shift. Firing the swaps at the right cycles makes every
// bit leave the ring already at its permuted position, so the bit permutation
// costs no extra cycles. The six swap pairs and the cycles at which each fires
// (one list for the bits entering in the current pass, one for the bits that
// entered during the previous pass) are the published encryption and decryption
// schedules; they were checked against the PRESENT permutation with a
// bit-accurate pipeline model before being coded here.
package present_pkg;

  localparam int unsigned STATE_BITS = 64;
  localparam int unsigned KEY_BITS   = 80;
  localparam int unsigned ROUNDS     = 32;  // 31 full rounds + final key addition
  localparam int unsigned NSWAP      = 6;
  localparam int unsigned LOAD_CYCLES = 80; // key and state are shifted in together

  // Swap pairs (x, y): the bits in ring positions x and y are exchanged before
  // the shift, so they land in x+1 and y+1.
  localparam int unsigned SWAP_X [NSWAP] = '{20, 34, 48, 60, 61, 62};
  localparam int unsigned SWAP_Y [NSWAP] = '{ 5,  4,  3, 57, 55, 53};

  // Entry and exit positions of the ring in each direction of operation.
  localparam int unsigned ENC_ENTRY = 0;
  localparam int unsigned ENC_EXIT  = 63;
  localparam int unsigned DEC_ENTRY = 53;
  localparam int unsigned DEC_EXIT  = 52;

  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_LOAD = 2'd1,
    PH_RUN  = 2'd2
  } phase_e;

  // PRESENT S-box and its inverse.
  function automatic logic [3:0] sbox(input logic [3:0] x);
    case (x)
      4'h0: return 4'hC;  4'h1: return 4'h5;  4'h2: return 4'h6;  4'h3: return 4'hB;
      4'h4: return 4'h9;  4'h5: return 4'h0;  4'h6: return 4'hA;  4'h7: return 4'hD;
      4'h8: return 4'h3;  4'h9: return 4'hE;  4'hA: return 4'hF;  4'hB: return 4'h8;
      4'hC: return 4'h4;  4'hD: return 4'h7;  4'hE: return 4'h1;  default: return 4'h2;
    endcase
  endfunction

  function automatic logic [3:0] inv_sbox(input logic [3:0] x);
    case (x)
      4'h0: return 4'h5;  4'h1: return 4'hE;  4'h2: return 4'hF;  4'h3: return 4'h8;
      4'h4: return 4'hC;  4'h5: return 4'h1;  4'h6: return 4'h2;  4'h7: return 4'hD;
      4'h8: return 4'hB;  4'h9: return 4'h4;  4'hA: return 4'h6;  4'hB: return 4'h3;
      4'hC: return 4'h0;  4'hD: return 4'h7;  4'hE: return 4'h9;  default: return 4'hA;
    endcase
  endfunction

  // Swap enables for one cycle. `cur` enables the entries that act on bits that
  // entered the ring during the current pass, `prv` those acting on bits that
  // entered during the previous pass. Bit k of the result enables pair k.
  function automatic logic [NSWAP-1:0] swap_enables(input logic dec, input logic [5:0] c,
                                                    input logic cur, input logic prv);
    logic [NSWAP-1:0] a, b;
    a = '0;
    b = '0;
    if (!dec) begin
      a[0] = c inside {22, 26, 30, 34, 39, 43, 47, 51, 56, 60};
      b[0] = c inside {0, 4};
      a[1] = c inside {37, 41, 45, 49, 54, 58, 62};
      b[1] = c inside {2};
      a[2] = c inside {52, 56, 60};
      b[2] = c inside {0};
      a[3] = c inside {62};
      b[3] = c inside {3, 8, 14, 19, 24, 30, 35, 40, 46, 51, 56};
      b[4] = c inside {0, 5, 16, 21, 32, 37, 48, 53};
      b[5] = c inside {2, 18, 34, 50};
    end else begin
      a[0] = c inside {33, 37, 41, 45, 50, 54, 58, 62};
      b[0] = c inside {3, 7, 11, 15};
      a[1] = c inside {48, 52, 56, 60};
      b[1] = c inside {1, 5, 9, 13};
      a[2] = c inside {63};
      b[2] = c inside {3, 7, 11};
      a[3] = c inside {9, 14, 19, 25, 30, 35, 41, 46, 51, 57, 62};
      b[3] = c inside {3};
      a[4] = c inside {11, 16, 27, 32, 43, 48, 59};
      b[4] = c inside {0};
      a[5] = c inside {13, 29, 45, 61};
    end
    return (cur ? a : '0) | (prv ? b : '0);
  endfunction

endpackage
