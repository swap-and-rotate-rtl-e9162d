// gift_ref_pkg: word-level GIFT-64-128 reference model for the testbenches, from
// the cipher definition: 28 rounds of SubCells, PermBits (Table of the GIFT-64
// permutation) and AddRoundKey (U = key word 1 into bits 4i+1, V = key word 0 into
// bits 4i, round constant into bits 23,19,15,11,7,3 and 1 into bit 63); key update
// k7..k0 <- (k1 >>> 2), (k0 >>> 12), k7..k2; 6-bit affine LFSR round constants.
// Decryption runs the rounds backwards with the inverse S-box and permutation;
// g_last_key gives the key state of round 28, the key input of decryption.
package gift_ref_pkg;
  function automatic logic [3:0] g_sbox(input logic [3:0] x);
    case (x)
      0: return 1;  1: return 10; 2: return 4;  3: return 12; 4: return 6;  5: return 15;
      6: return 3;  7: return 9;  8: return 2;  9: return 13; 10: return 11; 11: return 7;
      12: return 5; 13: return 0; 14: return 8; default: return 14;
    endcase
  endfunction
  function automatic int g_perm(input int i);
    // P64(i) = 4*floor(i/16) + 16*((3*floor((i mod 16)/4) + (i mod 4)) mod 4) + (i mod 4)
    return 4 * (i / 16) + 16 * ((3 * ((i % 16) / 4) + (i % 4)) % 4) + (i % 4);
  endfunction
  function automatic logic [63:0] g_player(input logic [63:0] s);
    logic [63:0] r;
    for (int i = 0; i < 64; i++) r[g_perm(i)] = s[i];
    return r;
  endfunction
  function automatic logic [63:0] g_encrypt(input logic [63:0] pt, input logic [127:0] key);
    logic [63:0] s;
    logic [127:0] k;
    logic [5:0] c;
    logic [15:0] u, v;
    s = pt; k = key; c = 0;
    for (int r = 1; r <= 28; r++) begin
      for (int n = 0; n < 16; n++) s[4*n +: 4] = g_sbox(s[4*n +: 4]);
      s = g_player(s);
      u = k[31:16]; v = k[15:0];
      for (int i = 0; i < 16; i++) begin
        s[4*i+1] ^= u[i];
        s[4*i]   ^= v[i];
      end
      c = {c[4:0], c[5] ^ c[4] ^ 1'b1};
      s[63] ^= 1'b1;
      s[23] ^= c[5]; s[19] ^= c[4]; s[15] ^= c[3]; s[11] ^= c[2]; s[7] ^= c[1]; s[3] ^= c[0];
      k = {k[17:16], k[31:18], k[11:0], k[15:12], k[127:32]};
    end
    return s;
  endfunction
  function automatic logic [3:0] g_isbox(input logic [3:0] y);
    for (int x = 0; x < 16; x++) if (g_sbox(4'(x)) == y) return 4'(x);
    return 4'h0;
  endfunction
  function automatic logic [63:0] g_inv_player(input logic [63:0] s);
    logic [63:0] r;
    for (int i = 0; i < 64; i++) r[i] = s[g_perm(i)];
    return r;
  endfunction
  function automatic logic [127:0] g_key_update(input logic [127:0] k);
    return {k[17:16], k[31:18], k[11:0], k[15:12], k[127:32]};
  endfunction
  // Key state of round 28: the user key after 27 updates.
  function automatic logic [127:0] g_last_key(input logic [127:0] key);
    logic [127:0] k;
    k = key;
    for (int r = 1; r < 28; r++) k = g_key_update(k);
    return k;
  endfunction
  // Decryption from the user key: round keys and constants computed forward, then
  // the rounds undone in reverse order.
  function automatic logic [63:0] g_decrypt(input logic [63:0] ct, input logic [127:0] key);
    logic [127:0] ks [1:28];
    logic [5:0] cs [1:28];
    logic [63:0] s;
    logic [5:0] c;
    ks[1] = key;
    for (int r = 2; r <= 28; r++) ks[r] = g_key_update(ks[r-1]);
    c = 0;
    for (int r = 1; r <= 28; r++) begin
      c = {c[4:0], c[5] ^ c[4] ^ 1'b1};
      cs[r] = c;
    end
    s = ct;
    for (int r = 28; r >= 1; r--) begin
      for (int i = 0; i < 16; i++) begin
        s[4*i+1] ^= ks[r][16+i];
        s[4*i]   ^= ks[r][i];
      end
      s[63] ^= 1'b1;
      s[23] ^= cs[r][5]; s[19] ^= cs[r][4]; s[15] ^= cs[r][3];
      s[11] ^= cs[r][2]; s[7] ^= cs[r][1]; s[3] ^= cs[r][0];
      s = g_inv_player(s);
      for (int n = 0; n < 16; n++) s[4*n +: 4] = g_isbox(s[4*n +: 4]);
    end
    return s;
  endfunction
endpackage
