// present_ref_pkg: word-level PRESENT-80 reference model for the testbenches.
// Straight from the cipher definition: 31 rounds of addRoundKey, sBoxLayer and
// pLayer (bit i moves to 16*i mod 63, bit 63 stays), then a final addRoundKey. Key
// schedule: rotate the 80-bit register left by 61, S-box on bits 79..76, XOR the
// round counter into bits 19..15. The round key is bits 79..16.
package present_ref_pkg;
  function automatic logic [3:0] ref_sbox(input logic [3:0] x);
    logic [63:0] t;
    t = 64'h2174_8FE3_DA09_B65C; // S(15)..S(0)
    return t[4*x +: 4];
  endfunction
  function automatic logic [3:0] ref_isbox(input logic [3:0] y);
    for (int v = 0; v < 16; v++) if (ref_sbox(4'(v)) == y) return 4'(v);
    return 4'h0;
  endfunction
  function automatic int ref_p(input int i);
    return (i == 63) ? 63 : (16 * i) % 63;
  endfunction
  function automatic logic [63:0] ref_player(input logic [63:0] s);
    logic [63:0] r;
    for (int i = 0; i < 64; i++) r[ref_p(i)] = s[i];
    return r;
  endfunction
  function automatic logic [63:0] ref_inv_player(input logic [63:0] s);
    logic [63:0] r;
    for (int i = 0; i < 64; i++) r[i] = s[ref_p(i)];
    return r;
  endfunction
  function automatic logic [79:0] ref_key_update(input logic [79:0] k, input int i);
    logic [79:0] r;
    r = {k[18:0], k[79:19]};
    r[79:76] = ref_sbox(r[79:76]);
    r[19:15] = r[19:15] ^ 5'(i);
    return r;
  endfunction
  function automatic logic [63:0] ref_encrypt(input logic [63:0] pt, input logic [79:0] key);
    logic [63:0] s;
    logic [79:0] k;
    s = pt;
    k = key;
    for (int i = 1; i <= 31; i++) begin
      s = s ^ k[79:16];
      for (int n = 0; n < 16; n++) s[4*n +: 4] = ref_sbox(s[4*n +: 4]);
      s = ref_player(s);
      k = ref_key_update(k, i);
    end
    return s ^ k[79:16];
  endfunction
  // Key register value that supplies the 32nd round key.
  function automatic logic [79:0] ref_last_key(input logic [79:0] key);
    logic [79:0] k;
    k = key;
    for (int i = 1; i <= 31; i++) k = ref_key_update(k, i);
    return k;
  endfunction
  function automatic logic [63:0] ref_decrypt(input logic [63:0] ct, input logic [79:0] key);
    logic [79:0] rk [1:32];
    logic [79:0] k;
    logic [63:0] s;
    k = key;
    for (int i = 1; i <= 32; i++) begin
      rk[i] = k;
      if (i < 32) k = ref_key_update(k, i);
    end
    s = ct ^ rk[32][79:16];
    for (int i = 31; i >= 1; i--) begin
      s = ref_inv_player(s);
      for (int n = 0; n < 16; n++) s[4*n +: 4] = ref_isbox(s[4*n +: 4]);
      s = s ^ rk[i][79:16];
    end
    return s;
  endfunction
endpackage
