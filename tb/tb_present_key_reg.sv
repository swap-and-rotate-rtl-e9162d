// tb_present_key_reg: drives the key pipeline with the per-round control sequence
// (61 shifts, three held cycles, tap selection, S-box and counter updates) and
// checks all 32 round keys of random keys against the word-level key schedule,
// for encryption (round keys K1..K32, most significant bit first) and decryption
// (K32..K1, least significant bit first, starting from the final key register).
// The key schedule is the PRESENT definition; holding the key in the last three
// cycles follows the document, the decryption key order is this design's own.
`timescale 1ns/1ps
module tb_present_key_reg;
  import present_ref_pkg::*;
  logic clk = 0, dec = 0, shift = 0, kin = 0, load = 0, sbox_wr = 0, rc_wr = 0;
  logic [1:0] rd_sel = '0;
  logic [3:0] sbox_out;
  logic [4:0] rc = '0;
  logic [3:0] nib;
  logic key_bit, key_tap;
  int checks = 0, failures = 0;
  present_key_reg dut (.*);
  always #5 clk = ~clk;
  // the testbench plays the S-box
  assign sbox_out = dec ? ref_isbox(nib) : ref_sbox(nib);
  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_key(input logic d, input logic [79:0] key);
    logic [79:0] kr [1:32];
    logic [79:0] k, lk;
    logic [63:0] got;
    k = key;
    for (int i = 1; i <= 32; i++) begin kr[i] = k; if (i < 32) k = ref_key_update(k, i); end
    lk = d ? kr[32] : kr[1];
    for (int c = 0; c < 80; c++) begin
      @(negedge clk);
      dec = d; shift = 1; load = 1; sbox_wr = 0; rc_wr = 0; rd_sel = 0;
      kin = d ? lk[c] : lk[79 - c];
    end
    for (int r = 1; r <= 32; r++) begin
      for (int c = 0; c < 64; c++) begin
        @(negedge clk);
        load = 0;
        shift = (c <= 60);
        rd_sel = (c == 62) ? 2'd1 : (c == 63) ? 2'd2 : 2'd0;
        sbox_wr = d ? (r <= 31 && c == 63) : (r >= 2 && c == 0);
        rc_wr = (r <= 31 && c == 63);
        rc = d ? 5'(32 - r) : 5'(r);
        #1;
        if (d) got[c] = key_bit; else got[63 - c] = key_bit;
      end
      checks++;
      if (got !== (d ? kr[33 - r][79:16] : kr[r][79:16])) begin
        failures++;
        $display("FAIL dec=%0d round %0d key %h", d, r, got);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 3; t++) begin
      logic [79:0] key;
      key = 80'({$urandom(), $urandom(), $urandom()});
      one_key(0, key);
      one_key(1, key);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
