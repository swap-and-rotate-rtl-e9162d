// tb_gift_key_sched: loads random keys into the column-organised key register,
// drives the per-round control (block in use, block being updated, cycle count)
// for 28 rounds and checks that the (U, V) bits delivered for each nibble equal
// the round keys of the GIFT-64 key schedule (U = word 1, V = word 0 of the key
// state of that round). Then the same for decryption: the register is loaded
// with the key state of round 28 and must deliver the round keys 28 down to 1,
// blocks in reverse order and each update undone before the block is used.
`timescale 1ns/1ps
module tb_gift_key_sched;
  logic clk = 0, dec = 0, load = 0, kin = 0, run = 0, upd_en = 0;
  logic [5:0] count = '0;
  logic [1:0] use_blk = '0, upd_blk = '0;
  logic u_bit, v_bit;
  int checks = 0, failures = 0;
  gift_key_sched dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 3; t++) begin
      logic [127:0] key, k;
      logic [15:0] gu, gv;
      key = {$urandom(), $urandom(), $urandom(), $urandom()};
      for (int c = 0; c < 128; c++) begin
        @(negedge clk); load = 1; run = 0; kin = key[127 - c];
      end
      k = key;
      for (int r = 1; r <= 28; r++) begin
        for (int c = 0; c < 64; c++) begin
          @(negedge clk);
          load = 0; run = 1; count = 6'(c);
          use_blk = 2'(r - 1); upd_blk = 2'(r - 2); upd_en = (r >= 2);
          #1;
          if (c % 4 == 2) gu[15 - c / 4] = u_bit;
          if (c % 4 == 3) gv[15 - c / 4] = v_bit;
        end
        checks++;
        if ({gu, gv} !== k[31:0]) begin
          failures++;
          $display("FAIL key %0d round %0d: got %h expected %h", t, r, {gu, gv}, k[31:0]);
        end
        k = {k[17:16], k[31:18], k[11:0], k[15:12], k[127:32]};
      end
      @(negedge clk); run = 0;
    end
    // Decryption.
    for (int t = 0; t < 3; t++) begin
      logic [127:0] key, ks [1:28];
      logic [15:0] gu, gv;
      key = {$urandom(), $urandom(), $urandom(), $urandom()};
      ks[1] = key;
      for (int r = 2; r <= 28; r++)
        ks[r] = {ks[r-1][17:16], ks[r-1][31:18], ks[r-1][11:0], ks[r-1][15:12], ks[r-1][127:32]};
      dec = 1;
      for (int c = 0; c < 128; c++) begin
        @(negedge clk); load = 1; run = 0; kin = ks[28][127 - c];
      end
      for (int p = 1; p <= 28; p++) begin
        for (int c = 0; c < 64; c++) begin
          @(negedge clk);
          load = 0; run = 1; count = 6'(c);
          use_blk = 2'(29 - p); upd_blk = 2'(28 - p); upd_en = (p <= 27);
          #1;
          if (c % 4 == 2) gu[15 - c / 4] = u_bit;
          if (c % 4 == 3) gv[15 - c / 4] = v_bit;
        end
        checks++;
        if ({gu, gv} !== ks[29 - p][31:0]) begin
          failures++;
          $display("FAIL dec key %0d round %0d: got %h expected %h", t, 29 - p, {gu, gv}, ks[29 - p][31:0]);
        end
      end
      @(negedge clk); run = 0; dec = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
