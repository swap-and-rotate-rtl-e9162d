// tb_present_ctrl: runs the sequencer through one encryption and one decryption
// block and counts its strobes against the numbers the schedule implies: 80 load
// cycles of which 64 take data, 2128 cycles per block, 64 output cycles, one S-box
// write per nibble per full round, one key S-box and one counter write per round,
// 61 key shifts per round, and the number of swap firings listed in the schedule.
// The 2128-cycle total and the schedule follow the document; the strobe
// interface checked here is this design's own.
`timescale 1ns/1ps
module tb_present_ctrl;
  import present_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, dec = 0;
  phase_e phase;
  logic [5:0] round, count;
  logic key_take, data_take, st_sbox_wr, key_sbox_wr, rc_wr, key_shift, feed, out_valid, done;
  logic [NSWAP-1:0] swap_en;
  logic [4:0] rc;
  logic [1:0] key_rd_sel;
  int checks = 0, failures = 0;
  present_ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  task automatic block(input logic d, input int swaps_per_block);
    int n_cyc, n_key, n_data, n_sb, n_ksb, n_rc, n_sh, n_out, n_sw, rcsum;
    n_cyc = 0; n_key = 0; n_data = 0; n_sb = 0; n_ksb = 0; n_rc = 0; n_sh = 0; n_out = 0; n_sw = 0; rcsum = 0;
    @(negedge clk); dec = d; start = 1;
    @(negedge clk); start = 0;
    do begin
      #1;
      n_cyc++;
      n_key += int'(key_take); n_data += int'(data_take); n_sb += int'(st_sbox_wr);
      n_ksb += int'(key_sbox_wr); n_rc += int'(rc_wr); n_sh += int'(key_shift);
      n_out += int'(out_valid); n_sw += $countones(swap_en);
      if (rc_wr) rcsum += int'(rc);
      @(negedge clk);
    end while (!(phase == PH_IDLE));
    expect_eq("cycles per block", n_cyc, 2128);
    expect_eq("key load cycles", n_key, 80);
    expect_eq("data load cycles", n_data, 64);
    expect_eq("state S-box writes", n_sb, 31 * 16);
    expect_eq("key S-box writes", n_ksb, 31);
    expect_eq("counter writes", n_rc, 31);
    expect_eq("counter sum", rcsum, 31 * 32 / 2);
    expect_eq("key shifts", n_sh, 80 + 32 * 61);
    expect_eq("output cycles", n_out, 64);
    expect_eq("swap firings", n_sw, swaps_per_block);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Per block: 31 passes of the "current" list and 31 of the "previous" list.
    // Encryption lists: 10+2, 7+1, 3+1, 1+11, 0+8, 0+4 = 48 entries per pass pair.
    block(0, 31 * 48);
    // Decryption lists: 8+4, 4+4, 1+3, 11+1, 7+1, 4+0 = 48.
    block(1, 31 * 48);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
