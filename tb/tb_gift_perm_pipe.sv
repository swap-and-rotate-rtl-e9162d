// tb_gift_perm_pipe: streams random words through the GIFT state ring, S-box writes
// off, with the swap pairs driven by the published encryption schedule, and checks that
// each word leaves the ring one 64-cycle pass later permuted by the GIFT-64 bit
// permutation (most significant bit first in and out). The same is then done in
// decryption mode, where the ring enters at bit 61, leaves at bit 60 and the swap
// pairs 2..7 must apply the inverse permutation. Also checks both nibble writes.
`timescale 1ns/1ps
module tb_gift_perm_pipe;
  import gift_pkg::*;
  import gift_ref_pkg::*;
  logic clk = 0, dec = 0, en = 0, enter_bit = 0, nib_wr = 0;
  logic [NSWAP-1:0] swap_en = '0;
  logic [3:0] nib_in = '0;
  logic exit_bit;
  logic [2:0] enc_nib;
  logic [3:0] dec_nib;
  int checks = 0, failures = 0;
  gift_perm_pipe dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [63:0] w [0:15];
    logic [63:0] got;
    int npass;
    npass = 8;
    for (int d = 0; d < 2; d++) begin
    dec = d[0];
    for (int p = 0; p <= npass; p++) begin
      if (p < npass) w[p] = {$urandom(), $urandom()};
      for (int c = 0; c < 64; c++) begin
        @(negedge clk);
        en = 1;
        swap_en = gift_swap_enables(dec, 6'(c), p < npass, p > 0);
        enter_bit = (p < npass) ? w[p][63 - c] : 1'b0;
        #1;
        got[63 - c] = exit_bit;
      end
      if (p > 0) begin
        checks++;
        if (got !== (dec ? g_inv_player(w[p-1]) : g_player(w[p-1]))) begin
          failures++;
          $display("FAIL dec=%0d pass %0d: got %h", d, p, got);
        end
      end
    end
    end
    dec = 0;
    @(negedge clk);
    swap_en = '0; nib_wr = 1; nib_in = 4'b0110; enter_bit = 0;
    @(negedge clk);
    nib_wr = 0; en = 0; #1;
    checks++;
    if (enc_nib !== 3'b110) begin failures++; $display("FAIL nibble write %b", enc_nib); end
    @(negedge clk);
    dec = 1; en = 1; nib_wr = 1; nib_in = 4'b0101; enter_bit = 1;
    @(negedge clk);
    nib_wr = 0; en = 0; #1;
    checks++;
    if (dec_nib[3:1] !== 3'b101) begin failures++; $display("FAIL decrypt nibble write %b", dec_nib); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
