// tb_present_state_pipe: streams random 64-bit words through the state ring with
// the S-box writes off and checks that every word leaves the ring permuted by the
// PRESENT bit permutation (encryption direction, most significant bit first) or
// by its inverse (decryption direction, least significant bit first), with exactly
// one pass of 64 cycles of latency. Also checks the in-place nibble writes.
// The schedule under test follows the document; the nibble-write check is for
// this design's own write positions.
`timescale 1ns/1ps
module tb_present_state_pipe;
  import present_pkg::*;
  import present_ref_pkg::*;
  logic clk = 0, en = 0, dec = 0, enter_bit = 0, nib_wr = 0;
  logic [NSWAP-1:0] swap_en = '0;
  logic [3:0] nib_in = '0;
  logic exit_bit;
  logic [2:0] enc_nib;
  logic [3:0] dec_nib;
  int checks = 0, failures = 0;
  present_state_pipe dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Streams `npass` words; pass p feeds word p and reads the output of word p-1.
  task automatic stream(input logic d, input int npass);
    logic [63:0] w [0:15];
    logic [63:0] got, exp;
    for (int p = 0; p <= npass; p++) begin
      if (p < npass) w[p] = {$urandom(), $urandom()};
      for (int c = 0; c < 64; c++) begin
        @(negedge clk);
        dec = d;
        en = 1;
        swap_en = swap_enables(d, 6'(c), p < npass, p > 0);
        enter_bit = (p < npass) ? (d ? w[p][c] : w[p][63 - c]) : 1'b0;
        #1;
        if (p > 0) begin
          if (d) got[c] = exit_bit; else got[63 - c] = exit_bit;
        end
      end
      if (p > 0) begin
        exp = d ? ref_inv_player(w[p-1]) : ref_player(w[p-1]);
        checks++;
        if (got !== exp) begin
          failures++;
          $display("FAIL dec=%0d pass %0d: got %h expected %h", d, p, got, exp);
        end
      end
    end
    @(negedge clk);
    en = 0;
    swap_en = '0;
  endtask

  initial begin
    stream(0, 6);
    stream(1, 6);
    // Nibble write, encryption side: positions 3..0 take nib_in.
    @(negedge clk);
    dec = 0; en = 1; nib_wr = 1; nib_in = 4'hA; enter_bit = 0;
    @(negedge clk);
    nib_wr = 0; en = 0; #1;
    checks++;
    if (enc_nib !== 3'b010) begin
      failures++; $display("FAIL enc nibble write: %b", enc_nib);
    end
    // Decryption side: bits 3..1 go to positions 50..52.
    @(negedge clk);
    dec = 1; en = 1; nib_wr = 1; nib_in = 4'b1010;
    @(negedge clk);
    nib_wr = 0; en = 0; #1;
    checks++;
    if (dec_nib[2:0] !== 3'b101) begin
      failures++; $display("FAIL dec nibble write: %b", dec_nib);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
