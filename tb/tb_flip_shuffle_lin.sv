// tb_flip_shuffle_lin: loads random 530-bit keys and runs complete Knuth shuffles
// (i = 529 down to 1, random j <= i) through the one-swap-per-cycle register,
// comparing the register with a reference bit array after every cycle. Counts the
// three cases of a step (bits differ and toggle, bits equal, i = j) and fails if any
// never occurred. Checks the latency of one cycle per swap, 530 cycles per shuffle
// including the load, and that step = 0 leaves the register unchanged.
`timescale 1ns/1ps
module tb_flip_shuffle_lin;
  localparam int N = 530, IW = 10;
  logic clk = 0, load = 0, step = 0;
  logic [N-1:0] key = '0;
  logic [IW-1:0] i = '0, j = '0;
  logic [N-1:0] state;
  int checks = 0, failures = 0;
  int n_toggle = 0, n_equal = 0, n_same_index = 0, cycles;
  flip_shuffle_lin dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] model;
    for (int s = 0; s < 6; s++) begin
      for (int k = 0; k < N; k++) model[k] = 1'($urandom());
      @(negedge clk);
      load = 1; key = model; cycles = 1;
      @(negedge clk);
      load = 0;
      checks++;
      if (state !== model) begin failures++; $display("FAIL load, shuffle %0d", s); end
      for (int ii = N - 1; ii >= 1; ii--) begin
        int jj;
        jj = (s == 1) ? ii : $urandom_range(ii, 0);   // shuffle 1: only i = j
        i = IW'(ii); j = IW'(jj); step = 1;
        if (ii == jj) n_same_index++;
        else if (model[ii] != model[jj]) n_toggle++;
        else n_equal++;
        begin
          logic t;
          t = model[ii]; model[ii] = model[jj]; model[jj] = t;
        end
        @(negedge clk);
        cycles++;
        checks++;
        if (state !== model) begin
          failures++;
          $display("FAIL shuffle %0d step i=%0d j=%0d", s, ii, jj);
        end
      end
      step = 0;
      checks++;
      if (cycles != N) begin failures++; $display("FAIL shuffle took %0d cycles", cycles); end
      // Idle cycles with a pending differing pair must not change anything.
      i = IW'(N - 1); j = '0;
      repeat (3) @(negedge clk);
      checks++;
      if (state !== model) begin failures++; $display("FAIL register moved with step=0"); end
    end
    checks += 3;
    if (n_toggle == 0) begin failures++; $display("FAIL no toggling swap"); end
    if (n_equal == 0) begin failures++; $display("FAIL no equal-bit swap"); end
    if (n_same_index == 0) begin failures++; $display("FAIL no i = j step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
