// tb_swap_rotate_top: end-to-end test of the whole design at its default sizes.
// The four circuits run at the same time:
//  - PRESENT-80: a published test vector and a random block are encrypted, and both
//    ciphertexts decrypted again, each block checked against the reference model
//    and for its 2128-cycle latency;
//  - GIFT-64-128: a published test vector and a random block are encrypted and
//    decrypted again, checked against the reference model and for the 1920-cycle
//    (encryption) and 1984-cycle (decryption) latency;
//  - FLIP, linear-time register: a random 530-bit key is loaded once and shuffled
//    64 times in a row, each shuffle continuing from the previous register
//    contents, which gives 64 keystream bits; the filter output is compared with
//    a reference shuffle after every swap. The first shuffle must take 530 cycles
//    including the load, all 64 together 1 + 64 x 529;
//  - FLIP, rotate-based register: a random key is shuffled twice in a row with
//    random indices (with j withheld now and then, and forced Delta = 0 and 1
//    steps), the keystream bit after each shuffle compared with the reference and
//    the cycle count with the operation count.
// Each mechanism is counted (encrypt, decrypt, toggling swap, swap of equal bits,
// i = j, Delta = 0, Delta = 1, Delta > 1, withheld index) and one that never
// happened counts as a failure.
`timescale 1ns/1ps
module tb_swap_rotate_top;
  import present_ref_pkg::*;
  import gift_ref_pkg::*;
  import flip_ref_pkg::*;
  localparam int N = 530, IW = 10;
  localparam int FLIP_BITS = 64;   // keystream bits produced by the linear-time register

  logic clk = 1'b0, rst_n = 1'b0;
  logic pr_start = 0, pr_dec = 0, pr_kin = 0, pr_din = 0;
  logic pr_key_take, pr_data_take, pr_dout, pr_dout_valid, pr_done, pr_busy;
  logic gf_start = 0, gf_dec = 0, gf_kin = 0, gf_din = 0;
  logic gf_key_take, gf_data_take, gf_dout, gf_dout_valid, gf_done, gf_busy;
  logic fl_load = 0, fl_step = 0;
  logic [N-1:0] fl_key = '0;
  logic [IW-1:0] fl_i = '0, fl_j = '0;
  logic fl_z;
  logic fq_load = 0, fq_start = 0, fq_j_valid = 0;
  logic [N-1:0] fq_key = '0;
  logic [IW-1:0] fq_j = '0;
  logic fq_j_ready, fq_busy, fq_done, fq_z;
  logic [IW-1:0] fq_i;

  int checks = 0, failures = 0;
  int n_pr_enc = 0, n_pr_dec = 0, n_gf_enc = 0, n_gf_dec = 0;
  int n_toggle = 0, n_equal = 0, n_same = 0;
  int n_flip_bits = 0;
  int n_d0 = 0, n_d1 = 0, n_dbig = 0, n_stall = 0;
  int fq_cycles = 0;

  swap_rotate_top dut (.*);

  always #5 clk = ~clk;
  int fq_dones = 0;
  always_ff @(posedge clk) begin
    if (fq_busy) fq_cycles <= fq_cycles + 1;
    if (fq_done) fq_dones <= fq_dones + 1;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check64(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic check_cycles(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d cycles, expected %0d", what, got, exp); end
  endtask

  // PRESENT: encryption takes the key and data MSB first, decryption LSB first.
  task automatic present_block(input logic d, input logic [79:0] key, input logic [63:0] data,
                               output logic [63:0] res, output int cycles);
    int ki, di, oi;
    ki = 0; di = 0; oi = 0; cycles = 0; res = '0;
    @(negedge clk); pr_dec = d; pr_start = 1;
    @(negedge clk); pr_start = 0;
    forever begin
      pr_kin = d ? key[ki] : key[79 - ki];
      pr_din = d ? data[di] : data[63 - di];
      #1;
      if (pr_busy) cycles++;
      @(posedge clk);
      if (pr_key_take) ki++;
      if (pr_data_take) di++;
      if (pr_dout_valid) begin
        if (d) res[oi] = pr_dout; else res[63 - oi] = pr_dout;
        oi++;
      end
      if (pr_done) break;
      @(negedge clk);
    end
  endtask

  task automatic gift_block(input logic d, input logic [127:0] key, input logic [63:0] data,
                            output logic [63:0] res, output int cycles);
    int ki, di, oi;
    ki = 0; di = 0; oi = 0; cycles = 0; res = '0;
    @(negedge clk); gf_start = 1; gf_dec = d;
    @(negedge clk); gf_start = 0;
    forever begin
      gf_kin = key[127 - ki];
      gf_din = data[63 - di];
      #1;
      if (gf_busy) cycles++;
      @(posedge clk);
      if (gf_key_take) ki++;
      if (gf_data_take) di++;
      if (gf_dout_valid) begin res[63 - oi] = gf_dout; oi++; end
      if (gf_done) break;
      @(negedge clk);
    end
  endtask

  task automatic run_present();
    logic [79:0] k;
    logic [63:0] p, ct, pt;
    int cyc;
    for (int t = 0; t < 2; t++) begin
      k = (t == 0) ? '1 : 80'({$urandom(), $urandom(), $urandom()});
      p = (t == 0) ? '0 : {$urandom(), $urandom()};
      present_block(1'b0, k, p, ct, cyc); n_pr_enc++;
      if (t == 0) check64("PRESENT published vector", ct, 64'hE72C46C0F5945049);
      check64("PRESENT encrypt", ct, ref_encrypt(p, k));
      check_cycles("PRESENT encrypt", cyc, 2128);
      present_block(1'b1, ref_last_key(k), ct, pt, cyc); n_pr_dec++;
      check64("PRESENT decrypt", pt, p);
      check_cycles("PRESENT decrypt", cyc, 2128);
    end
  endtask

  task automatic run_gift();
    logic [127:0] k;
    logic [63:0] p, ct, pt;
    int cyc;
    for (int t = 0; t < 2; t++) begin
      k = (t == 0) ? 128'hbd91731eb6bc2713a1f9f6ffc75044e7
                   : {$urandom(), $urandom(), $urandom(), $urandom()};
      p = (t == 0) ? 64'hc450c7727a9b8a7d : {$urandom(), $urandom()};
      gift_block(1'b0, k, p, ct, cyc); n_gf_enc++;
      if (t == 0) check64("GIFT published vector", ct, 64'he3272885fa94ba8b);
      check64("GIFT encrypt", ct, g_encrypt(p, k));
      check_cycles("GIFT encrypt", cyc, 1920);
      gift_block(1'b1, g_last_key(k), ct, pt, cyc); n_gf_dec++;
      check64("GIFT decrypt", pt, p);
      check_cycles("GIFT decrypt", cyc, 1984);
    end
  endtask

  task automatic run_flip_lin();
    logic [N-1:0] model;
    int cycles;
    for (int k = 0; k < N; k++) model[k] = 1'($urandom());
    @(negedge clk); fl_load = 1; fl_key = model; cycles = 1;
    @(negedge clk); fl_load = 0;
    checks++;
    if (fl_z !== ref_filter(model)) begin failures++; $display("FAIL FLIP load keystream bit"); end
    for (int bitn = 0; bitn < FLIP_BITS; bitn++) begin
    for (int ii = N - 1; ii >= 1; ii--) begin
      int jj;
      logic t;
      jj = (ii % 97 == 0) ? ii : $urandom_range(ii, 0);
      if (ii == jj) n_same++;
      else if (model[ii] != model[jj]) n_toggle++;
      else n_equal++;
      t = model[ii]; model[ii] = model[jj]; model[jj] = t;
      fl_i = IW'(ii); fl_j = IW'(jj); fl_step = 1;
      @(negedge clk); cycles++;
      checks++;
      if (fl_z !== ref_filter(model)) begin
        failures++;
        $display("FAIL FLIP linear keystream bit after step i=%0d j=%0d", ii, jj);
      end
    end
    if (bitn == 0) check_cycles("FLIP linear shuffle", cycles, N);
    n_flip_bits++;
    end
    fl_step = 0;
    check_cycles("FLIP linear, 64 keystream bits", cycles, 1 + FLIP_BITS * (N - 1));
  endtask

  task automatic run_flip_quad();
    logic [N-1:0] model;
    int expect_cycles, stalls;
    for (int k = 0; k < N; k++) model[k] = 1'($urandom());
    @(negedge clk); fq_load = 1; fq_key = model;
    for (int sh = 0; sh < 2; sh++) begin
    @(negedge clk); fq_load = 0; fq_start = 1; fq_cycles = 0;
    @(negedge clk); fq_start = 0;
    expect_cycles = 1;
    stalls = 0;
    for (int ii = N - 1; ii >= 1; ii--) begin
      int jj, d;
      logic t;
      case (ii % 50)
        0: jj = ii;
        1: jj = ii - 1;
        default: jj = $urandom_range(ii, 0);
      endcase
      d = ii - jj;
      expect_cycles += (d == 0) ? 1 : 2 * d - 1;
      if (d == 0) n_d0++; else if (d == 1) n_d1++; else n_dbig++;
      t = model[ii]; model[ii] = model[jj]; model[jj] = t;
      fq_j = IW'(jj);
      forever begin
        fq_j_valid = ($urandom_range(7, 0) != 0);
        #1;
        if (fq_j_ready && !fq_j_valid) begin stalls++; n_stall++; end
        if (fq_j_ready && fq_j_valid) begin
          checks++;
          if (fq_i !== IW'(ii)) begin failures++; $display("FAIL FLIP index %0d, expected %0d", fq_i, ii); end
          @(negedge clk);
          break;
        end
        @(negedge clk);
      end
      fq_j_valid = 0;
    end
    while (fq_busy) @(negedge clk);
    checks++;
    if (fq_z !== ref_filter(model)) begin failures++; $display("FAIL FLIP rotate-based keystream bit"); end
    check_cycles("FLIP rotate-based shuffle", fq_cycles, expect_cycles + stalls);
    checks++;
    if (fq_dones != sh + 1) begin failures++; $display("FAIL %0d done pulses", fq_dones); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      run_present();
      run_gift();
      run_flip_lin();
      run_flip_quad();
    join
    checks += 11;
    if (n_pr_enc == 0) begin failures++; $display("FAIL no PRESENT encryption"); end
    if (n_pr_dec == 0) begin failures++; $display("FAIL no PRESENT decryption"); end
    if (n_gf_enc == 0) begin failures++; $display("FAIL no GIFT encryption"); end
    if (n_gf_dec == 0) begin failures++; $display("FAIL no GIFT decryption"); end
    if (n_toggle == 0) begin failures++; $display("FAIL no toggling swap"); end
    if (n_equal == 0) begin failures++; $display("FAIL no swap of equal bits"); end
    if (n_same == 0) begin failures++; $display("FAIL no i = j swap"); end
    if (n_d0 == 0) begin failures++; $display("FAIL no Delta = 0 step"); end
    if (n_d1 == 0) begin failures++; $display("FAIL no Delta = 1 step"); end
    if (n_dbig == 0) begin failures++; $display("FAIL no Delta > 1 step"); end
    if (n_stall == 0) begin failures++; $display("FAIL index never withheld"); end
    $display("mechanisms: present enc=%0d dec=%0d gift enc=%0d dec=%0d flip bits=%0d toggle=%0d equal=%0d i=j=%0d delta0=%0d delta1=%0d delta>1=%0d stalls=%0d",
             n_pr_enc, n_pr_dec, n_gf_enc, n_gf_dec, n_flip_bits, n_toggle, n_equal, n_same, n_d0, n_d1, n_dbig, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
