// tb_present_sbox: checks the PRESENT S-box and inverse S-box against the table of
// the cipher specification, for all 16 inputs.
// Combinational: each input is applied for 1 ns. The tables are the cipher's own;
// the exhaustive check is this bench's choice.
module tb_present_sbox;
  logic dec;
  logic [3:0] din, dout;
  int checks = 0, failures = 0;
  // S(0..15) as listed in the PRESENT specification
  logic [3:0] spec [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                            4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};
  present_sbox dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      dec = 0; din = 4'(v); #1;
      checks++; if (dout !== spec[v]) begin failures++; $display("FAIL S(%0d)=%h", v, dout); end
      dec = 1; din = spec[v]; #1;
      checks++; if (dout !== 4'(v)) begin failures++; $display("FAIL Sinv(%h)=%h", spec[v], dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
