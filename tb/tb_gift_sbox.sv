// tb_gift_sbox: checks the GIFT S-box against the table of the cipher definition
// and the inverse S-box against that table read backwards (S^-1(S(x)) = x).
// Combinational: each input is applied for 1 ns in each mode. The table is the one
// of the GIFT definition; the exhaustive check in both modes is this bench's own.
`timescale 1ns/1ps
module tb_gift_sbox;
  logic dec;
  logic [3:0] din, dout;
  int checks = 0, failures = 0;
  logic [3:0] spec [16] = '{4'h1, 4'hA, 4'h4, 4'hC, 4'h6, 4'hF, 4'h3, 4'h9,
                            4'h2, 4'hD, 4'hB, 4'h7, 4'h5, 4'h0, 4'h8, 4'hE};
  gift_sbox dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      dec = 1'b0; din = 4'(v); #1;
      checks++; if (dout !== spec[v]) begin failures++; $display("FAIL S(%0d)=%h", v, dout); end
      dec = 1'b1; din = spec[v]; #1;
      checks++; if (dout !== 4'(v)) begin failures++; $display("FAIL S^-1(%h)=%h", spec[v], dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
