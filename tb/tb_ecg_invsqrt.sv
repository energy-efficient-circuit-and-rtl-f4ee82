// Self-checking testbench for ecg_invsqrt: every 14-bit input value is compared
// with 1/sqrt(x); relative error must stay below 0.1 % (48-segment linear fit),
// the input shift must be even and the output shift half of it (k), and inputs
// differing by a factor of 4 must give outputs differing by exactly 2.
module tb_ecg_invsqrt;
  logic [13:0] x; logic [22:0] y; logic [2:0] k;
  ecg_invsqrt dut (.*);
  int checks = 0, failures = 0;
  real maxerr = 0.0;
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [22:0] y4;
    for (int v = 1; v < 16384; v++) begin
      real ex, er;
      x = 14'(v); #1;
      ex = 32768.0 / $sqrt(v / 4096.0);
      er = (y - ex) / ex; if (er < 0) er = -er;
      if (er > maxerr) maxerr = er;
      checks++; if (er > 0.001) begin failures++; if (failures < 10) $display("x=%0d y=%0d exp %f", v, y, ex); end
      checks++; if ((v << (2 * k)) < 4096 || (v << (2 * k)) >= 16384) failures++;
      if (v < 4096) begin
        y4 = y; x = 14'(v * 4); #1;
        checks++; if (y4 != y * 2) begin failures++; if (failures < 10) $display("scale x=%0d", v); end
      end
    end
    x = 0; #1; checks++; if (y != '1) failures++;
    $display("max relative error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
