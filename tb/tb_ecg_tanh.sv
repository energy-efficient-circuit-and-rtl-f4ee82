// Self-checking testbench for ecg_tanh: all 4096 inputs against tanh(x); the
// error must be within the table resolution (step 1/32 of the input, i.e. at
// most 1/64 times the slope, plus rounding) and the output exactly odd.
module tb_ecg_tanh;
  logic signed [11:0] x, y; logic signed [11:0] yn;
  ecg_tanh dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = -2047; v < 2048; v++) begin
      real r, e, ex, err;
      x = 12'(v); #1;
      r = v / 256.0; e = $exp(2.0 * r); ex = (e - 1.0) / (e + 1.0) * 1024.0;
      err = y - ex; if (err < 0) err = -err;
      checks++; if (err > 17.0) begin failures++; if (failures < 10) $display("x=%0d y=%0d exp %f", v, y, ex); end
      yn = y; x = 12'(-v); #1;
      checks++; if (y != -yn) begin failures++; $display("odd x=%0d %0d %0d", v, y, yn); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
