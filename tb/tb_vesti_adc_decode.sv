// Self-checking testbench for vesti_adc_decode: every valid thermometer code maps
// to its level and to -60 + 12*level; codes with one bubble still decode by count.
module tb_vesti_adc_decode;
  logic [9:0] therm; logic [3:0] level; logic signed [7:0] value;
  int checks = 0, failures = 0;
  vesti_adc_decode dut (.*);
  initial begin
    for (int l = 0; l <= 10; l++) begin
      therm = 10'((1 << l) - 1);
      #1;
      checks++;
      if (int'(level) != l || int'(value) != -60 + 12 * l) begin
        failures++; $display("level %0d got %0d value %0d", l, level, value);
      end
    end
    therm = 10'b0000101111; #1;
    checks++; if (level != 4'd5 || value != 8'sd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
