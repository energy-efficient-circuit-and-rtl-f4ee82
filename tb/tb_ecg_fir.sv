// Self-checking testbench for ecg_fir (148 taps): random symmetric 8-bit
// coefficients, a random 13-bit input stream with gaps between samples, and a
// reference direct-form convolution over the full tap set (no pre-adder) with
// the same rounding and saturation. Checks the one-cycle output latency.
module tb_ecg_fir;
  localparam int TAPS = 148, NC = 74;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic c_we = 0; logic [7:0] c_addr = 0; logic signed [7:0] c_data = 0;
  logic in_valid = 0; logic signed [12:0] x = 0; logic out_valid; logic signed [12:0] y;
  ecg_fir dut (.*);
  int c [TAPS], hist [TAPS];
  int checks = 0, failures = 0, nsat = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < NC; i++) begin c[i] = int'($urandom % 64) - 32; c[TAPS - 1 - i] = c[i]; end
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < NC; i++) begin @(negedge clk); c_we = 1; c_addr = 8'(i); c_data = 8'(c[i]); end
    @(negedge clk); c_we = 0;
    for (int t = 0; t < 2000; t++) begin
      int acc, e;
      @(negedge clk); in_valid = 1;
      x = (t < 1000) ? 13'($urandom % 512 - 256) : 13'($urandom);
      for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i - 1];
      hist[0] = x;
      acc = 0;
      for (int i = 0; i < TAPS; i++) acc += c[i] * hist[i];
      e = (acc + 64) >>> 7;
      if (e > 4095 || e < -4096) nsat++;
      e = e > 4095 ? 4095 : (e < -4096 ? -4096 : e);
      @(negedge clk); in_valid = 0;
      checks++; if (!out_valid || int'(y) != e) begin failures++; if (failures < 10) $display("t%0d got %0d exp %0d", t, y, e); end
      if ($urandom % 2 == 1) begin
        @(negedge clk);
        checks++; if (out_valid) failures++;    // one result per sample
      end
    end
    checks++; if (nsat == 0) begin failures++; $display("saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
