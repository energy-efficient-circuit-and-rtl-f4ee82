// Self-checking testbench for ecg_arrhythmia: R-peaks are placed at a sequence of
// regular and premature R-R intervals (random 120..300 samples at 250 Hz, with
// sudden short/long beats); every heart rate (60*250*16/RR, 4 fraction bits)
// and every HRV decision (standard deviation of the last three rates against
// the threshold, computed here in real arithmetic) is compared. Also checks
// that each heart rate appears 20 cycles after its R-peak (divider latency).
module tb_ecg_arrhythmia;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sample_tick = 0, rpeak = 0; logic [7:0] thr = 8'd80;   // 5.0 bpm
  logic hr_valid, hrv_valid, arrhythmia; logic [11:0] hr;
  ecg_arrhythmia dut (.*);
  int checks = 0, failures = 0, n_arr = 0, n_ok = 0, nbeat = 0, cyc = 0, t_peak;
  real h [3];
  always @(posedge clk) cyc++;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int beat = 0; beat < 60; beat++) begin
      int rr, e;
      rr = (beat % 7 == 5) ? 110 + $urandom % 30 : 200 + $urandom % 20;
      if (beat == 0) rr = 50;
      for (int s = 0; s < rr; s++) begin
        @(negedge clk); sample_tick = 1; rpeak = (s == rr - 1);
        if (rpeak) t_peak = cyc;
        @(negedge clk); sample_tick = 0; rpeak = 0;
        repeat (2) @(negedge clk);
      end
      if (beat == 0) continue;           // first R-peak only starts the interval
      e = 240000 / rr;
      @(posedge clk iff hr_valid);
      checks++; if (int'(hr) != e) begin failures++; $display("beat %0d rr %0d hr %0d exp %0d", beat, rr, hr, e); end
      checks++; if (cyc - t_peak != 20) begin failures++; $display("hr latency %0d", cyc - t_peak); end
      h[2] = h[1]; h[1] = h[0]; h[0] = e / 16.0; nbeat++;
      if (nbeat >= 3) begin
        real m, sd;
        m = (h[0] + h[1] + h[2]) / 3.0;
        sd = $sqrt(((h[0] - m) ** 2 + (h[1] - m) ** 2 + (h[2] - m) ** 2) / 3.0);
        @(posedge clk iff hrv_valid); #1;
        checks++;
        if (arrhythmia != (sd > 5.0)) begin failures++; $display("beat %0d sd %f flag %0d", beat, sd, arrhythmia); end
        if (arrhythmia) n_arr++; else n_ok++;
      end
    end
    checks++; if (n_arr == 0 || n_ok == 0) begin failures++; $display("flags %0d/%0d", n_arr, n_ok); end
    $display("arrhythmia beats %0d, normal %0d", n_arr, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
