// ecg_arrhythmia -- heart rate from R-R intervals and heart-rate-variability alarm.
//
// sample_tick marks every input sample (FS per second); rpeak (together with
// sample_tick) marks a detected R-peak. The R-R interval is counted in samples;
// at each R-peak after the first, the instantaneous heart rate
// HR = 60 * FS / RR (beats per minute, 12-bit unsigned with 4 fraction bits) is
// computed by a sequential restoring divider (one quotient bit per cycle, 19
// cycles, hr_valid when done). The last three heart rates (four beats) give the
// heart-rate variability as their standard deviation; arrhythmia is raised with
// hrv_valid when that standard deviation exceeds thr (8-bit, 4 fraction bits,
// 0 to 15.9375 bpm). The comparison is done without a square root:
//   std > thr  <=>  3*(h1^2+h2^2+h3^2) - (h1+h2+h3)^2 > 9*thr^2.
// Paper: heart rate as the inverse of the R-R interval, standard deviation of the
// last three heart rates against a programmable threshold. Own choices: the
// divider, number formats and the squared comparison.
module ecg_arrhythmia #(
  parameter int FS = 250
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sample_tick,
  input  logic        rpeak,
  input  logic [7:0]  thr,
  output logic        hr_valid,
  output logic [11:0] hr,
  output logic        hrv_valid,
  output logic        arrhythmia
);
  localparam int NUM = 60 * FS * 16;
  localparam int QW  = $clog2(NUM + 1);
  logic [15:0] cnt, rr;
  logic        have_prev, div_busy;
  logic [4:0]  div_i;
  logic [QW-1:0] quo;
  logic [15:0] rem;
  logic [11:0] h [3];
  logic [1:0]  nh;

  // squared comparison on the history after the new rate is inserted
  logic [13:0] s1;
  logic [25:0] s2;
  logic signed [28:0] lhs;
  logic [19:0] rhs;
  always_comb begin
    s1 = 14'(h[0]) + 14'(h[1]) + 14'(h[2]);
    s2 = 26'(h[0]) * 26'(h[0]) + 26'(h[1]) * 26'(h[1]) + 26'(h[2]) * 26'(h[2]);
    lhs = 29'(3 * 29'(s2)) - 29'(29'(s1) * 29'(s1));
    rhs = 20'(9) * 20'(thr) * 20'(thr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; rr <= '0; have_prev <= 1'b0; div_busy <= 1'b0; div_i <= '0; quo <= '0; rem <= '0;
      hr_valid <= 1'b0; hr <= '0; hrv_valid <= 1'b0; arrhythmia <= 1'b0; nh <= '0;
      for (int i = 0; i < 3; i++) h[i] <= '0;
    end else begin
      hr_valid <= 1'b0; hrv_valid <= 1'b0;
      if (sample_tick) begin
        if (rpeak) begin
          cnt <= 16'd1;
          have_prev <= 1'b1;
          if (have_prev && cnt != 0) begin
            rr <= cnt; div_busy <= 1'b1; div_i <= 5'(QW); quo <= '0; rem <= '0;
          end
        end else if (cnt != 16'hffff) cnt <= cnt + 16'd1;
      end
      if (div_busy) begin
        // restoring division NUM / rr, MSB first
        logic [16:0] t;
        t = {rem, 1'(NUM >> (div_i - 5'd1))};
        if (t >= 17'(rr)) begin rem <= 16'(t - 17'(rr)); quo <= {quo[QW-2:0], 1'b1}; end
        else begin rem <= t[15:0]; quo <= {quo[QW-2:0], 1'b0}; end
        div_i <= div_i - 5'd1;
        if (div_i == 5'd1) div_busy <= 1'b0;
      end
      if (!div_busy && div_i == 5'd0 && quo != 0) begin
        hr <= (quo > QW'(4095)) ? 12'd4095 : 12'(quo);
        hr_valid <= 1'b1;
        h[2] <= h[1]; h[1] <= h[0]; h[0] <= (quo > QW'(4095)) ? 12'd4095 : 12'(quo);
        if (nh != 2'd3) nh <= nh + 2'd1;
        quo <= '0;
      end
      if (hr_valid && nh == 2'd3) begin
        hrv_valid  <= 1'b1;
        arrhythmia <= lhs > 29'(rhs);
      end
    end
  end
endmodule
