// Stimulus and checker for an end-to-end test of ecg_top (used by tb_ecg_top and
// by the chip-level testbench). A synthetic ECG (flat baseline, R-waves of 1500
// counts, mostly regular beats with premature beats every few beats) is filtered
// by the 148-tap filter (loaded as a 4-tap moving average at the filter centre),
// R-peaks are detected and heart rates / HRV alarms are produced and checked
// against the R-R intervals used to build the signal. Then the four sparse
// networks are loaded with random weights and beat segments; one run enrolls the
// user, a second run with the same segments must give cosine similarity ~1 and
// accept, and a run with different segments is checked against the cosine of
// the feature vectors the networks actually produced. Counts every mechanism
// (filter outputs, R-peaks, heart rates, HRV decisions both ways, NN outputs of
// each network, enrollment, accept and reject) and checks the authentication
// latency (100 neurons + pipeline, then 400 streamed elements + 3 cycles).
module ecg_stim
(
  input  logic clk,
  input  logic rst_n,
  output logic x_valid,
  output logic signed [12:0] x,
  output logic fir_c_we,
  output logic [7:0] fir_c_addr,
  output logic signed [7:0] fir_c_data,
  output logic signed [12:0] rpk_thr,
  output logic [7:0] hrv_thr,
  output logic [1:0] nn_sel,
  output logic nn_x_we,
  output logic [7:0] nn_x_addr,
  output logic signed [11:0] nn_x_data,
  output logic nn_w_we,
  output logic nn_b_we,
  output logic [6:0] nn_w_neuron,
  output logic [3:0] nn_w_slot,
  output logic [7:0] nn_w_index,
  output logic signed [5:0] nn_w_value,
  output logic signed [11:0] nn_b_value,
  output logic nn_start,
  output logic enroll,
  output logic signed [8:0] sim_thr,
  input  logic filt_valid,
  input  logic signed [12:0] filt,
  input  logic rpeak,
  input  logic hr_valid,
  input  logic [11:0] hr,
  input  logic hrv_valid,
  input  logic arrhythmia,
  input  logic fv_done,
  input  logic auth_valid,
  input  logic signed [8:0] auth_cos,
  input  logic auth_accept,
  input  logic [3:0] probe_nv,
  input  logic [6:0] probe_ni [4],
  input  logic signed [11:0] probe_nval [4],
  output int checks,
  output int failures,
  output bit finished
);
  initial begin
    x_valid = 0;
    x = 0;
    fir_c_we = 0;
    fir_c_addr = 0;
    fir_c_data = 0;
    rpk_thr = 13'sd600;
    hrv_thr = 8'd80;
    nn_sel = 0;
    nn_x_we = 0;
    nn_x_addr = 0;
    nn_x_data = 0;
    nn_w_we = 0;
    nn_b_we = 0;
    nn_w_neuron = 0;
    nn_w_slot = 0;
    nn_w_index = 0;
    nn_w_value = 0;
    nn_b_value = 0;
    nn_start = 0;
    enroll = 0;
    sim_thr = 9'sd115;
    checks = 0; failures = 0; finished = 0;
  end

  localparam int NIN [4] = '{160, 50, 50, 30};
  localparam int NNZ [4] = '{16, 5, 5, 3};
  int cyc = 0;
  int n_filt = 0, n_rpk = 0, n_hr = 0, n_arr = 0, n_norm = 0, n_nn [4], n_acc = 0, n_rej = 0, n_enr = 0;
  int rr_list [$], hr_idx = 0;
  int fv [400];
  always @(posedge clk) begin
    cyc++;
    if (filt_valid) n_filt++;
    if (rpeak) n_rpk++;
    if (hrv_valid) begin if (arrhythmia) n_arr++; else n_norm++; end
    for (int n = 0; n < 4; n++) if (probe_nv[n]) begin
      n_nn[n]++;
      fv[n * 100 + int'(probe_ni[n])] = int'(probe_nval[n]) >>> 3;
    end
    if (hr_valid) begin
      int e;
      e = 240000 / rr_list[hr_idx]; hr_idx++;
      n_hr++; checks++;
      if (int'(hr) != e) begin failures++; $display("hr %0d exp %0d", hr, e); end
    end
  end
  task automatic nn_load(bit new_w);
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < NIN[n]; i++) begin
        @(negedge clk); nn_sel = 2'(n); nn_x_we = 1; nn_x_addr = 8'(i); nn_x_data = 12'(int'($urandom % 1024) - 512);
      end
      @(negedge clk); nn_x_we = 0;
      if (new_w) for (int h = 0; h < 100; h++) begin
        for (int k = 0; k < NNZ[n]; k++) begin
          @(negedge clk); nn_w_we = 1; nn_w_neuron = 7'(h); nn_w_slot = 4'(k);
          nn_w_index = 8'($urandom % NIN[n]); nn_w_value = 6'(int'($urandom % 64) - 32);
        end
        @(negedge clk); nn_w_we = 0; nn_b_we = 1; nn_b_value = 12'(int'($urandom % 512) - 256);
        @(negedge clk); nn_b_we = 0;
      end
    end
  endtask
  task automatic auth_run(bit enr, output int cosv, output bit acc);
    int t0;
    @(negedge clk); nn_start = 1; enroll = enr; t0 = cyc;
    @(negedge clk); nn_start = 0;
    @(posedge clk iff fv_done);
    checks++; if (cyc - t0 != 100 + 3) begin failures++; $display("fv cycles %0d", cyc - t0); end
    if (enr) begin n_enr++; cosv = 0; acc = 0; return; end
    t0 = cyc;
    @(posedge clk iff auth_valid);
    checks++; if (cyc - t0 != 400 + 3) begin failures++; $display("auth cycles %0d", cyc - t0); end
    cosv = auth_cos; acc = auth_accept;
    if (acc) n_acc++; else n_rej++;
  endtask

  initial begin
    int cosv, t, beat; bit acc;
    real dot, na, nb, ex;
    int fv_reg [400];
    for (int n = 0; n < 4; n++) n_nn[n] = 0;
    wait (rst_n); @(posedge clk);
    for (int i = 0; i < 74; i++) begin
      @(negedge clk); fir_c_we = 1; fir_c_addr = 8'(i); fir_c_data = (i >= 72) ? 8'sd32 : 8'sd0;
    end
    @(negedge clk); fir_c_we = 0;
    // ---- synthetic ECG ----
    t = 0; beat = 0;
    for (int b = 0; b < 40; b++) begin
      int rr;
      rr = (b % 6 == 4) ? 120 + $urandom % 20 : 210 + $urandom % 10;
      if (b < 39) rr_list.push_back(rr);    // interval to the next R-wave
      for (int s = 0; s < rr; s++) begin
        @(negedge clk); x_valid = 1;
        x = (s < 3) ? 13'sd1500 : 13'(int'($urandom % 40) - 20);
        @(negedge clk); x_valid = 0;
        repeat (2) @(negedge clk);
      end
    end
    repeat (200) begin @(negedge clk); x_valid = 1; x = 0; @(negedge clk); x_valid = 0; repeat (2) @(negedge clk); end
    checks++; if (n_rpk != 40) begin failures++; $display("rpeaks %0d", n_rpk); end
    // ---- authentication ----
    nn_load(1);
    auth_run(1, cosv, acc);
    fv_reg = fv;
    auth_run(0, cosv, acc);
    checks++; if (cosv < 126 || !acc) begin failures++; $display("same user cos %0d acc %0d", cosv, acc); end
    nn_load(0);
    auth_run(0, cosv, acc);
    dot = 0; na = 0; nb = 0;
    foreach (fv[i]) begin dot += fv[i] * fv_reg[i]; na += fv[i] * fv[i]; nb += fv_reg[i] * fv_reg[i]; end
    ex = 128.0 * dot / $sqrt(na * nb);
    checks++; if (cosv - ex > 2.0 || ex - cosv > 2.0 || acc != (cosv > 115)) begin failures++; $display("other cos %0d exp %f", cosv, ex); end
    $display("events: filt=%0d rpeak=%0d hr=%0d hrv_alarm=%0d hrv_normal=%0d nn=%0d/%0d/%0d/%0d enroll=%0d accept=%0d reject=%0d cos_other=%0d",
             n_filt, n_rpk, n_hr, n_arr, n_norm, n_nn[0], n_nn[1], n_nn[2], n_nn[3], n_enr, n_acc, n_rej, cosv);
    checks++; if (n_filt == 0 || n_hr != 39 || n_arr == 0 || n_norm == 0 || n_enr == 0 || n_acc == 0 || n_rej == 0
                  || n_nn[0] == 0 || n_nn[1] == 0 || n_nn[2] == 0 || n_nn[3] == 0) begin
      failures++; $display("a mechanism never happened");
    end
    finished = 1;
  end
endmodule
