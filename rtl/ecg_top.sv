// ecg_top -- ECG processor datapath: filtering, R-peak and arrhythmia detection,
// sparse-NN feature extraction and cosine-similarity authentication.
//
// Signal path (one raw 13-bit sample per x_valid, 250 samples/s):
//   * noise-rejection FIR (ecg_fir, 148 taps, coefficients via fir_c_*);
//   * R-peak: the filtered signal crossing rpk_thr upwards, at most once per
//     REFR samples (refractory period);
//   * ecg_arrhythmia: heart rate per R-R interval, HRV alarm against hrv_thr.
// Feature path: four ecg_sparse_nn hidden layers (160/50/50/30 inputs, 100
// neurons, 16/5/5/3 non-zero weights: 29 multipliers) are loaded through the
// shared nn_* port (nn_sel picks the network) with normalised beat segments and
// run together after nn_start (100 cycles). Their 4 x 100 tanh outputs form the
// 400-element feature vector. With enroll set it is stored (9 bits per element)
// as the registered user; otherwise it is streamed, one element per cycle, into
// ecg_cosine_sim together with the registered vector, and auth_valid/auth_cos/
// auth_accept report the similarity and the decision against sim_thr.
// Paper: filter/NN sizes, precisions, R-R based HRV, 400-element feature vector
// from four hidden layers, cosine similarity with threshold. Not built here: the
// other band-pass/high-pass/low-pass filters, the adaptive R-peak threshold and
// beat alignment, outlier removal, normalisation and feature averaging over
// beats; the beat segments are supplied already normalised.
// Own choices: the simple threshold R-peak detector and all port formats.
module ecg_top #(
  parameter int REFR = 50
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               x_valid,
  input  logic signed [12:0] x,
  input  logic               fir_c_we,
  input  logic [7:0]         fir_c_addr,
  input  logic signed [7:0]  fir_c_data,
  input  logic signed [12:0] rpk_thr,
  input  logic [7:0]         hrv_thr,
  input  logic [1:0]         nn_sel,
  input  logic               nn_x_we,
  input  logic [7:0]         nn_x_addr,
  input  logic signed [11:0] nn_x_data,
  input  logic               nn_w_we,
  input  logic               nn_b_we,
  input  logic [6:0]         nn_w_neuron,
  input  logic [3:0]         nn_w_slot,
  input  logic [7:0]         nn_w_index,
  input  logic signed [5:0]  nn_w_value,
  input  logic signed [11:0] nn_b_value,
  input  logic               nn_start,
  input  logic               enroll,
  input  logic signed [8:0]  sim_thr,
  output logic               filt_valid,
  output logic signed [12:0] filt,
  output logic               rpeak,
  output logic               hr_valid,
  output logic [11:0]        hr,
  output logic               hrv_valid,
  output logic               arrhythmia,
  output logic               fv_done,
  output logic               auth_valid,
  output logic signed [8:0]  auth_cos,
  output logic               auth_accept
);
  // ---------------- filtering, R-peak, arrhythmia ----------------
  ecg_fir u_nrf (.clk, .rst_n, .c_we(fir_c_we), .c_addr(fir_c_addr), .c_data(fir_c_data),
    .in_valid(x_valid), .x, .out_valid(filt_valid), .y(filt));

  logic signed [12:0] prev;
  logic [7:0] refr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin prev <= '0; refr <= '0; end
    else if (filt_valid) begin
      prev <= filt;
      if (rpeak) refr <= 8'(REFR - 1);
      else if (refr != 0) refr <= refr - 8'd1;
    end
  end
  assign rpeak = filt_valid && filt > rpk_thr && prev <= rpk_thr && refr == 0;

  ecg_arrhythmia u_arr (.clk, .rst_n, .sample_tick(filt_valid), .rpeak, .thr(hrv_thr),
    .hr_valid, .hr, .hrv_valid, .arrhythmia);

  // ---------------- four sparse networks ----------------
  localparam int NIN [4] = '{160, 50, 50, 30};
  localparam int NNZ [4] = '{16, 5, 5, 3};
  logic [3:0] nv, nd;
  logic [6:0] ni [4];
  logic signed [11:0] nval [4];
  for (genvar n = 0; n < 4; n++) begin : g_nn
    logic unused_busy;
    ecg_sparse_nn #(.NIN(NIN[n]), .NNZ(NNZ[n]), .NHID(100)) u_nn (
      .clk, .rst_n, .x_we(nn_x_we && nn_sel == 2'(n)), .x_addr(nn_x_addr), .x_data(nn_x_data),
      .w_we(nn_w_we && nn_sel == 2'(n)), .b_we(nn_b_we && nn_sel == 2'(n)),
      .w_neuron(nn_w_neuron), .w_slot(nn_w_slot), .w_index(nn_w_index), .w_value(nn_w_value),
      .b_value(nn_b_value), .start(nn_start), .busy(unused_busy), .out_valid(nv[n]),
      .out_idx(ni[n]), .out_val(nval[n]), .done(nd[n]));
  end

  // ---------------- feature vectors and authentication ----------------
  logic signed [8:0] fv_new [400];
  logic signed [8:0] fv_reg [400];
  logic enroll_q, cmp;
  logic [8:0] ci;
  always_ff @(posedge clk) begin
    for (int n = 0; n < 4; n++) if (nv[n]) begin
      if (enroll_q) fv_reg[n * 100 + int'(ni[n])] <= 9'(nval[n] >>> 3);
      else          fv_new[n * 100 + int'(ni[n])] <= 9'(nval[n] >>> 3);
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin enroll_q <= 1'b0; cmp <= 1'b0; ci <= '0; fv_done <= 1'b0; end
    else begin
      fv_done <= &nd;
      if (nn_start) enroll_q <= enroll;
      if (&nd && !enroll_q) begin cmp <= 1'b1; ci <= '0; end
      else if (cmp) begin
        ci <= ci + 9'd1;
        if (ci == 9'd399) cmp <= 1'b0;
      end
    end
  end
  ecg_cosine_sim u_cos (.clk, .rst_n, .start(&nd && !enroll_q), .in_valid(cmp), .last(ci == 9'd399),
    .a(fv_new[ci]), .b(fv_reg[ci]), .thr(sim_thr), .out_valid(auth_valid), .cos_out(auth_cos),
    .accept(auth_accept));
endmodule
