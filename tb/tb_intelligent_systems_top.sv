// Chip-level end-to-end testbench for intelligent_systems_top at its default
// (full) size. The four processors run their tests at the same time, each
// driven and checked by its stimulus/checker module:
//   pimca_stim  program with a two-level loop and repeats, 3x3 convolution with
//               disabled macros (padding), 18-input accumulation, ADD2 across
//               partner ways, write-back comparison, issue-to-write-back latency
//   vesti_stim  two conv layers on the two cores with double-buffered weight
//               loading, padding, max-pooling, 2-bit activations, inter-core
//               write-back, cycles per layer
//   cnn_stim    forward pass (two input blocks, ReLU), backward pass with
//               transpose weight reads, weight gradient from image-major reads
//               plus SGD-with-momentum update, forward pass with the new weights,
//               command cycle counts, zero gating
//   ecg_stim    148-tap filter, R-peak detection, heart rate and HRV alarms,
//               four sparse networks, enrollment, accept and reject decisions,
//               authentication latency
// Each checker counts its mechanisms and fails if any never happened; this
// testbench adds up checks and failures and fails if any design did not finish.
module tb_intelligent_systems_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic p_im_we;
  logic [pimca_pkg::PW-1:0] p_im_addr;
  pimca_pkg::instr_t p_im_data;
  logic p_start;
  logic p_busy;
  logic p_done;
  logic p_w_we;
  logic [2:0] p_w_pe;
  logic [4:0] p_w_macro;
  logic [7:0] p_w_addr;
  logic [pimca_pkg::MCOLS-1:0] p_w_data;
  logic p_am_ext_we;
  logic p_am_ext_grp;
  logic [2:0] p_am_ext_bank;
  logic [pimca_pkg::AW-1:0] p_am_ext_addr;
  logic [pimca_pkg::AM_WIDTH-1:0] p_am_ext_data;
  logic p_wb_valid;
  logic p_wb_grp;
  logic [pimca_pkg::AW-1:0] p_wb_addr;
  logic [1:0] p_wb_pair;
  logic [pimca_pkg::WAYS-1:0] p_wb_data;
  logic p_ev_repeat;
  logic p_ev_loop_jump;
  logic v_cfg_we;
  logic v_cfg_core;
  vesti_pkg::layer_cfg_t v_cfg;
  logic v_start;
  logic v_start_core;
  logic [1:0] v_busy;
  logic [1:0] v_done;
  logic v_w_we;
  logic v_w_core;
  logic [5:0] v_w_macro;
  logic [7:0] v_w_addr;
  logic [63:0] v_w_data;
  logic v_bn_we;
  logic v_bn_core;
  logic [7:0] v_bn_lane;
  logic signed [7:0] v_bn_scale;
  logic signed [15:0] v_bn_offset;
  logic v_in_we;
  logic v_in_core;
  logic [5:0] v_in_x;
  logic [5:0] v_in_y;
  logic [1:0] v_in_plane;
  logic [255:0] v_in_data;
  logic v_in_fc;
  logic [3:0] v_in_fc_blk;
  logic [vesti_pkg::RA-1:0] v_in_fc_addr;
  logic v_res_valid;
  logic v_res_core;
  logic [5:0] v_res_x;
  logic [5:0] v_res_y;
  logic [3:0] v_res_act [256];
  logic c_ld_we;
  logic [1:0] c_ld_sel;
  logic [8-1:0] c_ld_blk;
  logic [3:0] c_ld_row;
  logic signed [15:0] c_ld_data [16];
  logic c_start;
  logic [1:0] c_cmd_op;
  logic [8-1:0] c_n_kb;
  logic [8-1:0] c_w_blk;
  logic [8-1:0] c_x_blk;
  logic c_relu;
  logic [1:0] c_rnd_mode;
  logic signed [15:0] c_eta;
  logic signed [15:0] c_mom;
  logic c_busy;
  logic c_done;
  logic c_res_valid;
  logic [3:0] c_res_row;
  logic signed [15:0] c_res_data [16];
  logic [15:0] c_res_mask;
  logic [4:0] c_ev_gated_rows;
  logic [4:0] c_ev_gated_cols;
  logic c_ev_transpose;
  logic e_x_valid;
  logic signed [12:0] e_x;
  logic e_fir_c_we;
  logic [7:0] e_fir_c_addr;
  logic signed [7:0] e_fir_c_data;
  logic signed [12:0] e_rpk_thr;
  logic [7:0] e_hrv_thr;
  logic [1:0] e_nn_sel;
  logic e_nn_x_we;
  logic [7:0] e_nn_x_addr;
  logic signed [11:0] e_nn_x_data;
  logic e_nn_w_we;
  logic e_nn_b_we;
  logic [6:0] e_nn_w_neuron;
  logic [3:0] e_nn_w_slot;
  logic [7:0] e_nn_w_index;
  logic signed [5:0] e_nn_w_value;
  logic signed [11:0] e_nn_b_value;
  logic e_nn_start;
  logic e_enroll;
  logic signed [8:0] e_sim_thr;
  logic e_filt_valid;
  logic signed [12:0] e_filt;
  logic e_rpeak;
  logic e_hr_valid;
  logic [11:0] e_hr;
  logic e_hrv_valid;
  logic e_arrhythmia;
  logic e_fv_done;
  logic e_auth_valid;
  logic signed [8:0] e_auth_cos;
  logic e_auth_accept;
  int chk [4], fail [4];
  bit fin [4];

  intelligent_systems_top dut (.*);

  pimca_stim s_p (
    .clk,
    .rst_n,
    .im_we(p_im_we),
    .im_addr(p_im_addr),
    .im_data(p_im_data),
    .start(p_start),
    .busy(p_busy),
    .done(p_done),
    .w_we(p_w_we),
    .w_pe(p_w_pe),
    .w_macro(p_w_macro),
    .w_addr(p_w_addr),
    .w_data(p_w_data),
    .am_ext_we(p_am_ext_we),
    .am_ext_grp(p_am_ext_grp),
    .am_ext_bank(p_am_ext_bank),
    .am_ext_addr(p_am_ext_addr),
    .am_ext_data(p_am_ext_data),
    .wb_valid(p_wb_valid),
    .wb_grp(p_wb_grp),
    .wb_addr(p_wb_addr),
    .wb_pair(p_wb_pair),
    .wb_data(p_wb_data),
    .ev_repeat(p_ev_repeat),
    .ev_loop_jump(p_ev_loop_jump),
    .probe_u0(dut.u_pimca.u0),
    .probe_u2(dut.u_pimca.u2),
    .checks(chk[0]),
    .failures(fail[0]),
    .finished(fin[0])
  );
  vesti_stim s_v (
    .clk,
    .rst_n,
    .cfg_we(v_cfg_we),
    .cfg_core(v_cfg_core),
    .cfg(v_cfg),
    .start(v_start),
    .start_core(v_start_core),
    .busy(v_busy),
    .done(v_done),
    .w_we(v_w_we),
    .w_core(v_w_core),
    .w_macro(v_w_macro),
    .w_addr(v_w_addr),
    .w_data(v_w_data),
    .bn_we(v_bn_we),
    .bn_core(v_bn_core),
    .bn_lane(v_bn_lane),
    .bn_scale(v_bn_scale),
    .bn_offset(v_bn_offset),
    .in_we(v_in_we),
    .in_core(v_in_core),
    .in_x(v_in_x),
    .in_y(v_in_y),
    .in_plane(v_in_plane),
    .in_data(v_in_data),
    .in_fc(v_in_fc),
    .in_fc_blk(v_in_fc_blk),
    .in_fc_addr(v_in_fc_addr),
    .res_valid(v_res_valid),
    .res_core(v_res_core),
    .res_x(v_res_x),
    .res_y(v_res_y),
    .res_act(v_res_act),
    .probe_am_rd_en(dut.u_vesti.g_core[0].u_core.u_am.rd_en),
    .probe_am_rv(dut.u_vesti.g_core[0].u_core.u_am.rv),
    .checks(chk[1]),
    .failures(fail[1]),
    .finished(fin[1])
  );
  cnn_stim s_c (
    .clk,
    .rst_n,
    .ld_we(c_ld_we),
    .ld_sel(c_ld_sel),
    .ld_blk(c_ld_blk),
    .ld_row(c_ld_row),
    .ld_data(c_ld_data),
    .start(c_start),
    .cmd_op(c_cmd_op),
    .n_kb(c_n_kb),
    .w_blk(c_w_blk),
    .x_blk(c_x_blk),
    .relu(c_relu),
    .rnd_mode(c_rnd_mode),
    .eta(c_eta),
    .mom(c_mom),
    .busy(c_busy),
    .done(c_done),
    .res_valid(c_res_valid),
    .res_row(c_res_row),
    .res_data(c_res_data),
    .res_mask(c_res_mask),
    .ev_gated_rows(c_ev_gated_rows),
    .ev_gated_cols(c_ev_gated_cols),
    .ev_transpose(c_ev_transpose),
    .checks(chk[2]),
    .failures(fail[2]),
    .finished(fin[2])
  );
  ecg_stim s_e (
    .clk,
    .rst_n,
    .x_valid(e_x_valid),
    .x(e_x),
    .fir_c_we(e_fir_c_we),
    .fir_c_addr(e_fir_c_addr),
    .fir_c_data(e_fir_c_data),
    .rpk_thr(e_rpk_thr),
    .hrv_thr(e_hrv_thr),
    .nn_sel(e_nn_sel),
    .nn_x_we(e_nn_x_we),
    .nn_x_addr(e_nn_x_addr),
    .nn_x_data(e_nn_x_data),
    .nn_w_we(e_nn_w_we),
    .nn_b_we(e_nn_b_we),
    .nn_w_neuron(e_nn_w_neuron),
    .nn_w_slot(e_nn_w_slot),
    .nn_w_index(e_nn_w_index),
    .nn_w_value(e_nn_w_value),
    .nn_b_value(e_nn_b_value),
    .nn_start(e_nn_start),
    .enroll(e_enroll),
    .sim_thr(e_sim_thr),
    .filt_valid(e_filt_valid),
    .filt(e_filt),
    .rpeak(e_rpeak),
    .hr_valid(e_hr_valid),
    .hr(e_hr),
    .hrv_valid(e_hrv_valid),
    .arrhythmia(e_arrhythmia),
    .fv_done(e_fv_done),
    .auth_valid(e_auth_valid),
    .auth_cos(e_auth_cos),
    .auth_accept(e_auth_accept),
    .probe_nv(dut.u_ecg.nv),
    .probe_ni(dut.u_ecg.ni),
    .probe_nval(dut.u_ecg.nval),
    .checks(chk[3]),
    .failures(fail[3]),
    .finished(fin[3])
  );

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
  end
  initial begin
    int checks, failures;
    fork
      wait (fin[0] && fin[1] && fin[2] && fin[3]);
      begin repeat (3000000) @(posedge clk); $display("watchdog"); end
    join_any
    checks = 0; failures = 0;
    foreach (chk[i]) begin
      checks += chk[i]; failures += fail[i];
      if (!fin[i]) failures++;
    end
    $display("designs finished: pimca=%0d vesti=%0d cnn=%0d ecg=%0d; failures pimca=%0d vesti=%0d cnn=%0d ecg=%0d",
             fin[0], fin[1], fin[2], fin[3], fail[0], fail[1], fail[2], fail[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
