// intelligent_systems_top -- the four processors side by side on one clock and
// reset: the PIMCA programmable in-memory-computing accelerator (p_* ports), the
// Vesti two-core XNOR-SRAM accelerator (v_*), the FX16 CNN learning processor
// (c_*) and the ECG authentication / cardiac-monitoring processor (e_*).
// The designs are independent; each keeps its own load, control and result
// ports, with timing as described in the corresponding module (pimca_top,
// vesti_top, cnn_top, ecg_top). All submodules use their default (full-size)
// parameters. Placing them together, and sharing clock and reset, is an own
// choice: on silicon they are separate chips in different technologies.
module intelligent_systems_top (
  input  logic clk,
  input  logic rst_n,
  // ---- pimca_top ----
  input  logic p_im_we,
  input  logic [pimca_pkg::PW-1:0] p_im_addr,
  input  pimca_pkg::instr_t p_im_data,
  input  logic p_start,
  output logic p_busy,
  output logic p_done,
  input  logic p_w_we,
  input  logic [2:0] p_w_pe,
  input  logic [4:0] p_w_macro,
  input  logic [7:0] p_w_addr,
  input  logic [pimca_pkg::MCOLS-1:0] p_w_data,
  input  logic p_am_ext_we,
  input  logic p_am_ext_grp,
  input  logic [2:0] p_am_ext_bank,
  input  logic [pimca_pkg::AW-1:0] p_am_ext_addr,
  input  logic [pimca_pkg::AM_WIDTH-1:0] p_am_ext_data,
  output logic p_wb_valid,
  output logic p_wb_grp,
  output logic [pimca_pkg::AW-1:0] p_wb_addr,
  output logic [1:0] p_wb_pair,
  output logic [pimca_pkg::WAYS-1:0] p_wb_data,
  output logic p_ev_repeat,
  output logic p_ev_loop_jump,
  // ---- vesti_top ----
  input  logic v_cfg_we,
  input  logic v_cfg_core,
  input  vesti_pkg::layer_cfg_t v_cfg,
  input  logic v_start,
  input  logic v_start_core,
  output logic [1:0] v_busy,
  output logic [1:0] v_done,
  input  logic v_w_we,
  input  logic v_w_core,
  input  logic [5:0] v_w_macro,
  input  logic [7:0] v_w_addr,
  input  logic [63:0] v_w_data,
  input  logic v_bn_we,
  input  logic v_bn_core,
  input  logic [7:0] v_bn_lane,
  input  logic signed [7:0] v_bn_scale,
  input  logic signed [15:0] v_bn_offset,
  input  logic v_in_we,
  input  logic v_in_core,
  input  logic [5:0] v_in_x,
  input  logic [5:0] v_in_y,
  input  logic [1:0] v_in_plane,
  input  logic [255:0] v_in_data,
  input  logic v_in_fc,
  input  logic [3:0] v_in_fc_blk,
  input  logic [vesti_pkg::RA-1:0] v_in_fc_addr,
  output logic v_res_valid,
  output logic v_res_core,
  output logic [5:0] v_res_x,
  output logic [5:0] v_res_y,
  output logic [3:0] v_res_act [256],
  // ---- cnn_top ----
  input  logic c_ld_we,
  input  logic [1:0] c_ld_sel,
  input  logic [8-1:0] c_ld_blk,
  input  logic [3:0] c_ld_row,
  input  logic signed [15:0] c_ld_data [16],
  input  logic c_start,
  input  logic [1:0] c_cmd_op,
  input  logic [8-1:0] c_n_kb,
  input  logic [8-1:0] c_w_blk,
  input  logic [8-1:0] c_x_blk,
  input  logic c_relu,
  input  logic [1:0] c_rnd_mode,
  input  logic signed [15:0] c_eta,
  input  logic signed [15:0] c_mom,
  output logic c_busy,
  output logic c_done,
  output logic c_res_valid,
  output logic [3:0] c_res_row,
  output logic signed [15:0] c_res_data [16],
  output logic [15:0] c_res_mask,
  output logic [4:0] c_ev_gated_rows,
  output logic [4:0] c_ev_gated_cols,
  output logic c_ev_transpose,
  // ---- ecg_top ----
  input  logic e_x_valid,
  input  logic signed [12:0] e_x,
  input  logic e_fir_c_we,
  input  logic [7:0] e_fir_c_addr,
  input  logic signed [7:0] e_fir_c_data,
  input  logic signed [12:0] e_rpk_thr,
  input  logic [7:0] e_hrv_thr,
  input  logic [1:0] e_nn_sel,
  input  logic e_nn_x_we,
  input  logic [7:0] e_nn_x_addr,
  input  logic signed [11:0] e_nn_x_data,
  input  logic e_nn_w_we,
  input  logic e_nn_b_we,
  input  logic [6:0] e_nn_w_neuron,
  input  logic [3:0] e_nn_w_slot,
  input  logic [7:0] e_nn_w_index,
  input  logic signed [5:0] e_nn_w_value,
  input  logic signed [11:0] e_nn_b_value,
  input  logic e_nn_start,
  input  logic e_enroll,
  input  logic signed [8:0] e_sim_thr,
  output logic e_filt_valid,
  output logic signed [12:0] e_filt,
  output logic e_rpeak,
  output logic e_hr_valid,
  output logic [11:0] e_hr,
  output logic e_hrv_valid,
  output logic e_arrhythmia,
  output logic e_fv_done,
  output logic e_auth_valid,
  output logic signed [8:0] e_auth_cos,
  output logic e_auth_accept
);
  pimca_top u_pimca (
    .clk(clk),
    .rst_n(rst_n),
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
    .ev_loop_jump(p_ev_loop_jump)
  );

  vesti_top u_vesti (
    .clk(clk),
    .rst_n(rst_n),
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
    .res_act(v_res_act)
  );

  cnn_top u_cnn (
    .clk(clk),
    .rst_n(rst_n),
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
    .ev_transpose(c_ev_transpose)
  );

  ecg_top u_ecg (
    .clk(clk),
    .rst_n(rst_n),
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
    .auth_accept(e_auth_accept)
  );
endmodule
