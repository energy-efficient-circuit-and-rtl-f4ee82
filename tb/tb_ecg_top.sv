// End-to-end testbench for ecg_top at full size: clock, reset, watchdog and the
// device; the ECG signal, authentication runs and all checks are in ecg_stim.
module tb_ecg_top;
  logic x_valid; logic signed [12:0] x;
  logic fir_c_we; logic [7:0] fir_c_addr; logic signed [7:0] fir_c_data;
  logic signed [12:0] rpk_thr; logic [7:0] hrv_thr;
  logic [1:0] nn_sel; logic nn_x_we; logic [7:0] nn_x_addr; logic signed [11:0] nn_x_data;
  logic nn_w_we, nn_b_we; logic [6:0] nn_w_neuron; logic [3:0] nn_w_slot;
  logic [7:0] nn_w_index; logic signed [5:0] nn_w_value; logic signed [11:0] nn_b_value;
  logic nn_start, enroll; logic signed [8:0] sim_thr;
  logic filt_valid, rpeak, hr_valid, hrv_valid, arrhythmia, fv_done, auth_valid, auth_accept;
  logic signed [12:0] filt; logic [11:0] hr; logic signed [8:0] auth_cos;
  logic clk = 0, rst_n = 0;
  int checks, failures;
  bit finished;
  always #5 clk = ~clk;

  ecg_top dut (.*);
  ecg_stim stim (.*, .probe_nv(dut.nv), .probe_ni(dut.ni), .probe_nval(dut.nval));

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
  end
  initial begin
    fork
      wait (finished);
      begin repeat (3000000) @(posedge clk); $display("watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
