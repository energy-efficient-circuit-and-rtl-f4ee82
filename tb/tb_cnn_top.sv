// End-to-end testbench for cnn_top at full size: clock, reset, watchdog and the
// device; the training-step commands and all checks are in cnn_stim.
module tb_cnn_top;
  localparam int N = 16, BW = 8;
  logic ld_we; logic [1:0] ld_sel; logic [BW-1:0] ld_blk; logic [3:0] ld_row;
  logic signed [15:0] ld_data [N];
  logic start; logic [1:0] cmd_op; logic [BW-1:0] n_kb, w_blk, x_blk;
  logic relu; logic [1:0] rnd_mode; logic signed [15:0] eta, mom;
  logic busy, done, res_valid; logic [3:0] res_row; logic signed [15:0] res_data [N];
  logic [N-1:0] res_mask; logic [4:0] ev_gated_rows, ev_gated_cols; logic ev_transpose;
  logic clk = 0, rst_n = 0;
  int checks, failures;
  bit finished;
  always #5 clk = ~clk;

  cnn_top dut (.*);
  cnn_stim stim (.*);

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
  end
  initial begin
    fork
      wait (finished);
      begin repeat (20000) @(posedge clk); $display("watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
