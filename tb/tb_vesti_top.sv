// End-to-end testbench for vesti_top at full size: clock, reset, watchdog and the
// device; the two-layer double-buffered test and all checks are in vesti_stim.
module tb_vesti_top;
    import vesti_pkg::*;
  logic cfg_we, cfg_core, start, start_core;
  layer_cfg_t cfg;
  logic [1:0] busy, done;
  logic w_we, w_core; logic [5:0] w_macro; logic [7:0] w_addr; logic [63:0] w_data;
  logic bn_we, bn_core; logic [7:0] bn_lane; logic signed [7:0] bn_scale; logic signed [15:0] bn_offset;
  logic in_we, in_core; logic [5:0] in_x, in_y; logic [1:0] in_plane; logic [255:0] in_data;
  logic in_fc; logic [3:0] in_fc_blk; logic [RA-1:0] in_fc_addr;
  logic res_valid, res_core; logic [5:0] res_x, res_y; logic [3:0] res_act [256];

  logic clk = 0, rst_n = 0;
  int checks, failures;
  bit finished;
  always #5 clk = ~clk;

  vesti_top dut (.*);
  vesti_stim stim (.*, .probe_am_rd_en(dut.g_core[0].u_core.u_am.rd_en), .probe_am_rv(dut.g_core[0].u_core.u_am.rv));

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
  end
  initial begin
    fork
      wait (finished);
      begin repeat (100000) @(posedge clk); $display("watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
