// End-to-end testbench for pimca_top at its full default size: clock, reset,
// watchdog and the device; the program, data and all checks are in pimca_stim
// (weights, feature map, a looped and repeated 3x3 convolution program with
// disabled macros, an 18-input accumulation, write-back comparison against a
// reference, issue-to-write-back latency and mechanism counts).
module tb_pimca_top;
  import pimca_pkg::*;
  logic im_we, start, busy, done;
  logic [PW-1:0] im_addr;
  instr_t im_data;
  logic w_we; logic [2:0] w_pe; logic [4:0] w_macro; logic [7:0] w_addr;
  logic [MCOLS-1:0] w_data;
  logic am_ext_we, am_ext_grp; logic [2:0] am_ext_bank;
  logic [AW-1:0] am_ext_addr; logic [AM_WIDTH-1:0] am_ext_data;
  logic wb_valid, wb_grp, ev_repeat, ev_loop_jump;
  logic [AW-1:0] wb_addr; logic [1:0] wb_pair; logic [WAYS-1:0] wb_data;

  logic clk = 0, rst_n = 0;
  int checks, failures;
  bit finished;
  always #5 clk = ~clk;

  pimca_top dut (.*);
  pimca_stim stim (.*, .probe_u0(dut.u0), .probe_u2(dut.u2));

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
  end
  initial begin
    fork
      wait (finished);
      begin repeat (50000) @(posedge clk); $display("watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
