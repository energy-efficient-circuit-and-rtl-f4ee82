// Self-checking testbench for pimca_ctrl: a program with two nested hardware loops
// (3 x 2 iterations, with per-level read/write strides) around a repeated regular
// instruction, followed by HALT. The issued micro-operations are compared with the
// expected address sequence, and the cycle count checks that a repetition costs no
// extra cycle and a taken loop jump costs one bubble.
module tb_pimca_ctrl;
  import pimca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic im_we = 0, start = 0, busy, done, ev_repeat, ev_loop_jump;
  logic [PW-1:0] im_addr = 0; instr_t im_data; uop_t uop;
  int checks = 0, failures = 0;
  pimca_ctrl dut (.*);
  instr_t prog [6];
  int exp_rd [$], exp_wr [$];
  int got = 0, cyc = 0, t_start = 0, t_done = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (uop.valid) begin
      checks++;
      if (exp_rd.size() == 0 || int'(uop.rd_addr) != exp_rd[0] || int'(uop.wr_addr) != exp_wr[0] || uop.imm != 8'h5a) begin
        failures++; $display("uop %0d rd %0d wr %0d", got, uop.rd_addr, uop.wr_addr);
      end
      if (exp_rd.size() != 0) begin void'(exp_rd.pop_front()); void'(exp_wr.pop_front()); end
      got++;
    end
  end

  initial begin
    im_data = '0;
    for (int i = 0; i < 6; i++) prog[i] = '0;
    prog[0].itype = I_LS; prog[0].lvl = 3'd1; prog[0].lcount = 16'd3; prog[0].rd_stride = 10'd100; prog[0].wr_stride = 10'd50;
    prog[1].itype = I_LS; prog[1].lvl = 3'd0; prog[1].lcount = 16'd2; prog[1].rd_stride = 10'd10; prog[1].wr_stride = 10'd5;
    prog[2].itype = I_REG; prog[2].rd_addr = 10'd7; prog[2].wr_addr = 10'd1; prog[2].rep = 6'd2; prog[2].imm = 8'h5a;
    prog[3].itype = I_LE; prog[3].lvl = 3'd0; prog[3].ltarget = 10'd2;
    prog[4].itype = I_LE; prog[4].lvl = 3'd1; prog[4].ltarget = 10'd1;
    prog[5].itype = I_HALT;
    for (int o = 0; o < 3; o++) for (int i = 0; i < 2; i++) for (int r = 0; r < 3; r++) begin
      exp_rd.push_back(7 + 100 * o + 10 * i + r);
      exp_wr.push_back(1 + 50 * o + 5 * i + r);
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 6; i++) begin @(negedge clk); im_we = 1; im_addr = PW'(i); im_data = prog[i]; end
    @(negedge clk); im_we = 0; start = 1; t_start = cyc;
    @(negedge clk); start = 0;
    wait (done); t_done = cyc;
    repeat (3) @(posedge clk);
    checks++; if (got != 18) begin failures++; $display("issued %0d", got); end
    // 1 (LS1) + 3 x 10 (LS0, 2 x (3 issues + LE0), LE1) + 5 taken-jump bubbles + HALT + fetch and done latency = 39
    checks++;
    if (t_done - t_start != 39) begin failures++; $display("program cycles %0d", t_done - t_start); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
