// Stimulus and checker for an end-to-end test of pimca_top (used by tb_pimca_top
// and by the chip-level testbench): loads random 1-bit weights into PE 0, a random
// 6 x 6 x 256 binary feature map into the top activation-memory group and a short
// program: a two-iteration hardware loop over row triplets, each iteration a
// repeated input-load instruction and a repeated 3x3-convolution instruction
// (left-column macros disabled, as for zero padding) whose SIMD step adds an
// immediate bias and writes the sign bits to the bottom group; then one 18-input
// (5x5-style) accumulation combined with ADD2 across partner ways. Every
// write-back is compared with an independent reference of the macros' ideal
// MAC and 11-level quantization. Also checks the instruction-to-write-back
// latency and counts repeats, loop jumps, disabled macros and both adder modes.
module pimca_stim
  import pimca_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  output logic                  im_we,
  output logic [PW-1:0]         im_addr,
  output instr_t                im_data,
  output logic                  start,
  input  logic                  busy,
  input  logic                  done,
  output logic                  w_we,
  output logic [2:0]            w_pe,
  output logic [4:0]            w_macro,
  output logic [7:0]            w_addr,
  output logic [MCOLS-1:0]      w_data,
  output logic                  am_ext_we,
  output logic                  am_ext_grp,
  output logic [2:0]            am_ext_bank,
  output logic [AW-1:0]         am_ext_addr,
  output logic [AM_WIDTH-1:0]   am_ext_data,
  input  logic                  wb_valid,
  input  logic                  wb_grp,
  input  logic [AW-1:0]         wb_addr,
  input  logic [1:0]            wb_pair,
  input  logic [WAYS-1:0]       wb_data,
  input  logic                  ev_repeat,
  input  logic                  ev_loop_jump,
  input  uop_t                  probe_u0,     // pipeline register after fetch/decode
  input  uop_t                  probe_u2,     // pipeline register at the in-memory MAC
  output int                    checks,
  output int                    failures,
  output bit                    finished
);
  localparam int W = 6, STEP = 14;
  initial begin
    im_we = 0; start = 0; im_addr = 0; im_data = '0; w_we = 0; w_pe = 0; w_macro = 0; w_addr = 0;
    w_data = 0; am_ext_we = 0; am_ext_grp = 0; am_ext_bank = 0; am_ext_addr = 0; am_ext_data = 0;
    checks = 0; failures = 0; finished = 0;
  end

  logic [MCOLS-1:0] wt [NMACRO][MROWS];
  logic [255:0] fmap [6][W];     // [y][x] 256 channels
  int n_rep = 0, n_jump = 0, n_wb = 0, n_pad = 0, n_mode9 = 0, n_mode18 = 0;
  localparam logic [17:0] MASK = ~18'b000001_000001_000001;

  function automatic int qz(int s);
    int l; l = 0;
    for (int k = 0; k < 10; k++) if (2 * s > (2 * k - 9) * STEP) l++;
    return l - 5;
  endfunction
  function automatic int mac(int m, int col, logic [255:0] a);
    int s; s = 0;
    for (int r = 0; r < MROWS; r++) s += (a[r] == wt[m][r][col]) ? 1 : -1;
    return qz(s);
  endfunction

  // expected 3x3 result for output window with columns x0..x0+2, rows y0..y0+2
  function automatic logic [255:0] exp3(int y0, int x0, int bias);
    logic [255:0] o;
    for (int d = 0; d < 256; d++) begin
      int s; s = 0;
      for (int m = 0; m < NMACRO; m++) begin
        int r, c, cc;
        r = m / 6; c = m % 6; cc = c % 3;   // ir[cc] holds column x0+2-cc
        if (!MASK[m]) continue;
        if ((d < 128) != (c < 3)) continue;
        s += mac(m, d % 128, fmap[y0 + r][x0 + 2 - cc]);
      end
      o[d] = (s + bias) < 0;
    end
    return o;
  endfunction

  instr_t prog [8];
  task automatic mk();
    for (int i = 0; i < 8; i++) prog[i] = '0;
    prog[0].itype = I_LS; prog[0].lvl = 3'd0; prog[0].lcount = 16'd2;
    prog[0].rd_stride = 10'(W); prog[0].wr_stride = 10'd4;
    prog[1].itype = I_REG; prog[1].rd_en = 1; prog[1].rd_addr = 0; prog[1].rd_pitch = 10'(W);
    prog[1].in_shift = 1; prog[1].rep = 6'd1;
    prog[2].itype = I_REG; prog[2].rd_en = 1; prog[2].rd_addr = 2; prog[2].rd_pitch = 10'(W);
    prog[2].in_shift = 1; prog[2].pe_en = 1; prog[2].macro_en = MASK;
    prog[2].simd_en = 1; prog[2].op = S_ADD; prog[2].xsel = X_PE; prog[2].ysel = Y_IMM;
    prog[2].imm = 8'd3; prog[2].zsel = 3'd4;
    prog[2].wr_en = 1; prog[2].wr_addr = 0; prog[2].wr_pair = 0; prog[2].wr_half = 2'b11;
    prog[2].rep = 6'd3;
    prog[3].itype = I_LE; prog[3].lvl = 0; prog[3].ltarget = 10'd1;
    prog[4].itype = I_REG; prog[4].pe_en = 1; prog[4].macro_en = '1; prog[4].acc18 = 1;
    prog[4].simd_en = 1; prog[4].op = S_ADD2; prog[4].xsel = X_PE; prog[4].ysel = Y_PEX;
    prog[4].zsel = 3'd4; prog[4].wr_en = 1; prog[4].wr_addr = 10'd20; prog[4].wr_pair = 2'd1;
    prog[4].wr_half = 2'b11;
    prog[5].itype = I_HALT;
  endtask

  // expected write-backs: 8 from the loop, 1 from the 18-input step
  logic [255:0] expv [9];
  int exp_addr [9];
  task automatic mk_exp();
    for (int it = 0; it < 2; it++)
      for (int k = 0; k < 4; k++) begin
        expv[it*4+k] = exp3(3*it, k, 3);
        exp_addr[it*4+k] = it * 4 + k;
      end
    // 18-input mode: ir[0..2] hold x=5,4,3 of rows 3..5; ir[3..5] still reset (all -1)
    for (int d = 0; d < 256; d++) begin
      int s, p;
      s = 0; p = 0;
      for (int m = 0; m < NMACRO; m++) begin
        int r, c;
        logic [255:0] a;
        r = m / 6; c = m % 6;
        a = (c < 3) ? fmap[3 + r][5 - c] : '0;
        if (d < 128) s += mac(m, d, a);
        else p += mac(m, d - 128, a);
      end
      // lanes < 128: 2*sum + 0 ; lanes >= 128: 2*0 + sum(partner)
      expv[8][d] = (d < 128) ? ((2 * s) < 0) : (p < 0);
    end
    exp_addr[8] = 20;
  endtask

  always @(posedge clk) begin
    if (ev_repeat) n_rep++;
    if (ev_loop_jump) n_jump++;
    if (probe_u2.valid && probe_u2.pe_en) begin
      if (probe_u2.acc18) n_mode18++; else n_mode9++;
      if (probe_u2.macro_en != '1) n_pad++;
    end
  end

  int issue_cycle, wb_cycle, cyc;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    if (probe_u0.valid && probe_u0.wr_en && issue_cycle < 0) issue_cycle = cyc;
    if (wb_valid) begin
      if (wb_cycle < 0) wb_cycle = cyc;
      if (n_wb < 9) begin
        checks++;
        if (wb_data !== expv[n_wb] || int'(wb_addr) != exp_addr[n_wb] || !wb_grp) begin
          failures++;
          $display("write-back %0d mismatch addr %0d (exp %0d) ones got %0d exp %0d", n_wb, wb_addr,
                   exp_addr[n_wb], $countones(wb_data), $countones(expv[n_wb]));
        end
      end
      n_wb++;
    end
  end

  initial begin
    issue_cycle = -1; wb_cycle = -1; cyc = 0;
    for (int m = 0; m < NMACRO; m++) for (int r = 0; r < MROWS; r++) wt[m][r] = {$urandom, $urandom, $urandom, $urandom};
    for (int y = 0; y < 6; y++) for (int x = 0; x < W; x++)
      fmap[y][x] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    mk(); mk_exp();
    wait (rst_n); @(posedge clk);
    for (int m = 0; m < NMACRO; m++) for (int r = 0; r < MROWS; r++) begin
      @(negedge clk); w_we = 1; w_pe = 0; w_macro = 5'(m); w_addr = 8'(r); w_data = wt[m][r];
    end
    @(negedge clk); w_we = 0;
    for (int y = 0; y < 6; y++) for (int x = 0; x < W; x++) for (int h = 0; h < 2; h++) begin
      @(negedge clk); am_ext_we = 1; am_ext_grp = 0; am_ext_bank = 3'(2 * (y % 3) + h);
      am_ext_addr = AW'((y / 3) * W + x); am_ext_data = fmap[y][x][h*128 +: 128];
    end
    @(negedge clk); am_ext_we = 0;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); im_we = 1; im_addr = PW'(i); im_data = prog[i];
    end
    @(negedge clk); im_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (done);
    repeat (8) @(posedge clk);
    checks++; if (n_wb != 9) begin failures++; $display("write-backs %0d", n_wb); end
    checks++; if (wb_cycle - issue_cycle != 4) begin failures++; $display("issue->WB latency %0d", wb_cycle - issue_cycle); end
    checks++; if (n_rep != 2 * (1 + 3)) begin failures++; $display("repeats %0d", n_rep); end
    checks++; if (n_jump != 1) begin failures++; $display("loop jumps %0d", n_jump); end
    checks++; if (n_pad == 0) begin failures++; $display("no disabled-macro MAC"); end
    checks++; if (n_mode9 == 0 || n_mode18 == 0) begin failures++; $display("adder modes %0d %0d", n_mode9, n_mode18); end
    $display("events: repeats=%0d loop_jumps=%0d padded_macs=%0d mode9=%0d mode18=%0d wb=%0d",
             n_rep, n_jump, n_pad, n_mode9, n_mode18, n_wb);
    finished = 1;
  end
endmodule
