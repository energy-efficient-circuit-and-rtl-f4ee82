// Stimulus and checker for an end-to-end test of cnn_top (used by tb_cnn_top and
// by the chip-level testbench) for one fully-connected layer of a training step:
// forward pass over 32 inputs (two blocks, ReLU), backward pass through the same
// weights read in transpose mode, weight-gradient accumulation from image-major
// reads plus SGD-with-momentum update, and a second forward pass that must use
// the updated weights. All results are compared with a bit-exact reference
// (FX16 products scaled by 2^-8, 22-bit saturating accumulation, rounding,
// ReLU/SGD). Checks the cycle count of each command (one MAC step per cycle,
// 16 shift-out cycles, fixed overhead) and that transpose reads and zero gating
// happened.
module cnn_stim
(
  input  logic clk,
  input  logic rst_n,
  output logic ld_we,
  output logic [1:0] ld_sel,
  output logic [8-1:0] ld_blk,
  output logic [3:0] ld_row,
  output logic signed [15:0] ld_data [16],
  output logic start,
  output logic [1:0] cmd_op,
  output logic [8-1:0] n_kb,
  output logic [8-1:0] w_blk,
  output logic [8-1:0] x_blk,
  output logic relu,
  output logic [1:0] rnd_mode,
  output logic signed [15:0] eta,
  output logic signed [15:0] mom,
  input  logic busy,
  input  logic done,
  input  logic res_valid,
  input  logic [3:0] res_row,
  input  logic signed [15:0] res_data [16],
  input  logic [16-1:0] res_mask,
  input  logic [4:0] ev_gated_rows,
  input  logic [4:0] ev_gated_cols,
  input  logic ev_transpose,
  output int checks,
  output int failures,
  output bit finished
);
  localparam int N = 16, BW = 8;
  initial begin
    ld_we = 0;
    ld_sel = 0;
    ld_blk = 0;
    ld_row = 0;
    foreach (ld_data[i]) ld_data[i] = '0;
    start = 0;
    cmd_op = 0;
    n_kb = 1;
    w_blk = 0;
    x_blk = 0;
    relu = 0;
    rnd_mode = 0;
    eta = 0;
    mom = 0;
    checks = 0; failures = 0; finished = 0;
  end

  int X [16][32], Wt [32][16], D [16][16], M [16][16], E [16][16];
  int cyc = 0, n_t = 0, n_g = 0;
  always @(posedge clk) begin
    cyc++;
    if (ev_transpose) n_t++;
    n_g += ev_gated_rows + ev_gated_cols;
  end

  function automatic int sat(int v, int bits);
    int mx; mx = (1 << (bits - 1)) - 1;
    return v > mx ? mx : (v < -mx - 1 ? -mx - 1 : v);
  endfunction
  function automatic int mac(int acc, int a, int b);
    return sat(acc + ((a * b) >>> 8), 22);
  endfunction
  function automatic int rnd(int v, int mode);
    int sh; sh = 2 * mode;
    return sat(sh == 0 ? v : (v + (1 << (sh - 1))) >>> sh, 16);
  endfunction
  function automatic int r16();
    int v; v = int'($urandom % 1024) - 512;
    return ($urandom % 8 == 0) ? 0 : v;        // some zeros to exercise gating
  endfunction

  task automatic load(int sel, int blk, int row, int v [16]);
    @(negedge clk); ld_we = 1; ld_sel = 2'(sel); ld_blk = BW'(blk); ld_row = 4'(row);
    for (int i = 0; i < N; i++) ld_data[i] = 16'(v[i]);
  endtask
  task automatic run(int op, int nkb, int rm, bit rl, int exp_cycles);
    int t0;
    @(negedge clk); ld_we = 0; start = 1; cmd_op = 2'(op); n_kb = BW'(nkb); rnd_mode = 2'(rm); relu = rl; t0 = cyc;
    @(negedge clk); start = 0;
    fork
      begin @(posedge done); end
      begin
        for (int r = 0; r < N; r++) begin
          @(posedge clk iff res_valid);
          checks++; if (res_row != 4'(r)) failures++;
          for (int i = 0; i < N; i++) begin
            checks++;
            if (int'(res_data[i]) != E[r][i]) begin
              failures++; if (failures < 10) $display("op %0d row %0d el %0d got %0d exp %0d", op, r, i, res_data[i], E[r][i]);
            end
          end
        end
      end
    join
    checks++; if (cyc - t0 != exp_cycles) begin failures++; $display("op %0d cycles %0d exp %0d", op, cyc - t0, exp_cycles); end
  endtask

  task automatic ff_ref(int nk);
    for (int b = 0; b < 16; b++) for (int j = 0; j < 16; j++) begin
      int acc; acc = 0;
      for (int k = 0; k < nk; k++) acc = mac(acc, X[b][k], Wt[k][j]);
      acc = rnd(acc, 1); E[b][j] = acc > 0 ? acc : 0;
    end
  endtask

  initial begin
    int v [16];
    for (int b = 0; b < 16; b++) for (int k = 0; k < 32; k++) X[b][k] = r16();
    for (int k = 0; k < 32; k++) for (int j = 0; j < 16; j++) Wt[k][j] = r16();
    for (int b = 0; b < 16; b++) for (int j = 0; j < 16; j++) D[b][j] = r16();
    for (int k = 0; k < 16; k++) for (int j = 0; j < 16; j++) M[k][j] = r16();
    wait (rst_n); @(posedge clk);
    for (int k = 0; k < 32; k++) begin
      for (int b = 0; b < 16; b++) v[b] = X[b][k];
      load(0, k / 16, k % 16, v);
      for (int j = 0; j < 16; j++) v[j] = Wt[k][j];
      load(2, k / 16, k % 16, v);
    end
    for (int j = 0; j < 16; j++) begin
      for (int b = 0; b < 16; b++) v[b] = D[b][j];
      load(1, 0, j, v);
    end
    for (int k = 0; k < 16; k++) begin
      for (int j = 0; j < 16; j++) v[j] = M[k][j];
      load(3, 0, k, v);
    end
    // forward, 32 inputs
    ff_ref(32);
    run(0, 2, 1, 1, 32 + 16 + 4);
    // backward through block 0 (transpose weight reads)
    for (int b = 0; b < 16; b++) for (int k = 0; k < 16; k++) begin
      int acc; acc = 0;
      for (int j = 0; j < 16; j++) acc = mac(acc, D[b][j], Wt[k][j]);
      E[b][k] = rnd(acc, 1);
    end
    run(1, 1, 1, 0, 16 + 16 + 4);
    // weight gradient and update of block 0
    eta = 16'sd32; mom = 16'sd128;       // 0.125 and 0.5
    for (int k = 0; k < 16; k++) for (int j = 0; j < 16; j++) begin
      int acc, g, nm;
      acc = 0;
      for (int b = 0; b < 16; b++) acc = mac(acc, X[b][k], D[b][j]);
      g = rnd(acc, 2);
      nm = ((128 * M[k][j]) >>> 8) + ((32 * g) >>> 8);
      M[k][j] = sat(nm, 16);
      Wt[k][j] = sat(Wt[k][j] - M[k][j], 16);
      E[k][j] = Wt[k][j];
    end
    run(2, 1, 2, 0, 16 + 16 + 4);
    // forward again over block 0 only: must see the updated weights
    ff_ref(16);
    run(0, 1, 1, 1, 16 + 16 + 4);
    checks++; if (n_t == 0) begin failures++; $display("no transpose reads"); end
    checks++; if (n_g == 0) begin failures++; $display("no gating"); end
    $display("events: transpose_read_cycles=%0d gated_rows_cols=%0d", n_t, n_g);
    finished = 1;
  end
endmodule
