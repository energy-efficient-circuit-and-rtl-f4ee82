// cnn_top -- FX16 learning processor datapath for fully-connected layers:
// forward pass, backward pass and weight-gradient + SGD-with-momentum update.
//
// Four cyclic dual-read-mode memories (cnn_weight_mem), all organised as 16x16
// blocks addressed by (blk, idx):
//   XM  layer inputs      XM[k][b]  (row = input neuron k, column = image b)
//   DM  output gradients  DM[j][b]  (row = output neuron j, column = image b)
//   WM  weights           WM[k][j]
//   MM  weight momentum   MM[k][j]
// They are loaded through ld_* (ld_sel 0..3 = XM, DM, WM, MM; one 16-word row
// per cycle). A command (start, cmd_op) runs on the 16x16 output-stationary MAC
// array with 16 images as the mini-batch group:
//   OP_FF  (0)  Y[b][j]   = sum_k X[b][k] W[k][j], k over n_kb blocks of 16;
//               a = XM row k (neuron-major), b = WM row k (non-transpose)
//   OP_FB  (1)  Din[b][k] = sum_j D[b][j] W[k][j]; a = DM row j, b = WM
//               column j (transpose read of the same weight SRAMs)
//   OP_UPD (2)  G[k][j]   = sum_b X[b][k] D[b][j]; a = XM column b and b = DM
//               column b (image-major reads), then for every row k:
//               WM' = MM*mom + eta*G, W = W - WM' (written back to WM and MM)
// Results leave the array one row per cycle (serial shift-out), go through the
// configurable rounding (cnn_round, rnd_mode) and the SIMD unit (cnn_simd: ReLU
// when relu is set for OP_FF, pass for OP_FB, SGD for OP_UPD); res_valid/res_row/
// res_data show each row (for OP_UPD the updated weights).
// Timing: one MAC step per cycle (16*n_kb steps for OP_FF, 16 otherwise), one
// cycle memory latency, 16 shift-out cycles, two pipeline cycles; done pulses
// after the last row.
// Paper: 16x16 MAC array with FX16 inputs and FX22 accumulation, broadcast
// operands, serial shift-out, rounding before the 16-way SIMD unit, SGD with
// momentum, cyclic weight storage read in non-transpose (forward) and transpose
// (backward) mode, and the same scheme for neuron-/image-major input access.
// Own choices: command interface instead of the full layer-level instruction
// decoder, fully-connected layers only, 16 images per pass, two-port SRAMs.
module cnn_top #(
  parameter int N     = 16,
  parameter int DEPTH = 4096,
  parameter int FRAC  = 8,
  localparam int BW = $clog2(DEPTH / N)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ld_we,
  input  logic [1:0]         ld_sel,
  input  logic [BW-1:0]      ld_blk,
  input  logic [3:0]         ld_row,
  input  logic signed [15:0] ld_data [N],
  input  logic               start,
  input  logic [1:0]         cmd_op,
  input  logic [BW-1:0]      n_kb,
  input  logic [BW-1:0]      w_blk,
  input  logic [BW-1:0]      x_blk,
  input  logic               relu,
  input  logic [1:0]         rnd_mode,
  input  logic signed [15:0] eta,
  input  logic signed [15:0] mom,
  output logic               busy,
  output logic               done,
  output logic               res_valid,
  output logic [3:0]         res_row,
  output logic signed [15:0] res_data [N],
  output logic [N-1:0]       res_mask,
  output logic [4:0]         ev_gated_rows,
  output logic [4:0]         ev_gated_cols,
  output logic               ev_transpose
);
  localparam logic [1:0] OP_FF = 2'd0, OP_FB = 2'd1, OP_UPD = 2'd2;
  typedef enum logic [1:0] {S_IDLE, S_MAC, S_WAIT, S_DRAIN} state_e;
  state_e st;
  logic [1:0]    op_q;
  logic [BW+3:0] step, nsteps;
  logic [4:0]    drow;
  logic          mac_v, mac_first;

  // ---------------- memories ----------------
  logic x_re, d_re, w_re, m_re, x_t, d_t, w_t;
  logic [BW-1:0] x_rb, d_rb, w_rb;
  logic [3:0] x_ri, d_ri, w_ri;
  logic signed [15:0] x_q [N], d_q [N], w_q [N], m_q [N];
  logic upd_we; logic [3:0] upd_row;
  logic signed [15:0] simd_y [N], simd_wm [N], w_wd [N], m_wd [N];
  always_comb for (int i = 0; i < N; i++) begin
    w_wd[i] = upd_we ? simd_y[i]  : ld_data[i];
    m_wd[i] = upd_we ? simd_wm[i] : ld_data[i];
  end

  cnn_weight_mem #(.N(N), .DEPTH(DEPTH)) u_xm (.clk, .we(ld_we && ld_sel == 2'd0),
    .wr_blk(ld_blk), .wr_row(ld_row), .wdata(ld_data), .re(x_re), .transpose(x_t),
    .rd_blk(x_rb), .rd_idx(x_ri), .rdata(x_q));
  cnn_weight_mem #(.N(N), .DEPTH(DEPTH)) u_dm (.clk, .we(ld_we && ld_sel == 2'd1),
    .wr_blk(ld_blk), .wr_row(ld_row), .wdata(ld_data), .re(d_re), .transpose(d_t),
    .rd_blk(d_rb), .rd_idx(d_ri), .rdata(d_q));
  cnn_weight_mem #(.N(N), .DEPTH(DEPTH)) u_wm (.clk, .we((ld_we && ld_sel == 2'd2) || upd_we),
    .wr_blk(upd_we ? w_blk : ld_blk), .wr_row(upd_we ? upd_row : ld_row),
    .wdata(w_wd), .re(w_re), .transpose(w_t),
    .rd_blk(w_rb), .rd_idx(w_ri), .rdata(w_q));
  cnn_weight_mem #(.N(N), .DEPTH(DEPTH)) u_mm (.clk, .we((ld_we && ld_sel == 2'd3) || upd_we),
    .wr_blk(upd_we ? w_blk : ld_blk), .wr_row(upd_we ? upd_row : ld_row),
    .wdata(m_wd), .re(m_re), .transpose(1'b0),
    .rd_blk(w_blk), .rd_idx(w_ri), .rdata(m_q));

  // read scheduling
  logic [3:0] si;              // index inside the current block
  logic [BW-1:0] kb;           // block of the reduction index (OP_FF)
  assign si = step[3:0];
  assign kb = BW'(step >> 4);
  always_comb begin
    x_re = 1'b0; d_re = 1'b0; w_re = 1'b0; m_re = 1'b0;
    x_t = 1'b0; d_t = 1'b0; w_t = 1'b0;
    x_rb = '0; d_rb = '0; w_rb = w_blk; x_ri = si; d_ri = si; w_ri = si;
    if (st == S_MAC) begin
      case (op_q)
        OP_FF:   begin x_re = 1'b1; x_rb = kb; w_re = 1'b1; w_rb = w_blk + kb; end
        OP_FB:   begin d_re = 1'b1; w_re = 1'b1; w_t = 1'b1; end
        default: begin x_re = 1'b1; x_t = 1'b1; x_rb = x_blk; d_re = 1'b1; d_t = 1'b1; end
      endcase
    end else if (st == S_DRAIN && op_q == OP_UPD) begin
      w_re = 1'b1; m_re = 1'b1; w_ri = drow[3:0];
    end
  end
  assign ev_transpose = w_t || x_t || d_t;

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; op_q <= OP_FF; step <= '0; nsteps <= '0; drow <= '0;
      mac_v <= 1'b0; mac_first <= 1'b0; busy <= 1'b0;
    end else begin
      mac_v <= (st == S_MAC); mac_first <= (st == S_MAC) && step == 0;
      case (st)
        S_IDLE: if (start) begin
          st <= S_MAC; op_q <= cmd_op; step <= '0; busy <= 1'b1;
          nsteps <= (cmd_op == OP_FF) ? {n_kb, 4'd0} : (BW+4)'(16);
        end
        S_MAC: begin
          step <= step + 1'b1;
          if (step == nsteps - 1'b1) st <= S_WAIT;
        end
        S_WAIT: begin st <= S_DRAIN; drow <= '0; end
        S_DRAIN: begin
          drow <= drow + 5'd1;
          if (drow == 5'(N - 1)) begin st <= S_IDLE; busy <= 1'b0; end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---------------- MAC array ----------------
  logic signed [15:0] ma [N], mb [N];
  logic signed [21:0] row [N];
  always_comb begin
    case (op_q)
      OP_FF:   begin ma = x_q; mb = w_q; end
      OP_FB:   begin ma = d_q; mb = w_q; end
      default: begin ma = x_q; mb = d_q; end
    endcase
  end
  cnn_mac_array #(.N(N), .FRAC(FRAC)) u_mac (.clk, .rst_n, .en(mac_v), .clr(mac_first),
    .shift(st == S_DRAIN), .a(ma), .b(mb), .out_row(row), .gated_rows(ev_gated_rows),
    .gated_cols(ev_gated_cols));

  // ---------------- rounding + SIMD ----------------
  logic signed [15:0] rq [N], rr [N];
  logic v1; logic [3:0] row1, row2;
  logic [N-1:0] unused_sat;
  for (genvar i = 0; i < N; i++) begin : g_rnd
    cnn_round u_rnd (.din(row[i]), .mode(rnd_mode), .dout(rr[i]), .saturated(unused_sat[i]));
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; row1 <= '0; row2 <= '0; end
    else begin
      v1 <= (st == S_DRAIN); row1 <= drow[3:0]; row2 <= row1;
      rq <= rr;
    end
  end
  logic [2:0] simd_op;
  logic [3:0] unused_idx [N];
  logic simd_v;
  assign simd_op = (op_q == OP_UPD) ? 3'd4 : (op_q == OP_FF && relu) ? 3'd1 : 3'd0;
  cnn_simd #(.N(N), .FRAC(FRAC)) u_simd (.clk, .rst_n, .in_valid(v1), .op(simd_op), .first(1'b0),
    .x(rq), .mask_in('0), .w(w_q), .wm(m_q), .eta, .mom, .out_valid(simd_v), .y(simd_y),
    .wm_out(simd_wm), .mask_out(res_mask), .idx(unused_idx));

  assign upd_we    = simd_v && op_q == OP_UPD;
  assign upd_row   = row2;
  assign res_valid = simd_v;
  assign res_row   = row2;
  assign res_data  = simd_y;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) done <= 1'b0;
    else done <= simd_v && row2 == 4'(N - 1);
endmodule
