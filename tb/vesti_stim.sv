// Stimulus and checker for an end-to-end test of vesti_top (used by tb_vesti_top
// and by the chip-level testbench): two 3x3 convolution layers with 2-bit activations.
// Layer 1 runs on core 0 (4x4x256 input, 'same' padding, 2x2 max-pooling) while
// core 1 is still being loaded with layer-2 weights (double buffering); its results
// land in core 1's activation memory. Layer 2 runs on core 1 (2x2x256, padding,
// no pooling) and writes into core 0. Every result pixel is compared with an
// independent reference (ideal XAC per macro, 11-level quantization, bit-plane
// shift-and-accumulate, batch norm, ReLU quantization, max-pooling). Also checks
// the cycles per layer (2 per output pixel per plane plus drain) and counts the
// mechanisms exercised: overlap of weight loading with computing, padding
// (zero positions), pooling windows, multi-bit planes and inter-core write-back.
module vesti_stim
  import vesti_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  output logic cfg_we,
  output logic cfg_core,
  output layer_cfg_t cfg,
  output logic start,
  output logic start_core,
  input  logic [1:0] busy,
  input  logic [1:0] done,
  output logic w_we,
  output logic w_core,
  output logic [5:0] w_macro,
  output logic [7:0] w_addr,
  output logic [63:0] w_data,
  output logic bn_we,
  output logic bn_core,
  output logic [7:0] bn_lane,
  output logic signed [7:0] bn_scale,
  output logic signed [15:0] bn_offset,
  output logic in_we,
  output logic in_core,
  output logic [5:0] in_x,
  output logic [5:0] in_y,
  output logic [1:0] in_plane,
  output logic [255:0] in_data,
  output logic in_fc,
  output logic [3:0] in_fc_blk,
  output logic [RA-1:0] in_fc_addr,
  input  logic res_valid,
  input  logic res_core,
  input  logic [5:0] res_x,
  input  logic [5:0] res_y,
  input  logic [3:0] res_act [256],
  input  logic probe_am_rd_en,
  input  logic probe_am_rv [9],
  output int checks,
  output int failures,
  output bit finished
);
  import vesti_pkg::*;
  initial begin
    cfg_we = 0;
    cfg_core = 0;
    cfg = '0;
    start = 0;
    start_core = 0;
    w_we = 0;
    w_core = 0;
    w_macro = 0;
    w_addr = 0;
    w_data = 0;
    bn_we = 0;
    bn_core = 0;
    bn_lane = 0;
    bn_scale = 0;
    bn_offset = 0;
    in_we = 0;
    in_core = 0;
    in_x = 0;
    in_y = 0;
    in_plane = 0;
    in_data = 0;
    in_fc = 0;
    in_fc_blk = 0;
    in_fc_addr = 0;
    checks = 0; failures = 0; finished = 0;
  end

  logic [63:0] wt [2][36][256];
  int off [2][256];
  int a1 [4][4][256];     // layer-1 input activations (2-bit)
  int a2 [2][2][256];     // layer-1 output = layer-2 input
  int a3 [2][2][256];     // layer-2 output
  int n_overlap = 0, n_res = 0, n_l1 = 0, n_l2 = 0, n_pad = 0;
  localparam int QSH = 3;

  function automatic int decode(int xac);
    int l; l = 0;
    for (int k = 0; k < 10; k++) if (xac > 12 * k - 54) l++;
    return -60 + 12 * l;
  endfunction

  // one output pixel (ox, oy) of a 'same' 3x3 conv on an HxW map of 2-bit acts
  function automatic int conv_px(int c, int H, int W, int ox, int oy, int lane, bit first_layer);
    int acc; acc = 0;
    for (int pl = 1; pl >= 0; pl--) begin
      int s; s = 0;
      for (int p = 0; p < 9; p++) begin
        int x, y, xac, g;
        x = ox - 1 + p % 3; y = oy - 1 + p / 3; g = lane / 64;
        xac = 0;
        if (x >= 0 && y >= 0 && x < W && y < H)
          for (int r = 0; r < 256; r++) begin
            int a;
            a = first_layer ? a1[y][x][r] : a2[y][x][r];
            if ((a >> pl) & 1) xac += wt[c][g * 9 + p][r][lane % 64] ? 1 : -1;
          end
        s += decode(xac);
      end
      acc = 2 * acc + s;
    end
    return acc;
  endfunction
  function automatic int act(int acc, int c, int lane);
    int bn; bn = acc + off[c][lane];
    bn = bn >>> QSH;
    return bn < 0 ? 0 : (bn > 3 ? 3 : bn);
  endfunction

  always @(posedge clk) begin
    if (w_we && (busy[!w_core])) n_overlap++;
    if (probe_am_rd_en) for (int b = 0; b < 9; b++) if (!probe_am_rv[b]) n_pad++;
  end

  // result checker
  always @(posedge clk) if (res_valid) begin
    n_res++;
    for (int l = 0; l < 256; l++) begin
      int e;
      e = res_core ? a3[res_y][res_x][l] : a2[res_y][res_x][l];
      checks++;
      if (int'(res_act[l]) != e) begin
        failures++;
        if (failures < 10) $display("core %0d (%0d,%0d) lane %0d got %0d exp %0d", res_core, res_x, res_y, l, res_act[l], e);
      end
    end
  end

  task automatic load_w(int c);
    for (int m = 0; m < 36; m++) for (int r = 0; r < 256; r++) begin
      @(negedge clk); w_we = 1; w_core = 1'(c); w_macro = 6'(m); w_addr = 8'(r); w_data = wt[c][m][r];
      if (c == 1 && m == 3 && r == 0) begin start = 1; start_core = 0; end
      else start = 0;
    end
    @(negedge clk); w_we = 0; start = 0;
  endtask

  int t0, t1, cyc;
  always @(posedge clk) cyc++;

  initial begin
    cyc = 0;
    for (int c = 0; c < 2; c++) begin
      for (int m = 0; m < 36; m++) for (int r = 0; r < 256; r++) wt[c][m][r] = {$urandom, $urandom};
      for (int l = 0; l < 256; l++) off[c][l] = int'($urandom % 64) - 24;
    end
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) for (int r = 0; r < 256; r++) a1[y][x][r] = $urandom % 4;
    // reference
    for (int y = 0; y < 2; y++) for (int x = 0; x < 2; x++) for (int l = 0; l < 256; l++) begin
      int m; m = 0;
      for (int k = 0; k < 4; k++) begin
        int v; v = act(conv_px(0, 4, 4, 2 * x + k % 2, 2 * y + k / 2, l, 1), 0, l);
        if (v > m) m = v;
      end
      a2[y][x][l] = m;
    end
    for (int y = 0; y < 2; y++) for (int x = 0; x < 2; x++) for (int l = 0; l < 256; l++)
      a3[y][x][l] = act(conv_px(1, 2, 2, x, y, l, 0), 1, l);

    wait (rst_n); @(posedge clk);
    // configuration: core 0 = layer 1, core 1 = layer 2 (also the storage layout of its input)
    cfg = '0; cfg.map_w = 4; cfg.map_h = 4; cfg.tiles_w = 2; cfg.plane_words = 8; cfg.pad = 1;
    cfg.pool = 1; cfg.prec = 2; cfg.qshift = QSH;
    @(negedge clk); cfg_we = 1; cfg_core = 0;
    @(negedge clk); cfg = '0; cfg.map_w = 2; cfg.map_h = 2; cfg.tiles_w = 1; cfg.plane_words = 4;
    cfg.pad = 1; cfg.prec = 2; cfg.qshift = QSH; cfg_core = 1;
    @(negedge clk); cfg = '0; cfg.map_w = 2; cfg.map_h = 2; cfg.tiles_w = 1; cfg.plane_words = 4;
    cfg.prec = 2; cfg.qshift = QSH; cfg_core = 0; cfg_we = 0;
    for (int c = 0; c < 2; c++) for (int l = 0; l < 256; l++) begin
      @(negedge clk); bn_we = 1; bn_core = 1'(c); bn_lane = 8'(l); bn_scale = 1; bn_offset = 16'(off[c][l]);
    end
    @(negedge clk); bn_we = 0;
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) for (int pl = 0; pl < 2; pl++) begin
      @(negedge clk); in_we = 1; in_core = 0; in_x = 6'(x); in_y = 6'(y); in_plane = 2'(pl);
      for (int r = 0; r < 256; r++) in_data[r] = 1'((a1[y][x][r] >> pl) & 1);
    end
    @(negedge clk); in_we = 0;
    load_w(0);
    // layer 1 starts on core 0 while core 1 is being loaded
    fork
      load_w(1);
      begin
        @(posedge start); t0 = cyc;
        @(posedge done[0]); t1 = cyc; n_l1 = t1 - t0;
      end
    join
    // core 0 will receive layer-2 results: give it the layout of its next input
    @(negedge clk); cfg_we = 1; cfg_core = 0;
    @(negedge clk); cfg_we = 0;
    @(negedge clk); start = 1; start_core = 1; t0 = cyc;
    @(negedge clk); start = 0;
    @(posedge done[1]); n_l2 = cyc - t0;
    repeat (10) @(posedge clk);
    checks++; if (n_res != 8) begin failures++; $display("results %0d", n_res); end
    checks++; if (n_overlap == 0) begin failures++; $display("no weight-load overlap"); end
    checks++; if (n_pad == 0) begin failures++; $display("no padding"); end
    // pixels x planes + 3-cycle pipeline drain + 2 cycles of start and done registering
    checks++; if (n_l1 != 32 + 5 || n_l2 != 8 + 5) begin failures++; $display("layer cycles %0d %0d", n_l1, n_l2); end
    $display("events: overlap_cycles=%0d padded_reads=%0d results=%0d l1_cycles=%0d l2_cycles=%0d", n_overlap, n_pad, n_res, n_l1, n_l2);
    finished = 1;
  end
endmodule
