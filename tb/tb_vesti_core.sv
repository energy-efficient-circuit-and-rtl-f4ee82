// Self-checking testbench for vesti_core with binary (1-bit, +/-1) activations:
// (1) a fully-connected layer, 2304 inputs -> 256 outputs, read from the nine
// activation blocks at once; (2) a 5x5 convolution without padding (3x3 outputs).
// Each output is compared with a reference built from ideal XNOR-accumulates per
// macro, the 11-level quantization, batch norm (random signed scale and offset)
// and the sign activation. Also checks the cycle count (one cycle per output pixel
// and bit plane, plus a five-cycle start, pipeline and done overhead).
module tb_vesti_core;
  localparam int RA = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic w_we = 0; logic [5:0] w_macro = 0; logic [7:0] w_addr = 0; logic [63:0] w_data = 0;
  logic bn_we = 0; logic [7:0] bn_lane = 0; logic signed [7:0] bn_scale_in = 0; logic signed [15:0] bn_offset_in = 0;
  logic aw_en = 0; logic [5:0] aw_x = 0, aw_y = 0; logic [1:0] aw_plane = 0; logic [255:0] aw_data = 0;
  logic aw_fc = 0; logic [3:0] aw_fc_blk = 0; logic [RA-1:0] aw_fc_addr = 0;
  logic start = 0; logic [5:0] map_w = 0, map_h = 0; logic [4:0] tiles_w = 0; logic [RA-1:0] plane_words = 0;
  logic pad = 0, fc = 0, pool = 0; logic [RA-1:0] fc_addr = 0; logic [2:0] prec = 1; logic [3:0] qshift = 0;
  logic busy, done, out_valid; logic [5:0] out_x, out_y; logic [3:0] out_act [256];

  vesti_core dut (.*);

  logic [63:0] wt [36][256];
  logic [255:0] fcin [9], img [5][5];
  int sc [256], of [256], expv [3][3][256];
  int checks = 0, failures = 0, nres = 0, cyc = 0, t0;
  bit fc_phase;
  always @(posedge clk) cyc++;

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int decode(int xac);
    int l; l = 0;
    for (int k = 0; k < 10; k++) if (xac > 12 * k - 54) l++;
    return -60 + 12 * l;
  endfunction
  function automatic int xac(logic [255:0] a, int m, int c);
    int s; s = 0;
    for (int r = 0; r < 256; r++) s += (a[r] == wt[m][r][c]) ? 1 : -1;
    return s;
  endfunction
  function automatic int sgn(int acc, int l);
    return (acc * sc[l] + of[l]) >= 0;
  endfunction

  always @(posedge clk) if (out_valid) begin
    nres++;
    for (int l = 0; l < 256; l++) begin
      int e, s;
      s = 0;
      if (fc_phase) begin
        for (int p = 0; p < 9; p++) s += decode(xac(fcin[p], (l / 64) * 9 + p, l % 64));
        e = sgn(s, l);
      end else e = expv[out_y][out_x][l];
      checks++;
      if (int'(out_act[l]) != e) begin failures++; if (failures < 10) $display("(%0d,%0d) lane %0d got %0d exp %0d", out_x, out_y, l, out_act[l], e); end
    end
  end

  initial begin
    for (int m = 0; m < 36; m++) for (int r = 0; r < 256; r++) wt[m][r] = {$urandom, $urandom};
    for (int l = 0; l < 256; l++) begin sc[l] = int'($urandom % 7) - 3; of[l] = int'($urandom % 400) - 200; end
    for (int p = 0; p < 9; p++) fcin[p] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int y = 0; y < 5; y++) for (int x = 0; x < 5; x++)
      img[y][x] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int oy = 0; oy < 3; oy++) for (int ox = 0; ox < 3; ox++) for (int l = 0; l < 256; l++) begin
      int s; s = 0;
      for (int p = 0; p < 9; p++) s += decode(xac(img[oy + p / 3][ox + p % 3], (l / 64) * 9 + p, l % 64));
      expv[oy][ox][l] = sgn(s, l);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int m = 0; m < 36; m++) for (int r = 0; r < 256; r++) begin
      @(negedge clk); w_we = 1; w_macro = 6'(m); w_addr = 8'(r); w_data = wt[m][r];
    end
    @(negedge clk); w_we = 0;
    for (int l = 0; l < 256; l++) begin
      @(negedge clk); bn_we = 1; bn_lane = 8'(l); bn_scale_in = 8'(sc[l]); bn_offset_in = 16'(of[l]);
    end
    @(negedge clk); bn_we = 0;
    for (int p = 0; p < 9; p++) begin
      @(negedge clk); aw_en = 1; aw_fc = 1; aw_fc_blk = 4'(p); aw_fc_addr = 90; aw_data = fcin[p];
    end
    @(negedge clk); aw_fc = 0; plane_words = 16; map_w = 5; map_h = 5; tiles_w = 2;
    for (int y = 0; y < 5; y++) for (int x = 0; x < 5; x++) begin
      @(negedge clk); aw_en = 1; aw_x = 6'(x); aw_y = 6'(y); aw_plane = 0; aw_data = img[y][x];
    end
    @(negedge clk); aw_en = 0;
    // fully-connected layer
    fc_phase = 1; fc = 1; fc_addr = 90; prec = 1;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    @(posedge done);
    checks++; if (cyc - t0 != 1 + 5) begin failures++; $display("fc cycles %0d", cyc - t0); end
    checks++; if (nres != 1) begin failures++; $display("fc results %0d", nres); end
    // 5x5 convolution, no padding: 3x3 outputs, window origin = output coordinate
    @(negedge clk); fc_phase = 0; fc = 0; nres = 0;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    @(posedge done);
    checks++; if (cyc - t0 != 9 + 5) begin failures++; $display("conv cycles %0d", cyc - t0); end
    checks++; if (nres != 9) begin failures++; $display("conv results %0d", nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
