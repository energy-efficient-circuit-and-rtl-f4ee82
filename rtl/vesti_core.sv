// vesti_core -- one of the two symmetric cores of the Vesti accelerator.
//
// 36 XNOR-SRAM macros (256 x 64) in four groups of nine. Macro (g, p) stores
// kernel position p (0..8, row-major in the 3x3 kernel) for input channels
// 0..255 (rows) and output channels 64g..64g+63 (columns); for fully-connected
// layers position p holds inputs 256p..256p+255. The four groups share the
// activations, so each cycle computes up to 36 256-input XACs for 256 output
// channels of one output pixel and one activation bit plane.
// Sequencing (start with the layer configuration): the coordinate generator walks
// the output pixels (pooling-window order when pool is set); for each pixel the
// bit planes are processed MSB first, one per cycle. Pipeline per plane:
//   cycle t   activation-memory read of the 3x3 x 256 window (vesti_act_mem)
//   cycle t+1 XNOR evaluation in all 36 macros
//   cycle t+2 thermometer decode + LUT (vesti_adc_decode), ALU accumulate
//   cycle t+3 out_valid with the 256 activations and the output coordinates
// A layer of P-bit activations therefore takes P cycles per output pixel plus a
// three-cycle drain. Weights are written one macro row per cycle (w_*), which
// the double-buffered top does while the other core computes. Batch-norm
// parameters are written per lane (bn_*).
// The organisation follows the accelerator's description; the sequencing
// details, the 6-bit map sizes and the load ports are this implementation's
// choices.
module vesti_core #(
  parameter int NGROUP     = 4,
  parameter int NPOS       = 9,
  parameter int ROWS       = 256,
  parameter int COLS       = 64,
  parameter int BLOCK_ROWS = 128,
  localparam int LANES = NGROUP * COLS,
  localparam int RA = $clog2(BLOCK_ROWS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // weight load
  input  logic               w_we,
  input  logic [5:0]         w_macro,     // g*9 + p
  input  logic [7:0]         w_addr,
  input  logic [COLS-1:0]    w_data,
  // batch-norm parameter load
  input  logic               bn_we,
  input  logic [7:0]         bn_lane,
  input  logic signed [7:0]  bn_scale_in,
  input  logic signed [15:0] bn_offset_in,
  // activation memory write (input image or results of the other core)
  input  logic               aw_en,
  input  logic [5:0]         aw_x,
  input  logic [5:0]         aw_y,
  input  logic [1:0]         aw_plane,
  input  logic [ROWS-1:0]    aw_data,
  input  logic               aw_fc,
  input  logic [3:0]         aw_fc_blk,
  input  logic [RA-1:0]      aw_fc_addr,
  // layer configuration and control
  input  logic               start,
  input  logic [5:0]         map_w,
  input  logic [5:0]         map_h,
  input  logic [4:0]         tiles_w,
  input  logic [RA-1:0]      plane_words,
  input  logic               pad,
  input  logic               fc,
  input  logic [RA-1:0]      fc_addr,
  input  logic               pool,
  input  logic [2:0]         prec,
  input  logic [3:0]         qshift,
  output logic               busy,
  output logic               done,
  // results
  output logic               out_valid,
  output logic [5:0]         out_x,
  output logic [5:0]         out_y,
  output logic [3:0]         out_act [LANES]
);
  // ---------------- sequencing ----------------
  logic        cg_valid, cg_next, cg_wf, cg_wl, cg_last, cg_done;
  logic [5:0]  cx, cy;
  logic [1:0]  plane;
  logic        pool_q, fc_q, multibit;
  logic [2:0]  prec_q;

  // without padding a 3x3 window fits map_w-2 times across the input map
  logic [5:0] out_w, out_h;
  assign out_w = pad ? map_w : map_w - 6'd2;
  assign out_h = pad ? map_h : map_h - 6'd2;
  vesti_coord_gen u_cg (
    .clk, .rst_n, .start, .map_w(fc ? 6'd1 : out_w), .map_h(fc ? 6'd1 : out_h),
    .pool(pool && !fc), .next(cg_next), .valid(cg_valid), .x(cx), .y(cy),
    .win_first(cg_wf), .win_last(cg_wl), .last(cg_last), .done(cg_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      plane <= '0; pool_q <= 1'b0; fc_q <= 1'b0; prec_q <= 3'd1;
    end else if (start) begin
      plane <= 2'(prec - 3'd1); pool_q <= pool && !fc; fc_q <= fc; prec_q <= prec;
    end else if (cg_valid) begin
      plane <= (plane == 2'd0) ? 2'(prec_q - 3'd1) : plane - 2'd1;
    end
  end
  assign multibit = (prec_q > 3'd1);
  assign cg_next  = cg_valid && (plane == 2'd0);

  // control pipeline: stage 1 = XNOR, stage 2 = ALU
  typedef struct packed {
    logic v, bf, bl, wf, wl;
    logic [5:0] x, y;
  } ctl_t;
  ctl_t c0, c1, c2, c3;
  always_comb begin
    c0.v  = cg_valid;
    c0.bf = (plane == 2'(prec_q - 3'd1));
    c0.bl = (plane == 2'd0);
    c0.wf = cg_wf; c0.wl = cg_wl;
    c0.x = pool_q ? (cx >> 1) : cx;
    c0.y = pool_q ? (cy >> 1) : cy;
  end
  logic [2:0] drain;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0; c2 <= '0; c3 <= '0; busy <= 1'b0; done <= 1'b0; drain <= '0;
    end else begin
      c1 <= c0; c2 <= c1; c3 <= c2;
      done <= 1'b0;
      if (start) busy <= 1'b1;
      if (cg_done) drain <= 3'd3;
      else if (drain != 0) begin
        drain <= drain - 3'd1;
        if (drain == 3'd1) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end

  // ---------------- activation memory ----------------
  logic [ROWS-1:0] act_nz [9], act_pos [9];
  vesti_act_mem #(.BLOCK_ROWS(BLOCK_ROWS), .CH(ROWS)) u_am (
    .clk, .map_w, .map_h, .tiles_w, .plane_words, .pad, .multibit, .fc(fc_q),
    .rd_en(cg_valid), .ox(cx), .oy(cy), .plane, .fc_addr,
    .act_nz, .act_pos,
    .wr_en(aw_en), .wx(aw_x), .wy(aw_y), .wplane(aw_plane), .wdata(aw_data),
    .wr_fc(aw_fc), .wr_fc_blk(aw_fc_blk), .wr_fc_addr(aw_fc_addr)
  );

  // ---------------- XNOR-SRAM macros + decode ----------------
  logic signed [7:0] psum [9][LANES];
  for (genvar g = 0; g < NGROUP; g++) begin : g_grp
    for (genvar p = 0; p < NPOS; p++) begin : g_pos
      logic [9:0] therm [COLS];
      logic [COLS-1:0] unused_rd;
      logic [9:0] unused_mux;
      xnor_sram_macro #(.ROWS(ROWS), .COLS(COLS)) u_x (
        .clk, .rst_n,
        .we(w_we && w_macro == 6'(g * NPOS + p)), .re(1'b0), .addr(w_addr), .wdata(w_data),
        .rdata(unused_rd),
        .xnor_en(c1.v), .act_nz(act_nz[p]), .act_pos(act_pos[p]),
        .therm, .col_sel('0), .therm_mux(unused_mux)
      );
      for (genvar c = 0; c < COLS; c++) begin : g_col
        logic [3:0] unused_lvl;
        vesti_adc_decode u_dec (.therm(therm[c]), .level(unused_lvl), .value(psum[p][g*COLS + c]));
      end
    end
  end

  // ---------------- ALU ----------------
  logic signed [7:0]  bn_scale  [LANES];
  logic signed [15:0] bn_offset [LANES];
  always_ff @(posedge clk) if (bn_we) begin
    bn_scale[bn_lane]  <= bn_scale_in;
    bn_offset[bn_lane] <= bn_offset_in;
  end

  vesti_alu #(.LANES(LANES)) u_alu (
    .clk, .rst_n, .in_valid(c2.v), .bit_first(c2.bf), .bit_last(c2.bl),
    .win_first(c2.wf), .win_last(c2.wl), .psum, .prec(prec_q), .qshift,
    .bn_scale, .bn_offset, .out_valid, .out_act
  );
  assign out_x = c3.x;
  assign out_y = c3.y;
endmodule
