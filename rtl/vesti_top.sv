// vesti_top -- Vesti: double-buffered DNN accelerator built from 72 XNOR-SRAM macros.
//
// Two symmetric cores (vesti_core, 36 macros each) run a network layer by layer
// in ping-pong fashion: while one core computes a layer from its activation
// memory, the other core's macros are reprogrammed row by row with the next
// layer's weights (w_* port, e.g. from DRAM), hiding the slow in-memory write.
// The computing core's results are written straight into the other core's
// activation memory, so the next layer starts there without any transfer.
// Results leave a core as 256 activations of up to 4 bits per output pixel; a
// write-back serializer stores them as bit planes, one plane per cycle (P cycles
// for P-bit activations, which is never longer than the P cycles the core needs
// per output pixel). Each core has its own configuration record (cfg_we),
// written before the layer that uses it; the destination core's record decides
// where incoming results are stored (map tiling, bit planes, or FC blocks).
// All results are also visible on res_*.
// Double buffering, the two cores and inter-core write-back follow the
// accelerator's description; the command/configuration interface and the
// serializer are this implementation's choices. Precision must be the same in
// consecutive layers (the serializer writes the producer's precision).
module vesti_top
  import vesti_pkg::*;
#(
  parameter int BLOCK_ROWS = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration and control
  input  logic               cfg_we,
  input  logic               cfg_core,
  input  layer_cfg_t         cfg,
  input  logic               start,
  input  logic               start_core,
  output logic [1:0]         busy,
  output logic [1:0]         done,
  // weight load (DRAM side)
  input  logic               w_we,
  input  logic               w_core,
  input  logic [5:0]         w_macro,
  input  logic [7:0]         w_addr,
  input  logic [63:0]        w_data,
  // batch-norm parameter load
  input  logic               bn_we,
  input  logic               bn_core,
  input  logic [7:0]         bn_lane,
  input  logic signed [7:0]  bn_scale,
  input  logic signed [15:0] bn_offset,
  // input activation load
  input  logic               in_we,
  input  logic               in_core,
  input  logic [5:0]         in_x,
  input  logic [5:0]         in_y,
  input  logic [1:0]         in_plane,
  input  logic [255:0]       in_data,
  input  logic               in_fc,
  input  logic [3:0]         in_fc_blk,
  input  logic [RA-1:0]      in_fc_addr,
  // results
  output logic               res_valid,
  output logic               res_core,
  output logic [5:0]         res_x,
  output logic [5:0]         res_y,
  output logic [3:0]         res_act [256]
);
  layer_cfg_t cfg_r [2];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_r[0] <= '0; cfg_r[1] <= '0;
    end else if (cfg_we) begin
      cfg_r[cfg_core] <= cfg;
    end
  end

  logic       ov [2];
  logic [5:0] ox [2], oy [2];
  logic [3:0] oact [2][256];

  // write-back serializer (one result pixel in flight)
  logic       sv;
  logic       s_dst;
  logic [1:0] s_plane, s_last;
  logic [5:0] s_x, s_y;
  logic [3:0] s_act [256];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sv <= 1'b0; s_dst <= 1'b0; s_plane <= '0; s_last <= '0; s_x <= '0; s_y <= '0;
      for (int l = 0; l < 256; l++) s_act[l] <= '0;
    end else begin
      if (sv) begin
        if (s_plane == s_last) sv <= 1'b0;
        else s_plane <= s_plane + 2'd1;
      end
      for (int c = 0; c < 2; c++) if (ov[c]) begin
        sv <= 1'b1; s_dst <= !1'(c); s_plane <= '0; s_last <= 2'(cfg_r[c].prec - 3'd1);
        s_x <= ox[c]; s_y <= oy[c]; s_act <= oact[c];
      end
    end
  end

  a_serializer_free: assert property (@(posedge clk) disable iff (!rst_n)
    (ov[0] || ov[1]) |-> (!sv || s_plane == s_last))
    else $error("result arrived before the previous one was written back");
  a_no_port_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(sv && in_we && in_core == s_dst))
    else $error("input load collides with result write-back");

  logic [255:0] s_plane_bits;
  always_comb for (int l = 0; l < 256; l++) s_plane_bits[l] = s_act[l][s_plane];

  for (genvar c = 0; c < 2; c++) begin : g_core
    logic               aw_en, aw_fc;
    logic [5:0]         aw_x, aw_y;
    logic [1:0]         aw_plane;
    logic [255:0]       aw_data;
    logic [3:0]         aw_fc_blk;
    logic [RA-1:0]      aw_fc_addr;
    layer_cfg_t         src;
    always_comb begin
      src = cfg_r[1-c];
      if (sv && s_dst == 1'(c)) begin
        aw_en = 1'b1; aw_x = s_x; aw_y = s_y; aw_plane = s_plane; aw_data = s_plane_bits;
        aw_fc = src.dst_fc; aw_fc_blk = src.dst_fc_blk;
        aw_fc_addr = RA'(int'(s_plane) * int'(cfg_r[c].plane_words) + int'(src.dst_fc_addr));
      end else begin
        aw_en = in_we && in_core == 1'(c); aw_x = in_x; aw_y = in_y; aw_plane = in_plane;
        aw_data = in_data; aw_fc = in_fc; aw_fc_blk = in_fc_blk; aw_fc_addr = in_fc_addr;
      end
    end
    vesti_core #(.BLOCK_ROWS(BLOCK_ROWS)) u_core (
      .clk, .rst_n,
      .w_we(w_we && w_core == 1'(c)), .w_macro, .w_addr, .w_data,
      .bn_we(bn_we && bn_core == 1'(c)), .bn_lane, .bn_scale_in(bn_scale), .bn_offset_in(bn_offset),
      .aw_en, .aw_x, .aw_y, .aw_plane, .aw_data, .aw_fc, .aw_fc_blk, .aw_fc_addr,
      .start(start && start_core == 1'(c)),
      .map_w(cfg_r[c].map_w), .map_h(cfg_r[c].map_h), .tiles_w(cfg_r[c].tiles_w),
      .plane_words(cfg_r[c].plane_words), .pad(cfg_r[c].pad), .fc(cfg_r[c].fc),
      .fc_addr(cfg_r[c].fc_addr), .pool(cfg_r[c].pool), .prec(cfg_r[c].prec),
      .qshift(cfg_r[c].qshift),
      .busy(busy[c]), .done(done[c]),
      .out_valid(ov[c]), .out_x(ox[c]), .out_y(oy[c]), .out_act(oact[c])
    );
  end

  always_comb begin
    res_valid = ov[0] || ov[1];
    res_core  = ov[1];
    res_x     = ov[1] ? ox[1] : ox[0];
    res_y     = ov[1] ? oy[1] : oy[0];
    res_act   = ov[1] ? oact[1] : oact[0];
  end
endmodule
