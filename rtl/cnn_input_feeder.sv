// cnn_input_feeder -- input memory with 4x4-interleaved storage so that any 4x4
// patch of a feature map, including patches that hang over the border (zero
// padding), is read from 16 different SRAMs in one cycle.
//
// Storage: 16 SRAMs of DEPTH 16-bit words. Pixel (x, y) of a map is held in SRAM
// (y mod 4)*4 + (x mod 4) at address base + (y div 4)*tiles_w + (x div 4).
// Read: rd_en with the patch origin (ox, oy), signed so that negative origins
// express padding; patch element e = 4*i + j is pixel (ox + j, oy + i). Each
// SRAM computes which of its pixels falls into the patch, so every element has
// its own address; elements outside 0..map_w-1 x 0..map_h-1 read as zero.
// rd_data is registered (one-cycle latency). Write: one pixel per cycle.
// Paper: 16 input SRAMs of 16,384 16-bit rows, storage pattern that guarantees
// any 4x4 patch lies in 16 different SRAMs, any zero padding by address
// generation and remapping. Own choices: exact address formula, per-pixel write
// port. The two-level FIFO array that reuses overlapping patches between cycles
// is not built here; each patch is read directly from the SRAMs.
module cnn_input_feeder #(
  parameter int DEPTH = 16384,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic [AW-1:0]       base,
  input  logic [7:0]          map_w,
  input  logic [7:0]          map_h,
  input  logic [5:0]          tiles_w,
  input  logic                we,
  input  logic [7:0]          wx,
  input  logic [7:0]          wy,
  input  logic signed [15:0]  wdata,
  input  logic                rd_en,
  input  logic signed [8:0]   ox,
  input  logic signed [8:0]   oy,
  output logic signed [15:0]  rd_data [16]
);
  logic [15:0] sram [16][DEPTH];
  logic [15:0] q [16];
  logic [15:0] v;
  logic [3:0]  pos [16];
  for (genvar s = 0; s < 16; s++) begin : g_sram
    localparam int SI = s / 4, SJ = s % 4;
    // patch row i with (oy + i) mod 4 == SI and column j with (ox + j) mod 4 == SJ
    logic [1:0] i, j;
    logic signed [9:0] py, px;
    logic in_map;
    logic [AW-1:0] addr;
    assign i  = 2'(SI) - oy[1:0];
    assign j  = 2'(SJ) - ox[1:0];
    assign py = 10'(oy) + 10'(i);
    assign px = 10'(ox) + 10'(j);
    assign in_map = py >= 0 && px >= 0 && py < 10'(map_h) && px < 10'(map_w);
    assign addr = in_map ? base + AW'(py[9:2]) * AW'(tiles_w) + AW'(px[9:2]) : '0;
    always_ff @(posedge clk) begin
      if (we && wy[1:0] == 2'(SI) && wx[1:0] == 2'(SJ))
        sram[s][base + AW'(wy[7:2]) * AW'(tiles_w) + AW'(wx[7:2])] <= wdata;
      if (rd_en) begin
        q[s]   <= sram[s][addr];
        v[s]   <= in_map;
        pos[s] <= {i, j};
      end
    end
  end
  // remapping: patch element 4*i + j comes from the SRAM that holds it
  always_comb begin
    for (int e = 0; e < 16; e++) rd_data[e] = '0;
    for (int s = 0; s < 16; s++) if (v[s]) rd_data[pos[s]] = q[s];
  end
endmodule
