// cnn_weight_mem -- dual-read-mode cyclic storage of 16x16 weight blocks.
//
// The memory is 16 independent SRAMs of DEPTH x 16-bit words. A block holds a
// 16x16 matrix W[ix][jx] (ix = pre-synaptic / row index, jx = post-synaptic /
// column index) in 16 consecutive addresses: W[ix][jx] lives in SRAM
// (ix + jx) mod 16 at address 16*blk + ix, i.e. row ix is rotated by ix mod 16.
//   * non-transpose read (transpose = 0, idx = ix): all SRAMs read address
//     16*blk + ix; rdata[jx] = W[ix][jx]   (16 weights of one pre-synaptic neuron)
//   * transpose read (transpose = 1, idx = jx): SRAM s reads address
//     16*blk + ((s - jx) mod 16); rdata[ix] = W[ix][jx]  (16 weights of one
//     post-synaptic neuron)
// Both use one access per SRAM and a bit rotator on the read data, so no
// explicit transpose is needed in the backward pass. Writes store one whole row
// (non-transpose order). Reads are registered: rdata is valid one cycle after re.
// The write port is separate from the read port (two-port SRAMs), an own
// choice that lets weight updates stream back while the next row is read.
// Paper: 16 SRAMs with one 16-bit weight per row, cyclic rotation by mod(ix,16),
// bit rotator, one-cycle access in both modes. Own choice: DEPTH = 4096.
module cnn_weight_mem #(
  parameter int N     = 16,
  parameter int W     = 16,
  parameter int DEPTH = 4096,
  localparam int BW = $clog2(DEPTH / N),
  localparam int IW = $clog2(N)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [BW-1:0]       wr_blk,
  input  logic [IW-1:0]       wr_row,
  input  logic signed [W-1:0] wdata [N],
  input  logic                re,
  input  logic                transpose,
  input  logic [BW-1:0]       rd_blk,
  input  logic [IW-1:0]       rd_idx,
  output logic signed [W-1:0] rdata [N]
);
  logic [W-1:0] sram [N][DEPTH];
  logic [W-1:0] q [N];
  logic [IW-1:0] idx_q;

  for (genvar s = 0; s < N; s++) begin : g_sram
    logic [IW-1:0] col;      // jx stored in this SRAM for the row being written
    logic [IW-1:0] row;      // ix read by this SRAM in transpose mode
    assign col = IW'(s) - wr_row;
    assign row = IW'(s) - rd_idx;
    always_ff @(posedge clk) begin
      if (we) sram[s][{wr_blk, wr_row}] <= wdata[col];
      if (re) q[s] <= sram[s][{rd_blk, transpose ? row : rd_idx}];
    end
  end
  always_ff @(posedge clk) if (re) idx_q <= rd_idx;

  // bit rotator: element e comes from SRAM (e + idx) mod N in both modes
  always_comb for (int e = 0; e < N; e++) rdata[e] = q[IW'(e) + idx_q];
endmodule
