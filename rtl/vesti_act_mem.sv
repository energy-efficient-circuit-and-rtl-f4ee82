// vesti_act_mem -- activation memory buffer of a Vesti core.
//
// Nine SRAM blocks (BLOCK_ROWS x CH bits) hold the input feature maps split into
// 3x3 tiles: pixel (x, y) lives in block (y mod 3)*3 + (x mod 3) at row
// plane*plane_words + (y div 3)*tiles_w + (x div 3), one bit per channel. Any 3x3
// window then touches each block exactly once, so all 9 x CH inputs of a 3x3
// convolution step are read in one cycle without a line buffer.
//  * Address decoder: for the window whose centre is output pixel (ox, oy)
//    (top-left = (ox - pad, oy - pad)), each block works out which window
//    position it serves and its row address. Positions outside the map are not
//    read; they are delivered as zero activations (zero padding).
//  * Rewiring logic: the nine block outputs are permuted back into row-major
//    window order (nine patterns, by window offset mod 3); output position p
//    feeds the XNOR-SRAM macro that stores kernel position p.
//  * Input interpreter: in 1-bit mode (multibit = 0) a stored 1/0 drives the
//    wordlines as +1/-1; in multi-bit mode the selected bit plane drives +1/0.
//    Padded positions drive 0 in both modes.
//  * Fully-connected mode (fc): all nine blocks are read at row
//    plane*plane_words + fc_addr and
//    position p receives block p, giving 9 x CH = 2304 inputs.
// The write port stores one CH-bit bit plane of one pixel per cycle (results of
// the other core). Timing: read request at a rising edge, wordline outputs valid
// the next cycle.
// The 9-block tiling, address decoding with padding, rewiring and interpreter
// follow the accelerator's description. The bit-plane layout, the FC addressing
// and the plain CH-bit words are this implementation's choices; the option of
// pairing two 128-bit half blocks in depth or in width is not modelled.
module vesti_act_mem #(
  parameter int BLOCK_ROWS = 128,
  parameter int CH         = 256,
  localparam int RA = $clog2(BLOCK_ROWS)
) (
  input  logic           clk,
  // layer configuration
  input  logic [5:0]     map_w,        // input map width
  input  logic [5:0]     map_h,        // input map height
  input  logic [4:0]     tiles_w,      // ceil(map_w / 3)
  input  logic [RA-1:0]  plane_words,  // rows per bit plane
  input  logic           pad,          // 1: 'same' 3x3 convolution
  input  logic           multibit,
  input  logic           fc,
  // read
  input  logic           rd_en,
  input  logic [5:0]     ox,
  input  logic [5:0]     oy,
  input  logic [1:0]     plane,
  input  logic [RA-1:0]  fc_addr,
  output logic [CH-1:0]  act_nz  [9],
  output logic [CH-1:0]  act_pos [9],
  // write
  input  logic           wr_en,
  input  logic [5:0]     wx,
  input  logic [5:0]     wy,
  input  logic [1:0]     wplane,
  input  logic [CH-1:0]  wdata,
  input  logic           wr_fc,
  input  logic [3:0]     wr_fc_blk,
  input  logic [RA-1:0]  wr_fc_addr
);
  logic [RA-1:0] ra [9];
  logic          rv [9];      // position valid (inside the map)
  logic [3:0]    pos_of [9];  // window position served by block b
  logic [CH-1:0] q [9];
  logic          v_q [9];
  logic [3:0]    pos_q [9];
  logic          multibit_q;

  // address decoder
  always_comb begin
    for (int b = 0; b < 9; b++) begin
      int br, bc, x0, y0, i, j, xx, yy;
      br = b / 3; bc = b % 3;
      x0 = int'(ox) - int'(pad);
      y0 = int'(oy) - int'(pad);
      i = (br - ((y0 + 3) % 3) + 3) % 3;
      j = (bc - ((x0 + 3) % 3) + 3) % 3;
      xx = x0 + j; yy = y0 + i;
      if (fc) begin
        rv[b] = 1'b1; pos_of[b] = 4'(b); ra[b] = RA'(int'(plane) * int'(plane_words) + int'(fc_addr));
      end else begin
        rv[b] = (xx >= 0) && (yy >= 0) && (xx < int'(map_w)) && (yy < int'(map_h));
        pos_of[b] = 4'(i * 3 + j);
        ra[b] = RA'(int'(plane) * int'(plane_words) + ((yy < 0 ? 0 : yy) / 3) * int'(tiles_w)
                    + (xx < 0 ? 0 : xx) / 3);
      end
    end
  end

  for (genvar b = 0; b < 9; b++) begin : g_blk
    logic [CH-1:0] mem [BLOCK_ROWS];
    logic          we;
    logic [RA-1:0] wa;
    always_comb begin
      if (wr_fc) begin
        we = wr_en && (wr_fc_blk == 4'(b));
        wa = wr_fc_addr;
      end else begin
        we = wr_en && ((int'(wy) % 3) * 3 + int'(wx) % 3 == b);
        wa = RA'(int'(wplane) * int'(plane_words) + (int'(wy) / 3) * int'(tiles_w) + int'(wx) / 3);
      end
    end
    always_ff @(posedge clk) begin
      if (we) mem[wa] <= wdata;
      if (rd_en && rv[b]) q[b] <= mem[ra[b]];
      if (rd_en) begin v_q[b] <= rv[b]; pos_q[b] <= pos_of[b]; end
    end
  end

  always_ff @(posedge clk) if (rd_en) multibit_q <= multibit;

  // rewiring + input interpreter
  always_comb begin
    for (int p = 0; p < 9; p++) begin act_nz[p] = '0; act_pos[p] = '0; end
    for (int b = 0; b < 9; b++) begin
      if (v_q[b]) begin
        if (multibit_q) begin
          act_nz[pos_q[b]]  = q[b];
          act_pos[pos_q[b]] = '1;
        end else begin
          act_nz[pos_q[b]]  = '1;
          act_pos[pos_q[b]] = q[b];
        end
      end
    end
  end
endmodule
