// pimca_act_mem -- activation memory (AM) of the PIMCA accelerator.
//
// Two groups (top, bottom) so that a layer reads one group while its results go
// to the other. Each group has six single-port banks of DEPTH x WIDTH bits. Bank
// pair p = {2p, 2p+1} holds feature-map rows y with y mod 3 = p; the even bank of
// a pair holds channels 0..127 and the odd bank channels 128..255. A row of a bank
// stores one pixel position for 128 channels, at address (y div 3) * pitch + x.
// Because three consecutive feature-map rows always sit in three different bank
// pairs, any 3 x 1 x 256 patch (three rows, one column, 256 channels) is read in a
// single cycle: pair p reads rd_addr when p >= rd_rot (rd_rot = y mod 3 of the top
// row) and rd_addr + rd_pitch otherwise, and the three outputs are rotated so that
// rd_data[0] is the top row. Increasing rd_addr by one slides the patch right.
// Timing: read data is registered (valid the cycle after rd_en). A write stores a
// 256-bit SIMD result into one pair (wr_half chooses which 128-channel halves).
// An external port loads input images and parameters a 128-bit word at a time.
// The split into groups, the six 1024 x 128 banks and the 3-row patch follow the
// accelerator's description; the address formula, the pitch/rotation operands and
// the external load port are this implementation's choices.
module pimca_act_mem #(
  parameter int BANKS = 6,
  parameter int DEPTH = 1024,
  parameter int WIDTH = 128,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic                 clk,
  // patch read
  input  logic                 rd_en,
  input  logic                 rd_grp,
  input  logic [AW-1:0]        rd_addr,
  input  logic [1:0]           rd_rot,
  input  logic [AW-1:0]        rd_pitch,
  output logic [2*WIDTH-1:0]   rd_data [3],
  // result write (SIMD write-back)
  input  logic                 wr_en,
  input  logic                 wr_grp,
  input  logic [AW-1:0]        wr_addr,
  input  logic [1:0]           wr_pair,
  input  logic [1:0]           wr_half,
  input  logic [2*WIDTH-1:0]   wr_data,
  // external load
  input  logic                 ext_we,
  input  logic                 ext_grp,
  input  logic [2:0]           ext_bank,
  input  logic [AW-1:0]        ext_addr,
  input  logic [WIDTH-1:0]     ext_data
);
  logic [WIDTH-1:0] bank_q [2][BANKS];
  logic [1:0]       rot_q;

  for (genvar g = 0; g < 2; g++) begin : g_grp
    for (genvar b = 0; b < BANKS; b++) begin : g_bank
      localparam int PAIR = b / 2;
      localparam int HALF = b % 2;
      logic [WIDTH-1:0] mem [DEPTH];
      logic             re, we;
      logic [AW-1:0]    ra, wa;
      logic [WIDTH-1:0] wd;
      always_comb begin
        re = rd_en && (rd_grp == 1'(g));
        ra = (PAIR >= int'(rd_rot)) ? rd_addr : rd_addr + rd_pitch;
        we = 1'b0; wa = wr_addr; wd = wr_data[HALF*WIDTH +: WIDTH];
        if (wr_en && wr_grp == 1'(g) && wr_pair == 2'(PAIR) && wr_half[HALF]) we = 1'b1;
        if (ext_we && ext_grp == 1'(g) && ext_bank == 3'(b)) begin
          we = 1'b1; wa = ext_addr; wd = ext_data;
        end
      end
      always_ff @(posedge clk) begin
        if (we) mem[wa] <= wd;
        if (re) bank_q[g][b] <= mem[ra];
      end
    end
  end

  logic grp_q;
  always_ff @(posedge clk) if (rd_en) begin rot_q <= rd_rot; grp_q <= rd_grp; end

  always_comb begin
    for (int j = 0; j < 3; j++) begin
      int p;
      p = (int'(rot_q) + j) % 3;
      rd_data[j] = {bank_q[grp_q][2*p+1], bank_q[grp_q][2*p]};
    end
  end

  // single-port banks: a read and a write may not hit the same bank in one cycle
  a_no_conflict: assert property (@(posedge clk)
    !(rd_en && wr_en && rd_grp == wr_grp))
    else $error("activation memory read and write target the same group");
endmodule
