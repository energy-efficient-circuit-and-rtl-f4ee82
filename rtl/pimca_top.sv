// pimca_top -- PIMCA: programmable in-memory-computing DNN accelerator.
//
// 108 C3SRAM macros (256 x 128 bitcells each, 3.4 Mb) are grouped into six PEs of
// 18 macros; one PE is active per cycle. A 256-way SIMD processor performs the
// non-MAC operations, and a 2 x 6 x 1024 x 128-bit activation memory (AM) feeds
// the PEs and receives results. Instructions flow through a six-stage pipeline:
//   IF   fetch from instruction memory            (pimca_ctrl)
//   ID   decode, repeat / loop expansion -> uop   (pimca_ctrl)
//   LD   AM patch read (3 rows x 1 column x 256 channels)
//   IMC  shift the patch into the active PE's input registers... then MAC in
//        the selected macros (one cycle later)
//   SIMD one SIMD operation on the adder-tree sums of the active PE
//   WB   write the MSBs of the 256 R4 registers to AM
// Cycle by cycle (uop issued in cycle t): AM read at t (data at t+1), input
// registers of PE pe_sel load at the end of t+1, macros evaluate at the end of
// t+2, SIMD registers update at the end of t+3, AM write at the end of t+4. Reads
// use group rd_grp and write-back goes to the opposite group (ping-pong between
// layers). The SIMD 'data memory' bit of each way is channel w of the top row of
// the patch read by the same instruction.
// Weights are loaded row by row through w_*; input images through am_ext_*.
// wb_* shows every write-back so results can be streamed out.
// The organisation, sizes and pipeline stages follow the accelerator's description;
// the exact stage timing, the opposite-group write-back rule, the SIMD memory-bit
// source and the load/observe ports are this implementation's choices.
module pimca_top
  import pimca_pkg::*;
#(
  parameter int N_PE     = NPE,
  parameter int ADC_STEP = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  // program load and control
  input  logic              im_we,
  input  logic [PW-1:0]     im_addr,
  input  instr_t            im_data,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // weight load (one macro row per cycle)
  input  logic              w_we,
  input  logic [2:0]        w_pe,
  input  logic [4:0]        w_macro,
  input  logic [7:0]        w_addr,
  input  logic [MCOLS-1:0]  w_data,
  // activation memory load
  input  logic              am_ext_we,
  input  logic              am_ext_grp,
  input  logic [2:0]        am_ext_bank,
  input  logic [AW-1:0]     am_ext_addr,
  input  logic [AM_WIDTH-1:0] am_ext_data,
  // write-back observation
  output logic              wb_valid,
  output logic              wb_grp,
  output logic [AW-1:0]     wb_addr,
  output logic [1:0]        wb_pair,
  output logic [WAYS-1:0]   wb_data,
  // event strobes
  output logic              ev_repeat,
  output logic              ev_loop_jump
);
  uop_t u0, u1, u2, u3, u4;
  logic [2*AM_WIDTH-1:0] patch [3];
  logic [WAYS-1:0] mem_bit1, mem_bit2, mem_bit3;
  logic signed [7:0] pe_sum [N_PE][WAYS];
  logic [WAYS-1:0] simd_out;

  pimca_ctrl u_ctrl (
    .clk, .rst_n, .im_we, .im_addr, .im_data, .start, .busy, .done,
    .uop(u0), .ev_repeat, .ev_loop_jump
  );

  // pipeline registers LD -> IMC -> SIMD -> WB
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u1 <= '0; u2 <= '0; u3 <= '0; u4 <= '0;
      mem_bit2 <= '0; mem_bit3 <= '0;
    end else begin
      u1 <= u0; u2 <= u1; u3 <= u2; u4 <= u3;
      mem_bit2 <= mem_bit1; mem_bit3 <= mem_bit2;
    end
  end
  assign mem_bit1 = patch[0];

  pimca_act_mem #(.BANKS(AM_BANKS), .DEPTH(AM_DEPTH), .WIDTH(AM_WIDTH)) u_am (
    .clk,
    .rd_en(u0.valid && u0.rd_en), .rd_grp(u0.rd_grp), .rd_addr(u0.rd_addr),
    .rd_rot(u0.rd_rot), .rd_pitch(u0.rd_pitch), .rd_data(patch),
    .wr_en(u4.valid && u4.wr_en), .wr_grp(!u4.rd_grp), .wr_addr(u4.wr_addr),
    .wr_pair(u4.wr_pair), .wr_half(u4.wr_half), .wr_data(simd_out),
    .ext_we(am_ext_we), .ext_grp(am_ext_grp), .ext_bank(am_ext_bank),
    .ext_addr(am_ext_addr), .ext_data(am_ext_data)
  );

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    pimca_pe #(.ADC_STEP(ADC_STEP)) u_pe (
      .clk, .rst_n,
      .in_shift(u1.valid && u1.in_shift && u1.pe_sel == 3'(p)),
      .chain(u1.acc18),
      .patch(patch),
      .mac_en(u2.valid && u2.pe_en && u2.pe_sel == 3'(p)),
      .macro_en(u2.macro_en), .acc18(u2.acc18),
      .sum(pe_sum[p]),
      .w_we(w_we && w_pe == 3'(p)), .w_macro, .w_addr, .w_data
    );
  end

  logic signed [7:0] sel_sum [WAYS];
  always_comb
    for (int w = 0; w < WAYS; w++) sel_sum[w] = pe_sum[u3.pe_sel][w];

  pimca_simd u_simd (
    .clk, .rst_n, .en(u3.valid && u3.simd_en), .op(u3.op), .xsel(u3.xsel),
    .ysel(u3.ysel), .zsel(u3.zsel), .imm(u3.imm), .pe_sum(sel_sum),
    .mem_bit(mem_bit3), .out(simd_out)
  );

  assign wb_valid = u4.valid && u4.wr_en;
  assign wb_grp   = !u4.rd_grp;
  assign wb_addr  = u4.wr_addr;
  assign wb_pair  = u4.wr_pair;
  assign wb_data  = simd_out;
endmodule
