// pimca_pe -- one processing element (PE) of the PIMCA accelerator.
//
// Eighteen C3SRAM macros (256 rows x 128 columns each) are arranged as three rows
// (kernel rows) by six columns. Input registers ir[0..5] each hold a 3 x 256-bit
// activation column patch. On in_shift the patch from activation memory enters
// ir[0] and the older columns move on (ir[0] -> ir[1] -> ir[2]), so that a 3 x 3
// window slides horizontally with one new memory read per output pixel. In the
// default 3x3 mode the left (columns 0-2) and right (columns 3-5) macro groups
// share ir[0..2]: the left group produces output channels 0..127 and the right
// group channels 128..255 (or, for 2-bit weights, the two weight bits of the same
// channels). With chain set, ir[2] continues into ir[3..5], feeding the right
// group from the left group's registers for 5x5 kernels.
// Each enabled macro returns 128 signed 4-bit ADC codes; disabled macros return
// zero, which replaces explicit zero padding. The configurable adder tree then
// forms 256 8-bit sums of 9 macros (acc18 = 0) or 128 8-bit sums of all 18 macros
// (acc18 = 1, upper 128 outputs zero).
// Timing: in_shift updates the registers at a clock edge; mac_en at the next edge
// starts the macros; sum is valid combinationally in the cycle after mac_en.
// Weights are written a row at a time through w_we / w_macro / w_addr / w_data.
// The arrangement, the two accumulation modes and the macro gating follow the
// accelerator's description; the register shift direction and the write port
// are this implementation's choices.
module pimca_pe
  import pimca_pkg::*;
#(
  parameter int NMAC     = NMACRO,
  parameter int ADC_STEP = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_shift,
  input  logic                    chain,
  input  logic [MROWS-1:0]        patch [3],
  input  logic                    mac_en,
  input  logic [NMAC-1:0]         macro_en,
  input  logic                    acc18,
  output logic signed [7:0]       sum [WAYS],
  input  logic                    w_we,
  input  logic [4:0]              w_macro,
  input  logic [7:0]              w_addr,
  input  logic [MCOLS-1:0]        w_data
);
  logic [MROWS-1:0] ir [6][3];
  logic signed [3:0] q [NMAC][MCOLS];
  logic acc18_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 6; c++) for (int r = 0; r < 3; r++) ir[c][r] <= '0;
      acc18_q <= 1'b0;
    end else begin
      if (in_shift) begin
        ir[0] <= patch;
        ir[1] <= ir[0];
        ir[2] <= ir[1];
        if (chain) begin
          ir[3] <= ir[2];
          ir[4] <= ir[3];
          ir[5] <= ir[4];
        end
      end
      if (mac_en) acc18_q <= acc18;
    end
  end

  for (genvar m = 0; m < NMAC; m++) begin : g_mac
    localparam int R = m / 6;
    localparam int C = m % 6;
    logic [MROWS-1:0] act;
    logic [MCOLS-1:0] unused_rdata;
    logic             unused_qv;
    assign act = (C < 3) ? ir[C][R] : (acc18 ? ir[C][R] : ir[C-3][R]);
    c3sram_macro #(.ROWS(MROWS), .COLS(MCOLS), .ADC_STEP(ADC_STEP)) u_mac (
      .clk, .rst_n,
      .we(w_we && w_macro == 5'(m)), .re(1'b0), .addr(w_addr), .wdata(w_data),
      .rdata(unused_rdata),
      .mac_en(mac_en && macro_en[m]),
      .act_en({MROWS{1'b1}}), .act_pos(act),
      .q(q[m]), .q_valid(unused_qv)
    );
  end

  // configurable adder tree
  always_comb begin
    for (int d = 0; d < WAYS; d++) begin
      logic signed [7:0] s;
      s = '0;
      for (int m = 0; m < NMAC; m++) begin
        if (acc18_q) begin
          if (d < MCOLS) s += 8'(q[m][d]);
        end else if ((d < MCOLS) == ((m % 6) < 3)) begin
          s += 8'(q[m][d % MCOLS]);
        end
      end
      sum[d] = s;
    end
  end
endmodule
