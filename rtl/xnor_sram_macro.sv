// xnor_sram_macro -- behavioural model of the XNOR-SRAM resistive in-memory
// computing macro (256 x 64 12T bitcells, XNOR-mode wordline driver, flash ADC).
//
// Behavioural model: the real macro forms a resistive divider on each read
// bitline; this model reproduces its digital function. In memory mode a row of
// COLS weight bits (1 = +1, 0 = -1) is written or read (registered read). In XNOR
// mode all rows are driven at once with ternary activations (act_nz[i] = 0 means
// 0; otherwise act_pos[i] = 1 means +1 and 0 means -1); each column computes the
// ternary XNOR-and-accumulate XAC = (#agreeing rows) - (#disagreeing rows), range
// -ROWS..+ROWS, and an 11-level flash ADC (ten comparators) digitizes it with
// confined linear quantization: references at XAC = +/-6, +/-18, ... +/-54 (levels
// spaced 12 apart covering -60..+60), output as a 10-bit thermometer code
// (bit k set when XAC > 12*k - 54).
// All COLS columns are digitized every evaluation (therm); therm_mux additionally
// shows the column picked by col_sel, which is how the single-array test chip
// shares one ADC across its 64 columns through an analog multiplexer.
// Timing: xnor_en is sampled at a rising edge; codes are valid the next cycle.
// Choices of this model: ideal (no mismatch/offset), zero activations contribute
// nothing (the chip's alternating weak/strong drive of '0' rows approximates that),
// and all-zero codes after reset.
module xnor_sram_macro #(
  parameter int ROWS = 256,
  parameter int COLS = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // memory mode
  input  logic                    we,
  input  logic                    re,
  input  logic [$clog2(ROWS)-1:0] addr,
  input  logic [COLS-1:0]         wdata,
  output logic [COLS-1:0]         rdata,
  // XNOR mode
  input  logic                    xnor_en,
  input  logic [ROWS-1:0]         act_nz,
  input  logic [ROWS-1:0]         act_pos,
  output logic [9:0]              therm [COLS],
  input  logic [$clog2(COLS)-1:0] col_sel,
  output logic [9:0]              therm_mux
);
  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < COLS; c++) therm[c] <= '0;
    end else if (xnor_en) begin
      for (int c = 0; c < COLS; c++) begin
        int s;
        s = 0;
        for (int r = 0; r < ROWS; r++)
          if (act_nz[r]) s += (act_pos[r] == mem[r][c]) ? 1 : -1;
        for (int k = 0; k < 10; k++) therm[c][k] <= (s > 12 * k - 54);
      end
    end
  end

  assign therm_mux = therm[col_sel];
endmodule
