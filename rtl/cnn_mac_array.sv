// cnn_mac_array -- output-stationary 16x16 multiply-accumulate array.
//
// Every cycle with en set, MAC (r, c) adds a[r] * b[c] to its accumulator: the
// vector a is broadcast along the rows and b along the columns, so a 16x16 block of
// outputs (for example a 4x4 output patch of 16 output maps, or 16 images x 16
// neurons) stays inside the array while the reduction index advances.
// Operands are 16-bit fixed point with FRAC fraction bits (FX16); the product is
// scaled back by FRAC bits and accumulated with saturation in ACC_W = 22 bits
// (FX22). clr starts a new accumulation (acc <= product, or 0 without en).
// shift moves the rows up by one; out_row is row 0, so a block leaves the array
// serially, one row of 16 results per cycle, as on the chip.
// Zero skipping: a row whose a operand is zero or a column whose b operand is
// zero does not update (the chip clock-gates such rows/columns); gated_rows and
// gated_cols report how many were gated in the current cycle.
// Paper: 16x16 array, FX16 operands, FX22 accumulation, serial shift-out, row and
// column gating. Own choices: FRAC = 8, saturation, the shift/clear interface.
module cnn_mac_array #(
  parameter int N     = 16,
  parameter int W     = 16,
  parameter int ACC_W = 22,
  parameter int FRAC  = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic                    shift,
  input  logic signed [W-1:0]     a [N],
  input  logic signed [W-1:0]     b [N],
  output logic signed [ACC_W-1:0] out_row [N],
  output logic [$clog2(N+1)-1:0]  gated_rows,
  output logic [$clog2(N+1)-1:0]  gated_cols
);
  localparam logic signed [ACC_W-1:0] MAXV = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] MINV = {1'b1, {(ACC_W-1){1'b0}}};
  logic signed [ACC_W-1:0] acc [N][N];

  function automatic logic signed [ACC_W-1:0] sat_add(logic signed [ACC_W-1:0] x,
                                                      logic signed [2*W-1:0] p);
    logic signed [2*W+1:0] s;
    s = (2*W+2)'(x) + (2*W+2)'(p >>> FRAC);
    if (s > (2*W+2)'(MAXV)) return MAXV;
    if (s < (2*W+2)'(MINV)) return MINV;
    return ACC_W'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) acc[r][c] <= '0;
    end else if (shift) begin
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
        acc[r][c] <= (r == N - 1) ? '0 : acc[r + 1][c];
    end else if (en || clr) begin
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
        if (clr) acc[r][c] <= en ? sat_add('0, a[r] * b[c]) : '0;
        else if (a[r] != 0 && b[c] != 0) acc[r][c] <= sat_add(acc[r][c], a[r] * b[c]);
      end
    end
  end

  always_comb begin
    gated_rows = '0; gated_cols = '0;
    for (int i = 0; i < N; i++) begin
      if (en && a[i] == 0) gated_rows++;
      if (en && b[i] == 0) gated_cols++;
    end
  end
  assign out_row = acc[0];
endmodule
