// cnn_round -- configurable rounding of FX22 accumulator values to FX16.
//
// Combinational, one value. mode selects how many fraction bits are dropped
// (0, 2, 4 or 6); the value is rounded and
// saturated to 16 bits. Rounding is round-half-up (add half an LSB, then
// arithmetic shift), which is cheap in hardware.
// Paper: a reconfigurable rounding module (2-bit setting) converts the 22-bit
// MAC results to 16 bits before the SIMD unit. Own choices: the four shift
// amounts, round-half-up, saturation.
module cnn_round #(
  parameter int IN_W  = 22,
  parameter int OUT_W = 16
) (
  input  logic signed [IN_W-1:0]  din,
  input  logic [1:0]              mode,
  output logic signed [OUT_W-1:0] dout,
  output logic                    saturated
);
  logic [2:0] sh;
  logic signed [IN_W:0] r;
  assign sh = {mode, 1'b0};
  always_comb begin
    r = (sh == 0) ? (IN_W+1)'(din) : ((IN_W+1)'(din) + ((IN_W+1)'(1) <<< (sh - 3'd1))) >>> sh;
    saturated = 1'b0;
    if (r > (IN_W+1)'((1 <<< (OUT_W - 1)) - 1)) begin
      dout = {1'b0, {(OUT_W-1){1'b1}}}; saturated = 1'b1;
    end else if (r < -(IN_W+1)'(1 <<< (OUT_W - 1))) begin
      dout = {1'b1, {(OUT_W-1){1'b0}}}; saturated = 1'b1;
    end else dout = OUT_W'(r);
  end
endmodule
