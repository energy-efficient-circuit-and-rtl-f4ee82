// vesti_alu -- 256-way digital ALU at the periphery of a Vesti core.
//
// Per lane (one output channel = one macro column of one macro group):
//  1. accumulation of the nine decoded partial sums (one per kernel position /
//     macro) into the XAC of the whole 3x3 x 256-channel window;
//  2. shift-and-accumulate over the bit planes of multi-bit activations, most
//     significant plane first (acc = 2*acc + XAC), one plane per cycle;
//  3. batch normalization with per-lane integer parameters: bn = acc*scale + offset;
//  4. activation: 1-bit mode outputs bn >= 0 (stored as 1 = +1, 0 = -1); multi-bit
//     mode applies ReLU and quantizes to prec bits: clamp(bn >>> qshift, 0, 2^prec-1);
//  5. optional 2x2 max-pooling over the four consecutive pixels of a window.
// Handshake: in_valid with bit_first / bit_last framing the planes of one pixel,
// win_first / win_last framing a pooling window (both high when pool = 0).
// out_valid pulses the cycle after the last plane of the last pixel of a window;
// out_act holds the 4-bit activation of every lane.
// The operation list and order follow the accelerator's description; integer
// batch-norm parameters, the rounding shift and pooling on quantized values
// (identical to pooling before the monotonic quantizer) are this implementation's
// choices.
module vesti_alu #(
  parameter int LANES = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     bit_first,
  input  logic                     bit_last,
  input  logic                     win_first,
  input  logic                     win_last,
  input  logic signed [7:0]        psum [9][LANES],
  input  logic [2:0]               prec,        // 1..4
  input  logic [3:0]               qshift,
  input  logic signed [7:0]        bn_scale  [LANES],
  input  logic signed [15:0]       bn_offset [LANES],
  output logic                     out_valid,
  output logic [3:0]               out_act [LANES]
);
  logic signed [15:0] acc  [LANES];
  logic [3:0]         pmax [LANES];

  function automatic logic [3:0] activ(input logic signed [15:0] a, input logic signed [7:0] sc,
                                       input logic signed [15:0] of, input logic [2:0] p,
                                       input logic [3:0] sh);
    logic signed [31:0] bn, qv;
    bn = 32'(a) * 32'(sc) + 32'(of);
    if (p <= 3'd1) return {3'd0, bn >= 0};
    qv = bn >>> sh;
    if (qv < 0) return 4'd0;
    if (qv > (32'sd1 <<< p) - 1) return 4'((1 << p) - 1);
    return qv[3:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) begin acc[l] <= '0; pmax[l] <= '0; out_act[l] <= '0; end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int l = 0; l < LANES; l++) begin
          logic signed [15:0] s, a;
          logic [3:0] v, m;
          s = '0;
          for (int p = 0; p < 9; p++) s += 16'(psum[p][l]);
          a = (bit_first ? 16'sd0 : (acc[l] <<< 1)) + s;
          acc[l] <= a;
          if (bit_last) begin
            v = activ(a, bn_scale[l], bn_offset[l], prec, qshift);
            m = (win_first || v > pmax[l]) ? v : pmax[l];
            pmax[l] <= m;
            if (win_last) out_act[l] <= m;
          end
        end
        if (bit_last && win_last) out_valid <= 1'b1;
      end
    end
  end
endmodule
