// cnn_simd -- 16-way SIMD unit for element-wise training operations.
//
// One pipeline stage: operands in cycle t, results registered at t+1 (out_valid).
// Operations (op), per lane, on 16-bit fixed point with FRAC fraction bits:
//   OP_PASS  y = x
//   OP_RELU  y = max(x, 0); mask_out = (x > 0) (activation derivative)
//   OP_MASK  y = mask_in ? x : 0 (back-propagating through ReLU)
//   OP_MAX   running maximum for max-pooling: first sets y = x, idx = 0; later
//            inputs replace y when larger and idx counts the element position
//   OP_SGD   SGD with momentum: wm' = m*wm + eta*x (x = weight gradient),
//            w' = w - wm'; y = w', wm_out = wm'
// Results saturate to 16 bits.
// Paper: 16-way SIMD for ReLU, max-pooling, masking and weight updates with the
// momentum rule above (learning rate and momentum factor are 16-bit fields of
// the layer instruction). Own choices: encoding, FRAC = 8, saturation, the
// pooling index format.
module cnn_simd #(
  parameter int N    = 16,
  parameter int W    = 16,
  parameter int FRAC = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [2:0]          op,
  input  logic                first,
  input  logic signed [W-1:0] x [N],
  input  logic [N-1:0]        mask_in,
  input  logic signed [W-1:0] w [N],
  input  logic signed [W-1:0] wm [N],
  input  logic signed [W-1:0] eta,
  input  logic signed [W-1:0] mom,
  output logic                out_valid,
  output logic signed [W-1:0] y [N],
  output logic signed [W-1:0] wm_out [N],
  output logic [N-1:0]        mask_out,
  output logic [3:0]          idx [N]
);
  localparam logic [2:0] OP_PASS = 3'd0, OP_RELU = 3'd1, OP_MASK = 3'd2, OP_MAX = 3'd3, OP_SGD = 3'd4;
  logic [3:0] cnt;

  function automatic logic signed [W-1:0] sat(logic signed [2*W+1:0] v);
    if (v > (2*W+2)'((1 <<< (W - 1)) - 1)) return {1'b0, {(W-1){1'b1}}};
    if (v < -(2*W+2)'(1 <<< (W - 1))) return {1'b1, {(W-1){1'b0}}};
    return W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; cnt <= '0; mask_out <= '0;
      for (int i = 0; i < N; i++) begin y[i] <= '0; wm_out[i] <= '0; idx[i] <= '0; end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (op == OP_MAX) cnt <= first ? 4'd1 : cnt + 4'd1;
        for (int i = 0; i < N; i++) begin
          logic signed [2*W+1:0] nm;
          case (op)
            OP_RELU: begin y[i] <= x[i] > 0 ? x[i] : '0; mask_out[i] <= x[i] > 0; end
            OP_MASK: y[i] <= mask_in[i] ? x[i] : '0;
            OP_MAX: begin
              if (first) begin y[i] <= x[i]; idx[i] <= '0; end
              else if (x[i] > y[i]) begin y[i] <= x[i]; idx[i] <= cnt; end
            end
            OP_SGD: begin
              nm = ((mom * wm[i]) >>> FRAC) + ((eta * x[i]) >>> FRAC);
              wm_out[i] <= sat(nm);
              y[i] <= sat((2*W+2)'(w[i]) - (2*W+2)'(sat(nm)));
            end
            OP_PASS: y[i] <= x[i];
            default: y[i] <= x[i];
          endcase
        end
      end
    end
  end
endmodule
