// ecg_cosine_sim -- cosine similarity of two feature vectors with threshold test.
//
// start clears the accumulators; then one element pair (a, b; 9-bit signed) per
// in_valid cycle, last marking the final pair. The unit accumulates the dot
// product a.b and the squared norms |a|^2 and |b|^2, then computes
//   cos = a.b * invsqrt(|a|^2) * invsqrt(|b|^2)
// using one shared ecg_invsqrt unit twice: each norm n is written as m * 4^e with
// m in [1, 4) (14 bits), so 1/sqrt(n) = invsqrt(m) * 2^-e. Result cos: 9-bit
// signed with 7 fraction bits; accept = cos > thr (same format). out_valid comes
// three cycles after the last pair. A zero vector gives cos = 0.
// Paper: identification compares the cosine similarity of the new and the
// registered feature vector with a threshold, in 9-bit precision, and the inverse
// square root is shared piecewise-linear hardware. Own choices: the streaming
// interface and the fixed-point formats.
module ecg_cosine_sim #(
  parameter int DW = 9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 in_valid,
  input  logic                 last,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] b,
  input  logic signed [8:0]    thr,
  output logic                 out_valid,
  output logic signed [8:0]    cos_out,
  output logic                 accept
);
  logic signed [31:0] dot;
  logic [31:0] na, nb;
  logic [1:0]  ph;            // 0 idle, 1 first norm, 2 second norm
  logic [13:0] m;
  logic [4:0]  e, ea;
  logic [22:0] f;
  logic [2:0]  unused_k;
  logic [22:0] fa, fb;   // below 2^16 here because m is already in [1, 4)
  ecg_invsqrt u_isq (.x(m), .y(f), .k(unused_k));

  // normalise n = m * 4^e, m in [1, 4) with 12 fraction bits
  function automatic logic [18:0] norm4(logic [31:0] n);
    logic [4:0] ee; logic [13:0] mm;
    ee = 0;
    for (int i = 0; i < 16; i++) if ((n >> (2 * i)) != 0) ee = 5'(i);
    if (2 * ee >= 12) mm = 14'(n >> (2 * ee - 12));
    else mm = 14'(n << (12 - 2 * ee));
    return {ee, mm};
  endfunction
  always_comb {e, m} = norm4(ph == 2'd1 ? na : nb);

  logic signed [63:0] prod;
  logic signed [63:0] c;
  logic signed [8:0]  cq;
  always_comb begin
    prod = 64'(dot) * 64'(fa) * 64'(fb);
    // f values have 15 fraction bits each; result needs 7
    c = prod >>> (23 + ea + e);
    cq = (c > 64'sd255) ? 9'sd255 : (c < -64'sd256) ? -9'sd256 : 9'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dot <= '0; na <= '0; nb <= '0; ph <= '0; fa <= '0; fb <= '0; ea <= '0;
      out_valid <= 1'b0; cos_out <= '0; accept <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (start) begin dot <= '0; na <= '0; nb <= '0; ph <= '0; end
      else if (in_valid) begin
        dot <= dot + 32'(a * b);
        na  <= na + 32'(a * a);
        nb  <= nb + 32'(b * b);
        if (last) ph <= 2'd1;
      end else if (ph == 2'd1) begin
        fa <= f; ea <= e; ph <= 2'd2;
      end else if (ph == 2'd2) begin
        fb <= f; ph <= 2'd3;
      end else if (ph == 2'd3) begin
        ph <= 2'd0; out_valid <= 1'b1;
        if (na == 0 || nb == 0) begin cos_out <= '0; accept <= thr[8]; end
        else begin
          cos_out <= cq;
          accept  <= cq > thr;
        end
      end
    end
  end
endmodule
