// ecg_sparse_nn -- hidden layer of a sparse feature-extraction network.
//
// NIN inputs (12-bit signed, 8 fraction bits) are written into an input register
// file (x_we). Each of the NHID hidden neurons keeps only NNZ non-zero 6-bit
// weights (5 fraction bits), each with the index of its input, plus a 12-bit
// bias (w_we / b_we). After start, one hidden neuron is evaluated per cycle:
// NNZ multiplexers (NIN-to-1) pick the inputs named by the stored indices, NNZ
// multipliers form the products, their sum plus the bias is saturated to 12 bits
// and passed through the tanh table (ecg_tanh). Outputs: one (out_idx, out_val)
// per cycle with out_valid, two cycles after the neuron is selected; the hidden
// outputs are the feature vector. done pulses after the last neuron.
// Paper: four such networks (160, 50, 50, 30 inputs; 100 hidden neurons each;
// 16, 5, 5, 3 non-zero weights per neuron selected by 160-to-16 ... 30-to-3
// multiplexers; 29 multipliers in total), one hidden neuron per cycle, 6-bit
// weights, 12-bit NN data, tanh after the bias. Own choices: number formats,
// load ports and the two-stage pipeline. The 8-bit index and address ports fit
// the largest network; smaller instances ignore the upper bits.
module ecg_sparse_nn #(
  parameter int NIN  = 160,
  parameter int NNZ  = 16,
  parameter int NHID = 100,
  localparam int IW = $clog2(NIN),
  localparam int HW = $clog2(NHID),
  localparam int KW = (NNZ > 1) ? $clog2(NNZ) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               x_we,
  input  logic [7:0]         x_addr,
  input  logic signed [11:0] x_data,
  input  logic               w_we,
  input  logic               b_we,
  input  logic [6:0]         w_neuron,
  input  logic [3:0]         w_slot,
  input  logic [7:0]         w_index,
  input  logic signed [5:0]  w_value,
  input  logic signed [11:0] b_value,
  input  logic               start,
  output logic               busy,
  output logic               out_valid,
  output logic [6:0]         out_idx,
  output logic signed [11:0] out_val,
  output logic               done
);
  logic signed [11:0] x  [NIN];
  logic [IW-1:0]      wi [NHID][NNZ];
  logic signed [5:0]  wv [NHID][NNZ];
  logic signed [11:0] bias [NHID];

  always_ff @(posedge clk) begin
    if (x_we && int'(x_addr) < NIN) x[x_addr[IW-1:0]] <= x_data;
    if (w_we && int'(w_neuron) < NHID && int'(w_slot) < NNZ) begin
      wi[w_neuron[HW-1:0]][w_slot[KW-1:0]] <= w_index[IW-1:0];
      wv[w_neuron[HW-1:0]][w_slot[KW-1:0]] <= w_value;
    end
    if (b_we && int'(w_neuron) < NHID) bias[w_neuron[HW-1:0]] <= b_value;
  end

  // neuron sequencing and stage 1: select, multiply, sum, bias
  logic [HW-1:0] h;
  logic signed [23:0] s;
  logic signed [11:0] z;
  logic v1; logic [HW-1:0] h1;
  always_comb begin
    s = 24'(bias[h]) <<< 5;
    for (int k = 0; k < NNZ; k++) s += 24'(wv[h][k]) * 24'(x[wi[h][k]]);
    s = s >>> 5;
  end
  logic signed [11:0] t;
  ecg_tanh u_tanh (.x(z), .y(t));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0; busy <= 1'b0; v1 <= 1'b0; h1 <= '0; z <= '0;
      out_valid <= 1'b0; out_idx <= '0; out_val <= '0; done <= 1'b0;
    end else begin
      v1 <= busy; h1 <= h;
      if (busy) z <= (s > 24'sd2047) ? 12'sd2047 : (s < -24'sd2048) ? -12'sd2048 : 12'(s);
      if (start && !busy) begin busy <= 1'b1; h <= '0; end
      else if (busy) begin
        if (int'(h) == NHID - 1) busy <= 1'b0;
        else h <= h + 1'b1;
      end
      out_valid <= v1; out_idx <= 7'(h1); out_val <= t;
      done <= v1 && int'(h1) == NHID - 1;
    end
  end
endmodule
