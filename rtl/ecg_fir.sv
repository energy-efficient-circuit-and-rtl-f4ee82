// ecg_fir -- linear-phase FIR filter with symmetric-coefficient pre-adders.
//
// Each input sample (in_valid) enters a TAPS-long delay line. Because the
// coefficients are symmetric, the two samples that share a coefficient are added
// first (pre-adder) so only ceil(TAPS/2) multipliers are needed:
//   y = sum_{i < TAPS/2} c[i] * (d[i] + d[TAPS-1-i])  (+ c[mid] * d[mid], odd TAPS)
// with d[0] the newest sample. Coefficients are 8-bit signed with SHIFT = 7
// fraction bits, written through c_we/c_addr/c_data (index i < ceil(TAPS/2)).
// Samples and results are 13-bit signed; the result is rounded and saturated.
// Timing: y/out_valid are registered one cycle after in_valid; one sample per
// cycle at most (at 250 samples/s the clock is far faster than the data).
// Paper: direct-form linear-phase FIR, pre-adders halving the multipliers, 8-bit
// coefficients, 13-bit signals, reduced tap counts (NRF 148 taps, which is the
// default here). Own choices: the systolic pipeline of the chip is replaced by a
// single registered sum per sample, coefficient scaling and the load port.
module ecg_fir #(
  parameter int TAPS  = 148,
  parameter int CW    = 8,
  parameter int DW    = 13,
  parameter int SHIFT = 7,
  localparam int NC = (TAPS + 1) / 2,
  localparam int CA = $clog2(NC)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 c_we,
  input  logic [7:0]           c_addr,
  input  logic signed [CW-1:0] c_data,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  output logic                 out_valid,
  output logic signed [DW-1:0] y
);
  localparam int SW = DW + CW + $clog2(TAPS) + 1;
  logic signed [CW-1:0] c [NC];
  logic signed [DW-1:0] d [TAPS];
  logic signed [DW-1:0] nd [TAPS];
  logic signed [SW-1:0] acc, r;

  always_ff @(posedge clk) if (c_we && int'(c_addr) < NC) c[c_addr[CA-1:0]] <= c_data;

  // delay line including the new sample
  always_comb begin
    nd[0] = x;
    for (int i = 1; i < TAPS; i++) nd[i] = d[i - 1];
  end
  always_comb begin
    acc = '0;
    for (int i = 0; i < TAPS / 2; i++)
      acc += SW'(c[i]) * (SW'(nd[i]) + SW'(nd[TAPS - 1 - i]));
    if (TAPS % 2 == 1) acc += SW'(c[NC - 1]) * SW'(nd[NC - 1]);
    r = (acc + (SW'(1) <<< (SHIFT - 1))) >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; y <= '0;
      for (int i = 0; i < TAPS; i++) d[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        d <= nd;
        if (r > SW'((1 <<< (DW - 1)) - 1)) y <= {1'b0, {(DW-1){1'b1}}};
        else if (r < -SW'(1 <<< (DW - 1))) y <= {1'b1, {(DW-1){1'b0}}};
        else y <= DW'(r);
      end
    end
  end
endmodule
