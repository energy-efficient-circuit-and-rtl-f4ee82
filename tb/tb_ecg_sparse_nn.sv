// Self-checking testbench for ecg_sparse_nn at its default size (160 inputs,
// 16 non-zero weights per neuron, 100 hidden neurons): random inputs, weights,
// indices and biases; each hidden output is compared with tanh of the saturated
// weighted sum (real arithmetic, within the table accuracy), outputs must come
// in neuron order one per cycle, and done must follow the last neuron after
// NHID + 2 cycles.
module tb_ecg_sparse_nn;
  localparam int NIN = 160, NNZ = 16, NHID = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic x_we = 0, w_we = 0, b_we = 0, start = 0; logic [7:0] x_addr = 0, w_index = 0;
  logic signed [11:0] x_data = 0, b_value = 0; logic [6:0] w_neuron = 0; logic [3:0] w_slot = 0;
  logic signed [5:0] w_value = 0;
  logic busy, out_valid, done; logic [6:0] out_idx; logic signed [11:0] out_val;
  ecg_sparse_nn dut (.*);
  int xv [NIN], wi [NHID][NNZ], wv [NHID][NNZ], bv [NHID];
  int checks = 0, failures = 0, nout = 0, cyc = 0, t0, tdone;
  always @(posedge clk) cyc++;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (out_valid) begin
    int s; real r, e, ex;
    s = bv[out_idx] * 32;
    for (int k = 0; k < NNZ; k++) s += wv[out_idx][k] * xv[wi[out_idx][k]];
    s = s >>> 5;
    s = s > 2047 ? 2047 : (s < -2048 ? -2048 : s);
    r = s / 256.0; e = $exp(2.0 * r); ex = (e - 1.0) / (e + 1.0) * 1024.0;
    checks++;
    if (int'(out_idx) != nout || out_val - ex > 17.0 || ex - out_val > 17.0) begin
      failures++; if (failures < 10) $display("n%0d idx %0d got %0d exp %f", nout, out_idx, out_val, ex);
    end
    nout++;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < NIN; i++) begin
      xv[i] = int'($urandom % 1024) - 512;
      @(negedge clk); x_we = 1; x_addr = 8'(i); x_data = 12'(xv[i]);
    end
    @(negedge clk); x_we = 0;
    for (int h = 0; h < NHID; h++) begin
      for (int k = 0; k < NNZ; k++) begin
        wi[h][k] = $urandom % NIN; wv[h][k] = int'($urandom % 64) - 32;
        @(negedge clk); w_we = 1; w_neuron = 7'(h); w_slot = 4'(k); w_index = 8'(wi[h][k]); w_value = 6'(wv[h][k]);
      end
      bv[h] = int'($urandom % 1024) - 512;
      @(negedge clk); w_we = 0; b_we = 1; b_value = 12'(bv[h]);
      @(negedge clk); b_we = 0;
    end
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    @(posedge clk iff done); tdone = cyc;
    @(negedge clk);
    checks++; if (nout != NHID) begin failures++; $display("outputs %0d", nout); end
    checks++; if (tdone - t0 != NHID + 2) begin failures++; $display("cycles %0d", tdone - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
