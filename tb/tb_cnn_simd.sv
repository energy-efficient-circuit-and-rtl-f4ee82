// Self-checking testbench for cnn_simd: random vectors through PASS, ReLU
// (value and derivative mask), MASK, max-pooling over 4 inputs (value and
// index) and the SGD-with-momentum update, each checked one cycle later.
module tb_cnn_simd;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, first = 0; logic [2:0] op = 0;
  logic signed [15:0] x [N], w [N], wm [N], eta = 0, mom = 0, y [N], wm_out [N];
  logic [N-1:0] mask_in = 0, mask_out; logic out_valid; logic [3:0] idx [N];
  cnn_simd dut (.*);
  int checks = 0, failures = 0;
  int ey [N], em [N], ei [N+1]; logic [N-1:0] emask;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int sat(int v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction
  task automatic step(int o, bit f);
    @(negedge clk); in_valid = 1; op = 3'(o); first = f;
    eta = 16'($urandom % 256); mom = 16'($urandom % 256); mask_in = N'($urandom);
    for (int i = 0; i < N; i++) begin x[i] = 16'($urandom); w[i] = 16'($urandom); wm[i] = 16'($urandom % 4096); end
    for (int i = 0; i < N; i++) case (o)
      0: ey[i] = x[i];
      1: begin ey[i] = x[i] > 0 ? x[i] : 0; emask[i] = x[i] > 0; end
      2: ey[i] = mask_in[i] ? x[i] : 0;
      3: if (f || x[i] > ey[i]) begin ey[i] = x[i]; ei[i] = f ? 0 : ei[N]; end
      default: begin
        em[i] = sat(((int'(mom) * int'(wm[i])) >>> 8) + ((int'(eta) * int'(x[i])) >>> 8));
        ey[i] = sat(int'(w[i]) - em[i]);
      end
    endcase
    @(negedge clk); in_valid = 0;
    checks++; if (!out_valid) failures++;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(y[i]) != ey[i] || (o == 1 && mask_out[i] != emask[i]) || (o == 3 && int'(idx[i]) != ei[i])
          || (o == 4 && int'(wm_out[i]) != em[i])) begin
        failures++; if (failures < 10) $display("op %0d lane %0d y %0d exp %0d", o, i, y[i], ey[i]);
      end
    end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      step(0, 0); step(1, 0); step(2, 0); step(4, 0);
      for (int k = 0; k < 4; k++) begin ei[N] = k; step(3, k == 0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
