// Self-checking testbench for vesti_alu: random decoded partial sums for nine
// positions, processed as 1-bit (sign) activations without pooling and as 3-bit
// activations with 2x2 max-pooling; compares each lane against a reference of
// accumulation, MSB-first shift-and-accumulate, batch norm, quantization and max.
module tb_vesti_alu;
  localparam int L = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, bit_first = 0, bit_last = 0, win_first = 0, win_last = 0, out_valid;
  logic signed [7:0] psum [9][L];
  logic [2:0] prec = 1; logic [3:0] qshift = 2;
  logic signed [7:0] bn_scale [L]; logic signed [15:0] bn_offset [L];
  logic [3:0] out_act [L];
  int exp_v [L];
  int checks = 0, failures = 0, outs = 0;
  vesti_alu dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic pixel(int P, bit wf, bit wl, output int val [L]);
    int acc [L];
    for (int l = 0; l < L; l++) acc[l] = 0;
    for (int b = P - 1; b >= 0; b--) begin
      @(negedge clk);
      in_valid = 1; bit_first = (b == P - 1); bit_last = (b == 0); win_first = wf; win_last = wl;
      for (int l = 0; l < L; l++) begin
        int s; s = 0;
        for (int p = 0; p < 9; p++) begin psum[p][l] = 8'(12 * (int'($urandom % 11) - 5)); s += psum[p][l]; end
        acc[l] = 2 * acc[l] + s;
      end
    end
    @(negedge clk); in_valid = 0;
    for (int l = 0; l < L; l++) begin
      int bn; bn = acc[l] * bn_scale[l] + bn_offset[l];
      if (P == 1) val[l] = bn >= 0;
      else begin bn = bn >>> qshift; val[l] = bn < 0 ? 0 : (bn > (1 << P) - 1 ? (1 << P) - 1 : bn); end
    end
  endtask

  initial begin
    int v [L];
    for (int l = 0; l < L; l++) begin bn_scale[l] = 8'(int'($urandom % 5) - 1); bn_offset[l] = 16'(int'($urandom % 200) - 100); end
    for (int p = 0; p < 9; p++) for (int l = 0; l < L; l++) psum[p][l] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      prec = 1;
      pixel(1, 1, 1, v);
      checks++; if (!out_valid) failures++;
      for (int l = 0; l < L; l++) begin checks++; if (int'(out_act[l]) != v[l]) failures++; end
    end
    prec = 3; qshift = 4;
    for (int t = 0; t < 3; t++) begin
      for (int l = 0; l < L; l++) exp_v[l] = 0;
      for (int k = 0; k < 4; k++) begin
        pixel(3, k == 0, k == 3, v);
        for (int l = 0; l < L; l++) if (v[l] > exp_v[l]) exp_v[l] = v[l];
        if (k < 3) begin checks++; if (out_valid) failures++; end
      end
      checks++; if (!out_valid) failures++;
      for (int l = 0; l < L; l++) begin
        checks++;
        if (int'(out_act[l]) != exp_v[l]) begin failures++; if (failures < 10) $display("lane %0d got %0d exp %0d", l, out_act[l], exp_v[l]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
