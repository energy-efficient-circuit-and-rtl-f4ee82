// Self-checking testbench for cnn_mac_array: random FX16 operand streams
// (including zeros and large values to reach 22-bit saturation) accumulated for
// 40 cycles, then shifted out row by row (16 cycles) and compared with a
// reference; also checks the gating counts and that clr restarts accumulation.
module tb_cnn_mac_array;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, clr = 0, shift = 0;
  logic signed [15:0] a [N], b [N];
  logic signed [21:0] out_row [N];
  logic [4:0] gated_rows, gated_cols;
  cnn_mac_array dut (.*);
  int ref_acc [N][N];
  int checks = 0, failures = 0, nsat = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int sat22(int v);
    return v > 2097151 ? 2097151 : (v < -2097152 ? -2097152 : v);
  endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int t = 0; t < 40; t++) begin
        int zr, zc;
        @(negedge clk); en = 1; clr = (t == 0); zr = 0; zc = 0;
        for (int i = 0; i < N; i++) begin
          a[i] = ($urandom % 6 == 0) ? 16'sd0 : 16'(pass ? $urandom : $urandom % 2048);
          b[i] = ($urandom % 6 == 0) ? 16'sd0 : 16'(pass ? $urandom : $urandom % 2048);
          if (a[i] == 0) zr++;
          if (b[i] == 0) zc++;
        end
        #1; checks++; if (gated_rows != 5'(zr) || gated_cols != 5'(zc)) failures++;
        for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
          int p; p = (int'(a[r]) * int'(b[c])) >>> 8;
          ref_acc[r][c] = sat22((t == 0 ? 0 : ref_acc[r][c]) + p);
        end
      end
      @(negedge clk); en = 0; clr = 0;
      for (int r = 0; r < N; r++) begin
        @(negedge clk); shift = 1;
        for (int c = 0; c < N; c++) begin
          checks++;
          if (ref_acc[r][c] == 2097151 || ref_acc[r][c] == -2097152) nsat++;
          if (int'(out_row[c]) != ref_acc[r][c]) begin failures++; if (failures < 10) $display("r%0d c%0d %0d %0d", r, c, out_row[c], ref_acc[r][c]); end
        end
      end
      @(negedge clk); shift = 0;
    end
    checks++; if (nsat == 0) begin failures++; $display("no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
