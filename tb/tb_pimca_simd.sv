// Self-checking testbench for pimca_simd: drives random operands through all
// eight operations and every operand source, and compares each way's registers
// with a reference model kept in the testbench.
module tb_pimca_simd;
  import pimca_pkg::*;
  localparam int N = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0; simd_op_e op; xsel_e xsel; ysel_e ysel; logic [2:0] zsel; logic [7:0] imm;
  logic signed [7:0] pe_sum [N]; logic [N-1:0] mem_bit, out;
  int checks = 0, failures = 0;
  int rm [N][5];
  int opcnt [8];
  pimca_simd dut (.*);

  function automatic int wrapv(int v, int bits);
    int m; m = 1 << bits; v = v % m; if (v < 0) v += m;
    if (v >= m / 2) v -= m; return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    op = S_ADD; xsel = X_R0; ysel = Y_R0; zsel = 0; imm = 0; mem_bit = 0;
    for (int w = 0; w < N; w++) begin pe_sum[w] = 0; for (int k = 0; k < 5; k++) rm[w][k] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int x, y, z;
      @(negedge clk);
      op = simd_op_e'(t < 16 ? t % 8 : $urandom % 8);
      xsel = xsel_e'(t < 40 ? (t % 8) : $urandom % 8);
      ysel = ysel_e'($urandom % 8);
      zsel = 3'(t < 20 ? 4 : $urandom % 5);
      imm = 8'($urandom);
      if (op == S_RSHIFT) begin ysel = Y_IMM; imm = 8'($urandom % 5); end
      for (int w = 0; w < N; w++) begin pe_sum[w] = 8'(($urandom % 91) - 45); mem_bit[w] = 1'($urandom); end
      en = 1;
      // reference
      for (int w = 0; w < N; w++) begin
        case (xsel)
          X_PE: x = pe_sum[w]; X_AM: x = mem_bit[w]; X_IMM: x = $signed(imm);
          default: x = rm[w][int'(xsel)];
        endcase
        case (ysel)
          Y_PEX: y = pe_sum[w ^ 128]; Y_PE: y = pe_sum[w]; Y_IMM: y = $signed(imm);
          default: y = rm[w][int'(ysel)];
        endcase
        case (op)
          S_ADD: z = x + y; S_ADD2: z = 2 * x + y; S_COMP: z = x > y;
          S_CMP2: z = (x > rm[w][0]) + (x > rm[w][1]) + (x > rm[w][2]);
          S_LOAD: z = x; S_MAX: z = x > y ? x : y; S_RSHIFT: z = x >>> y;
          default: z = 2 * x + mem_bit[w];
        endcase
        rm[w][zsel] = wrapv(z, zsel == 4 ? 10 : 8);
      end
      opcnt[op]++;
      @(negedge clk); en = 0;
      for (int w = 0; w < N; w++) begin
        int got;
        got = (zsel == 4) ? int'(dut.r4[w]) : int'(dut.r[w][zsel]);
        checks++;
        if (got != rm[w][zsel]) begin
          failures++;
          if (failures < 10) $display("t=%0d op=%0d w=%0d got %0d exp %0d", t, op, w, got, rm[w][zsel]);
        end
        checks++;
        if (out[w] != (rm[w][4] < 0)) failures++;
      end
    end
    for (int k = 0; k < 8; k++) begin checks++; if (opcnt[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
