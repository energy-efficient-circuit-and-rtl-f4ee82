// Self-checking testbench for cnn_weight_mem: writes random 16x16 blocks row by
// row, then reads every row (non-transpose) and every column (transpose) of
// several blocks in random order, checking the one-cycle read latency and that
// both access modes return the logical matrix.
module tb_cnn_weight_mem;
  localparam int N = 16, NB = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0, transpose = 0; logic [7:0] wr_blk = 0, rd_blk = 0; logic [3:0] wr_row = 0, rd_idx = 0;
  logic signed [15:0] wdata [N], rdata [N];
  cnn_weight_mem dut (.*);
  int M [NB][N][N];
  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int bl = 0; bl < NB; bl++) for (int r = 0; r < N; r++) begin
      @(negedge clk); we = 1; wr_blk = 8'(bl * 37); wr_row = 4'(r);
      for (int c = 0; c < N; c++) begin M[bl][r][c] = int'($urandom % 65536) - 32768; wdata[c] = 16'(M[bl][r][c]); end
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 400; t++) begin
      int bl, ix; bit tr;
      bl = $urandom % NB; ix = $urandom % N; tr = $urandom % 2;
      @(negedge clk); re = 1; rd_blk = 8'(bl * 37); rd_idx = 4'(ix); transpose = tr;
      @(negedge clk); re = 0; rd_idx = 4'($urandom);   // changes after the access must not matter
      for (int e = 0; e < N; e++) begin
        int exp_v; exp_v = tr ? M[bl][e][ix] : M[bl][ix][e];
        checks++; if (int'(rdata[e]) != exp_v) begin failures++; if (failures < 10) $display("b%0d ix%0d t%0d e%0d", bl, ix, tr, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
