// Self-checking testbench for vesti_coord_gen: checks the full coordinate sequence
// in row-major order (5x3 map) and in 2x2 pooling-window order (4x4 map),
// including window flags, the last flag, stalls on next and the done pulse.
module tb_vesti_coord_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, pool = 0, next = 0;
  logic [5:0] map_w = 0, map_h = 0, x, y;
  logic valid, win_first, win_last, last, done;
  int checks = 0, failures = 0;
  vesti_coord_gen dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(int W, int H, bit p);
    int n; n = 0;
    @(negedge clk); start = 1; map_w = 6'(W); map_h = 6'(H); pool = p;
    @(negedge clk); start = 0;
    while (valid) begin
      int ex, ey;
      bit ewf, ewl;
      if (p) begin
        int win, k; win = n / 4; k = n % 4;
        ex = (win % (W / 2)) * 2 + k % 2; ey = (win / (W / 2)) * 2 + k / 2;
        ewf = (k == 0); ewl = (k == 3);
      end else begin
        ex = n % W; ey = n / W; ewf = 1; ewl = 1;
      end
      checks++;
      if (int'(x) != ex || int'(y) != ey || win_first != ewf || win_last != ewl || last != (n == W * H - 1)) begin
        failures++; $display("n=%0d got (%0d,%0d) exp (%0d,%0d)", n, x, y, ex, ey);
      end
      next = ($urandom % 4) != 0;
      @(negedge clk);
      if (next) n++;
      next = 0;
      if (done) break;
    end
    checks++; if (n != W * H) begin failures++; $display("count %0d", n); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(5, 3, 0);
    run(4, 4, 1);
    run(6, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
