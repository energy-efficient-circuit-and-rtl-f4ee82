// Self-checking testbench for vesti_act_mem: writes a random 7x5 map with two bit
// planes, then reads every 3x3 window with and without padding, in 1-bit and
// multi-bit interpreter modes, and compares all nine positions (zero outside the
// map, correct row-major order for all nine rewiring patterns); then checks the
// fully-connected read of nine blocks.
module tb_vesti_act_mem;
  localparam int W = 7, H = 5, CH = 256, RA = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [5:0] map_w = W, map_h = H; logic [4:0] tiles_w = 3; logic [RA-1:0] plane_words = 8;
  logic pad = 0, multibit = 0, fc = 0, rd_en = 0;
  logic [5:0] ox = 0, oy = 0; logic [1:0] plane = 0; logic [RA-1:0] fc_addr = 0;
  logic [CH-1:0] act_nz [9], act_pos [9];
  logic wr_en = 0; logic [5:0] wx = 0, wy = 0; logic [1:0] wplane = 0; logic [CH-1:0] wdata = 0;
  logic wr_fc = 0; logic [3:0] wr_fc_blk = 0; logic [RA-1:0] wr_fc_addr = 0;
  logic [CH-1:0] fm [2][H][W], fcd [9];
  int checks = 0, failures = 0, patterns = 0;
  bit seen [9];
  vesti_act_mem dut (.*);

  function automatic logic [CH-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < 2; p++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      fm[p][y][x] = rnd();
      @(negedge clk); wr_en = 1; wx = 6'(x); wy = 6'(y); wplane = 2'(p); wdata = fm[p][y][x];
    end
    @(negedge clk); wr_en = 0;
    for (int mode = 0; mode < 4; mode++) begin
      pad = mode[0]; multibit = mode[1];
      for (int yy = 0; yy < (pad ? H : H - 2); yy++) for (int xx = 0; xx < (pad ? W : W - 2); xx++) begin
        int pl;
        pl = multibit ? ($urandom % 2) : 0;
        @(negedge clk); rd_en = 1; ox = 6'(xx); oy = 6'(yy); plane = 2'(pl);
        seen[((yy - pad + 3) % 3) * 3 + (xx - pad + 3) % 3] = 1;
        @(negedge clk); rd_en = 0;
        for (int p = 0; p < 9; p++) begin
          int x, y; logic [CH-1:0] enz, epos;
          x = xx - pad + p % 3; y = yy - pad + p / 3;
          if (x < 0 || y < 0 || x >= W || y >= H) begin enz = '0; epos = '0; end
          else if (multibit) begin enz = fm[pl][y][x]; epos = '1; end
          else begin enz = '1; epos = fm[pl][y][x]; end
          checks++;
          if (act_nz[p] !== enz || act_pos[p] !== epos) begin
            failures++; if (failures < 10) $display("mode %0d (%0d,%0d) pos %0d", mode, xx, yy, p);
          end
        end
      end
    end
    foreach (seen[i]) if (seen[i]) patterns++;
    checks++; if (patterns != 9) begin failures++; $display("rewiring patterns %0d", patterns); end
    // fully connected: nine blocks at row 100
    for (int b = 0; b < 9; b++) begin
      fcd[b] = rnd();
      @(negedge clk); wr_en = 1; wr_fc = 1; wr_fc_blk = 4'(b); wr_fc_addr = 100; wdata = fcd[b];
    end
    @(negedge clk); wr_en = 0; wr_fc = 0; fc = 1; multibit = 0; rd_en = 1; fc_addr = 100; plane = 0;
    @(negedge clk); rd_en = 0;
    for (int p = 0; p < 9; p++) begin
      checks++; if (act_pos[p] !== fcd[p] || act_nz[p] !== '1) begin failures++; $display("fc pos %0d", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
