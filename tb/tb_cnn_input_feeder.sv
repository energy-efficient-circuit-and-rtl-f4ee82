// Self-checking testbench for cnn_input_feeder: stores a random 10x7 map, then
// reads 4x4 patches at every origin from (-3,-3) to beyond the far corner
// (covering zero padding of any amount on every side) and compares them with
// the map, one-cycle latency.
module tb_cnn_input_feeder;
  localparam int W = 10, H = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [13:0] base = 100; logic [7:0] map_w = W, map_h = H; logic [5:0] tiles_w = 3;
  logic we = 0; logic [7:0] wx = 0, wy = 0; logic signed [15:0] wdata = 0;
  logic rd_en = 0; logic signed [8:0] ox = 0, oy = 0; logic signed [15:0] rd_data [16];
  cnn_input_feeder dut (.*);
  int img [H][W];
  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      img[y][x] = int'($urandom % 65535) - 32767;
      if (img[y][x] == 0) img[y][x] = 1;
      @(negedge clk); we = 1; wx = 8'(x); wy = 8'(y); wdata = 16'(img[y][x]);
    end
    @(negedge clk); we = 0;
    for (int py = -3; py <= H; py++) for (int px = -3; px <= W; px++) begin
      @(negedge clk); rd_en = 1; ox = 9'(px); oy = 9'(py);
      @(negedge clk); rd_en = 0;
      for (int e = 0; e < 16; e++) begin
        int x, y, ev;
        x = px + e % 4; y = py + e / 4;
        ev = (x < 0 || y < 0 || x >= W || y >= H) ? 0 : img[y][x];
        checks++;
        if (int'(rd_data[e]) != ev) begin failures++; if (failures < 10) $display("(%0d,%0d) e%0d got %0d exp %0d", px, py, e, rd_data[e], ev); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
