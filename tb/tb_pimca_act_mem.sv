// Self-checking testbench for pimca_act_mem: stores a random 9-row feature map
// (row y in bank pair y mod 3 at address (y div 3)*W + x), then reads 3 x 1 patches
// at every start row and column and compares each row of the patch; also checks
// SIMD-style 256-bit writes to the other group with half-enables, and that data is
// valid exactly one cycle after the read request.
module tb_pimca_act_mem;
  localparam int W = 5, H = 9, AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en = 0, rd_grp = 0; logic [AW-1:0] rd_addr = 0, rd_pitch = AW'(W); logic [1:0] rd_rot = 0;
  logic [255:0] rd_data [3];
  logic wr_en = 0, wr_grp = 0; logic [AW-1:0] wr_addr = 0; logic [1:0] wr_pair = 0, wr_half = 0;
  logic [255:0] wr_data = 0;
  logic ext_we = 0, ext_grp = 0; logic [2:0] ext_bank = 0; logic [AW-1:0] ext_addr = 0; logic [127:0] ext_data = 0;
  logic [255:0] fm [H][W];
  int checks = 0, failures = 0;
  pimca_act_mem dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      fm[y][x] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) for (int h = 0; h < 2; h++) begin
      @(negedge clk); ext_we = 1; ext_grp = 0; ext_bank = 3'(2 * (y % 3) + h);
      ext_addr = AW'((y / 3) * W + x); ext_data = fm[y][x][h*128 +: 128];
    end
    @(negedge clk); ext_we = 0;
    for (int y = 0; y + 2 < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk); rd_en = 1; rd_grp = 0; rd_rot = 2'(y % 3); rd_addr = AW'((y / 3) * W + x);
      @(negedge clk); rd_en = 0;
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (rd_data[j] !== fm[y + j][x]) begin failures++; $display("patch y=%0d x=%0d row %0d", y, x, j); end
      end
    end
    // write-back into group 1, pair 2, lower half only, then both halves
    @(negedge clk); wr_en = 1; wr_grp = 1; wr_addr = 7; wr_pair = 2; wr_half = 2'b11; wr_data = fm[0][0];
    @(negedge clk); wr_half = 2'b01; wr_data = ~fm[0][0];
    @(negedge clk); wr_en = 0; rd_en = 1; rd_grp = 1; rd_rot = 2; rd_addr = 7;
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_data[0] !== {fm[0][0][255:128], ~fm[0][0][127:0]}) begin failures++; $display("write-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
