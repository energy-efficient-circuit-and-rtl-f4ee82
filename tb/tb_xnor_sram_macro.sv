// Self-checking testbench for xnor_sram_macro: random weights written and read
// back in memory mode; random binary and ternary activation vectors (some skewed
// towards the weights to reach large XAC values) in XNOR mode, with each column's
// thermometer code and the multiplexed single-ADC output compared against an
// independent count of agreements minus disagreements.
module tb_xnor_sram_macro;
  localparam int ROWS = 256, COLS = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0, xnor_en = 0;
  logic [7:0] addr = 0; logic [COLS-1:0] wdata = 0, rdata;
  logic [ROWS-1:0] act_nz = 0, act_pos = 0;
  logic [9:0] therm [COLS]; logic [5:0] col_sel = 0; logic [9:0] therm_mux;
  logic [COLS-1:0] w [ROWS];
  int checks = 0, failures = 0;
  xnor_sram_macro dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      w[r] = {$urandom, $urandom};
      @(negedge clk); we = 1; addr = 8'(r); wdata = w[r];
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < ROWS; r += 51) begin
      @(negedge clk); re = 1; addr = 8'(r);
      @(negedge clk); re = 0; checks++;
      if (rdata !== w[r]) failures++;
    end
    for (int t = 0; t < 80; t++) begin
      int bias;
      @(negedge clk);
      bias = t % 8;
      for (int r = 0; r < ROWS; r++) begin
        act_nz[r]  = (t % 2 == 0) ? 1'b1 : (($urandom % 3) != 0);
        act_pos[r] = (($urandom % 8) < bias) ? w[r][t % COLS] : 1'($urandom);
      end
      xnor_en = 1; col_sel = 6'($urandom);
      @(negedge clk); xnor_en = 0;
      for (int c = 0; c < COLS; c++) begin
        int s; logic [9:0] e;
        s = 0;
        for (int r = 0; r < ROWS; r++) if (act_nz[r]) s += (act_pos[r] == w[r][c]) ? 1 : -1;
        for (int k = 0; k < 10; k++) e[k] = s > (-54 + 12 * k);
        checks++;
        if (therm[c] !== e) begin failures++; if (failures < 10) $display("col %0d xac %0d got %b exp %b", c, s, therm[c], e); end
      end
      checks++;
      if (therm_mux !== therm[col_sel]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
