// Self-checking testbench for c3sram_macro: random weights are written row by row,
// read back in memory mode, then random ternary input vectors are applied and the
// per-column 4-bit ADC codes are compared against an independent reference that
// counts agreements and disagreements and rounds to the nearest 24-step level.
module tb_c3sram_macro;
  localparam int ROWS = 256, COLS = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, re, mac_en, q_valid;
  logic [7:0] addr;
  logic [COLS-1:0] wdata, rdata;
  logic [ROWS-1:0] act_en, act_pos;
  logic signed [3:0] q [COLS];
  logic [COLS-1:0] w [ROWS];
  int checks = 0, failures = 0;

  c3sram_macro #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  function automatic int ref_code(int s);
    int l;
    // nearest multiple of 24, ties toward zero-side comparator convention
    l = 0;
    for (int k = -5; k <= 5; k++)
      if (s * 2 > (2 * k - 1) * 24) l = k;
    if (s * 2 <= -9 * 24) l = -5;
    return l;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; re = 0; mac_en = 0; addr = 0; wdata = 0; act_en = 0; act_pos = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      w[r] = {$urandom, $urandom};
      @(negedge clk); we = 1; addr = 8'(r); wdata = w[r];
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < ROWS; r += 37) begin
      @(negedge clk); re = 1; addr = 8'(r);
      @(negedge clk); re = 0; checks++;
      if (rdata !== w[r]) begin failures++; $display("read mismatch row %0d", r); end
    end
    for (int t = 0; t < 60; t++) begin
      int bias;
      @(negedge clk);
      bias = t % 6;
      for (int r = 0; r < ROWS; r++) begin
        act_en[r]  = ($urandom % 8) != 0;
        // skew inputs toward the stored weights on some vectors to sweep the range
        act_pos[r] = (($urandom % 6) < bias) ? w[r][t % COLS] : 1'($urandom);
      end
      mac_en = 1;
      @(negedge clk); mac_en = 0;
      checks++;
      if (!q_valid) begin failures++; $display("q_valid missing"); end
      for (int c = 0; c < COLS; c++) begin
        int s;
        s = 0;
        for (int r = 0; r < ROWS; r++)
          if (act_en[r]) s += (act_pos[r] == w[r][c]) ? 1 : -1;
        checks++;
        if (int'(q[c]) != ref_code(s)) begin
          failures++;
          $display("t=%0d col %0d sum %0d got %0d exp %0d", t, c, s, q[c], ref_code(s));
        end
      end
    end
    @(negedge clk); checks++;
    if (q_valid || q[0] != 0) begin failures++; $display("idle macro not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
