// Self-checking testbench for pimca_pe: random weights in all 18 macros, random
// activation patches shifted through the input registers, MAC in the 9-input
// (256-d) mode and, after chained shifts, in the 18-input (128-d) mode, with
// random macro-enable masks. Sums are compared with an independent reference of
// each macro's ideal MAC and 11-level quantization; checks the one-cycle latency.
module tb_pimca_pe;
  import pimca_pkg::*;
  localparam int STEP = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_shift = 0, chain = 0, mac_en = 0, acc18 = 0;
  logic [MROWS-1:0] patch [3];
  logic [NMACRO-1:0] macro_en = '1;
  logic signed [7:0] sum [WAYS];
  logic w_we = 0; logic [4:0] w_macro = 0; logic [7:0] w_addr = 0; logic [MCOLS-1:0] w_data = 0;
  logic [MCOLS-1:0] wt [NMACRO][MROWS];
  logic [MROWS-1:0] ir [6][3];
  int checks = 0, failures = 0;
  pimca_pe dut (.*);

  function automatic int qz(int s);
    int l; l = 0;
    for (int k = 0; k < 10; k++) if (2 * s > (2 * k - 9) * STEP) l++;
    return l - 5;
  endfunction
  function automatic int mac(int m, int col, logic [255:0] a);
    int s; s = 0;
    for (int r = 0; r < MROWS; r++) s += (a[r] == wt[m][r][col]) ? 1 : -1;
    return qz(s);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic shift(bit ch);
    @(negedge clk);
    for (int r = 0; r < 3; r++) patch[r] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    in_shift = 1; chain = ch;
    if (ch) begin ir[5] = ir[4]; ir[4] = ir[3]; ir[3] = ir[2]; end
    ir[2] = ir[1]; ir[1] = ir[0]; ir[0] = patch;
    @(negedge clk); in_shift = 0; chain = 0;
  endtask

  task automatic run(bit m18, logic [17:0] mask);
    @(negedge clk); mac_en = 1; acc18 = m18; macro_en = mask;
    @(negedge clk); mac_en = 0;
    for (int d = 0; d < WAYS; d++) begin
      int s; s = 0;
      for (int m = 0; m < NMACRO; m++) begin
        int r, c; logic [255:0] a;
        r = m / 6; c = m % 6;
        a = (c < 3 || m18) ? ir[c][r] : ir[c - 3][r];
        if (!mask[m]) continue;
        if (m18) begin if (d < 128) s += mac(m, d, a); end
        else if ((d < 128) == (c < 3)) s += mac(m, d % 128, a);
      end
      checks++;
      if (int'(sum[d]) != s) begin failures++; if (failures < 8) $display("m18=%0d d=%0d got %0d exp %0d", m18, d, sum[d], s); end
    end
  endtask

  initial begin
    for (int c = 0; c < 6; c++) for (int r = 0; r < 3; r++) ir[c][r] = '0;
    for (int r = 0; r < 3; r++) patch[r] = '0;
    for (int m = 0; m < NMACRO; m++) for (int r = 0; r < MROWS; r++) wt[m][r] = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int m = 0; m < NMACRO; m++) for (int r = 0; r < MROWS; r++) begin
      @(negedge clk); w_we = 1; w_macro = 5'(m); w_addr = 8'(r); w_data = wt[m][r];
    end
    @(negedge clk); w_we = 0;
    for (int i = 0; i < 3; i++) shift(0);
    run(0, '1);
    shift(0);
    run(0, 18'($urandom));
    for (int i = 0; i < 6; i++) shift(1);
    run(1, '1);
    run(1, 18'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
