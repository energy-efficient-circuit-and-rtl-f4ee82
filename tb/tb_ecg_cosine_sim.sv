// Self-checking testbench for ecg_cosine_sim: 400-element vector pairs with
// chosen correlation (identical, noisy copies, independent, negated, one zero
// vector); the 9-bit result must be within 2 LSB of 128*cos computed in real
// arithmetic, accept must equal (cos_out > thr), and out_valid must come three
// cycles after the last element.
module tb_ecg_cosine_sim;
  localparam int L = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, in_valid = 0, last = 0; logic signed [8:0] a = 0, b = 0, thr = 9'sd90;
  logic out_valid, accept; logic signed [8:0] cos_out;
  ecg_cosine_sim dut (.*);
  int checks = 0, failures = 0, nacc = 0, nrej = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      real dot, na, nb, ex;
      int noise, sgn;
      noise = (t % 5) * 40; sgn = (t % 7 == 3) ? -1 : 1;
      dot = 0; na = 0; nb = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < L; i++) begin
        int va, vb;
        va = int'($urandom % 400) - 200;
        vb = sgn * va + (noise == 0 ? 0 : int'($urandom % (2 * noise + 1)) - noise);
        if (t % 11 == 10) vb = 0;
        vb = vb > 255 ? 255 : (vb < -256 ? -256 : vb);
        if (t % 13 == 12) va = va >>> 4;       // small-magnitude vector
        dot += va * vb; na += va * va; nb += vb * vb;
        @(negedge clk); in_valid = 1; last = (i == L - 1); a = 9'(va); b = 9'(vb);
      end
      @(negedge clk); in_valid = 0; last = 0;
      ex = (na == 0 || nb == 0) ? 0.0 : 128.0 * dot / $sqrt(na * nb);
      repeat (2) @(negedge clk);                // E = edge taking the last pair; now past E+2
      checks++; if (out_valid) begin failures++; $display("early"); end
      @(negedge clk);
      checks++; if (!out_valid) begin failures++; $display("latency"); end
      checks++;
      if (cos_out - ex > 2.0 || ex - cos_out > 2.0) begin failures++; $display("t%0d cos %0d exp %f", t, cos_out, ex); end
      checks++; if (accept != (cos_out > thr)) failures++;
      if (accept) nacc++; else nrej++;
    end
    checks++; if (nacc == 0 || nrej == 0) begin failures++; $display("decisions %0d/%0d", nacc, nrej); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
