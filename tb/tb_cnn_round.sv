// Self-checking testbench for cnn_round: random and boundary 22-bit values in all
// four rounding modes against a reference (round half up, saturate to 16 bits).
module tb_cnn_round;
  logic signed [21:0] din; logic [1:0] mode; logic signed [15:0] dout; logic saturated;
  cnn_round dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 20000; t++) begin
      int v, e, sh;
      case (t % 5)
        0: v = int'($urandom % 4194304) - 2097152;
        1: v = int'($urandom % 600) - 300;
        2: v = (t & 8) ? 2097151 : -2097152;
        default: v = int'($urandom % 300000) - 150000;
      endcase
      din = 22'(v); mode = 2'(t >> 4); sh = 2 * mode;
      e = sh == 0 ? v : (v + (1 << (sh - 1))) >>> sh;
      e = e > 32767 ? 32767 : (e < -32768 ? -32768 : e);
      #1; checks++;
      if (int'(dout) != e) begin failures++; if (failures < 10) $display("%0d m%0d got %0d exp %0d", v, mode, dout, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
