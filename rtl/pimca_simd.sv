// pimca_simd -- 256-way SIMD processor of the PIMCA accelerator.
//
// Handles the non-MAC work of a layer (batch-norm thresholds, activation
// quantization, pooling, residual additions, bit-serial/bit-parallel combination
// of 2-bit operands). Every way has four 8-bit registers R0-R3 and one 10-bit
// register R4; the MSB of R4 of all ways forms the 256-bit output that is written
// back to activation memory. One instruction per cycle, same for all ways:
//   ADD  Z=X+Y   ADD2 Z=2X+Y   COMP Z=(X>Y)   CMP2 Z=(X>R0)+(X>R1)+(X>R2)
//   LOAD Z=X     MAX  Z=max(X,Y)   RSHIFT Z=X>>>Y   LSHIFT Z=(X<<1)|mem_bit
// X is R0-R4, the way's PE sum, the way's activation-memory bit or an immediate;
// Y is R0-R4, the PE sum of the partner way (way index xor 128, used by ADD2 to
// merge the two weight bits computed by the left and right macro groups), the
// way's own PE sum or an immediate. All values are signed two's complement; a
// result is truncated to the width of its destination register.
// Timing: operands are read and Z is written at the same rising edge when en is
// high; out reflects R4 after that edge.
// The register set and the eight operations follow the accelerator's description;
// operand selectors, the immediate, the partner-way choice and truncation are this
// implementation's choices.
module pimca_simd
  import pimca_pkg::*;
#(
  parameter int N = WAYS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  simd_op_e          op,
  input  xsel_e             xsel,
  input  ysel_e             ysel,
  input  logic [2:0]        zsel,
  input  logic [7:0]        imm,
  input  logic signed [7:0] pe_sum [N],
  input  logic [N-1:0]      mem_bit,
  output logic [N-1:0]      out
);
  logic signed [7:0] r [N][4];
  logic signed [9:0] r4 [N];

  function automatic logic signed [10:0] rd(input int sel,
                                            input logic signed [7:0] r0, input logic signed [7:0] r1,
                                            input logic signed [7:0] r2, input logic signed [7:0] r3,
                                            input logic signed [9:0] q4);
    case (sel)
      0: return 11'(r0);
      1: return 11'(r1);
      2: return 11'(r2);
      3: return 11'(r3);
      default: return 11'(q4);
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < N; w++) begin
        for (int k = 0; k < 4; k++) r[w][k] <= '0;
        r4[w] <= '0;
      end
    end else if (en) begin
      for (int w = 0; w < N; w++) begin
        logic signed [10:0] x, y, z;
        case (xsel)
          X_PE:    x = 11'(pe_sum[w]);
          X_AM:    x = {10'd0, mem_bit[w]};
          X_IMM:   x = 11'($signed(imm));
          default: x = rd(int'(xsel), r[w][0], r[w][1], r[w][2], r[w][3], r4[w]);
        endcase
        case (ysel)
          Y_PEX:   y = 11'(pe_sum[w ^ (N/2)]);
          Y_PE:    y = 11'(pe_sum[w]);
          Y_IMM:   y = 11'($signed(imm));
          default: y = rd(int'(ysel), r[w][0], r[w][1], r[w][2], r[w][3], r4[w]);
        endcase
        case (op)
          S_ADD:    z = x + y;
          S_ADD2:   z = (x <<< 1) + y;
          S_COMP:   z = (x > y) ? 11'sd1 : 11'sd0;
          S_CMP2:   z = 11'(int'(x > 11'(r[w][0])) + int'(x > 11'(r[w][1])) + int'(x > 11'(r[w][2])));
          S_LOAD:   z = x;
          S_MAX:    z = (x > y) ? x : y;
          S_RSHIFT: z = x >>> y[3:0];
          default:  z = (x <<< 1) | {10'd0, mem_bit[w]};
        endcase
        if (zsel == 3'd4) r4[w] <= z[9:0];
        else              r[w][zsel[1:0]] <= z[7:0];
      end
    end
  end

  always_comb for (int w = 0; w < N; w++) out[w] = r4[w][9];
endmodule
