// vesti_coord_gen -- output-pixel coordinate generator of a Vesti core.
//
// After start it produces the (x, y) coordinates of every output pixel of a
// map_w x map_h map, one per accepted step (next). Without pooling the order is
// row-major. With pool set (2x2 max-pooling follows) the four pixels of each
// pooling window are produced together, row-major inside the window, and the
// windows in row-major order, so that the pooling unit only needs one window of
// storage; win_first / win_last mark the first and last pixel of a window.
// Timing: the first coordinate is valid the cycle after start; each cycle with
// next high advances; done pulses after the last coordinate is consumed.
// The two orders follow the accelerator's description; the handshake, the
// requirement of even map sizes when pooling and the 6-bit size fields are this
// implementation's choices.
module vesti_coord_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [5:0] map_w,
  input  logic [5:0] map_h,
  input  logic       pool,
  input  logic       next,
  output logic       valid,
  output logic [5:0] x,
  output logic [5:0] y,
  output logic       win_first,
  output logic       win_last,
  output logic       last,
  output logic       done
);
  logic [5:0] bx, by;   // window origin (pooling) or pixel (no pooling)
  logic [1:0] k;        // index inside the 2x2 window
  logic       pool_q;
  logic [5:0] w_q, h_q;

  always_comb begin
    if (pool_q) begin
      x = bx + 6'(k[0]);
      y = by + 6'(k[1]);
      win_first = (k == 2'd0);
      win_last  = (k == 2'd3);
      last = win_last && (bx + 6'd2 >= w_q) && (by + 6'd2 >= h_q);
    end else begin
      x = bx; y = by;
      win_first = 1'b1; win_last = 1'b1;
      last = (bx + 6'd1 >= w_q) && (by + 6'd1 >= h_q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0; bx <= '0; by <= '0; k <= '0; pool_q <= 1'b0; w_q <= '0; h_q <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        valid <= 1'b1; bx <= '0; by <= '0; k <= '0; pool_q <= pool; w_q <= map_w; h_q <= map_h;
      end else if (valid && next) begin
        if (last) begin
          valid <= 1'b0; done <= 1'b1;
        end else if (pool_q && !win_last) begin
          k <= k + 2'd1;
        end else begin
          k <= '0;
          if (bx + (pool_q ? 6'd2 : 6'd1) >= w_q) begin
            bx <= '0; by <= by + (pool_q ? 6'd2 : 6'd1);
          end else begin
            bx <= bx + (pool_q ? 6'd2 : 6'd1);
          end
        end
      end
    end
  end
endmodule
