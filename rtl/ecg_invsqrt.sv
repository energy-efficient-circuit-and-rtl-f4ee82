// ecg_invsqrt -- 1/sqrt(x) by a 48-segment piecewise-linear table.
//
// Input x: 14-bit unsigned, 12 fraction bits (0 < x < 4). Combinational.
// The input is first shifted left by an even amount 2k (k = 0..6) until it lies
// in [1, 4); the six most significant bits of the shifted value then select one
// of 48 segments of width 1/16 (index = msbs - 16) and the remaining 8 bits are
// the position inside the segment: y_m = OFF[s] - SLOPE[s] * pos. Because
// 1/sqrt(x) = 2^k / sqrt(x * 4^k), the result is y_m shifted left by k.
// Output y: 23-bit unsigned with 15 fraction bits; x = 0 returns the largest value.
// Table entries are the function at the segment ends (secant lines), computed at
// elaboration.
// Paper: 48 uniform segments on [1, 4), 14-bit input, six MSBs as the segment
// index, output shift equal to half the input shift. Own choices: the fixed-point
// formats and the secant fit.
module ecg_invsqrt (
  input  logic [13:0] x,
  output logic [22:0] y,
  output logic [2:0]  k
);
  typedef logic [16:0] tab_t [48];
  function automatic tab_t mk_off();
    tab_t tab;
    for (int s = 0; s < 48; s++) tab[s] = 17'($rtoi(32768.0 / $sqrt(1.0 + s / 16.0) + 0.5));
    return tab;
  endfunction
  function automatic tab_t mk_slope();
    tab_t tab;
    for (int s = 0; s < 48; s++)
      tab[s] = 17'($rtoi((1.0 / $sqrt(1.0 + s / 16.0) - 1.0 / $sqrt(1.0 + (s + 1) / 16.0)) * 16.0 * 65536.0 + 0.5));
    return tab;
  endfunction
  localparam tab_t OFF   = mk_off();
  localparam tab_t SLOPE = mk_slope();

  logic [13:0] m;
  logic [5:0]  seg;
  logic [33:0] prod;
  logic [16:0] ym;
  always_comb begin
    k = 3'd6;
    for (int i = 6; i >= 0; i--) if ((x << (2 * i)) >> 12 != 0 && (x >> (14 - 2 * i)) == 0) k = 3'(i);
    m    = x << (2 * k);
    seg  = m[13:8] - 6'd16;
    // delta in Q15 = slope(Q16) * pos(2^-12) * 32768 / 65536 = slope * pos >> 13
    prod = 34'(SLOPE[seg]) * 34'(m[7:0]);
    ym   = OFF[seg] - 17'(prod >> 13);
    y    = (x == 0) ? '1 : 23'(ym) << k;
  end
endmodule
