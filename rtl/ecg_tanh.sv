// ecg_tanh -- tanh(x) from a 128-entry table of the positive half.
//
// Input: 12-bit signed, 8 fraction bits. Output: 12-bit signed, 10 fraction bits.
// Combinational. The table holds tanh(i/32) for i = 0..127; |x| is rounded to
// the nearest step (so tanh(0) = 0 exactly), larger magnitudes use the last entry, and
// negative inputs use the odd symmetry tanh(-x) = -tanh(x).
// Paper: 128-entry look-up table storing only the positive part of tanh, NN
// precision 12 bits. Own choices: the input range, step and formats.
module ecg_tanh (
  input  logic signed [11:0] x,
  output logic signed [11:0] y
);
  typedef logic [10:0] lut_t [128];
  function automatic lut_t mk_lut();
    lut_t tab;
    for (int i = 0; i < 128; i++) begin
      real r, e;
      r = i / 32.0;
      e = $exp(2.0 * r);
      tab[i] = 11'($rtoi((e - 1.0) / (e + 1.0) * 1024.0 + 0.5));
    end
    return tab;
  endfunction
  localparam lut_t LUT = mk_lut();

  logic [11:0] a;
  logic [8:0]  step;
  logic [6:0]  idx;
  always_comb begin
    a    = x[11] ? 12'(-x) : 12'(x);
    step = 9'((13'(a) + 13'd4) >> 3);
    idx  = (step > 9'd127) ? 7'd127 : step[6:0];
    y   = x[11] ? -12'(LUT[idx]) : 12'(LUT[idx]);
  end
endmodule
