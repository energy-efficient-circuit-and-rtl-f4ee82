// vesti_adc_decode -- ADC output decoding at the periphery of one XNOR-SRAM column.
//
// The flash ADC delivers a 10-bit thermometer code. It is converted to a level
// index 0..10 by counting ones (which also tolerates a bubble in the code), and a
// look-up table maps the level back to the XAC bitcount it represents. The default
// table holds the reconstruction values of the confined linear quantizer,
// -60 + 12 * level; a non-linear (e.g. Lloyd-Max) reference set only needs another
// table. Purely combinational.
// Thermometer-to-binary conversion followed by a LUT is the accelerator's scheme;
// counting ones and the table contents are this implementation's choices.
module vesti_adc_decode #(
  parameter logic signed [7:0] LUT [11] = '{-8'sd60, -8'sd48, -8'sd36, -8'sd24, -8'sd12, 8'sd0,
                                            8'sd12, 8'sd24, 8'sd36, 8'sd48, 8'sd60}
) (
  input  logic [9:0]        therm,
  output logic [3:0]        level,
  output logic signed [7:0] value
);
  always_comb begin
    level = '0;
    for (int k = 0; k < 10; k++) level += 4'(therm[k]);
    value = LUT[level];
  end
endmodule
