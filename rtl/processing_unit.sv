// processing_unit: inverts a sine sample about the zero level 128.
//
// The sine table holds only positive half-wave values; the negative half of the
// period is the same samples reflected about 128: ys = 2*128 - x. The unit is
// combinational. Reflecting about the "128" constant follows the document's
// block diagram; the exact arithmetic is this design's.
module processing_unit
  import spwm_pkg::*;
(
  input  sample_t sine_data,
  output sample_t ys
);

  always_comb ys = sample_t'(9'(2 * SINE_ZERO) - 9'(sine_data));

endmodule
