// sine_memory: quarter-period sine table, a synchronous-read block RAM.
//
// Entry i holds round(128 + 127*sin(pi/2 * (i + 0.5) / QUARTER)), the first
// quarter of a sine sampled QUARTER times with a half-sample offset so that
// reading the table backwards gives the exact mirror image of the second
// quarter. Values lie in 128..255 (128 is zero). The read has one clock of
// latency, like the block RAMs the design targets. The table is filled at
// elaboration from the formula rather than from a file; storing only a quarter
// of the period follows the document, the half-sample offset and rounding are
// this design's choice.
module sine_memory
  import spwm_pkg::*;
#(
  parameter int unsigned QUARTER = 160_000,
  localparam int unsigned AW = (QUARTER > 1) ? $clog2(QUARTER) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output sample_t       data
);

  sample_t rom [QUARTER];

  initial begin
    for (int unsigned i = 0; i < QUARTER; i++) begin
      real theta;
      theta  = 3.14159265358979323846 / 2.0 * (real'(i) + 0.5) / real'(QUARTER);
      rom[i] = sample_t'($rtoi(real'(SINE_ZERO) + real'(SINE_AMPL) * $sin(theta) + 0.5));
    end
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
