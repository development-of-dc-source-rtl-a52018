// adjustable_amplitude: scales the two constant-amplitude sines by the
// modulation index.
//
// Each reference is taken as a signed offset from the zero level 128,
// multiplied by the 8-bit Index (0..255 standing for M = 0..1) and shifted
// right by 8 with floor rounding:
//   sineRef = 128 + floor((sine - 128) * index / 256)
// One 9x9 signed multiply per reference (a DSP slice on an FPGA), registered:
// the result appears one clock after the inputs. Scaling the reference by M
// follows the document; the formula, the floor rounding and the register are
// this design's.
module adjustable_amplitude
  import spwm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  index_t  index,
  input  sample_t sine1,
  input  sample_t sine2,
  output sample_t sine_ref1,
  output sample_t sine_ref2
);

  function automatic sample_t scale(sample_t s, index_t m);
    logic signed [17:0] dev;
    logic signed [17:0] gain;
    logic signed [17:0] prod;
    dev  = 18'(s) - 18'(SINE_ZERO);
    gain = 18'(m);
    prod = dev * gain;
    return sample_t'(18'(prod >>> 8) + 18'(SINE_ZERO));
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sine_ref1 <= SINE_ZERO;
      sine_ref2 <= SINE_ZERO;
    end else begin
      sine_ref1 <= scale(sine1, index);
      sine_ref2 <= scale(sine2, index);
    end
  end

endmodule
