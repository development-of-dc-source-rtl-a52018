// spwm_pkg: types and constants shared by the SPWM generator.
//
// Every waveform in the generator is an unsigned 8-bit sample. A sine value in
// [-1, 1] is mapped onto [0, 255], and the value 128 stands for zero, as the
// design's 8-bit fixed-point arithmetic requires. The triangular carrier uses
// the same 0..255 range, so a reference and the carrier can be compared directly.
package spwm_pkg;

  typedef logic [7:0] sample_t;   // one 8-bit waveform sample
  typedef logic [7:0] index_t;    // fixed-point modulation index, 0..255

  localparam sample_t SINE_ZERO = 8'd128;   // the sample value that means 0
  localparam int unsigned SINE_AMPL = 127;  // peak deviation from SINE_ZERO

  // Sampling clock, carrier and output frequencies of the main configuration
  // (1 MHz carrier sampled at 32 MHz, 50 Hz output).
  localparam int unsigned DEFAULT_FS_HZ   = 32_000_000;
  localparam int unsigned DEFAULT_FC_HZ   = 1_000_000;
  localparam int unsigned DEFAULT_FOUT_HZ = 50;

  // Cycles from the control unit's phase counter to the registered gate
  // outputs: memory read, amplitude register, comparator register.
  localparam int unsigned PIPE_LATENCY = 3;

endpackage
