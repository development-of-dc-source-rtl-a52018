// spwm_generator: FPGA sinusoidal PWM generator for a single-phase full-bridge
// inverter, unipolar modulation, switching frequencies up to 1 MHz.
//
// Both the reference sine and the triangular carrier are read from on-chip
// tables, one sample per sampling clock f_s, so no arithmetic lies on the path
// from phase to sample. Blocks, in data-flow order:
//   clock_generator      board clock -> /2 FSM -> DCM -> f_s
//   modulation_index     IEEE-754 float M -> 8-bit Index
//   sine_carrier         control unit, quarter-wave sine table, carrier table,
//                        processing unit, MUX1/MUX2: a sine and its negative
//   adjustable_amplitude sineRef1/sineRef2 = sines scaled by Index
//   carrier_delay        aligns the carrier with the scaled references
//   comparison           Ta+/Ta- from sineRef1, Tb+/Tb- from sineRef2
// Table sizes follow from the frequencies: QUARTER = f_s / (4 f_out) sine
// samples and CARRIER_LEN = f_s / f_c carrier samples. The defaults are the
// 1 MHz carrier, 32 MHz sampling, 50 Hz output configuration, with f_s
// derived from a 100 MHz board clock as 100/2 * 16/25 MHz.
// The five subsystems, their parts and the 1 MHz / 32 MHz configuration follow
// the published design; the board clock, DCM ratio, pipeline registers and
// reset scheme are this design's choices.
//
// Timing: the datapath runs on clk_s. Reset, or loss of DCM lock, resets the
// datapath at once (asynchronous assertion, so all gate outputs go low even
// while clk_s is stopped) and is released two clk_s edges after both are gone;
// the waveform then restarts at phase 0. Gate outputs lag the phase counter by PIPE_LATENCY
// (3) clk_s cycles; the modulation index is registered once (one cycle).
// m_float should be held steady or changed slowly relative to clk_s, as it is
// sampled without synchronisation.
module spwm_generator
  import spwm_pkg::*;
#(
  parameter int unsigned F_CLKIN_HZ     = 100_000_000,
  parameter int unsigned CLKFX_MULTIPLY = 16,
  parameter int unsigned CLKFX_DIVIDE   = 25,
  parameter int unsigned FC_HZ          = DEFAULT_FC_HZ,
  parameter int unsigned FOUT_HZ        = DEFAULT_FOUT_HZ,
  parameter int unsigned N_FRAC         = 16
) (
  input  logic        clk_in,     // board clock
  input  logic        reset,      // active high
  input  logic [31:0] m_float,    // modulation index M, IEEE-754 single, 0..1
  output logic        clk_s,      // sampling clock from the DCM
  output logic        locked,     // clk_s valid
  output index_t      index,      // fixed-point modulation index in use
  output logic        ta_p,
  output logic        ta_n,
  output logic        tb_p,
  output logic        tb_n,
  output logic [1:0]  quadrant,   // quarter of the output period the phase counter is in
  output logic        half_flag,  // high in the negative half of the output period
  output logic        period_end  // one clk_s pulse per output period (phase counter)
);

  localparam longint unsigned FS_HZ =
      longint'(F_CLKIN_HZ) / 64'd2 * longint'(CLKFX_MULTIPLY) / longint'(CLKFX_DIVIDE);
  localparam int unsigned QUARTER     = int'(FS_HZ / (64'd4 * longint'(FOUT_HZ)));
  localparam int unsigned CARRIER_LEN = int'(FS_HZ / longint'(FC_HZ));

  // Power-up value "in reset" (an FPGA loads it with the configuration), so
  // the datapath starts reset even though clk_s only runs once the DCM locks.
  logic [1:0] rst_sync = 2'b11;
  logic       rst_s;

  clock_generator #(
    .CLKFX_MULTIPLY(CLKFX_MULTIPLY),
    .CLKFX_DIVIDE  (CLKFX_DIVIDE)
  ) u_clkgen (
    .clk_in, .rst(reset), .clk_half(), .clk_s, .locked
  );

  // Reset synchroniser: asserts at once on reset or loss of lock, releases two
  // clk_s edges after both are gone.
  logic rst_raw;
  assign rst_raw = reset || !locked;

  always_ff @(posedge clk_s or posedge rst_raw) begin
    if (rst_raw) rst_sync <= 2'b11;
    else         rst_sync <= {rst_sync[0], 1'b0};
  end
  assign rst_s = rst_sync[1];

  modulation_index #(.N_FRAC(N_FRAC)) u_mi (
    .clk(clk_s), .rst(rst_s), .m_float, .index
  );

  sample_t sine1, sine2, carrier, carrier_d, sine_ref1, sine_ref2;

  sine_carrier #(.QUARTER(QUARTER), .CARRIER_LEN(CARRIER_LEN)) u_sc (
    .clk(clk_s), .rst(rst_s), .sine1, .sine2, .carrier, .flag(half_flag), .quadrant, .wrap(period_end)
  );

  adjustable_amplitude u_amp (
    .clk(clk_s), .rst(rst_s), .index, .sine1, .sine2, .sine_ref1, .sine_ref2
  );

  carrier_delay #(.DEPTH(1)) u_delay (
    .clk(clk_s), .rst(rst_s), .din(carrier), .dout(carrier_d)
  );

  comparison u_cmp (
    .clk(clk_s), .rst(rst_s), .sine_ref1, .sine_ref2, .carrier(carrier_d),
    .ta_p, .ta_n, .tb_p, .tb_n
  );

endmodule
