// clock_generator: the clock generator subsystem.
//
// A two-state finite state machine toggles between its states on every rising
// edge of the board clock, so its state bit is the board clock divided by two.
// That half-rate clock drives the digital clock manager, whose CLKFX output
// (f_clkin/2 * CLKFX_MULTIPLY / CLKFX_DIVIDE) is the sampling clock f_s of the
// SPWM datapath. The FSM is the same for every switching frequency; only the
// two DCM ratio parameters change. `rst` (active high, synchronous for the FSM)
// parks the FSM in its first state and unlocks the DCM. `locked` tells when
// `clk_s` is valid. This split (fixed divide-by-two FSM, adjustable DCM ratio)
// follows the document; the default ratio 16/25 is this design's choice.
module clock_generator #(
  parameter int unsigned CLKFX_MULTIPLY = 16,
  parameter int unsigned CLKFX_DIVIDE   = 25
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_half,
  output logic clk_s,
  output logic locked
);

  typedef enum logic {S_LOW = 1'b0, S_HIGH = 1'b1} div_state_t;
  div_state_t state;

  always_ff @(posedge clk_in) begin
    if (rst) state <= S_LOW;
    else begin
      unique case (state)
        S_LOW:   state <= S_HIGH;
        S_HIGH:  state <= S_LOW;
        default: state <= S_LOW;
      endcase
    end
  end

  assign clk_half = (state == S_HIGH);

  dcm_clkfx #(
    .CLKFX_MULTIPLY(CLKFX_MULTIPLY),
    .CLKFX_DIVIDE  (CLKFX_DIVIDE)
  ) u_dcm (
    .clkin (clk_half),
    .rst   (rst),
    .clkfx (clk_s),
    .locked(locked)
  );

endmodule
