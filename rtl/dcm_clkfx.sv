// dcm_clkfx: behavioural model of a digital clock manager's frequency
// synthesis output (CLKFX). Not synthesizable: on an FPGA this is the vendor's
// clock-management primitive, and only its behaviour is modelled here.
//
// The model measures the period of `clkin` between rising edges. After
// LOCK_CYCLES consecutive equal periods it raises `locked` and starts a
// free-running output clock whose period is
//   T_clkfx = T_clkin * CLKFX_DIVIDE / CLKFX_MULTIPLY,
// i.e. f_clkfx = f_clkin * CLKFX_MULTIPLY / CLKFX_DIVIDE. It is unit-agnostic:
// periods are measured in whatever time unit the simulation uses. `rst` or a
// change of the input period drops `locked` and stops `clkfx` (held low) until
// the input is stable again. Output phase alignment, jitter and the primitive's
// allowed frequency ranges are not modelled. The two ratio parameters carry the
// names the vendor primitive uses; their default values are this design's
// choice for a 100 MHz board clock halved to 50 MHz and scaled to 32 MHz.
module dcm_clkfx #(
  parameter int unsigned CLKFX_MULTIPLY = 16,
  parameter int unsigned CLKFX_DIVIDE   = 25,
  parameter int unsigned LOCK_CYCLES    = 4
) (
  input  logic clkin,
  input  logic rst,
  output logic clkfx,
  output logic locked
);

  realtime last_edge;
  realtime period;
  int unsigned stable;

  initial begin
    clkfx     = 1'b0;
    locked    = 1'b0;
    last_edge = 0.0;
    period    = 0.0;
    stable    = 0;
  end

  always @(posedge clkin or posedge rst) begin
    if (rst) begin
      locked    <= 1'b0;
      stable    = 0;
      last_edge = 0.0;
      period    = 0.0;
    end else begin
      if (last_edge > 0.0 && ($realtime - last_edge) == period) begin
        if (stable < LOCK_CYCLES) stable = stable + 1;
      end else begin
        stable = 0;
        locked <= 1'b0;
      end
      period    = $realtime - last_edge;
      last_edge = $realtime;
      if (stable >= LOCK_CYCLES) locked <= 1'b1;
    end
  end

  always begin
    if (locked) begin
      #(period * real'(CLKFX_DIVIDE) / (2.0 * real'(CLKFX_MULTIPLY)));
      clkfx = locked ? !clkfx : 1'b0;
    end else begin
      clkfx = 1'b0;
      @(posedge locked);
    end
  end

endmodule
