// control_unit: address generator of the sine-carrier subsystem.
//
// One output-waveform period holds 4*QUARTER sampling-clock cycles and one
// carrier period CARRIER_LEN cycles. The unit keeps a quadrant number, an index
// inside the quadrant and a carrier index, all advanced once per clock.
// Only the first quarter of the sine is stored, so the sine address runs
// forward in quadrants 0 and 2 and backward in quadrants 1 and 3 (mirroring);
// `flag` is high in quadrants 2 and 3, where the processing unit's inverted
// sample must be chosen. The carrier address simply wraps over its full table.
//
// Addresses and flag are combinational from the counters, so a synchronous
// memory read returns the sample of the current phase one clock later.
// `wrap` pulses in the last cycle of each output period; `quadrant` is exposed
// for observation. Active-high reset (asserted asynchronously, released
// synchronously by the top level) restarts at phase 0.
// The forward/backward addressing and the flag follow the document's
// quarter-wave storage; counter layout and reset behaviour are this design's.
module control_unit #(
  parameter int unsigned QUARTER     = 160_000,  // sine samples per quarter period
  parameter int unsigned CARRIER_LEN = 32,       // carrier samples per period
  localparam int unsigned SAW = (QUARTER > 1) ? $clog2(QUARTER) : 1,
  localparam int unsigned CAW = (CARRIER_LEN > 1) ? $clog2(CARRIER_LEN) : 1
) (
  input  logic           clk,
  input  logic           rst,
  output logic [SAW-1:0] sine_addr,
  output logic [CAW-1:0] carrier_addr,
  output logic           flag,
  output logic [1:0]     quadrant,
  output logic           wrap
);

  logic [SAW-1:0] idx;
  logic [CAW-1:0] cidx;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      idx      <= '0;
      quadrant <= 2'd0;
      cidx     <= '0;
    end else begin
      if (idx == SAW'(QUARTER - 1)) begin
        idx      <= '0;
        quadrant <= quadrant + 2'd1;
      end else begin
        idx <= idx + SAW'(1);
      end
      if (cidx == CAW'(CARRIER_LEN - 1)) cidx <= '0;
      else                               cidx <= cidx + CAW'(1);
    end
  end

  always_comb begin
    sine_addr    = quadrant[0] ? SAW'(QUARTER - 1) - idx : idx;
    carrier_addr = cidx;
    flag         = quadrant[1];
    wrap         = (quadrant == 2'd3) && (idx == SAW'(QUARTER - 1));
  end

endmodule
