// carrier_memory: one full period of the triangular carrier, a synchronous-read
// block RAM.
//
// Entry j of a CARRIER_LEN-entry table holds the triangle
//   j <  L/2 : (510*j + L/2) / L        rising from 0 to 255
//   j >= L/2 : (510*(L-j) + L/2) / L    falling back towards 0
// (integer division, L = CARRIER_LEN), so one table pass is one switching
// period and the peak 255 sits at j = L/2. Read latency is one clock.
// Storing the whole carrier period follows the document; the exact sample
// formula is this design's.
module carrier_memory
  import spwm_pkg::*;
#(
  parameter int unsigned CARRIER_LEN = 32,
  localparam int unsigned AW = (CARRIER_LEN > 1) ? $clog2(CARRIER_LEN) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output sample_t       data
);

  sample_t rom [CARRIER_LEN];

  initial begin
    for (int unsigned j = 0; j < CARRIER_LEN; j++) begin
      if (2 * j < CARRIER_LEN)
        rom[j] = sample_t'((510 * j + CARRIER_LEN / 2) / CARRIER_LEN);
      else
        rom[j] = sample_t'((510 * (CARRIER_LEN - j) + CARRIER_LEN / 2) / CARRIER_LEN);
    end
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
