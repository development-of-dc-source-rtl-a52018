// carrier_delay: the "Delay" block between the carrier memory and the
// comparators.
//
// A DEPTH-stage register chain that gives the carrier the same latency as the
// adjustable-amplitude stage gives the references, so each comparator sees a
// carrier sample and a reference sample of the same sampling instant. Reset
// clears the chain to 0. The block's place follows the document's block
// diagram; its depth (one stage, matching the single amplitude register) is
// this design's.
module carrier_delay
  import spwm_pkg::*;
#(
  parameter int unsigned DEPTH = 1
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t din,
  output sample_t dout
);

  sample_t stage [DEPTH];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= din;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[DEPTH-1];

endmodule
