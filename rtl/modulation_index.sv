// modulation_index: converts the floating-point modulation index M to the
// 8-bit fixed-point Index used by the amplitude stage.
//
// Input is an IEEE-754 single-precision number meant to lie in [0, 1]. The
// 24-bit significand is first aligned to an unsigned fixed-point fraction with
// N_FRAC fractional bits (Mq = floor(M * 2^N_FRAC)); a larger N_FRAC resolves M
// more finely at the cost of wider logic. The fraction is then scaled to the
// 0..255 range with round-half-up: Index = floor((Mq*255 + 2^(N_FRAC-1)) / 2^N_FRAC).
// Negative numbers, zero and subnormals give 0; M >= 1, infinity and NaN give
// 255. The result is registered: Index follows m_float one clock later.
// The float input and the 0..255 fixed-point range follow the document; the
// intermediate width and the rounding are this design's.
module modulation_index
  import spwm_pkg::*;
#(
  parameter int unsigned N_FRAC = 16   // fractional bits of the intermediate value (1..23)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] m_float,
  output index_t      index
);

  localparam int unsigned W = 24 + N_FRAC;

  logic        sign;
  logic [7:0]  expo;
  logic [23:0] mant;
  logic [W-1:0] aligned;
  logic [N_FRAC-1:0] mq;
  logic [N_FRAC+7:0] scaled;
  index_t      index_next;

  always_comb begin
    sign = m_float[31];
    expo = m_float[30:23];
    mant = {1'b1, m_float[22:0]};
    // M = mant * 2^(expo - 150); Mq = floor(M * 2^N_FRAC) = mant >> (150 - expo - N_FRAC)
    aligned = W'(mant) << N_FRAC;
    aligned = aligned >> (8'd150 - expo);
    mq      = N_FRAC'(aligned);
    scaled  = (N_FRAC+8)'(mq) * (N_FRAC+8)'(255) + (N_FRAC+8)'(1 << (N_FRAC - 1));
    if (sign || expo == 8'd0)  index_next = 8'd0;
    else if (expo >= 8'd127)   index_next = 8'd255;
    else                       index_next = index_t'(scaled >> N_FRAC);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) index <= '0;
    else     index <= index_next;
  end

endmodule
