// comparison: the comparison subsystem, two comparators with complementary
// outputs.
//
// Leg a: ta_p is high while sineRef1 is above the carrier, ta_n is its
// complement. Leg b does the same with sineRef2. Because sineRef2 is the
// negative of sineRef1, the bridge voltage (Ta+ minus Tb+) is unipolar SPWM.
// Outputs are registered, one clock after the inputs; reset turns every
// switch off (all four outputs low). No dead time is inserted. The comparator
// pair with inverters follows the document's block diagram; the strict
// "greater than", the output register and the reset state are this design's.
module comparison
  import spwm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t sine_ref1,
  input  sample_t sine_ref2,
  input  sample_t carrier,
  output logic    ta_p,
  output logic    ta_n,
  output logic    tb_p,
  output logic    tb_n
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      {ta_p, ta_n, tb_p, tb_n} <= 4'b0000;
    end else begin
      ta_p <= (sine_ref1 > carrier);
      ta_n <= !(sine_ref1 > carrier);
      tb_p <= (sine_ref2 > carrier);
      tb_n <= !(sine_ref2 > carrier);
    end
  end

  // The two switches of a leg are never on together.
  a_leg_a_exclusive: assert property (@(posedge clk) disable iff (rst) !(ta_p && ta_n));
  a_leg_b_exclusive: assert property (@(posedge clk) disable iff (rst) !(tb_p && tb_n));

endmodule
