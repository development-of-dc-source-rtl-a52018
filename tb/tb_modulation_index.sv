// tb_modulation_index: converts a sweep of single-precision modulation indices
// (exact multiples of 2^-20 in [0, 1], the values used in the document's
// measurements, and special values) and compares the registered Index with the
// expected rounding of M * 255.
module tb_modulation_index;
  import spwm_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] m_float;
  logic [7:0] index;
  int checks = 0, failures = 0;

  modulation_index dut (.*);

  always #5 clk = !clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_bits(logic [31:0] bits, int expected, string what);
    @(negedge clk);
    m_float = bits;
    @(posedge clk);
    #1;
    checks++;
    if (int'(index) != expected) begin
      failures++;
      $display("FAIL %s: bits %h index %0d exp %0d", what, bits, index, expected);
    end
  endtask

  task automatic apply(real m);
    apply_bits(to_float(m), index_of(m, 16), $sformatf("M=%f", m));
  endtask

  initial begin
    m_float = 32'h3f800000;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (index != 0) failures++;
    rst = 1'b0;
    apply(0.1); apply(0.5); apply(0.9); apply(1.0);
    apply(0.0); apply(0.25); apply(0.75); apply(1.0 / 512.0); apply(1.0 / 1024.0);
    apply(2.0);
    apply_bits(32'hbf000000, 0, "-0.5");
    apply_bits(32'h7f800000, 255, "+inf");
    apply_bits(32'h00000001, 0, "subnormal");
    for (int n = 0; n < 3000; n++)
      apply(real'($urandom_range(1 << 20)) / real'(1 << 20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
