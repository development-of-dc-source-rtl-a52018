// tb_adjustable_amplitude: drives random samples and indices, plus the corner
// values, and checks both scaled references one clock later against
// 128 + floor((s - 128) * index / 256).
module tb_adjustable_amplitude;
  import spwm_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] index, sine1, sine2, sine_ref1, sine_ref2;
  int checks = 0, failures = 0;

  adjustable_amplitude dut (.*);

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int s1, int s2, int m);
    @(negedge clk);
    sine1 = 8'(s1);
    sine2 = 8'(s2);
    index = 8'(m);
    @(posedge clk);
    #1;
    checks += 2;
    if (int'(sine_ref1) != scaled(s1, m) || int'(sine_ref2) != scaled(s2, m)) begin
      failures++;
      $display("FAIL s1=%0d s2=%0d m=%0d -> %0d %0d exp %0d %0d",
               s1, s2, m, sine_ref1, sine_ref2, scaled(s1, m), scaled(s2, m));
    end
  endtask

  initial begin
    sine1 = 8'd200; sine2 = 8'd56; index = 8'd255;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (sine_ref1 != 8'd128 || sine_ref2 != 8'd128) failures++;  // reset value
    rst = 1'b0;
    apply(255, 1, 255);
    apply(255, 1, 0);
    apply(128, 128, 200);
    apply(1, 255, 128);
    apply(129, 127, 255);
    for (int n = 0; n < 2000; n++)
      apply(1 + int'($urandom_range(254)), 1 + int'($urandom_range(254)), int'($urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
