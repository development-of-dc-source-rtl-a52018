// tb_comparison: random references and carrier, plus equal values; checks the
// four gate outputs one clock later and that each leg's pair is complementary.
module tb_comparison;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] sine_ref1, sine_ref2, carrier;
  logic ta_p, ta_n, tb_p, tb_n;
  int checks = 0, failures = 0;

  comparison dut (.*);

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int r1, int r2, int c);
    bit ea, eb;
    @(negedge clk);
    sine_ref1 = 8'(r1);
    sine_ref2 = 8'(r2);
    carrier   = 8'(c);
    @(posedge clk);
    #1;
    ea = r1 > c;
    eb = r2 > c;
    checks += 4;
    if (ta_p != ea || ta_n != !ea || tb_p != eb || tb_n != !eb) begin
      failures++;
      $display("FAIL r1=%0d r2=%0d c=%0d -> %b%b%b%b", r1, r2, c, ta_p, ta_n, tb_p, tb_n);
    end
  endtask

  initial begin
    sine_ref1 = 8'd200; sine_ref2 = 8'd10; carrier = 8'd100;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if ({ta_p, ta_n, tb_p, tb_n} != 4'b0000) failures++;  // all switches off in reset
    rst = 1'b0;
    apply(100, 100, 100);
    apply(101, 99, 100);
    apply(0, 255, 0);
    apply(255, 0, 255);
    for (int n = 0; n < 2000; n++)
      apply(int'($urandom_range(255)), int'($urandom_range(255)), int'($urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
