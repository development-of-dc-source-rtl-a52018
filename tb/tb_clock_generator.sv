// tb_clock_generator: drives a 100 MHz board clock and checks the two-state
// divider (50 MHz, 50 % duty) and the synthesized sampling clock (32 MHz with
// the default 16/25 ratio, 8 MHz with 4/25 for a 4 MHz-class setting).
// Times are in ns.
module tb_clock_generator;
  logic clk_in = 1'b0, rst = 1'b1;
  logic clk_half, clk_s, locked;
  logic clk_half2, clk_s2, locked2;
  int checks = 0, failures = 0;

  clock_generator dut (.*);
  clock_generator #(.CLKFX_MULTIPLY(4), .CLKFX_DIVIDE(25)) dut2 (
    .clk_in, .rst, .clk_half(clk_half2), .clk_s(clk_s2), .locked(locked2));

  always #5 clk_in = !clk_in;  // 100 MHz

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic measure(ref logic c, input real expected, input string what);
    realtime t0, t1, th;
    @(posedge c);
    t0 = $realtime;
    @(negedge c);
    th = $realtime;
    repeat (10) @(posedge c);
    t1 = $realtime;
    check((t1 - t0) / 10.0 > expected - 0.01 && (t1 - t0) / 10.0 < expected + 0.01,
          $sformatf("%s period %f ns, expected %f", what, (t1 - t0) / 10.0, expected));
    check((th - t0) > expected / 2.0 - 0.01 && (th - t0) < expected / 2.0 + 0.01,
          $sformatf("%s high time %f ns", what, th - t0));
  endtask

  initial begin
    repeat (4) @(posedge clk_in);
    #1;
    check(!clk_half && !locked, "held in reset");
    rst = 1'b0;
    // the divider toggles on every board clock edge
    for (int i = 0; i < 8; i++) begin
      logic prev_half;
      prev_half = clk_half;
      @(posedge clk_in);
      #1;
      check(clk_half != prev_half, $sformatf("divider toggle %0d", i));
    end
    measure(clk_half, 20.0, "clk_half");
    wait (locked && locked2);
    measure(clk_s, 31.25, "clk_s 16/25");
    measure(clk_s2, 125.0, "clk_s 4/25");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
