// tb_dcm_clkfx: feeds the clock-manager model a 50 MHz clock and checks that it
// locks and then produces a 32 MHz output (ratio 16/25), that reset drops the
// lock and stops the output, and that a second ratio (4/1) gives 200 MHz.
// Times are in ns.
module tb_dcm_clkfx;
  logic clkin = 1'b0, rst = 1'b1;
  logic clkfx, locked, clkfx4, locked4;
  int checks = 0, failures = 0;

  dcm_clkfx                                           dut  (.clkin, .rst, .clkfx, .locked);
  dcm_clkfx #(.CLKFX_MULTIPLY(4), .CLKFX_DIVIDE(1))  dut4 (.clkin, .rst, .clkfx(clkfx4), .locked(locked4));

  always #10 clkin = !clkin;  // 20 ns period, 50 MHz

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
    realtime t0, t1;
    @(posedge c);
    t0 = $realtime;
    repeat (10) @(posedge c);
    t1 = $realtime;
    check((t1 - t0) / 10.0 > expected - 0.01 && (t1 - t0) / 10.0 < expected + 0.01,
          $sformatf("%s period %f ns, expected %f", what, (t1 - t0) / 10.0, expected));
  endtask

  initial begin
    #100;
    check(!locked && !clkfx, "held in reset");
    rst = 1'b0;
    wait (locked);
    check($realtime < 300.0, $sformatf("locked at %t", $realtime));
    measure(clkfx, 31.25, "16/25");
    measure(clkfx4, 5.0, "4/1");
    rst = 1'b1;
    #50;
    check(!locked && !locked4, "reset drops lock");
    #100;
    check(!clkfx, "output stopped while unlocked");
    rst = 1'b0;
    wait (locked);
    measure(clkfx, 31.25, "16/25 after relock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
