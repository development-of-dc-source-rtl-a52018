// tb_sine_carrier: runs the sine-carrier subsystem with a small table for two
// output periods and compares the sine, its negative and the carrier with the
// waveforms evaluated directly, one clock after the phase that produced them.
module tb_sine_carrier;
  import spwm_ref_pkg::*;
  localparam int Q = 50;
  localparam int L = 8;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] sine1, sine2, carrier;
  logic flag, wrap;
  logic [1:0] quadrant;
  int checks = 0, failures = 0;
  int flips = 0;

  sine_carrier #(.QUARTER(Q), .CARRIER_LEN(L)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic last_flag;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    last_flag = 1'b0;
    @(negedge clk);  // the edge that samples rst low still sees reset
    // after edge k the outputs describe phase k-1
    for (int k = 1; k <= 2 * 4 * Q + 2; k++) begin
      @(negedge clk);
      check(int'(sine1) == sine_at(k - 1, Q),
            $sformatf("k=%0d sine1=%0d exp %0d", k, sine1, sine_at(k - 1, Q)));
      check(int'(sine2) == neg_sine_at(k - 1, Q),
            $sformatf("k=%0d sine2=%0d exp %0d", k, sine2, neg_sine_at(k - 1, Q)));
      check(int'(carrier) == carrier_at((k - 1) % L, L),
            $sformatf("k=%0d carrier=%0d exp %0d", k, carrier, carrier_at((k - 1) % L, L)));
      check(flag == (((k - 1) % (4 * Q)) >= 2 * Q), $sformatf("k=%0d flag", k));
      if (flag != last_flag) flips++;
      last_flag = flag;
    end
    check(flips == 4, $sformatf("flag toggled %0d times, expected 4", flips));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
