// tb_control_unit: checks the address generator cycle by cycle against a phase
// counter model for three output periods, with a small table size: forward and
// backward sine addressing per quadrant, the half-period flag, the carrier
// address wrap and the end-of-period pulse.
module tb_control_unit;
  localparam int Q = 5;
  localparam int L = 6;

  logic clk = 1'b0, rst = 1'b1;
  logic [$clog2(Q)-1:0] sine_addr;
  logic [$clog2(L)-1:0] carrier_addr;
  logic flag, wrap;
  logic [1:0] quadrant;
  int checks = 0, failures = 0;

  control_unit #(.QUARTER(Q), .CARRIER_LEN(L)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
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
    int p;
    int q, i, exp_addr;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (p = 0; p < 3 * 4 * Q + 3; p++) begin
      @(negedge clk);
      q = (p % (4 * Q)) / Q;
      i = p % Q;
      exp_addr = (q == 1 || q == 3) ? Q - 1 - i : i;
      check(sine_addr == exp_addr, $sformatf("p=%0d sine_addr=%0d exp %0d", p, sine_addr, exp_addr));
      check(quadrant == q, $sformatf("p=%0d quadrant=%0d exp %0d", p, quadrant, q));
      check(flag == (q >= 2), $sformatf("p=%0d flag=%0b", p, flag));
      check(carrier_addr == p % L, $sformatf("p=%0d carrier_addr=%0d", p, carrier_addr));
      check(wrap == ((p % (4 * Q)) == 4 * Q - 1), $sformatf("p=%0d wrap=%0b", p, wrap));
    end
    // synchronous reset returns to phase 0
    rst <= 1'b1;
    @(negedge clk);
    check(sine_addr == 0 && quadrant == 0 && carrier_addr == 0, "reset to phase 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
