// tb_sine_memory: reads every entry of the default-size quarter-wave table and
// compares it with the sine evaluated directly; also checks the one-clock read
// latency.
module tb_sine_memory;
  import spwm_ref_pkg::*;
  localparam int Q = 160_000;

  logic clk = 1'b0;
  logic [$clog2(Q)-1:0] addr = '0;
  logic [7:0] data;
  int checks = 0, failures = 0;

  sine_memory dut (.*);

  always #5 clk = !clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    @(negedge clk);
    for (int i = 0; i < Q; i++) begin
      addr = ($clog2(Q))'(i);
      @(posedge clk);
      #1;
      checks++;
      if (int'(data) != sine_at(i, Q)) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d data %0d exp %0d", i, data, sine_at(i, Q));
      end
    end
    // latency: a new address shows only after the clock edge
    @(negedge clk);
    addr = 0;
    prev = int'(data);
    #1;
    checks++;
    if (int'(data) != prev) failures++;
    @(posedge clk);
    #1;
    checks++;
    if (int'(data) != sine_at(0, Q)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
