// tb_carrier_memory: reads the whole carrier table at the default length (32,
// a 1 MHz carrier at 32 MHz sampling) and at 4000 (1 kHz at 4 MHz) and compares
// each entry with the triangle evaluated directly.
module tb_carrier_memory;
  import spwm_ref_pkg::*;
  localparam int L1 = 32;
  localparam int L2 = 4000;

  logic clk = 1'b0;
  logic [$clog2(L1)-1:0] addr1 = '0;
  logic [$clog2(L2)-1:0] addr2 = '0;
  logic [7:0] data1, data2;
  int checks = 0, failures = 0;

  carrier_memory                      dut1 (.clk, .addr(addr1), .data(data1));
  carrier_memory #(.CARRIER_LEN(L2))  dut2 (.clk, .addr(addr2), .data(data2));

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int j = 0; j < L2; j++) begin
      addr1 = ($clog2(L1))'(j % L1);
      addr2 = ($clog2(L2))'(j);
      @(posedge clk);
      #1;
      if (j < L1) begin
        checks++;
        if (int'(data1) != carrier_at(j, L1)) begin
          failures++;
          $display("FAIL L=%0d j=%0d data %0d exp %0d", L1, j, data1, carrier_at(j, L1));
        end
      end
      checks++;
      if (int'(data2) != carrier_at(j, L2)) begin
        failures++;
        if (failures < 10) $display("FAIL L=%0d j=%0d data %0d exp %0d", L2, j, data2, carrier_at(j, L2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
