// tb_carrier_delay: feeds random samples to a one-stage and a three-stage delay
// and checks that each output equals the input the given number of clocks
// earlier, and that reset clears the chain.
module tb_carrier_delay;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] din, dout1, dout3;
  logic [7:0] hist [4];
  int checks = 0, failures = 0;

  carrier_delay                dut1 (.clk, .rst, .din, .dout(dout1));
  carrier_delay #(.DEPTH(3))   dut3 (.clk, .rst, .din, .dout(dout3));

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 8'd77;
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (dout1 != 0 || dout3 != 0) failures++;
    rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      din = 8'($urandom);
      for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = din;
      @(posedge clk);
      #1;
      if (n >= 3) begin
        checks += 2;
        if (dout1 != hist[0]) begin failures++; $display("FAIL depth 1 n=%0d", n); end
        if (dout3 != hist[2]) begin failures++; $display("FAIL depth 3 n=%0d", n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
