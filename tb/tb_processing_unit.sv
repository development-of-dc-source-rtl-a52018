// tb_processing_unit: exhaustive check of the reflection about 128 for every
// sample a quarter-wave table can hold (128..255) and for the rest of the range.
module tb_processing_unit;
  logic [7:0] sine_data, ys;
  int checks = 0, failures = 0;

  processing_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      sine_data = 8'(x);
      #1;
      checks++;
      // 128 + d reflects to 128 - d
      if (int'(ys) != ((128 - (x - 128)) & 255)) begin
        failures++;
        $display("FAIL x=%0d ys=%0d", x, ys);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
