// tb_workload_spectrum: runs the generator in the configurations whose output
// spectrum is characterised for this design, and checks the spectrum of the
// bridge voltage Ta+ - Tb+ over whole 50 Hz periods:
//   f_c = 10 kHz, 100 kHz and 1 MHz at f_s = 32 MHz, M = 0.1, 0.5, 0.9, 1.0
//   f_c = 1 kHz at f_s = 4 MHz (clock-manager ratio 2/25), same M values.
// Checks per configuration and M:
//   - the 50 Hz amplitude equals the effective modulation depth
//     2 * 127 * Index / (256 * 255) within 0.02 + 1/L (linear in M), where
//     L = f_s / f_c carrier samples per switching period limit the pulse-width
//     resolution (L = 32 at 1 MHz);
//   - the 3rd harmonic stays below the same tolerance;
//   - the component at f_c itself stays below 0.02 while the sidebands at
//     2 f_c -/+ 50 Hz carry the switching energy (unipolar modulation moves
//     the first harmonic band to twice the switching frequency).
// Times are in ns.
module tb_workload_spectrum;
  import spwm_ref_pkg::*;

  logic clk_in = 1'b0, reset = 1'b1;
  always #5 clk_in = !clk_in;

  int checks = 0, failures = 0;

  `define SPWM_INSTANCE(NAME, FC, MULT, PER, HCV) \
    logic [31:0] m_``NAME; \
    logic clk_``NAME, lk_``NAME, ap_``NAME, an_``NAME, bp_``NAME, bn_``NAME, hf_``NAME, pe_``NAME, dn_``NAME; \
    logic [1:0] q_``NAME; \
    logic [7:0] ix_``NAME; \
    spwm_generator #(.FC_HZ(FC), .CLKFX_MULTIPLY(MULT)) dut_``NAME ( \
      .clk_in, .reset, .m_float(m_``NAME), .clk_s(clk_``NAME), .locked(lk_``NAME), .index(ix_``NAME), \
      .ta_p(ap_``NAME), .ta_n(an_``NAME), .tb_p(bp_``NAME), .tb_n(bn_``NAME), \
      .quadrant(q_``NAME), .half_flag(hf_``NAME), .period_end(pe_``NAME)); \
    fundamental_meter #(.PERIOD(PER), .HC(HCV)) meter_``NAME ( \
      .clk_s(clk_``NAME), .period_end(pe_``NAME), .ta_p(ap_``NAME), .tb_p(bp_``NAME), \
      .m_float(m_``NAME), .done(dn_``NAME));

  `SPWM_INSTANCE(c10k,  10_000,    16, 640_000, 200)
  `SPWM_INSTANCE(c100k, 100_000,   16, 640_000, 2_000)
  `SPWM_INSTANCE(c1m,   1_000_000, 16, 640_000, 20_000)
  `SPWM_INSTANCE(c1k,   1_000,     2,  80_000,  20)

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic report(string name, int carrier_len, real amp [4][5]);
    real m_list [4] = '{0.1, 0.5, 0.9, 1.0};
    for (int i = 0; i < 4; i++) begin
      real expected, tol;
      // pulse widths are quantised to 1/carrier_len of a switching period
      tol = 0.02 + 1.0 / real'(carrier_len);
      expected = 2.0 * 127.0 * real'(index_of(m_list[i], 16)) / (256.0 * 255.0);
      $display("%s M=%.1f fundamental=%.4f (expected %.4f) h3=%.4f at_fc=%.4f 2fc-50=%.4f 2fc+50=%.4f",
               name, m_list[i], amp[i][0], expected, amp[i][1], amp[i][2], amp[i][3], amp[i][4]);
      check(amp[i][0] > expected - tol && amp[i][0] < expected + tol, $sformatf("%s M=%.1f fundamental", name, m_list[i]));
      check(amp[i][1] < tol, $sformatf("%s M=%.1f 3rd harmonic", name, m_list[i]));
      check(amp[i][2] < 0.02, $sformatf("%s M=%.1f component at f_c", name, m_list[i]));
      check(amp[i][3] + amp[i][4] > 5.0 * amp[i][2], $sformatf("%s M=%.1f sidebands at 2 f_c", name, m_list[i]));
    end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200;
    reset = 1'b0;
    wait (dn_c10k && dn_c100k && dn_c1m && dn_c1k);
    report("fc=10kHz fs=32MHz", 3200, meter_c10k.amp);
    report("fc=100kHz fs=32MHz", 320, meter_c100k.amp);
    report("fc=1MHz fs=32MHz", 32, meter_c1m.amp);
    report("fc=1kHz fs=4MHz", 4000, meter_c1k.amp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
