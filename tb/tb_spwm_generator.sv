// tb_spwm_generator: end-to-end test of the SPWM generator at its default
// configuration (100 MHz board clock, 32 MHz sampling clock, 1 MHz carrier,
// 50 Hz output).
//
// After reset the clock manager must lock and deliver a 31.25 ns sampling
// clock. The testbench then follows every sampling-clock cycle for one full
// output period at M = 0.9 and one full period at M = 0.5 and compares all four
// gate signals with a model that evaluates the sine, the carrier, the index
// scaling and the comparison directly, PIPE_LATENCY (3) cycles after the phase
// that produced them. It checks the 50 Hz period (640 000 cycles, 20 ms) and,
// finally, that a reset mid-run turns all switches off and restarts the
// waveform at phase 0. Each mechanism (lock, quadrant mirroring, half-period
// inversion, carrier wrap, index change, reset restart) is counted and must
// occur. Times are in ns.
module tb_spwm_generator;
  import spwm_ref_pkg::*;

  localparam int Q = 160_000;        // 32 MHz / (4 * 50 Hz)
  localparam int L = 32;             // 32 MHz / 1 MHz
  localparam int PERIOD = 4 * Q;
  localparam int LAT = 3;

  logic clk_in = 1'b0, reset = 1'b1;
  logic [31:0] m_float;
  logic clk_s, locked, ta_p, ta_n, tb_p, tb_n, half_flag, period_end;
  logic [1:0] quadrant;
  logic [7:0] index;

  spwm_generator dut (.*);

  always #5 clk_in = !clk_in;

  int checks = 0, failures = 0;
  int n_lock = 0, n_flag_toggle = 0, n_carrier_wrap = 0, n_index_change = 0;
  int n_restart = 0, n_period_end = 0, n_ta_pulse = 0, n_tb_pulse = 0;
  int n_quadrant [4] = '{0, 0, 0, 0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge locked) n_lock++;

  // ---- cycle model ------------------------------------------------------
  longint k = 0;                 // clk_s edges taken outside reset
  logic   pre_rst;
  logic [7:0] idx_hist [3];
  logic   last_flag = 1'b0, last_ta = 1'b0, last_tb = 1'b0;
  logic [1:0] last_quadrant = 2'd0;
  logic [7:0] last_index = 8'd0;
  longint last_end_k = -1;
  realtime last_end_t = 0.0;
  bit     checking = 1'b0;

  always @(posedge clk_s) pre_rst = dut.rst_s;

  always @(negedge clk_s) begin
    idx_hist[2] = idx_hist[1];
    idx_hist[1] = idx_hist[0];
    idx_hist[0] = index;
    if (pre_rst) begin
      k = 0;
      if (checking)
        check({ta_p, ta_n, tb_p, tb_n} == 4'b0000, "switches off during reset");
    end else begin
      k++;
      if (k >= LAT && checking) begin
        longint p;
        int r1, r2, c;
        bit ea, eb;
        p  = (k - LAT) % PERIOD;
        r1 = scaled(sine_at(p, Q), int'(idx_hist[2]));
        r2 = scaled(neg_sine_at(p, Q), int'(idx_hist[2]));
        c  = carrier_at((k - LAT) % L, L);
        ea = r1 > c;
        eb = r2 > c;
        check(ta_p == ea && ta_n == !ea && tb_p == eb && tb_n == !eb,
              $sformatf("k=%0d p=%0d idx=%0d r1=%0d r2=%0d c=%0d got %b%b%b%b",
                        k, p, idx_hist[2], r1, r2, c, ta_p, ta_n, tb_p, tb_n));
        if ((k - LAT) % L == L - 1) n_carrier_wrap++;
        if (k == LAT) n_restart++;
      end
      // phase counter observation (not delayed)
      check(quadrant == 2'((k % PERIOD) / Q), $sformatf("k=%0d quadrant %0d", k, quadrant));
      if (quadrant != last_quadrant) n_quadrant[quadrant]++;
      if (period_end) begin
        n_period_end++;
        check((k % PERIOD) == PERIOD - 1, $sformatf("period_end at k=%0d", k));
        if (last_end_k >= 0) begin
          check(k - last_end_k == PERIOD, $sformatf("period %0d cycles", k - last_end_k));
          check($realtime - last_end_t > 19_999_999.0 && $realtime - last_end_t < 20_000_001.0,
                $sformatf("output period %f ns, expected 20 ms", $realtime - last_end_t));
        end
        last_end_k = k;
        last_end_t = $realtime;
      end
    end
    if (half_flag != last_flag) n_flag_toggle++;
    if (index != last_index) n_index_change++;
    if (ta_p && !last_ta) n_ta_pulse++;
    if (tb_p && !last_tb) n_tb_pulse++;
    last_flag = half_flag;
    last_index = index;
    last_quadrant = quadrant;
    last_ta = ta_p;
    last_tb = tb_p;
  end

  // ---- stimulus ---------------------------------------------------------
  initial begin
    realtime t0;
    m_float = to_float(0.9);
    #200;
    reset = 1'b0;
    wait (locked);
    @(posedge clk_s);
    t0 = $realtime;
    repeat (100) @(posedge clk_s);
    check(($realtime - t0) / 100.0 > 31.249 && ($realtime - t0) / 100.0 < 31.251,
          $sformatf("clk_s period %f ns, expected 31.25", ($realtime - t0) / 100.0));
    wait (!dut.rst_s);
    checking = 1'b1;
    repeat (10) @(posedge clk_s);
    check(index == 8'(index_of(0.9, 16)), $sformatf("index %0d for M=0.9", index));

    // one full output period at M = 0.9, then switch to M = 0.5 for another
    wait (k == PERIOD + 1000);
    @(negedge clk_s);
    m_float = to_float(0.5);
    wait (k == 2 * PERIOD + 2000);
    check(index == 8'(index_of(0.5, 16)), $sformatf("index %0d for M=0.5", index));

    // reset mid-run: all off, relock, restart at phase 0
    @(negedge clk_s);
    reset = 1'b1;
    #300;
    check({ta_p, ta_n, tb_p, tb_n} == 4'b0000 && !locked, "reset turns all switches off");
    reset = 1'b0;
    wait (locked);
    wait (k == 5000);
    @(negedge clk_s);

    $display("mechanisms: lock=%0d quadrants=%0d/%0d/%0d/%0d flag_toggles=%0d carrier_wraps=%0d index_changes=%0d restarts=%0d period_ends=%0d ta_pulses=%0d tb_pulses=%0d",
             n_lock, n_quadrant[0], n_quadrant[1], n_quadrant[2], n_quadrant[3], n_flag_toggle,
             n_carrier_wrap, n_index_change, n_restart, n_period_end, n_ta_pulse, n_tb_pulse);
    check(n_lock >= 2, "clock manager locked after each reset");
    check(n_quadrant[1] >= 1 && n_quadrant[3] >= 1, "mirrored (backward) table reads");
    check(n_quadrant[0] >= 1 && n_quadrant[2] >= 1, "forward table reads in both halves");
    check(n_flag_toggle >= 4, "half-period inversion");
    check(n_carrier_wrap >= 2 * PERIOD / L, "carrier wraps");
    check(n_index_change >= 2, "modulation index change");
    check(n_restart >= 1, "restart at phase 0 after a mid-run reset");
    check(n_period_end >= 2, "end-of-period pulses");
    check(n_ta_pulse > 20_000 && n_tb_pulse > 20_000, "gate pulses on both legs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
