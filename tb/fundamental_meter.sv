// fundamental_meter: testbench helper that steps the modulation index through
// 0.1, 0.5, 0.9 and 1.0, one output period each, and measures the spectrum of
// the bridge voltage v = Ta+ - Tb+ (in units of the dc link) over each period.
//
// Starting at a period_end pulse it accumulates a discrete Fourier transform of
// v over exactly PERIOD sampling-clock cycles and records the amplitude of the
// fundamental (50 Hz), of the 3rd harmonic, of the component at the switching
// frequency f_c (harmonic HC = f_c / 50 Hz) and of the two sidebands 2 f_c -/+
// 50 Hz. After each period it applies the next index; `done` rises after the
// last one.
module fundamental_meter
  import spwm_ref_pkg::*;
#(
  parameter int PERIOD = 640_000,
  parameter int HC     = 20_000
) (
  input  logic        clk_s,
  input  logic        period_end,
  input  logic        ta_p,
  input  logic        tb_p,
  output logic [31:0] m_float,
  output logic        done
);

  localparam int NM = 4;
  localparam int NB = 5;
  real m_list [NM] = '{0.1, 0.5, 0.9, 1.0};
  int  harm   [NB];
  real amp    [NM][NB];

  real s_acc [NB];
  real c_acc [NB];
  int  n = 0;
  int  im = 0;
  bit  running = 1'b0;

  initial begin
    harm = '{1, 3, HC, 2 * HC - 1, 2 * HC + 1};
    m_float = to_float(m_list[0]);
    done = 1'b0;
    for (int b = 0; b < NB; b++) begin s_acc[b] = 0.0; c_acc[b] = 0.0; end
  end

  always @(posedge clk_s) begin
    if (!done) begin
      if (running) begin
        real v;
        v = real'(int'(ta_p) - int'(tb_p));
        if (v != 0.0) begin
          for (int b = 0; b < NB; b++) begin
            real a;
            a = 2.0 * PI * real'((longint'(harm[b]) * longint'(n)) % longint'(PERIOD)) / real'(PERIOD);
            s_acc[b] += v * $sin(a);
            c_acc[b] += v * $cos(a);
          end
        end
        n++;
      end
      if (period_end) begin
        if (running) begin
          for (int b = 0; b < NB; b++) begin
            amp[im][b] = 2.0 / real'(PERIOD) * $sqrt(s_acc[b] * s_acc[b] + c_acc[b] * c_acc[b]);
            s_acc[b] = 0.0;
            c_acc[b] = 0.0;
          end
          im++;
          if (im == NM) done <= 1'b1;
          else m_float <= to_float(m_list[im]);
        end
        running = 1'b1;
        n = 0;
      end
    end
  end

endmodule
