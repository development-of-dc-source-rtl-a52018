// spwm_ref_pkg: reference model used by the testbenches.
//
// Works out the expected waveforms straight from their definitions with real
// arithmetic, independently of how the RTL builds them (the RTL stores a
// quarter-wave table and mirrors it; this model evaluates the sine over the
// whole period).
package spwm_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int round_real(real x);
    return int'($floor(x + 0.5));
  endfunction

  // Constant-amplitude reference sine at phase p of a 4*quarter period.
  function automatic int sine_at(longint p, int quarter);
    real theta;
    theta = 2.0 * PI * (real'(p) + 0.5) / (4.0 * real'(quarter));
    return round_real(128.0 + 127.0 * $sin(theta));
  endfunction

  // Its negative, reflected about 128.
  function automatic int neg_sine_at(longint p, int quarter);
    return 256 - sine_at(p, quarter);
  endfunction

  // Triangular carrier, 0 at j = 0, 255 at j = len/2.
  function automatic int carrier_at(longint j, int len);
    longint t;
    t = (2 * j < len) ? 2 * j : 2 * (len - j);   // 2 * distance from the trough
    return round_real(255.0 * real'(t) / real'(len));
  endfunction

  // Reference scaled by an 8-bit index: 128 + floor((s - 128) * index / 256).
  function automatic int scaled(int s, int index);
    return 128 + int'($floor(real'((s - 128) * index) / 256.0));
  endfunction

  // Expected fixed-point index of a real modulation index with nfrac
  // intermediate fraction bits.
  function automatic int index_of(real m, int nfrac);
    real mq;
    if (m <= 0.0) return 0;
    if (m >= 1.0) return 255;
    mq = $floor(m * (2.0 ** nfrac));
    return int'($floor((mq * 255.0 + 2.0 ** (nfrac - 1)) / (2.0 ** nfrac)));
  endfunction

  // IEEE-754 single-precision bits of a real value exactly representable in
  // single precision (truncates further mantissa bits).
  function automatic logic [31:0] to_float(real m);
    logic [63:0] d;
    logic [10:0] e;
    d = $realtobits(m);
    e = d[62:52];
    if (e == 11'd0) return {d[63], 31'd0};
    if (e == 11'h7FF) return {d[63], 8'hFF, d[51:29]};
    return {d[63], 8'(int'(e) - 1023 + 127), d[51:29]};
  endfunction

endpackage
