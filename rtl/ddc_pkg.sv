// ddc_pkg: types, widths and elaboration-time helpers shared by the IF
// digital down-converter.
//
// The down-converter works on 12-bit samples from an ADC clocked at Fs =
// 200 MSps; all logic runs in one clock domain at Fs/2 = 100 MHz, and the
// ADC delivers two samples per clock. After the fixed Fs/4 stage every
// signal is an I/Q pair of DATA_W-bit two's-complement words (iq_t).
//
// Filter coefficients are not stored as tables: lpf_coef() designs a
// Hamming-windowed sinc lowpass from the tap count and a cutoff, scales it
// to a requested DC gain and rounds it to COEF_W-bit fixed point with
// COEF_FRAC fractional bits; lpf_cutoff() picks the window cutoff so that
// the response is 3 dB down at the requested bandwidth. The tap counts
// and cutoffs are the published ones (40 taps / 31.75 MHz at 200 MSps for
// the fixed stage, 32 taps / 11.75 MHz at 200 MSps for the rate
// converter); the window method, the widths and the rounding are choices
// of this design.
package ddc_pkg;

  localparam int ADC_W     = 12;  // ADC resolution
  localparam int MIX_W     = 13;  // after the +-1 Fs/4 mixer (room for -(-2048))
  localparam int DATA_W    = 16;  // I/Q word between stages
  localparam int COEF_W    = 16;  // FIR coefficient width
  localparam int COEF_FRAC = 14;  // FIR coefficient fractional bits
  localparam int PHASE_W   = 18;  // NCO phase accumulator length

  localparam real PI = 3.14159265358979323846;

  typedef struct packed {
    logic signed [DATA_W-1:0] i;
    logic signed [DATA_W-1:0] q;
  } iq_t;

  // Prototype lowpass: ideal impulse response for normalised cutoff fn
  // (cycles per sample), centred on (taps-1)/2, Hamming window.
  function automatic real lpf_proto(int taps, real fn, int k);
    real x, s, w;
    x = real'(k) - real'(taps - 1) / 2.0;
    if (x == 0.0) s = 2.0 * fn;
    else          s = $sin(2.0 * PI * fn * x) / (PI * x);
    w = 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / real'(taps - 1));
    return s * w;
  endfunction

  // Magnitude response of the prototype at normalised frequency f,
  // relative to its DC gain (the filter is symmetric, so it is real).
  function automatic real lpf_resp(int taps, real fn, real f);
    real num, den, p;
    num = 0.0;
    den = 0.0;
    for (int k = 0; k < taps; k++) begin
      p    = lpf_proto(taps, fn, k);
      num += p * $cos(2.0 * PI * f * (real'(k) - real'(taps - 1) / 2.0));
      den += p;
    end
    return num / den;
  endfunction

  // Window cutoff that puts the -3 dB point (response 1/sqrt(2)) of the
  // prototype at f3_khz: bisection between f3 and f3 + 4/taps.
  function automatic real lpf_cutoff(int taps, int f3_khz, int fs_khz);
    real f3, lo, hi, mid;
    f3 = real'(f3_khz) / real'(fs_khz);
    lo = f3;
    hi = f3 + 4.0 / real'(taps);
    if (hi > 0.499) hi = 0.499;
    for (int it = 0; it < 24; it++) begin
      mid = (lo + hi) / 2.0;
      if (lpf_resp(taps, mid, f3) < 0.70710678) lo = mid;
      else hi = mid;
    end
    return (lo + hi) / 2.0;
  endfunction

  // Coefficient k of the prototype with normalised cutoff fn, scaled to DC
  // gain `gain` and rounded to an integer with `frac` fractional bits.
  function automatic int lpf_coef(int taps, real fn, int gain, int frac, int k);
    real sum, v;
    sum = 0.0;
    for (int j = 0; j < taps; j++) sum += lpf_proto(taps, fn, j);
    v = lpf_proto(taps, fn, k) * real'(gain) / sum;
    return $rtoi(v * real'(64'd1 << frac) + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  // Arithmetic shift right by `sh` with round-half-up, then saturation to a
  // signed `w`-bit range. Used at every filter and multiplier output.
  function automatic longint round_sat(longint acc, int sh, int w);
    longint r, hi, lo;
    r  = (sh > 0) ? ((acc + (64'sd1 <<< (sh - 1))) >>> sh) : acc;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return r;
  endfunction

endpackage
