// ddc_top_tb: end-to-end test of the down-converter at its default
// (published) configuration: Fs = 200 MSps, fixed stage at Fs/4, NCO
// control word 52429, 2/5 rate change to 40 MSps.
//
// Real IF tones are synthesised at 200 MSps, quantised to 12 bits and fed
// as two samples per clock. At the output the bench measures the complex
// baseband tone, whose frequency and level are predicted from the
// frequency plan alone:
//   71 MHz -> +1 MHz : phase step +9 deg per output, level 8*A
//   69 MHz -> -1 MHz : phase step -9 deg per output, level 8*A
//   95 MHz -> +25 MHz: outside the 11.75 MHz channel, must be removed
//   70 MHz -> -76.29 Hz: the NCO sits at 20.000076 MHz, so the output
//            phase drifts by -6.18 deg over 9000 outputs
//   75 MHz with the NCO retuned to u = 65536 (exactly 25 MHz) -> 0 Hz
// plus the AGC level measurement (mean |a| = 2A/pi for a sine) and the
// output rate (2 outputs per 5 clocks). Each mechanism of the datapath
// is counted and must occur: both signs of the Fs/4 mixer, NCO phase
// wrap-around, both polyphase branches, clocks on which the decimator
// drops the sample, AGC reports, stalls (adc_valid low) and a retune.
module ddc_top_tb;
  import ddc_pkg::*;

  localparam real PI2 = 6.283185307179586;
  localparam real FS  = 200.0;  // MSps

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_valid = 1'b0;
  logic signed [ADC_W-1:0] s0 = '0, s1 = '0;
  logic [PHASE_W-1:0] fcw = 18'd52429;
  logic out_valid, agc_valid;
  logic signed [DATA_W-1:0] oi, oq;
  logic [ADC_W-1:0] agc_mean, agc_peak;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddc_top dut (.clk, .rst_n, .adc_valid, .adc_s0(s0), .adc_s1(s1), .nco_fcw(fcw),
               .out_valid, .out_i(oi), .out_q(oq), .agc_valid, .agc_mean, .agc_peak);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_mix_pos = 0, n_mix_neg = 0, n_nco_wrap = 0, n_br0 = 0, n_br1 = 0;
  int n_drop = 0, n_agc = 0, n_stall = 0, n_out = 0, n_in = 0, n_retune = 0;
  logic [PHASE_W-1:0] ph_prev = '0;
  always @(negedge clk) if (rst_n) begin
    if (adc_valid) begin
      n_in++;
      if (dut.u_fixed.u_mixer.neg) n_mix_neg++; else n_mix_pos++;
    end else n_stall++;
    if (dut.u_prog.u_nco.phase < ph_prev) n_nco_wrap++;
    ph_prev = dut.u_prog.u_nco.phase;
    if (dut.u_src.in_valid) begin
      if (!dut.u_src.due) n_drop++;
      else if (dut.u_src.off == 0) n_br0++;
      else n_br1++;
    end
    if (out_valid) n_out++;
    if (agc_valid) n_agc++;
  end

  // ---------------- stimulus ----------------
  longint t_adc = 0;  // ADC sample time index
  real     f_if = 71.0, amp = 1000.0;

  function automatic int adc_code(real f, real a, longint t);
    real v;
    v = $floor(a * $cos(PI2 * f / FS * real'(t)) + 0.5);
    if (v > 2047.0) v = 2047.0;
    if (v < -2048.0) v = -2048.0;
    return $rtoi(v);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      // a short stall every 997 clocks, to show the pipeline holds its state
      logic v;
      v = (($urandom_range(0, 996)) != 0);
      adc_valid <= v;
      if (v) begin
        s0 <= ADC_W'(adc_code(f_if, amp, t_adc));
        s1 <= ADC_W'(adc_code(f_if, amp, t_adc + 1));
        t_adc += 2;
      end
    end
  end

  // ---------------- output analysis ----------------
  bit  meas = 1'b0;
  int  nm;
  real pprev, dsum, dmin, dmax, mmin, mmax, msum;
  real psum_first, psum_last;
  always @(negedge clk) begin
    if (meas && out_valid) begin
      real p, d, m;
      p = $atan2(real'(oq), real'(oi));
      m = $sqrt(real'(oi) ** 2 + real'(oq) ** 2);
      if (nm > 0) begin
        d = p - pprev;
        while (d < -3.14159265) d += PI2;
        while (d > 3.14159265) d -= PI2;
        dsum += d;
        if (d < dmin) dmin = d;
        if (d > dmax) dmax = d;
      end
      if (nm < 1000) psum_first += p;
      if (nm >= 9000 && nm < 10000) psum_last += p;
      if (m < mmin) mmin = m;
      if (m > mmax) mmax = m;
      msum += m;
      pprev = p;
      nm++;
    end
  end

  // run `n` outputs of a tone after letting the filters settle
  task automatic tone(real f, real a, int n);
    f_if = f;
    amp  = a;
    meas = 1'b0;
    repeat (200) @(posedge clk);
    @(negedge clk);
    nm = 0; dsum = 0.0; dmin = 1.0e9; dmax = -1.0e9; mmin = 1.0e9; mmax = 0.0; msum = 0.0;
    psum_first = 0.0; psum_last = 0.0;
    meas = 1'b1;
    wait (nm == n);
    @(negedge clk);
    meas = 1'b0;
  endtask

  task automatic expect_tone(string what, real step_deg, real level);
    real step;
    step = dsum / real'(nm - 1) * 360.0 / PI2;
    checks += 2;
    $display("%s: step %f deg (min %f max %f), level %f..%f", what, step,
             dmin * 360.0 / PI2, dmax * 360.0 / PI2, mmin, mmax);
    if (step < step_deg - 0.05 || step > step_deg + 0.05 ||
        dmin * 360.0 / PI2 < step_deg - 1.0 || dmax * 360.0 / PI2 > step_deg + 1.0) begin
      failures++; $display("  frequency wrong, expected %f deg/sample", step_deg);
    end
    if (mmin < 0.97 * level || mmax > 1.03 * level) begin
      failures++; $display("  level wrong, expected %f", level);
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;

    tone(71.0, 1000.0, 500);
    expect_tone("71 MHz IF", 360.0 / 40.0, 8000.0);

    tone(69.0, 1500.0, 500);
    expect_tone("69 MHz IF", -360.0 / 40.0, 12000.0);

    // out-of-channel tone: 25 MHz from the carrier
    tone(95.0, 1500.0, 500);
    checks++;
    $display("95 MHz IF (25 MHz off carrier): level %f..%f", mmin, mmax);
    if (mmax > 0.01 * 12000.0) begin failures++; $display("  not suppressed"); end

    // AGC measurement on a full-scale-ish tone: mean |a| = 2A/pi
    tone(71.0, 2000.0, 100);
    // the first report may span the change of tone; use the second
    repeat (2) @(posedge agc_valid);
    @(negedge clk);
    checks += 2;
    $display("AGC: mean %0d (2A/pi = %f), peak %0d", agc_mean, 2.0 * 2000.0 / 3.14159265, agc_peak);
    if (agc_mean < 1250 || agc_mean > 1296) failures++;
    if (agc_peak < 1990 || agc_peak > 2000) failures++;

    // residual NCO offset: carrier exactly 70 MHz -> -76.29 Hz
    tone(70.0, 1500.0, 10000);
    begin
      real drift, expect_deg;
      drift = (psum_last - psum_first) / 1000.0 * 360.0 / PI2;
      // 9000 outputs at 40 MSps between the two averaging windows
      expect_deg = -(200.0e6 * 52429.0 / 524288.0 - 20.0e6) * 9000.0 / 40.0e6 * 360.0;
      checks++;
      $display("70 MHz IF: phase drift %f deg over 9000 outputs, expected %f (-76.29 Hz)",
               drift, expect_deg);
      if (drift < expect_deg - 0.5 || drift > expect_deg + 0.5) failures++;
    end

    // retune: carrier at 75 MHz, NCO word 65536 (exactly 25 MHz) -> 0 Hz
    fcw = 18'd65536;
    tone(75.0, 1000.0, 500);
    expect_tone("75 MHz IF, NCO 25 MHz", 0.0, 8000.0);
    n_retune++;
    fcw = 18'd52429;

    // rate and mechanisms
    checks += 10;
    $display("inputs %0d outputs %0d (ratio %f), stalls %0d", n_in, n_out,
             real'(n_out) / real'(n_in), n_stall);
    if (n_out * 5 < n_in * 2 - 10 || n_out * 5 > n_in * 2 + 10) failures++;
    $display("mixer +/-: %0d/%0d, NCO wraps %0d, SRC branch 0/1: %0d/%0d, decimator drops %0d, AGC reports %0d",
             n_mix_pos, n_mix_neg, n_nco_wrap, n_br0, n_br1, n_drop, n_agc);
    if (n_mix_pos == 0) failures++;
    if (n_mix_neg == 0) failures++;
    if (n_nco_wrap == 0) failures++;
    if (n_br0 == 0) failures++;
    if (n_br1 == 0) failures++;
    if (n_drop == 0) failures++;
    if (n_agc == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_retune == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
