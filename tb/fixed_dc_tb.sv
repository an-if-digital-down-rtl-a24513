// fixed_dc_tb: end-to-end check of the fixed conversion stage.
//
// 1. Exactness: the stage must equal the textbook model computed here at
//    the full rate Fs: z[t] = a[t] * exp(-j*pi*t/2), both parts filtered by
//    the 40-tap prototype, every second (even t) output kept. Mixing, I/Q
//    split, zero insertion, the quadrature delay and the decimation are
//    all folded into that one formula, so any mistake in them shows up.
// 2. Function: a 70 MHz IF tone sampled at 200 MSps must come out as a
//    complex tone at +20 MHz at 100 MSps: every output advances the phase
//    by 72 degrees and the magnitude is constant (the image at 80 MHz is
//    suppressed) at 8x the tone amplitude times the filter gain.
// 3. Timing: one output per ADC pair, the first one 2 clocks after the
//    first pair is taken.
module fixed_dc_tb;
  import ddc_pkg::*;

  localparam int TAPS = 40, FC = 31750, FS = 200000;
  localparam int SHIFT = COEF_FRAC - (DATA_W - MIX_W);
  localparam real PI2 = 6.283185307179586;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_valid = 1'b0, out_valid;
  logic signed [ADC_W-1:0] s0 = '0, s1 = '0;
  iq_t  out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fixed_dc dut (.clk, .rst_n, .adc_valid, .adc_s0(s0), .adc_s1(s1), .out_valid, .out);

  int h [TAPS];
  int a [$];  // ADC samples in time order

  // Real and imaginary part of a[t]*exp(-j*pi*t/2)
  function automatic int zr(int t);
    if (t < 0) return 0;
    case (t % 4) 0: return a[t]; 2: return -a[t]; default: return 0; endcase
  endfunction
  function automatic int zi(int t);
    if (t < 0) return 0;
    case (t % 4) 1: return -a[t]; 3: return a[t]; default: return 0; endcase
  endfunction
  function automatic int rs(longint acc);
    longint r = (acc + (longint'(1) << (SHIFT - 1))) >>> SHIFT;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare every output with the model; the n-th output is for t = 2n.
  int n_out = 0;
  real ph_prev = 0.0;
  real mag_min = 1.0e9, mag_max = 0.0;
  int phase_bad = 0;
  bit tone_phase = 1'b0;
  time t_first_in = 0, t_first_out = 0;
  always @(negedge clk) begin
    if (rst_n && out_valid && t_first_out == 0) t_first_out = $time;
    if (rst_n && out_valid) begin
      longint ai, aq;
      ai = 0;
      aq = 0;
      for (int k = 0; k < TAPS; k++) begin
        ai += longint'(h[k]) * zr(2 * n_out - k);
        aq += longint'(h[k]) * zi(2 * n_out - k);
      end
      checks++;
      if (int'(out.i) != rs(ai) || int'(out.q) != rs(aq)) begin
        failures++;
        if (failures < 10)
          $display("n=%0d got %0d %0d expected %0d %0d", n_out, out.i, out.q, rs(ai), rs(aq));
      end
      if (tone_phase && n_out >= 430) begin
        real ph, d, mag;
        ph  = $atan2(real'(out.q), real'(out.i));
        mag = $sqrt(real'(out.i) * real'(out.i) + real'(out.q) * real'(out.q));
        d   = ph - ph_prev;
        while (d < -3.14159265) d += PI2;
        while (d > 3.14159265) d -= PI2;
        if (d < PI2 * 0.2 - 0.02 || d > PI2 * 0.2 + 0.02) phase_bad++;
        if (mag < mag_min) mag_min = mag;
        if (mag > mag_max) mag_max = mag;
      end
      ph_prev = $atan2(real'(out.q), real'(out.i));
      n_out++;
    end
  end

  task automatic push_pair(int x0, int x1);
    if (a.size() == 0) t_first_in = $time;
    a.push_back(x0);
    a.push_back(x1);
    adc_valid <= 1'b1;
    s0 <= ADC_W'(x0);
    s1 <= ADC_W'(x1);
    @(posedge clk);
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) h[k] = lpf_coef(TAPS, lpf_cutoff(TAPS, FC, FS), 2, COEF_FRAC, k);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Part 1: random samples
    for (int it = 0; it < 400; it++)
      push_pair($urandom_range(0, 4095) - 2048, $urandom_range(0, 4095) - 2048);
    // Part 2: 70 MHz tone, amplitude 1500
    @(negedge clk);
    tone_phase = 1'b1;
    for (int it = 0; it < 400; it++) begin
      int t;
      t = a.size();
      push_pair($rtoi($floor(1500.0 * $cos(PI2 * 0.35 * t) + 0.5)),
                $rtoi($floor(1500.0 * $cos(PI2 * 0.35 * (t + 1)) + 0.5)));
    end
    adc_valid <= 1'b0;
    repeat (4) @(posedge clk);
    checks += 5;
    // latency: pair set up before edge 1, output registered at edge 2
    if (t_first_out - t_first_in != 25) begin
      failures++; $display("latency %0t, expected 2 clocks", t_first_out - t_first_in);
    end
    // one output per ADC pair, the last two still in the pipeline
    if (n_out != a.size() / 2) begin
      failures++; $display("%0d outputs for %0d sample pairs", n_out, a.size() / 2);
    end
    if (phase_bad != 0) begin failures++; $display("phase steps off 72 deg: %0d", phase_bad); end
    if (mag_max - mag_min > 0.02 * mag_max) begin
      failures++; $display("magnitude ripple %f..%f", mag_min, mag_max);
    end
    if (mag_min < 0.95 * 12000.0 || mag_max > 1.05 * 12000.0) begin
      failures++; $display("tone level %f..%f, expected about 12000", mag_min, mag_max);
    end
    $display("tone magnitude %f..%f", mag_min, mag_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
