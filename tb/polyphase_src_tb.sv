// polyphase_src_tb: checks the 2/5 rate converter against the direct
// (non-polyphase) definition computed in the bench: zero-stuff the input
// by L = 2, convolve with the full 32-tap prototype, keep every M = 5th
// sample:  y[m] = sum_k h[k] * u[5m - k],  u[2n] = x[n], u[2n+1] = 0.
// Output m must appear one clock after input floor(5m/2), which also
// checks the rate: exactly 2 outputs for every 5 inputs, with both
// polyphase branches in use. Random I/Q samples with random gaps in
// in_valid come first, then a +1 MHz complex tone at 100 MSps, which must
// come out at 40 MSps with a phase step of 9 degrees and unchanged level.
module polyphase_src_tb;
  import ddc_pkg::*;

  localparam int L = 2, M = 5, TAPS = 32;
  localparam real PI2 = 6.283185307179586;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  iq_t  in = '0, out;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  polyphase_src dut (.clk, .rst_n, .in_valid, .in, .out_valid, .out);

  int h [TAPS];
  int xi [$], xq [$];
  int in_cycle [$];   // cycle at which input n was presented
  int m_out = 0;
  int branch_seen [2] = '{0, 0};

  function automatic int u(ref int x [$], input int t);
    if (t < 0 || (t % L) != 0 || t / L >= x.size()) return 0;
    return x[t / L];
  endfunction
  // response of the integer taps at normalised frequency f, dB re DC
  function automatic real gain_db(real f);
    real re, im, dc;
    re = 0.0; im = 0.0; dc = 0.0;
    for (int k = 0; k < TAPS; k++) begin
      re += real'(h[k]) * $cos(6.283185307179586 * f * k);
      im -= real'(h[k]) * $sin(6.283185307179586 * f * k);
      dc += real'(h[k]);
    end
    return 20.0 * $log10($sqrt(re * re + im * im) / dc);
  endfunction

  function automatic int rs(longint acc);
    longint r;
    r = (acc + (longint'(1) << (COEF_FRAC - 1))) >>> COEF_FRAC;
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

  bit  tone = 1'b0;
  int  tone_from = 0;
  real pprev = 0.0;
  int  bad_step = 0;
  real mmin = 1.0e9, mmax = 0.0;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      longint ai, aq;
      int n0;
      ai = 0;
      aq = 0;
      for (int k = 0; k < TAPS; k++) begin
        ai += longint'(h[k]) * u(xi, M * m_out - k);
        aq += longint'(h[k]) * u(xq, M * m_out - k);
      end
      n0 = (M * m_out) / L;
      branch_seen[(M * m_out) % L]++;
      checks++;
      if (int'(out.i) != rs(ai) || int'(out.q) != rs(aq) || n0 >= in_cycle.size()
          || cycle - in_cycle[n0] != 1) begin
        failures++;
        if (failures < 10) $display("m=%0d got %0d %0d expected %0d %0d", m_out,
                                    out.i, out.q, rs(ai), rs(aq));
      end
      if (tone && n0 >= tone_from + 20) begin
        real p, d, mg;
        p  = $atan2(real'(out.q), real'(out.i));
        mg = $sqrt(real'(out.i) ** 2 + real'(out.q) ** 2);
        d  = p - pprev;
        while (d < -3.14159265) d += PI2;
        while (d > 3.14159265) d -= PI2;
        if (d < PI2 / 40.0 - 0.01 || d > PI2 / 40.0 + 0.01) bad_step++;
        if (mg < mmin) mmin = mg;
        if (mg > mmax) mmax = mg;
      end
      pprev = $atan2(real'(out.q), real'(out.i));
      m_out++;
    end
  end

  task automatic drive(int i, int q, bit v);
    #1;
    in_valid <= v;
    in.i <= 16'(i);
    in.q <= 16'(q);
    if (v) begin
      xi.push_back(i);
      xq.push_back(q);
      in_cycle.push_back(cycle);
    end
    @(posedge clk);
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) h[k] = lpf_coef(TAPS, lpf_cutoff(TAPS, 11750, 200000), L, COEF_FRAC, k);
    // the taps must put the -3 dB point at 11.75 MHz (of 200 MSps)
    checks++;
    if (gain_db(11.75 / 200.0) < -3.1 || gain_db(11.75 / 200.0) > -2.9) begin
      failures++; $display("response at 11.75 MHz: %f dB", gain_db(11.75 / 200.0));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int it = 0; it < 2000; it++)
      drive($urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768,
            $urandom_range(0, 3) != 0);
    // fill up to a multiple of 5 inputs, then a tone of 1000 samples
    while (xi.size() % 5 != 0) drive(0, 0, 1'b1);
    tone = 1'b1;
    tone_from = xi.size();
    for (int n = 0; n < 1000; n++)
      drive($rtoi($floor(12000.0 * $cos(PI2 * 0.01 * n) + 0.5)),
            $rtoi($floor(12000.0 * $sin(PI2 * 0.01 * n) + 0.5)), 1'b1);
    repeat (3) drive(0, 0, 1'b0);
    checks += 4;
    if (m_out != xi.size() * 2 / 5) begin
      failures++; $display("%0d outputs for %0d inputs", m_out, xi.size());
    end
    if (branch_seen[0] == 0 || branch_seen[1] == 0) failures++;
    if (bad_step != 0) begin failures++; $display("tone phase steps off: %0d", bad_step); end
    if (mmin < 0.97 * 12000.0 || mmax > 1.03 * 12000.0) failures++;
    $display("outputs %0d for %0d inputs; branch use %0d/%0d; tone level %f..%f",
             m_out, xi.size(), branch_seen[0], branch_seen[1], mmin, mmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
