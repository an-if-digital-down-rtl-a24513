// fixed_lpf_tb: checks both variants of the fixed-stage branch filter
// (DELAY = 0 for the in-phase path, DELAY = 1 for the quadrature path)
// against a direct model: build the zero-stuffed stream u[2n] = x[n],
// u[2n+1] = 0 explicitly, delay it, convolve it with the full 40-tap
// prototype and keep the even outputs. Random inputs (with extreme codes)
// and random in_valid gaps are used; each result must appear exactly one
// clock after its input. A constant input then checks the DC gain: the
// filter must restore the level lost to zero insertion, giving 8x the
// input (3 extra fractional bits) to within 1%.
module fixed_lpf_tb;
  import ddc_pkg::*;

  localparam int TAPS = 40, FC = 31750, FS = 200000;
  localparam int SHIFT = COEF_FRAC - (DATA_W - MIX_W);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [MIX_W-1:0] x = '0;
  logic v0, v1;
  logic signed [DATA_W-1:0] y0, y1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fixed_lpf #(.DELAY(0)) dut0 (.clk, .rst_n, .in_valid, .in_x(x), .out_valid(v0), .out_y(y0));
  fixed_lpf #(.DELAY(1)) dut1 (.clk, .rst_n, .in_valid, .in_x(x), .out_valid(v1), .out_y(y1));

  int h [TAPS];
  int xs [$];

  function automatic int ustream(int t);
    if (t < 0 || (t % 2) != 0) return 0;
    return xs[t / 2];
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

  function automatic int expect_y(int n, int d);
    longint acc = 0;
    longint r;
    for (int k = 0; k < TAPS; k++) acc += longint'(h[k]) * ustream(2 * n - d - k);
    r = (acc + (longint'(1) << (SHIFT - 1))) >>> SHIFT;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    n = 0;
    for (int k = 0; k < TAPS; k++) h[k] = lpf_coef(TAPS, lpf_cutoff(TAPS, FC, FS), 2, COEF_FRAC, k);
    // the taps must put the -3 dB point at 31.75 MHz (of 200 MSps)
    checks++;
    if (gain_db(31.75 / 200.0) < -3.1 || gain_db(31.75 / 200.0) > -2.9) begin
      failures++; $display("response at 31.75 MHz: %f dB", gain_db(31.75 / 200.0));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int it = 0; it < 1500; it++) begin
      logic v;
      int xv;
      v  = ($urandom_range(0, 4) != 0);
      xv = (it % 97 == 5) ? -4096 : (it % 89 == 7) ? 4095 : ($urandom_range(0, 8191) - 4096);
      in_valid <= v;
      x <= MIX_W'(xv);
      @(posedge clk);
      #1;
      checks++;
      if (v) begin
        xs.push_back(xv);
        if (!v0 || !v1 || int'(y0) != expect_y(n, 0) || int'(y1) != expect_y(n, 1)) begin
          failures++;
          if (failures < 10)
            $display("n=%0d got %0b%0b %0d %0d expected %0d %0d", n, v0, v1, y0, y1,
                     expect_y(n, 0), expect_y(n, 1));
        end
        n++;
      end else if (v0 || v1) failures++;
    end
    // DC gain
    for (int it = 0; it < 50; it++) begin
      in_valid <= 1'b1;
      x <= 13'sd1000;
      @(posedge clk);
    end
    #1;
    checks += 2;
    if (y0 < 7920 || y0 > 8080) begin failures++; $display("DC gain I: %0d", y0); end
    if (y1 < 7920 || y1 > 8080) begin failures++; $display("DC gain Q: %0d", y1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
