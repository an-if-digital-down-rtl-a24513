// prog_dc_tb: checks the programmable conversion stage.
// A model in the bench keeps the phase n*fcw (18 bits) of the n-th input,
// looks up 32767*cos/sin of its top 10 bits and forms
// (i + jq)(cos - j sin) / 2^15; each output must match it to +-1 LSB
// (table rounding) and arrive exactly 2 clocks after its input. The first
// part uses random samples with gaps in in_valid; the second feeds a
// +20 MHz complex tone at 100 MSps with the published control word 52429
// and checks that it lands at 0 Hz: constant magnitude and a phase that
// moves by less than 0.05 degrees per sample (the residual offset is
// 76 Hz, i.e. 0.0003 degrees per sample).
module prog_dc_tb;
  import ddc_pkg::*;

  localparam real PI2 = 6.283185307179586;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  iq_t  in = '0, out;
  logic [17:0] fcw = 18'd52429;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  prog_dc dut (.clk, .rst_n, .in_valid, .in, .fcw, .out_valid, .out);

  typedef struct { int i; int q; int t; } exp_t;
  exp_t expq [$];
  logic [17:0] ph;

  function automatic int lut(int addr, bit sine);
    real p = PI2 * real'(addr) / 1024.0;
    return $rtoi($floor((sine ? $sin(p) : $cos(p)) * 32767.0 + 0.5));
  endfunction
  function automatic int sat16(longint p);
    longint r;
    r = (p + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction
  function automatic bit near(int a, int b);
    return (a - b <= 2) && (b - a <= 2);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  bit   tone = 1'b0;
  int   n_tone = 0;
  real  ph0 = 0.0, dmax = 0.0, mmin = 1.0e9, mmax = 0.0;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        e = expq.pop_front();
        if (!near(int'(out.i), e.i) || !near(int'(out.q), e.q) || cycle - e.t != 2) begin
          failures++;
          if (failures < 10) $display("got %0d %0d at +%0d, expected %0d %0d",
                                      out.i, out.q, cycle - e.t, e.i, e.q);
        end
      end
      if (tone) begin
        real p, m;
        p = $atan2(real'(out.q), real'(out.i));
        m = $sqrt(real'(out.i) ** 2 + real'(out.q) ** 2);
        if (n_tone == 0) ph0 = p;
        else if ((p - ph0 > dmax) || (ph0 - p > dmax)) dmax = (p > ph0) ? p - ph0 : ph0 - p;
        if (m < mmin) mmin = m;
        if (m > mmax) mmax = m;
        n_tone++;
      end
    end
  end

  task automatic drive(int i, int q, bit v);
    #1;
    in_valid <= v;
    in.i <= 16'(i);
    in.q <= 16'(q);
    if (v) begin
      exp_t e;
      int c, s, a;
      a = int'(ph[17:8]);
      c = lut(a, 1'b0);
      s = lut(a, 1'b1);
      e.i = sat16(longint'(i) * c + longint'(q) * s);
      e.q = sat16(longint'(q) * c - longint'(i) * s);
      e.t = cycle;
      expq.push_back(e);
      ph = ph + fcw;
    end
    @(posedge clk);
  endtask

  initial begin
    ph = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int it = 0; it < 1500; it++) begin
      if (it == 700) fcw <= 18'($urandom);
      drive($urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768,
            $urandom_range(0, 3) != 0);
    end
    fcw <= 18'd52429;
    repeat (4) drive(0, 0, 1'b0);
    tone = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      real p;
      p = PI2 * 0.2 * real'(n) + 0.7;
      drive($rtoi($floor(10000.0 * $cos(p) + 0.5)), $rtoi($floor(10000.0 * $sin(p) + 0.5)), 1'b1);
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    checks += 2;
    $display("tone at 0 Hz: phase wander %f deg, magnitude %f..%f", dmax * 360.0 / PI2, mmin, mmax);
    // phase moves with the table's 0.35 deg resolution: allow one step either way
    if (dmax * 360.0 / PI2 > 0.8) failures++;
    if (mmin < 9900.0 || mmax > 10100.0) failures++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
