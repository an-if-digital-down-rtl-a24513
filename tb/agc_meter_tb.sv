// agc_meter_tb: feeds several measurement windows (1024 clocks, 2048
// samples each) of random samples at different amplitudes, with gaps in
// in_valid, and compares the reported mean magnitude (floor of the sum of
// |a| over 2048) and peak magnitude with values summed up in the bench.
// The report must pulse once per window, on the clock edge that takes the
// window's last pair, and track the level change from window to window.
module agc_meter_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, lv;
  logic signed [11:0] s0 = '0, s1 = '0;
  logic [11:0] mean, peak;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  agc_meter dut (.clk, .rst_n, .in_valid, .in_s0(s0), .in_s1(s1),
                 .level_valid(lv), .level_mean(mean), .level_peak(peak));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mag(int x); return x < 0 ? -x : x; endfunction

  initial begin
    int amps [5];
    amps = '{100, 2047, 700, 1500, 30};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    foreach (amps[w]) begin
      longint sum;
      int pk, cnt, a0, a1, reports;
      sum = 0; pk = 0; cnt = 0; reports = 0;
      while (cnt < 1024) begin
        logic v;
        v  = ($urandom_range(0, 4) != 0);
        a0 = $urandom_range(0, 2 * amps[w]) - amps[w];
        a1 = $urandom_range(0, 2 * amps[w]) - amps[w];
        if (w == 1 && cnt == 500) a0 = -2048;  // most negative code
        #1;
        in_valid <= v;
        s0 <= 12'(a0);
        s1 <= 12'(a1);
        if (v) begin
          sum += mag(a0) + mag(a1);
          if (mag(a0) > pk) pk = mag(a0);
          if (mag(a1) > pk) pk = mag(a1);
          cnt++;
        end
        @(posedge clk);
        #1;
        if (lv) reports++;
      end
      // the pair that completes the window was taken at the last edge
      checks += 3;
      if (!lv) begin failures++; $display("window %0d: no report", w); end
      if (reports != 1) begin failures++; $display("window %0d: %0d reports", w, reports); end
      if (int'(mean) != int'(sum / 2048) || int'(peak) != pk) begin
        failures++;
        $display("window %0d: got mean %0d peak %0d, expected %0d %0d", w, mean, peak, sum / 2048, pk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
