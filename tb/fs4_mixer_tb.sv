// fs4_mixer_tb: checks the Fs/4 mixer against the definition of the
// mixing: ADC sample t is multiplied by cos(pi*t/2) on the real path and
// by -sin(pi*t/2) on the imaginary path, and only the non-zero products
// are kept (real: even t, imaginary: odd t). Random samples, including the
// extreme codes, are fed with random gaps in in_valid; every output is
// compared one clock after its input pair, and the sign sequence must not
// advance during gaps.
module fs4_mixer_tb;
  import ddc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic signed [ADC_W-1:0] s0 = '0, s1 = '0;
  logic signed [MIX_W-1:0] oi, oq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fs4_mixer dut (.clk, .rst_n, .in_valid, .in_s0(s0), .in_s1(s1),
                 .out_valid, .out_i(oi), .out_q(oq));

  // cos(pi*t/2) and -sin(pi*t/2) for t mod 4
  function automatic int cosq(int t);  return (t % 4 == 0) ? 1 : (t % 4 == 2) ? -1 : 0; endfunction
  function automatic int nsinq(int t); return (t % 4 == 1) ? -1 : (t % 4 == 3) ? 1 : 0; endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t = 0;  // ADC sample index of s0
    int exp_i, exp_q;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      logic v;
      v = ($urandom_range(0, 3) != 0);
      in_valid <= v;
      case ($urandom_range(0, 9))
        0: begin s0 <= -12'sd2048; s1 <= 12'sd2047; end
        1: begin s0 <= 12'sd2047;  s1 <= -12'sd2048; end
        default: begin s0 <= ADC_W'($urandom); s1 <= ADC_W'($urandom); end
      endcase
      @(posedge clk);
      #1;
      if (v) begin
        exp_i = cosq(t) * int'(s0) + cosq(t + 1) * int'(s1);
        exp_q = nsinq(t) * int'(s0) + nsinq(t + 1) * int'(s1);
        checks++;
        if (!out_valid || int'(oi) != exp_i || int'(oq) != exp_q) begin
          failures++;
          if (failures < 10)
            $display("mismatch t=%0d: got v=%0b %0d %0d expected %0d %0d",
                     t, out_valid, oi, oq, exp_i, exp_q);
        end
        t += 2;
      end else begin
        checks++;
        if (out_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
