// complex_mult_tb: feeds random I/Q samples and random carrier samples
// (including full-scale corners that force saturation) and compares the
// registered result with (i + jq)(c - js) / 2^15 computed here, rounded
// half up and clipped to 16 bits. A second part uses an exact carrier
// pair of unit-circle points and checks that the rotation goes the
// right way (down-conversion): j * conj(j) must give a real output.
module complex_mult_tb;
  import ddc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  iq_t  in = '0, out;
  logic signed [15:0] cc = '0, ss = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  complex_mult dut (.clk, .rst_n, .in_valid, .in, .car_cos(cc), .car_sin(ss), .out_valid, .out);

  function automatic int sat16(longint p);
    longint r;
    r = (p + 16384) >>> 15;
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

  task automatic one(int i, int q, int c, int s, bit v);
    int ei, eq;
    in_valid <= v;
    in.i <= 16'(i); in.q <= 16'(q);
    cc <= 16'(c);   ss <= 16'(s);
    @(posedge clk);
    #1;
    ei = sat16(longint'(i) * c + longint'(q) * s);
    eq = sat16(longint'(q) * c - longint'(i) * s);
    checks++;
    if (v) begin
      if (!out_valid || int'(out.i) != ei || int'(out.q) != eq) begin
        failures++;
        if (failures < 10) $display("(%0d,%0d)x(%0d,%0d): got %0d %0d expected %0d %0d",
                                    i, q, c, s, out.i, out.q, ei, eq);
      end
    end else if (out_valid) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int it = 0; it < 2000; it++)
      one($urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768,
          $urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768,
          $urandom_range(0, 5) != 0);
    // saturation corners
    one(-32768, -32768, -32768, -32768, 1'b1);
    one(32767, 32767, 32767, 32767, 1'b1);
    one(32767, -32768, 32767, -32768, 1'b1);
    // sample 1000*j mixed with carrier j (phase 90 deg): must give 1000 (+-1)
    one(0, 1000, 0, 32767, 1'b1);
    checks++;
    if (out.i < 999 || out.i > 1000 || out.q != 0) begin
      failures++; $display("rotation direction wrong: %0d %0d", out.i, out.q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
