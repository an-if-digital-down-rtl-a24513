// nco_tb: checks the oscillator against a phase model kept in the bench.
// The model adds the control word to an 18-bit phase on each enabled
// clock; the table index is the top 10 bits of the phase before the add,
// and the expected outputs are 32767*cos and 32767*sin of that index,
// computed here with real arithmetic (+-1 LSB allowed for rounding).
// Enables have random gaps (the phase must hold) and the control word is
// changed while running. Finally the published setting fcw = 52429 is run
// for 2^18 samples: over that span the phase must have turned exactly
// 52429 times, i.e. the carrier is 52429 * 381.47 Hz = 20.000076 MHz at a
// 100 MHz clock, and the samples must come out at one per clock.
module nco_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, out_valid;
  logic [17:0] fcw = '0;
  logic signed [15:0] c, s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nco dut (.clk, .rst_n, .en, .fcw, .out_valid, .cos_o(c), .sin_o(s));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expv(int addr, bit sine);
    real ph = 6.283185307179586 * real'(addr) / 1024.0;
    return $rtoi($floor((sine ? $sin(ph) : $cos(ph)) * 32767.0 + 0.5));
  endfunction

  function automatic int absd(int x, int y);
    return (x > y) ? x - y : y - x;
  endfunction

  initial begin
    logic [17:0] ph;
    longint turns;
    int cycles;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    ph = '0;
    @(posedge clk);
    for (int it = 0; it < 3000; it++) begin
      logic v;
      int addr;
      v = ($urandom_range(0, 3) != 0);
      if (it % 500 == 0) fcw <= 18'($urandom);
      en <= v;
      @(posedge clk);
      #1;
      checks++;
      if (v) begin
        addr = int'(ph[17:8]);
        if (!out_valid || absd(int'(c), expv(addr, 1'b0)) > 1 || absd(int'(s), expv(addr, 1'b1)) > 1) begin
          failures++;
          if (failures < 10) $display("it=%0d addr=%0d got %0d %0d expected %0d %0d",
                                      it, addr, c, s, expv(addr, 1'b0), expv(addr, 1'b1));
        end
        ph = ph + fcw;
      end else if (out_valid) failures++;
    end
    // Published setting: count carrier periods by watching the table index wrap.
    @(negedge clk);
    fcw = 18'd52429;
    en  = 1'b1;
    turns = 0;
    cycles = 0;
    begin
      int prev_addr;
      prev_addr = int'(dut.addr);
      for (int k = 0; k < (1 << 18); k++) begin
        @(negedge clk);
        cycles++;
        if (out_valid) begin
          if (int'(dut.addr) < prev_addr) turns++;
          prev_addr = int'(dut.addr);
        end
      end
    end
    en = 1'b0;
    checks += 2;
    // the start phase is arbitrary, so one wrap more or less may be seen
    if (turns < 52428 || turns > 52430) begin
      failures++; $display("carrier periods in 2^18 samples: %0d, expected 52429", turns);
    end
    if (cycles != (1 << 18)) failures++;
    $display("fcw=52429: %0d periods in 2^18 samples -> %f MHz at 100 MHz",
             turns, real'(turns) * 100.0 / 262144.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
