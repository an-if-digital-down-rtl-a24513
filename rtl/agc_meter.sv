// agc_meter: level measurement on the raw ADC samples, reported to the
// analog gain controller that keeps the IF within the ADC's range.
//
// Over a window of 2^LOG2_N clocks (two samples each) it accumulates the
// magnitudes |a| of all samples and tracks the largest one. At the end of
// the window it presents the mean magnitude (sum / 2^(LOG2_N+1)) and the
// peak, pulses level_valid for one clock and starts the next window.
// The external controller compares these with its targets; the control
// law itself is outside this block.
//
// The need for a measurement inside the down-converter is the published
// part; the choice of mean and peak magnitude over a fixed window, and the
// window length, are this design's own.
// Timing: level_valid rises one clock after the last pair of a window is
// accepted; results hold until the next window ends.
module agc_meter #(
  parameter int ADC_W  = ddc_pkg::ADC_W,
  parameter int LOG2_N = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ADC_W-1:0] in_s0,
  input  logic signed [ADC_W-1:0] in_s1,
  output logic                    level_valid,
  output logic [ADC_W-1:0]        level_mean,
  output logic [ADC_W-1:0]        level_peak
);

  localparam int SUM_W = ADC_W + LOG2_N + 1;

  logic [ADC_W-1:0]  m0, m1, mpair;
  logic [ADC_W:0]    pair_sum;
  logic [SUM_W-1:0]  sum, sum_n;
  logic [ADC_W-1:0]  peak, peak_n;
  logic [LOG2_N-1:0] cnt;

  // |x| of the most negative code is 2^(ADC_W-1), which still fits unsigned.
  assign m0       = in_s0[ADC_W-1] ? ADC_W'(-in_s0) : ADC_W'(in_s0);
  assign m1       = in_s1[ADC_W-1] ? ADC_W'(-in_s1) : ADC_W'(in_s1);
  assign mpair    = (m0 > m1) ? m0 : m1;
  assign pair_sum = {1'b0, m0} + {1'b0, m1};
  assign sum_n    = sum + SUM_W'(pair_sum);
  assign peak_n   = (mpair > peak) ? mpair : peak;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum         <= '0;
      peak        <= '0;
      cnt         <= '0;
      level_valid <= 1'b0;
      level_mean  <= '0;
      level_peak  <= '0;
    end else begin
      level_valid <= 1'b0;
      if (in_valid) begin
        cnt <= cnt + 1'b1;
        if (&cnt) begin
          level_valid <= 1'b1;
          level_mean  <= ADC_W'(sum_n >> (LOG2_N + 1));
          level_peak  <= peak_n;
          sum         <= '0;
          peak        <= '0;
        end else begin
          sum  <= sum_n;
          peak <= peak_n;
        end
      end
    end
  end

endmodule
