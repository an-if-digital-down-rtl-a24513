// fixed_lpf: one branch of the fixed conversion stage's filtering:
// zero insertion by 2, optional one-sample delay, lowpass FIR at Fs, and
// decimation by 2 back to Fs/2.
//
// Each input sample x[n] (rate Fs/2) is followed by an inserted zero,
// giving the stream u[2n] = x[n], u[2n+1] = 0 at rate Fs. The branch that
// carries the odd ADC samples (the quadrature path) is delayed by DELAY = 1
// sample of Fs, which puts its samples back at the instants they were
// taken. The TAPS-tap lowpass removes the image created by zero insertion
// and the Fs/4 mixer, and only every second filter output, the one at
// even stream index 2n, is computed and kept:
//   y[n] = sum_k h[k] * u[2n - DELAY - k].
// The delay line holds the zero-stuffed stream literally (TAPS+DELAY
// entries, shifted two places per clock); the slots that hold inserted
// zeros are constant and are removed by synthesis, so the hardware is two
// interleaved half-length subfilters.
//
// The 40 taps and the 31.75 MHz -3 dB cutoff at 200 MSps are the published
// values. The coefficients come from ddc_pkg::lpf_coef (Hamming-windowed
// sinc whose cutoff ddc_pkg::lpf_cutoff sets so that the response is 3 dB
// down at FC_KHZ, DC gain 2 to make up for the inserted zeros, COEF_FRAC
// fractional bits), which is this design's choice. The output keeps OUT_W-IN_W extra
// fractional bits, rounded and saturated.
// Timing: out_valid/out_y follow in_valid/in_x by one clock. The line only
// moves on in_valid, so in_valid low stalls the branch.
module fixed_lpf
  import ddc_pkg::*;
#(
  parameter int TAPS   = 40,
  parameter int FC_KHZ = 31750,
  parameter int FS_KHZ = 200000,
  parameter int DELAY  = 0,
  parameter int IN_W   = MIX_W,
  parameter int OUT_W  = DATA_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_y
);

  localparam int LEN   = TAPS + DELAY;
  localparam int ACC_W = IN_W + COEF_W + $clog2(TAPS) + 1;
  localparam int SHIFT = COEF_FRAC - (OUT_W - IN_W);

  // window cutoff giving -3 dB at FC_KHZ
  localparam real FN = lpf_cutoff(TAPS, FC_KHZ, FS_KHZ);

  logic signed [COEF_W-1:0] coef [TAPS];
  for (genvar k = 0; k < TAPS; k++) begin : g_coef
    localparam int C = lpf_coef(TAPS, FN, 2, COEF_FRAC, k);
    assign coef[k] = COEF_W'(C);
  end

  // Zero-stuffed delay line: line[j] = u[2n - j] after sample n is taken.
  logic signed [IN_W-1:0] line   [LEN];
  logic signed [IN_W-1:0] line_n [LEN];

  always_comb begin
    line_n[0] = in_x;
    if (LEN > 1) line_n[1] = '0;
    for (int j = 2; j < LEN; j++) line_n[j] = line[j-2];
  end

  logic signed [ACC_W-1:0] acc;
  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++)
      acc += ACC_W'(coef[k]) * ACC_W'(line_n[k + DELAY]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < LEN; j++) line[j] <= '0;
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        line  <= line_n;
        out_y <= OUT_W'(round_sat(64'(acc), SHIFT, OUT_W));
      end
    end
  end

endmodule
