// fixed_dc: fixed frequency conversion stage. Moves the 70 MHz IF, sampled
// at Fs = 200 MSps, down by Fs/4 = 50 MHz to 20 MHz and delivers it as an
// I/Q pair at Fs/2.
//
// Structure: fs4_mixer multiplies the ADC stream by the Fs/4 quadrature
// carrier without multipliers and splits it into a real path (even
// samples) and an imaginary path (odd samples), each at Fs/2. Each path
// goes through fixed_lpf: zero insertion back to Fs, the quadrature path
// delayed by one sample, a 40-tap lowpass that suppresses the images at
// higher frequencies, and decimation by 2 back to Fs/2. The delay puts the
// two paths on a common time grid again, so the output pair describes one
// instant.
//
// Interface: two ADC samples per clock (adc_s0 earlier, adc_s1 later) with
// adc_valid; output iq_t words (DATA_W bits, 3 fractional bits more than
// the ADC) with out_valid, one per clock.
// Timing: latency 2 clocks (mixer register, filter register).
module fixed_dc
  import ddc_pkg::*;
#(
  parameter int TAPS   = 40,
  parameter int FC_KHZ = 31750,
  parameter int FS_KHZ = 200000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_s0,
  input  logic signed [ADC_W-1:0] adc_s1,
  output logic                    out_valid,
  output iq_t                     out
);

  logic                    mix_valid;
  logic signed [MIX_W-1:0] mix_i, mix_q;
  logic                    vi, vq;

  fs4_mixer #(.IN_W(ADC_W), .OUT_W(MIX_W)) u_mixer (
    .clk, .rst_n,
    .in_valid (adc_valid),
    .in_s0    (adc_s0),
    .in_s1    (adc_s1),
    .out_valid(mix_valid),
    .out_i    (mix_i),
    .out_q    (mix_q)
  );

  fixed_lpf #(.TAPS(TAPS), .FC_KHZ(FC_KHZ), .FS_KHZ(FS_KHZ), .DELAY(0),
              .IN_W(MIX_W), .OUT_W(DATA_W)) u_lpf_i (
    .clk, .rst_n,
    .in_valid (mix_valid),
    .in_x     (mix_i),
    .out_valid(vi),
    .out_y    (out.i)
  );

  fixed_lpf #(.TAPS(TAPS), .FC_KHZ(FC_KHZ), .FS_KHZ(FS_KHZ), .DELAY(1),
              .IN_W(MIX_W), .OUT_W(DATA_W)) u_lpf_q (
    .clk, .rst_n,
    .in_valid (mix_valid),
    .in_x     (mix_q),
    .out_valid(vq),
    .out_y    (out.q)
  );

  assign out_valid = vi;

  // Both branches see the same valid stream.
  a_branches_in_step: assert property (@(posedge clk) disable iff (!rst_n) vi == vq)
    else $error("fixed_dc: I/Q branches out of step");

endmodule
