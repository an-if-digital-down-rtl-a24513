// ddc_top: IF digital down-converter for a software-radio DVB-S2 receiver.
//
// A 70 MHz IF, sampled by a 12-bit ADC at Fs = 200 MSps, is turned into
// baseband I/Q samples at four times the 10 MBaud symbol rate (40 MSps)
// in three stages, all clocked at Fs/2 = 100 MHz:
//   1. fixed_dc      - Fs/4 (50 MHz) multiplierless mixing, I/Q split,
//                      zero insertion, 40-tap lowpass, decimation by 2:
//                      IF at 20 MHz, 100 MSps complex.
//   2. prog_dc       - NCO (18-bit accumulator, 381.47 Hz steps) and
//                      complex multiplier: 20 MHz (plus any carrier offset)
//                      to 0 Hz. fcw = 52429 gives 20.000076 MHz.
//   3. polyphase_src - 2/5 rate change with a 32-tap polyphase filter:
//                      100 MSps to 40 MSps.
// In parallel agc_meter measures the ADC level for the analog AGC.
//
// Interface: adc_s0/adc_s1 are two consecutive ADC samples (s0 first) per
// clock, qualified by adc_valid. nco_fcw sets the programmable carrier.
// out_valid strobes two out of every five clocks with one I/Q pair
// (16-bit, same scale as the ADC input with 3 extra fractional bits).
// agc_* carry the level measurement for the external gain control.
// Timing: latency from an ADC pair to the output sample that includes it
// is 5 clocks (2 + 2 + 1), plus the filters' group delays.
module ddc_top
  import ddc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_s0,
  input  logic signed [ADC_W-1:0] adc_s1,
  input  logic [PHASE_W-1:0]      nco_fcw,
  output logic                    out_valid,
  output logic signed [DATA_W-1:0] out_i,
  output logic signed [DATA_W-1:0] out_q,
  output logic                    agc_valid,
  output logic [ADC_W-1:0]        agc_mean,
  output logic [ADC_W-1:0]        agc_peak
);

  logic fix_valid, pdc_valid;
  iq_t  fix_out, pdc_out, src_out;

  fixed_dc u_fixed (
    .clk, .rst_n,
    .adc_valid,
    .adc_s0,
    .adc_s1,
    .out_valid(fix_valid),
    .out      (fix_out)
  );

  prog_dc u_prog (
    .clk, .rst_n,
    .in_valid (fix_valid),
    .in       (fix_out),
    .fcw      (nco_fcw),
    .out_valid(pdc_valid),
    .out      (pdc_out)
  );

  polyphase_src u_src (
    .clk, .rst_n,
    .in_valid (pdc_valid),
    .in       (pdc_out),
    .out_valid,
    .out      (src_out)
  );

  assign out_i = src_out.i;
  assign out_q = src_out.q;

  agc_meter u_agc (
    .clk, .rst_n,
    .in_valid   (adc_valid),
    .in_s0      (adc_s0),
    .in_s1      (adc_s1),
    .level_valid(agc_valid),
    .level_mean (agc_mean),
    .level_peak (agc_peak)
  );

endmodule
