// prog_dc: programmable frequency conversion stage. An NCO generates a
// complex carrier at f = Fs * fcw / 2^(PHASE_W+1) and a complex multiplier
// mixes each incoming I/Q sample with its conjugate, moving the signal at
// f down to 0 Hz. Both run at Fs/2, one sample per clock.
//
// The n-th accepted input sample (counted from reset) is multiplied by the
// carrier at phase n*fcw: the input is held in a register for the clock
// the NCO needs to read its table, so that the two arrive at the
// multiplier together. fcw may be changed at any time; the new step takes
// effect on the next sample.
// Timing: latency 2 clocks; in_valid low stalls the oscillator as well.
module prog_dc #(
  parameter int PHASE_W = ddc_pkg::PHASE_W,
  parameter int LUT_AW  = 10,
  parameter int LUT_W   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  ddc_pkg::iq_t                in,
  input  logic [PHASE_W-1:0] fcw,
  output logic               out_valid,
  output ddc_pkg::iq_t                out
);

  logic                    car_valid;
  logic signed [LUT_W-1:0] car_cos, car_sin;
  ddc_pkg::iq_t                     in_d;

  nco #(.PHASE_W(PHASE_W), .LUT_AW(LUT_AW), .LUT_W(LUT_W)) u_nco (
    .clk, .rst_n,
    .en       (in_valid),
    .fcw,
    .out_valid(car_valid),
    .cos_o    (car_cos),
    .sin_o    (car_sin)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        in_d <= '0;
    else if (in_valid) in_d <= in;
  end

  complex_mult #(.LUT_W(LUT_W)) u_cmult (
    .clk, .rst_n,
    .in_valid (car_valid),
    .in       (in_d),
    .car_cos,
    .car_sin,
    .out_valid,
    .out
  );

endmodule
