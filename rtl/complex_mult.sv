// complex_mult: mixes an I/Q sample with the conjugate of a carrier sample,
// i.e. computes (i + jq) * (c - js), which shifts the spectrum down by the
// carrier frequency:
//   out.i = (i*c + q*s) / 2^(LUT_W-1)
//   out.q = (q*c - i*s) / 2^(LUT_W-1)
// using four multipliers and two adders. The carrier is in LUT_W-bit
// fixed point with LUT_W-1 fractional bits; the results are rounded and
// saturated back to DATA_W bits. The down-conversion sign and the
// four-multiplier form are this design's reading of "mixing of the
// incoming samples with the respective carrier samples".
// Timing: one register stage; out_valid follows in_valid by one clock.
module complex_mult
  import ddc_pkg::*;
#(
  parameter int LUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  iq_t                     in,
  input  logic signed [LUT_W-1:0] car_cos,
  input  logic signed [LUT_W-1:0] car_sin,
  output logic                    out_valid,
  output iq_t                     out
);

  localparam int P_W = DATA_W + LUT_W + 1;

  logic signed [P_W-1:0] re, im;
  always_comb begin
    re = P_W'(in.i * car_cos) + P_W'(in.q * car_sin);
    im = P_W'(in.q * car_cos) - P_W'(in.i * car_sin);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out.i <= DATA_W'(round_sat(64'(re), LUT_W - 1, DATA_W));
        out.q <= DATA_W'(round_sat(64'(im), LUT_W - 1, DATA_W));
      end
    end
  end

endmodule
