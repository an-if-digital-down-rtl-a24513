// fs4_mixer: multiplierless quadrature mixer at Fs/4, split into I and Q.
//
// Mixing a real IF stream with the complex carrier exp(-j*pi*n/2) means
// multiplying by {1,0,-1,0} on the real path and {0,-1,0,1} on the
// imaginary path. Half of those products are zero, so the real path keeps
// only the even ADC samples and the imaginary path only the odd ones, each
// multiplied by the sign sequence {+1,-1,-1,+1}:
//   I[n] = (-1)^n * a[2n],   Q[n] = -(-1)^n * a[2n+1].
// Both paths therefore run at Fs/2 and no multiplier is needed. This is the
// arrangement the down-converter is built on; the two-samples-per-clock
// ADC interface and the one-bit sign toggle are this design's own choices.
//
// Interface: in_s0 is the earlier and in_s1 the later of two consecutive
// ADC samples, presented together when in_valid is high (one pair per
// Fs/2 clock). The sign toggle advances on each accepted pair and restarts
// at +1 after reset. Outputs are MIX_W = ADC_W+1 bits so that negating
// the most negative sample cannot overflow.
// Timing: one register stage; out_valid follows in_valid by one clock.
module fs4_mixer
  import ddc_pkg::*;
#(
  parameter int IN_W  = ADC_W,
  parameter int OUT_W = IN_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_s0,
  input  logic signed [IN_W-1:0]  in_s1,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);

  logic neg;  // high on odd pairs: sign of the real path is -1

  logic signed [OUT_W-1:0] s0_x, s1_x;
  assign s0_x = OUT_W'(in_s0);
  assign s1_x = OUT_W'(in_s1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg       <= 1'b0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        neg   <= ~neg;
        out_i <= neg ? -s0_x : s0_x;
        out_q <= neg ? s1_x : -s1_x;
      end
    end
  end

endmodule
