// nco: numerically controlled oscillator producing a complex carrier
// cos(phi) + j*sin(phi).
//
// A PHASE_W-bit phase accumulator adds the frequency control word fcw on
// every enabled clock; its LUT_AW most significant bits address a
// look-up table holding one period of the cosine and of the sine. With the
// accumulator clocked at Fs/2 the frequency step is (Fs/2)/2^PHASE_W and
// the carrier frequency is f = Fs * fcw / 2^(PHASE_W+1). With PHASE_W = 18
// and Fs = 200 MSps the step is 381.47 Hz and fcw = 52429 gives
// 20.000076 MHz, the setting that brings the 20 MHz output of the fixed
// stage to baseband.
//
// The accumulator length is the published one. The table depth (2^10),
// the amplitude (LUT_W = 16 bits, peak 2^(LUT_W-1)-1), plain phase
// truncation and the full-period tables are this design's choices. The
// tables are computed at elaboration and read through a register, so they
// map onto block RAM.
//
// Interface: en advances the oscillator by one sample; the phase starts at
// 0 after reset, so the k-th enabled clock (k = 0, 1, ...) produces the
// carrier sample for phase k*fcw.
// Timing: cos_o/sin_o/out_valid appear one clock after en.
module nco #(
  parameter int PHASE_W = ddc_pkg::PHASE_W,
  parameter int LUT_AW  = 10,
  parameter int LUT_W   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [PHASE_W-1:0]      fcw,
  output logic                    out_valid,
  output logic signed [LUT_W-1:0] cos_o,
  output logic signed [LUT_W-1:0] sin_o
);

  localparam int DEPTH = 1 << LUT_AW;

  typedef logic signed [LUT_W-1:0] lut_t [DEPTH];

  // Entry a of the table holds round(A * cos(2*pi*a/DEPTH)) (or sin).
  function automatic lut_t make_lut(bit sine);
    lut_t t;
    real  amp, ph;
    amp = real'((64'd1 << (LUT_W - 1)) - 1);
    for (int a = 0; a < DEPTH; a++) begin
      ph   = 2.0 * ddc_pkg::PI * real'(a) / real'(DEPTH);
      t[a] = LUT_W'($rtoi((sine ? $sin(ph) : $cos(ph)) * amp
                          + (((sine ? $sin(ph) : $cos(ph)) >= 0.0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam lut_t COS_LUT = make_lut(1'b0);
  localparam lut_t SIN_LUT = make_lut(1'b1);

  logic [PHASE_W-1:0] phase;
  logic [LUT_AW-1:0]  addr;
  assign addr = phase[PHASE_W-1 -: LUT_AW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) phase <= phase + fcw;
    end
  end

  // Table read port (no reset, block-RAM style).
  always_ff @(posedge clk) begin
    if (en) begin
      cos_o <= COS_LUT[addr];
      sin_o <= SIN_LUT[addr];
    end
  end

endmodule
