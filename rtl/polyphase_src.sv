// polyphase_src: rational sample-rate converter by L/M (default 2/5) for
// an I/Q stream, built as a polyphase interpolation filter followed by a
// decimator.
//
// The reference operation is: insert L-1 zeros after every input sample
// (rate L*Fin), filter with a TAPS-tap lowpass h, keep every M-th output.
// In polyphase form the prototype is split into L subfilters of TAPS/L
// taps, subfilter p holding h[j*L + p]; interpolated output t = L*n + p
// is subfilter p applied to the input line ending at x[n]. All L
// subfilters run at the input rate (Fs/2) and the decimator, a commutator,
// picks the one whose interpolated index is a multiple of M:
//   y[m] = sum_j h[j*L + p] * x[n - j],   with M*m = L*n + p.
// A small counter `off` holds (next kept index) - L*n; when off < L the
// subfilter `off` is output and off grows by M-L, otherwise it falls by L.
// With L=2, M=5 this gives two outputs for every five inputs, alternating
// between the subfilters: 100 MSps in, 40 MSps (4 samples per 10 MBaud
// symbol) out.
//
// The 2/5 ratio, the 32 taps and the 11.75 MHz -3 dB cutoff (at the
// interpolated rate of 200 MSps) are the published values; the window
// design of the coefficients (ddc_pkg::lpf_coef with the cutoff from
// ddc_pkg::lpf_cutoff, -3 dB at FC_KHZ, DC gain L) and the output rounding
// are this design's choices. M must be at least L.
// Timing: an output is registered on the clock after the input sample
// that completes it (latency 1); out_valid is a one-clock strobe.
module polyphase_src
  import ddc_pkg::*;
#(
  parameter int L      = 2,
  parameter int M      = 5,
  parameter int TAPS   = 32,
  parameter int FC_KHZ = 11750,
  parameter int FS_KHZ = 200000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  iq_t  in,
  output logic out_valid,
  output iq_t  out
);

  localparam int SUB   = TAPS / L;
  localparam int ACC_W = DATA_W + COEF_W + $clog2(SUB) + 1;
  localparam int OFF_W = $clog2(M + L) + 1;

  initial begin
    assert (M >= L && TAPS % L == 0)
      else $error("polyphase_src: needs M >= L and TAPS a multiple of L");
  end

  // window cutoff giving -3 dB at FC_KHZ
  localparam real FN = lpf_cutoff(TAPS, FC_KHZ, FS_KHZ);

  logic signed [COEF_W-1:0] coef [L][SUB];
  for (genvar p = 0; p < L; p++) begin : g_phase
    for (genvar j = 0; j < SUB; j++) begin : g_tap
      localparam int C = lpf_coef(TAPS, FN, L, COEF_FRAC, j * L + p);
      assign coef[p][j] = COEF_W'(C);
    end
  end

  // Input delay lines, newest first; the current sample joins combinationally.
  logic signed [DATA_W-1:0] line_i [SUB], line_q [SUB];
  logic signed [DATA_W-1:0] cur_i  [SUB], cur_q  [SUB];
  always_comb begin
    cur_i[0] = in.i;
    cur_q[0] = in.q;
    for (int j = 1; j < SUB; j++) begin
      cur_i[j] = line_i[j-1];
      cur_q[j] = line_q[j-1];
    end
  end

  // All L subfilters, each on both channels.
  logic signed [ACC_W-1:0] sub_i [L], sub_q [L];
  always_comb begin
    for (int p = 0; p < L; p++) begin
      sub_i[p] = '0;
      sub_q[p] = '0;
      for (int j = 0; j < SUB; j++) begin
        sub_i[p] += ACC_W'(coef[p][j]) * ACC_W'(cur_i[j]);
        sub_q[p] += ACC_W'(coef[p][j]) * ACC_W'(cur_q[j]);
      end
    end
  end

  logic [OFF_W-1:0] off;
  logic             due;
  assign due = (off < OFF_W'(L));

  // Commutator: the subfilter whose interpolated index is being kept.
  logic signed [ACC_W-1:0] sel_i, sel_q;
  always_comb begin
    sel_i = sub_i[0];
    sel_q = sub_q[0];
    for (int p = 1; p < L; p++)
      if (off == OFF_W'(p)) begin
        sel_i = sub_i[p];
        sel_q = sub_q[p];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < SUB; j++) begin
        line_i[j] <= '0;
        line_q[j] <= '0;
      end
      off       <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid && due;
      if (in_valid) begin
        line_i <= cur_i;
        line_q <= cur_q;
        if (due) begin
          out.i <= DATA_W'(round_sat(64'(sel_i), COEF_FRAC, DATA_W));
          out.q <= DATA_W'(round_sat(64'(sel_q), COEF_FRAC, DATA_W));
          off   <= off + OFF_W'(M - L);
        end else begin
          off   <= off - OFF_W'(L);
        end
      end
    end
  end

endmodule
