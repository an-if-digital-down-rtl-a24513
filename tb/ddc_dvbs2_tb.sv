// ddc_dvbs2_tb: runs the down-converter on DVB-S2-like modulated signals
// in the published configuration: 10 MBaud, roll-off 0.35, 70 MHz IF,
// 200 MSps 12-bit ADC, NCO word 52429, 40 MSps (4 samples/symbol) output.
//
// For each of QPSK, 8PSK and 16APSK (ring ratio 2.85), random symbols are
// shaped with a root-raised-cosine pulse (20 samples/symbol, +-8 symbols),
// placed on a 70 MHz carrier, optionally disturbed by white Gaussian
// noise of a set Es/N0, quantised to 12 bits and fed to ddc_top. The
// bench then acts as the demodulator: a root-raised-cosine matched filter
// at 4 samples/symbol, sampling at the known symbol instants (output
// sample 4k+7: the two filters delay the signal by 35 ADC samples), and a
// least-squares complex gain per block of 100 symbols standing in for
// carrier recovery (it also absorbs the 76 Hz NCO residual). From the
// recovered and reference symbols it computes the modulation error ratio
// MER = 10 log10( sum |ref|^2 / sum |rx - ref|^2 ) and the EVM.
// It also reports the variances of the normalised magnitude error and of
// the phase error (degrees) without noise, the fixed-point figures of merit.
// Checks: without noise the converter itself must stay above 38 dB MER;
// for Es/N0 from 10 to 30 dB the MER must be within 1.5 dB of Es/N0
// combined with that floor, i.e. the converter adds almost nothing to the
// channel noise.
module ddc_dvbs2_tb;
  import ddc_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam real BETA = 0.35;
  localparam int  SPS_ADC = 20;       // 200 MSps / 10 MBaud
  localparam int  SPAN = 8;           // pulse half-length in symbols
  localparam int  NSYM = 1400;
  localparam real AMP = 600.0;        // IF amplitude in ADC codes
  localparam real F_IF = 0.35;        // 70 MHz / 200 MSps

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_valid = 1'b0;
  logic signed [ADC_W-1:0] s0 = '0, s1 = '0;
  logic out_valid, agc_valid;
  logic signed [DATA_W-1:0] oi, oq;
  logic [ADC_W-1:0] agc_mean, agc_peak;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddc_top dut (.clk, .rst_n, .adc_valid, .adc_s0(s0), .adc_s1(s1), .nco_fcw(18'd52429),
               .out_valid, .out_i(oi), .out_q(oq), .agc_valid, .agc_mean, .agc_peak);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // root-raised-cosine pulse, t in symbol periods, peak normalised later
  function automatic real rrc(real t);
    real a;
    if (t == 0.0) return 1.0 - BETA + 4.0 * BETA / PI;
    a = 4.0 * BETA * t;
    if (a == 1.0 || a == -1.0)
      return BETA / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * BETA))
                                  + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * BETA)));
    return ($sin(PI * t * (1.0 - BETA)) + a * $cos(PI * t * (1.0 + BETA)))
           / (PI * t * (1.0 - a * a));
  endfunction

  real gtx [-SPAN*SPS_ADC:SPAN*SPS_ADC];  // transmit pulse at 200 MSps
  real gmf [-SPAN*4:SPAN*4];              // matched filter at 40 MSps

  real sym_re [NSYM], sym_im [NSYM];
  real y_re [$], y_im [$];
  int  clipped;
  real mag_var, ph_var;   // normalised magnitude error and phase error (deg) variances

  always @(negedge clk) if (rst_n && out_valid) begin
    y_re.push_back(real'(oi));
    y_im.push_back(real'(oq));
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 32'h7fffffff))) / 2147483648.0;
    u2 = (real'($urandom_range(0, 32'h7fffffff))) / 2147483648.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // constellation point for a random symbol, unit mean energy
  task automatic make_symbols(int mod);
    real gam, r1, r2, norm;
    gam = 2.85;
    r1 = 1.0;
    r2 = gam;
    norm = $sqrt((4.0 * r1 * r1 + 12.0 * r2 * r2) / 16.0);
    for (int k = 0; k < NSYM; k++) begin
      int s;
      real ph, r;
      case (mod)
        0: begin s = $urandom_range(0, 3); ph = PI / 4.0 + PI / 2.0 * s; r = 1.0; end
        1: begin s = $urandom_range(0, 7); ph = PI / 4.0 * s; r = 1.0; end
        default: begin
          s = $urandom_range(0, 15);
          if (s < 4) begin ph = PI / 4.0 + PI / 2.0 * s; r = r1 / norm; end
          else begin ph = PI / 12.0 + PI / 6.0 * (s - 4); r = r2 / norm; end
        end
      endcase
      sym_re[k] = r * $cos(ph);
      sym_im[k] = r * $sin(ph);
    end
  endtask

  function automatic int adc_sample(int t, real sigma);
    real bre, bim, v;
    int k0;
    bre = 0.0;
    bim = 0.0;
    k0 = t / SPS_ADC;
    for (int k = k0 - SPAN; k <= k0 + SPAN + 1; k++) begin
      int d;
      d = t - k * SPS_ADC;
      if (k >= 0 && k < NSYM && d >= -SPAN * SPS_ADC && d <= SPAN * SPS_ADC) begin
        bre += sym_re[k] * gtx[d];
        bim += sym_im[k] * gtx[d];
      end
    end
    v = AMP * (bre * $cos(2.0 * PI * F_IF * t) - bim * $sin(2.0 * PI * F_IF * t));
    if (sigma > 0.0) v += sigma * gauss();
    v = $floor(v + 0.5);
    if (v > 2047.0) begin v = 2047.0; clipped++; end
    if (v < -2048.0) begin v = -2048.0; clipped++; end
    return $rtoi(v);
  endfunction

  // one run: returns MER in dB and EVM in %
  task automatic run(int mod, real esn0_db, output real mer_db, output real evm_pct);
    real sigma, num, den, evm_num, evm_den;
    int nblk;
    sigma = (esn0_db > 200.0) ? 0.0 : AMP * $sqrt(5.0 / $pow(10.0, esn0_db / 10.0));
    make_symbols(mod);
    clipped = 0;
    y_re.delete();
    y_im.delete();
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < NSYM * SPS_ADC; t += 2) begin
      adc_valid <= 1'b1;
      s0 <= ADC_W'(adc_sample(t, sigma));
      s1 <= ADC_W'(adc_sample(t + 1, sigma));
      @(posedge clk);
    end
    adc_valid <= 1'b0;
    repeat (10) @(posedge clk);
    // matched filter, sample at 4k+7, LS gain per block of 100 symbols
    num = 0.0; den = 0.0; evm_num = 0.0; evm_den = 0.0;
    mag_var = 0.0; ph_var = 0.0;
    nblk = 0;
    for (int b = SPAN + 2; b + 100 <= NSYM - SPAN - 2; b += 100) begin
      real zr [100], zi [100];
      real cr, ci, cn;
      cr = 0.0; ci = 0.0; cn = 0.0;
      for (int k = 0; k < 100; k++) begin
        int m;
        m = 4 * (b + k) + 7;
        zr[k] = 0.0;
        zi[k] = 0.0;
        for (int j = -SPAN * 4; j <= SPAN * 4; j++) begin
          zr[k] += gmf[j] * y_re[m + j];
          zi[k] += gmf[j] * y_im[m + j];
        end
        // c = sum z * conj(a) / sum |a|^2
        cr += zr[k] * sym_re[b + k] + zi[k] * sym_im[b + k];
        ci += zi[k] * sym_re[b + k] - zr[k] * sym_im[b + k];
        cn += sym_re[b + k] ** 2 + sym_im[b + k] ** 2;
      end
      cr /= cn;
      ci /= cn;
      for (int k = 0; k < 100; k++) begin
        real rr, ri, g2, er, ei;
        g2 = cr * cr + ci * ci;
        // rx = z / c
        rr = (zr[k] * cr + zi[k] * ci) / g2;
        ri = (zi[k] * cr - zr[k] * ci) / g2;
        er = rr - sym_re[b + k];
        ei = ri - sym_im[b + k];
        num += sym_re[b + k] ** 2 + sym_im[b + k] ** 2;
        den += er * er + ei * ei;
        begin
          real me, pe;
          me = $sqrt(rr * rr + ri * ri) / $sqrt(sym_re[b + k] ** 2 + sym_im[b + k] ** 2) - 1.0;
          pe = $atan2(ri * sym_re[b + k] - rr * sym_im[b + k],
                      rr * sym_re[b + k] + ri * sym_im[b + k]) * 180.0 / PI;
          mag_var += me * me;
          ph_var  += pe * pe;
        end
        evm_den += $sqrt(sym_re[b + k] ** 2 + sym_im[b + k] ** 2);
      end
      nblk++;
    end
    mer_db = 10.0 * $log10(num / den);
    mag_var /= real'(nblk * 100);
    ph_var  /= real'(nblk * 100);
    evm_pct = $sqrt(den / real'(nblk * 100)) / (evm_den / real'(nblk * 100)) * 100.0;
  endtask

  initial begin
    string names [3];
    real mer, evm, e_tx, e_mf;
    names = '{"QPSK", "8PSK", "16APSK"};
    // pulses: unit energy per symbol at each rate
    e_tx = 0.0;
    e_mf = 0.0;
    for (int n = -SPAN * SPS_ADC; n <= SPAN * SPS_ADC; n++) begin
      gtx[n] = rrc(real'(n) / real'(SPS_ADC));
      e_tx += gtx[n] ** 2;
    end
    for (int n = -SPAN * SPS_ADC; n <= SPAN * SPS_ADC; n++) gtx[n] *= $sqrt(real'(SPS_ADC) / e_tx);
    for (int n = -SPAN * 4; n <= SPAN * 4; n++) begin
      gmf[n] = rrc(real'(n) / 4.0);
      e_mf += gmf[n] ** 2;
    end
    for (int n = -SPAN * 4; n <= SPAN * 4; n++) gmf[n] /= e_mf;
    for (int mod = 0; mod < 3; mod++) begin
      real floor_db;
      run(mod, 999.0, mer, evm);
      floor_db = mer;
      checks++;
      $display("%-6s no noise      : MER %6.2f dB  EVM %5.2f %%  magnitude error var %e  phase error var %f deg^2  (clipped %0d)",
               names[mod], mer, evm, mag_var, ph_var, clipped);
      if (mer < 38.0) failures++;
      // AWGN sweep: MER must follow Es/N0 combined with the converter's own floor
      for (int snr = 10; snr <= 30; snr += 5) begin
        real expect_db;
        run(mod, real'(snr), mer, evm);
        expect_db = -10.0 * $log10($pow(10.0, -real'(snr) / 10.0) + $pow(10.0, -floor_db / 10.0));
        checks++;
        $display("%-6s Es/N0 %2d dB   : MER %6.2f dB  EVM %5.2f %%  (expected about %5.2f dB)",
                 names[mod], snr, mer, evm, expect_db);
        if (mer < expect_db - 1.5 || mer > expect_db + 1.5) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
