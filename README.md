# IF digital down-converter for a DVB-S2 software-radio receiver

This design takes a satellite IF signal centred at 70 MHz, sampled directly by
a 12-bit ADC at 200 MSps, and turns it into complex baseband samples (I and Q)
at four samples per symbol for a 10 MBaud DVB-S2 carrier. It does the job in
two frequency conversions followed by a rational rate change:

```
 ADC 200 MSps        fixed_dc                 prog_dc                  polyphase_src
 2 samples/clk  ->  Fs/4 mix, LPF x2/2   ->  NCO + complex mult   ->  x2 / 5 polyphase  ->  I/Q 40 MSps
 70 MHz IF          20 MHz, 100 MSps         0 Hz, 100 MSps           0 Hz, 40 MSps
        \
         agc_meter: mean / peak |sample| for the analog gain control
```

The first conversion is at a fixed quarter of the sample rate, which needs no
multipliers. The second is a programmable NCO stage that removes the remaining
20 MHz and any carrier offset. It has a resolution of 381 Hz. All logic runs in one
clock domain at Fs/2 = 100 MHz. The ADC supplies two samples per clock.

## Frequency plan

| Quantity | Value | Where it comes from |
|---|---|---|
| ADC rate Fs | 200 MSps, 12 bit | 20 x the 10 MBaud symbol rate; even multiple of Rs |
| Nyquist check | 2(70 + 36/2) = 176 <= 200 <= 210 MSps | 36 MHz analog IF filter, 210 MSps ADC maximum |
| Fixed mixer | Fs/4 = 50 MHz | 70 MHz -> 20 MHz |
| Fixed lowpass | 40 taps, 31.75 MHz at 200 MSps | 26.75 MHz signal edge + 5 MHz carrier uncertainty |
| NCO | 18-bit accumulator at 100 MHz, step 381.47 Hz | f = Fs * u / 2^19 |
| NCO word | u = 52429 -> 20.000076 MHz | residual offset 76.29 Hz (about 1 ppm) |
| Rate change | x2/5: 100 MSps -> 40 MSps | 4 samples per symbol |
| SRC lowpass | 32 taps, 11.75 MHz at 200 MSps | 6.75 MHz half-band + 5 MHz uncertainty |

The NCO word can be changed at run time on the `nco_fcw` port. The other
numbers are parameters. They are listed at the end.

## Stage 1: the Fs/4 conversion (`fs4_mixer`, `fixed_lpf`, `fixed_dc`)

This stage is the least obvious part of the design.

Multiplying the real ADC stream `a[t]` by `exp(-j*pi*t/2)` shifts it down by
Fs/4. The carrier samples are only 1, -j, -1 and +j. So the real product is
non-zero only for even `t`, and the imaginary product only for odd `t`.
`fs4_mixer` therefore splits the stream into two half-rate paths and applies
a sign sequence:

```
I[n] =  (-1)^n * a[2n]        (even samples)
Q[n] = -(-1)^n * a[2n+1]      (odd samples)
```

The sign toggle advances once per accepted sample pair. No multiplier is used.

The two paths now hold samples taken at different instants: I at even times
and Q at odd times. `fixed_lpf` repairs this in a literal way:

1. It inserts a zero after every sample. This takes the path back to the full
   rate Fs.
2. It delays the Q path by one sample at Fs. Each Q sample then sits at the
   instant it was taken.
3. It runs a 40-tap lowpass. The filter interpolates the missing samples and
   removes the images above 31.75 MHz, including the 80 MHz alias of the
   negative-frequency IF component.
4. It keeps every second output. Both paths keep the output at even `t`.

The delay line holds the zero-stuffed stream as it is. Only the filter outputs
that survive decimation are computed. Because every other slot is a constant
zero, synthesis keeps two interleaved 20-tap subfilters per path. These
subfilters use the even taps for I and the odd taps for Q. In other words, the
stage is a half-sample fractional-delay filter between I and Q. For this reason
its output equals the textbook model exactly: a complex signal at Fs, filtered
by the full 40-tap response and decimated by 2. The testbench checks the stage
bit-exactly against that model.

The lowpass has DC gain 2, which makes up for the inserted zeros. A real tone
of amplitude A at the ADC therefore leaves this stage as a complex tone of
magnitude A. The output carries 3 extra fractional bits, so the number that
appears is 8A.

## Stage 2: programmable conversion (`nco`, `complex_mult`, `prog_dc`)

`nco` adds the 18-bit control word to a phase accumulator on every sample. The
top 10 bits of the phase address a 1024-entry cosine table and a 1024-entry
sine table. Each entry is 16 bits with a peak of 32767. The tables are computed
at elaboration time from `$cos` and `$sin`, and a register reads them, so they
map onto block RAM. The design truncates the phase rather than dithering or
interpolating it. The resulting phase error is at most 0.35 degrees, which is
small next to the residual that the filters leave.

`complex_mult` multiplies each sample by the conjugate carrier with four
multipliers. The result is rounded and saturated back to 16 bits:

```
I' = (I*cos + Q*sin) / 2^15        Q' = (Q*cos - I*sin) / 2^15
```

`prog_dc` registers the data for the one clock that the table read takes. After
reset, the n-th sample meets carrier phase `n*u`.

## Stage 3: rational rate change (`polyphase_src`)

The reference operation is to insert one zero after each sample, filter with a
32-tap lowpass at 200 MSps, and keep every fifth sample. In polyphase form the
32 taps split into two 16-tap subfilters (even and odd taps). Both subfilters
run every clock at 100 MHz on the same delay line. A commutator picks the
subfilter whose interpolated index is a multiple of 5. A small counter `off`
holds the next kept index minus `L*n`, where `n` is the current input:

```
if off < L:  output subfilter[off];  off += M - L
else:        no output;              off -= L
```

With L = 2 and M = 5, every five inputs give outputs at offsets 0 and 5. The
outputs therefore alternate between the two subfilters. `out_valid` is high on
2 clocks out of every 5. L, M, the tap count and the cutoff are parameters. The
module requires M >= L.

## Level measurement for the AGC (`agc_meter`)

The analog IF stage ahead of the ADC has a gain control. It needs a measurement
of the signal at the ADC so it can hold the signal inside the converter's range.
`agc_meter` measures the mean and the peak of |sample| over windows of 2048
samples (1024 clocks). At the end of each window it pulses `level_valid`. The
control law belongs to the external controller.

## Interface and timing (`ddc_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz clock; asynchronous active-low reset |
| `adc_valid` | in | 1 | `adc_s0`/`adc_s1` hold a new sample pair |
| `adc_s0`, `adc_s1` | in | 12 | two consecutive ADC samples, `s0` first, two's complement |
| `nco_fcw` | in | 18 | NCO word u, carrier = 200 MHz * u / 2^19 (52429 for the 20 MHz plan) |
| `out_valid` | out | 1 | strobe, 2 of every 5 clocks at full input rate |
| `out_i`, `out_q` | out | 16 | baseband samples, 40 MSps |
| `agc_valid` | out | 1 | one-clock strobe per measurement window |
| `agc_mean`, `agc_peak` | out | 12 | mean and peak magnitude of the last window |

The pipeline latencies are as follows:

- The mixer takes 1 clock.
- The branch filter takes 1 clock.
- The NCO table read takes 1 clock.
- The complex multiplier takes 1 clock.
- The rate converter takes 1 clock.

On top of these come the group delays of the filters. Together the two filters
delay the signal by 35 ADC samples. Output sample m describes the input around
ADC sample 5m - 35. A low `adc_valid` freezes every stage, so gaps in the ADC
stream are tolerated. There is no backpressure from the output.

Number formats:

- ADC: 12 bits.
- After the mixer: 13 bits, so the most negative code can be negated.
- Between stages (`ddc_pkg::iq_t`): 16 bits, with 3 fractional bits more than
  the ADC.
- Coefficients: 16 bits, with 14 fractional bits.

Every filter and multiplier output is rounded half up and then saturated.

## Filter coefficients

The coefficients are not stored. `ddc_pkg::lpf_coef` computes them at
elaboration time from the tap count N, the cutoff fc and the rate fs:

```
h[k] = w[k] * sin(2*pi*(fc/fs)*x) / (pi*x),   x = k - (N-1)/2   (2*fc/fs at x = 0)
w[k] = 0.54 - 0.46*cos(2*pi*k/(N-1))          (Hamming window)
```

The window cutoff fc is not the bandwidth itself: `ddc_pkg::lpf_cutoff`
finds it by bisection so that the response of the windowed filter is exactly
3 dB down at the specified bandwidth (31.75 MHz and 11.75 MHz). The taps are
then scaled so that they sum to the interpolation factor (2) and rounded to
16 bits. The testbenches measure the -3 dB point of the rounded taps. A filter designed with a dedicated tool to the same tap counts
can replace the function without touching the datapath.

## How far it has been checked

Each module has a self-checking testbench in `tb/`:

- `fs4_mixer_tb`, `fixed_lpf_tb`, `fixed_dc_tb`: bit-exact against direct
  full-rate models. The in-band tone comes out at +20 MHz with a constant
  magnitude, so the image is removed.
- `nco_tb`: table values against `$cos`/`$sin`. With u = 52429 the carrier
  completes exactly 52429 periods in 2^18 samples (20.000076 MHz).
- `complex_mult_tb`, `prog_dc_tb`: exact products, including saturation,
  rotation direction and 2-clock alignment. A 20 MHz tone lands at 0 Hz.
- `polyphase_src_tb`: bit-exact against zero-stuff / filter / keep-every-5th.
  The test also checks the 2-in-5 output rate and the use of both branches.
- `agc_meter_tb`: mean and peak over several windows and amplitudes.
- `ddc_top_tb`: the whole chain at its default configuration.
  - Tones at 71 and 69 MHz come out at +1 and -1 MHz, at the predicted level.
  - A tone 25 MHz from the carrier is removed.
  - At 70 MHz the output drifts at the predicted -76.29 Hz.
  - With the NCO retuned to exactly 25 MHz, a 75 MHz carrier lands at 0 Hz.
  - The test counts every mechanism and requires each to occur: mixer sign
    states, NCO wrap, both SRC branches, decimator drops, AGC reports,
    stalls and the retune.
- `ddc_dvbs2_tb`: QPSK, 8PSK and 16APSK at 10 MBaud with roll-off 0.35 on a
  70 MHz carrier. The bench uses its own root-raised-cosine matched filter and
  a block-wise phase estimate as the demodulator.
  - Without noise, the MER is about 43 dB and the EVM about 0.7 %. This is
    the fixed-point and filter floor of the converter.
  - Without noise, the normalised magnitude error has a variance of about
    2.2e-5 to 5.5e-5 and the phase error about 0.09 to 0.19 deg^2. Those
    figures leave out the analog chain, clock jitter and the real carrier
    and timing recovery, all of which a hardware measurement would include.
  - For Es/N0 from 10 to 30 dB in 5 dB steps, the MER stays within about
    0.3 dB of Es/N0 combined with that floor, so the converter adds almost
    nothing to the channel noise.
  - The floor comes mostly from the 32-tap rate-converter filter, whose
    transition band is wide compared with the 6.75 MHz signal half-band.

Not verified:

- Timing closure at 100 MHz. The filters are written as single-cycle dot
  products, so a real FPGA build would add pipeline registers.
- Bit-exactness with any other implementation. The coefficient design,
  widths and rounding are this design's own.

## Choices this design makes

The architecture is fixed: the two-stage frequency plan, the Fs/4
multiplierless mixer, zero insertion with the one-sample Q delay, the 40-tap
and 32-tap filters with their bandwidths, the 18-bit NCO, the 2/5 polyphase
rate converter and an ADC-level measurement for the AGC.

These choices are this design's own:

- Two ADC samples per 100 MHz clock, in a single clock domain.
- A valid strobe that stalls every stage.
- Asynchronous reset.
- All data widths, rounding and saturation.
- Coefficients from a Hamming-windowed sinc.
- A 1024 x 16 sine/cosine table with phase truncation.
- A four-multiplier complex mixer.
- The kept decimation phases.
- Mean and peak magnitude over 2048 samples as the AGC measurement.

These parts are not part of the RTL:

- The ADC itself.
- The analog L-band-to-IF converter, its gain stage and its 36 MHz filter.
- The LNB.
- The demodulator that follows (timing and carrier recovery, matched
  filtering, decoding).

The top-level ports are where these parts connect.

## Files and simulation

`rtl/` holds one unit per file:

- `ddc_pkg` (widths, `iq_t`, coefficient and rounding functions)
- `fs4_mixer`, `fixed_lpf`, `fixed_dc`
- `nco`, `complex_mult`, `prog_dc`
- `polyphase_src`, `agc_meter`
- `ddc_top`

`tb/` holds one `<module>_tb.sv` per module, plus `ddc_dvbs2_tb.sv`.

Lint:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/ddc_pkg.sv rtl/ddc_top.sv --top-module ddc_top
```

Simulate any testbench; each prints `TB_RESULT checks=N failures=M`:

```
verilator --binary --timing --assert -Wno-fatal --top-module ddc_top_tb \
    -y rtl -y tb +libext+.sv rtl/ddc_pkg.sv tb/ddc_top_tb.sv
./obj_dir/Vddc_top_tb
```

Every testbench except `fixed_lpf_tb` runs its unit at its default parameters.
`fixed_lpf_tb` sets `DELAY` to cover both the I and the Q variant. Each
testbench finishes in well under a minute.

To change the configuration, edit these parameters:

- Tap counts and cutoffs: `TAPS`, `FC_KHZ`, `FS_KHZ` on `fixed_dc` and
  `polyphase_src`.
- Rate ratio: `L`, `M` on `polyphase_src`.
- Table size: `LUT_AW`, `LUT_W` on `nco` and `prog_dc`.
- AGC window: `LOG2_N` on `agc_meter`.
- Global widths: the constants in `ddc_pkg`.
