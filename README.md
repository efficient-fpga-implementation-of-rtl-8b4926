# CP-FSK baseband demodulator with digital timing and carrier recovery

This is a synthesizable SystemVerilog receiver core for binary continuous-phase
FSK (CP-FSK). It turns complex baseband samples (I/Q from a down-converter and
a dual ADC) into bits and a bit clock. It recovers symbol timing and carrier
frequency on its own, and it needs neither a clock locked to the transmitter
nor an accurate local oscillator.

- **Sampling:** the ADC clock is free-running, with exactly four samples per
  symbol nominally. The right instant inside each symbol is reached by
  interpolation, not by moving the sampling clock.
- **Carrier offset:** it is measured on the demodulated frequency and removed
  as a phase ramp.
- **Cost:** the core is built for a small, cheap FPGA. One constant
  multiplier per interpolator, a five-stage CORDIC instead of a multiplier
  tree, and no memories except one 64-word buffer.

The architecture is the one published in "Efficient FPGA Implementation of
the Basic Receiving Functions for Aeronautical Reconfigurable Data-Link".
That design ran on a Spartan II with a 40 MHz, 10-bit dual ADC, at 200 kbit/s
to 9 Mbit/s with modulation index h = 0.7. The fixed-point formats, the loop
gains, the pipelining and the handling of the fractional-delay wrap described
below are this implementation's own.

## Signal chain

```
             in_valid, i_in, q_in (10 bit, 4 samples/symbol)
                               |
                        input register
                     /                    \
          farrow_interp (I)        farrow_interp (Q)      <-- mu
                     \                    /
                  cordic_vectoring: phase (11 bit), magnitude
                               |
   carrier_nco phase --> freq_detector: subtract carrier phase,
                          difference, unwrap, x4  <-- dup/gap
                               |  freq, f*T in 1/2048 units
              +----------------+-----------------+
              |                |                 |
        bit_decision      gardner_ted       cic_moving_avg
        (sign at strobe)  (at strobe)       (1024 samples)
              |                |                 |
       bit_out, bit_clk   pi_loop_filter    pi_loop_filter
                               |                 |
                          timing_nco        carrier_nco
                   strobe, mu, dup, gap      phase -> freq_detector
```

All blocks take a `valid` qualifier and do nothing on the cycles between
samples. The core therefore runs from any clock at or above the sample rate.
Samples may arrive every cycle (up to 10 Mbit/s at 40 MHz) or one in fifty
(200 kbit/s at 40 MHz). Everything is in `rtl/`:

| File | Role |
|---|---|
| `cpfsk_pkg.sv` | widths, samples per symbol, pipeline latencies |
| `farrow_interp.sv` | cubic Lagrange interpolator, Farrow form, one per rail |
| `cordic_vectoring.sv` | phase detector: 5-stage unrolled vectoring CORDIC |
| `freq_detector.sv` | carrier phase removal, phase difference, unwrap, time scaling |
| `bit_decision.sv` | zero-threshold decision at the symbol strobe, bit clock |
| `gardner_ted.sv` | Gardner timing error, decimated at the strobe |
| `pi_loop_filter.sv` | proportional-plus-integral loop filter (both loops) |
| `timing_nco.sv` | interpolation control: strobe, fractional delay mu, wrap flags |
| `cic_moving_avg.sv` | 1024-sample moving average (residual carrier offset) |
| `carrier_nco.sv` | 24-bit phase accumulator for the carrier correction |
| `cpfsk_demod.sv` | top level |

## Number formats

| Signal | Format |
|---|---|
| `i_in`, `q_in` | 10-bit two's complement ADC codes |
| interpolated I/Q | 11 bits: ADC scale plus one bit for the overshoot of the cubic; saturating |
| phase | 11-bit two's complement fraction of a turn; -1024 is -pi |
| `freq` | 13 bits; value = f*T*2048, where T is the symbol period. With h = 0.7 the ideal symbol values are +-717. Range is +-2/T. |
| `mu` | 10-bit unsigned fraction of a sample period |
| timing NCO | 16-bit fraction of a sample period; nominal step 2^14, i.e. one strobe every 4 samples |
| `carrier_inc` | 24-bit carrier frequency word in 2^-24 turn per sample; f*T = `carrier_inc` * 4 / 2^24 |

## Interpolator: one constant multiplier per rail

The cubic Lagrange interpolator gives the signal at (m+mu)Ts from the samples
x(m-1), x(m), x(m+1) and x(m+2). Written as a cubic in mu, the coefficients of
the four taps take only the values 1, 1/2, 1/3 and 1/6. The multiplications
that remain are:

- **x/6:** one multiplication by the constant 43691/2^18, done once as a
  sample enters.
- **x/3:** twice x/6.
- **x/2:** a shift.

The x/6 product travels in its own delay line beside the sample. Every tap that
needs it reuses it. The polynomial in mu is then evaluated with the Horner rule
in three pipelined multiply-add stages. The latency is 5 cycles, and one sample
can be taken per cycle.

## Phase detector

This is a vectoring CORDIC with five unrolled stages (`cordic_vectoring.sv`).

- **Range extension:** the micro-rotations alone only reach about +-99
  degrees. Stage 0 therefore turns left-half-plane vectors by +-90 degrees
  and preloads that angle.
- **Precision:** the angle is accumulated with three guard bits and rounded to
  11 bits. x and y carry two extra fraction bits, so that small vectors keep
  their precision through the shifts.
- **Magnitude:** it keeps the CORDIC gain of 1.646 and is only brought out
  for observation. Its top bit is always zero for in-range inputs.
- **Timing:** the latency is 7 cycles.

## Frequency detector and the fractional-delay wrap

This is the subtle part of the design. In the normal case, `freq_detector`
subtracts the carrier NCO phase from each CORDIC phase. It then takes the
difference to the previous sample. Keeping that difference to 11 bits folds it
into [-pi, pi), which is the unwrap. Multiplying by 4 converts "turns per
sample" into "turns per symbol".

Interpolation breaks the assumption behind that difference. The timing NCO
changes mu only at a symbol strobe, and mu slowly drifts when the ADC clock is
not exactly four times the symbol rate. When mu wraps, the strobed sample and
the sample before it are interpolated with delays that differ by almost a
whole sample period. There are two cases:

- **dup:** mu falls from near 1 to near 0. The two samples lie at almost the
  same instant, and their phase difference is about zero. The detector
  differences the raw phase against the sample two back instead.
- **gap:** mu rises from near 0 to near 1. The two samples lie two periods
  apart, so the difference is doubled. The detector removes two correction
  steps and scales by 2 instead of 4.

`timing_nco` raises these flags when mu jumps by more than half a sample at a
strobe. They travel with the sample through the pipeline, in a tag shift
register in `cpfsk_demod`. The carrier correction advances by one step per
input sample, whatever the spacing of the interpolated instants. For that
reason, the raw phase and the correction phase are differenced separately.

Without this handling, a wrap corrupts the strobed frequency sample. With a
large carrier offset, that flips the decided bit. With it, the end-to-end test
runs error-free with a 225 kHz offset at 200 kbit/s and 0.25 % clock drift at
the same time.

`gardner_ted` uses the same flags. On such a strobe it picks its half-symbol
and previous-symbol samples one position further back (dup) or nearer (gap).

## Timing recovery loop

The Gardner detector works on the demodulated frequency. The frequency is
non-data-aided and crosses zero between unlike symbols.

- **Error:** for every sample, the detector forms
  `(y(n) - y(n-4)) * y(n-2)`. The error at the strobed sample is kept; that is
  the decimation to one error per symbol. It is scaled by 2^-10 and saturated
  to 16 bits.
- **Filter:** `pi_loop_filter` gives
  `v = (TKP*e + sum(TKI*e)) / 2^TSHIFT`.
- **NCO:** `timing_nco` counts a 16-bit modulo-1 register down by
  `2^14 + v` per sample. The underflow is the strobe, and mu = 4 * eta is
  taken just before it. A positive v shortens the symbol.

The defaults are `TKP = 2080`, `TKI = 16` and `TSHIFT = 14`. These give unit
damping and a noise bandwidth near 1 % of the symbol rate.

The published design targets 0.5 %. In this fixed-point loop, 0.5 % (`TKP =
1040`, `TKI = 4`) tracks drifts of up to about 0.5 %. It did not pull in the
1 % clock error that the published design also claims to handle. The
bandwidth was doubled to meet that claim. Halve `TKP` and divide `TKI` by 4 to
return to the narrower loop.

## Carrier recovery loop

For random, balanced data the demodulated frequency averages to the residual
carrier offset. `cic_moving_avg` forms the mean of the last 1024 samples (256
symbols):

- a single integrator;
- decimation by R = 16;
- a comb with M = 64 stored values, held in a small circular-buffer memory.

Its output feeds `pi_loop_filter` (`CKP = 512`, `CKI = 16`, no shift). That
gives the frequency word of `carrier_nco`. The top 11 bits of the 24-bit
accumulator are the correction phase.

The published loop targets damping 1/sqrt(2) and a noise bandwidth of 5 % of
the symbol rate. A loop that fast is not stable around a 256-symbol moving
average, which delays the estimate by half a window. The gains here instead
settle an offset of 1.15/T within a few hundred symbols. That is 70 % of the
largest offset the discriminator can track, (1 - h/4) * 2/T = 1.65/T. The
residual error is well inside the lock criterion of 1/16 of the symbol rate.
The estimate is never exactly zero error, because a finite window of symbols
is never perfectly balanced.

## Pipeline timing

| Point | Cycles after the `in_valid` cycle |
|---|---|
| input register | 1 |
| interpolators | 1 + 5 |
| CORDIC | 6 + 7 |
| frequency word (`freq`, `smp_valid`) | 15 |
| `bit_valid` / `bit_out` | 16 (once per symbol) |

- The timing NCO decides the strobe for a sample in the cycle the sample is
  registered.
- The strobe and the dup/gap flags ride along in a shift register. This keeps
  each decision on exactly the sample the strobe marks.
- Both loops close through these pipelines. Their delay counts in samples
  only when samples arrive every cycle. At lower input rates the loop delay
  in samples is shorter.

`bit_clk` rises with each decision and stays high for two samples.
`sym_strobe`, `mu`, `ted_err`, `freq`, `magnitude`, `i_interp` and
`carrier_inc` are there for observation, as on a logic analyser.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the
block's outputs against a model computed independently in the testbench:

- real-valued Lagrange interpolation and `atan2`, with tolerances;
- exact integer models for the frequency detector, TED, loop filter, NCOs
  and moving average.

The testbenches also check latencies. Each prints
`TB_RESULT checks=N failures=M`.

`tb_cpfsk_demod` runs the top level at its default parameters. It contains a
behavioural CP-FSK transmitter: h = 0.7, a PN11 sequence (x^11 + x^9 + 1), an
amplitude of 400 LSB, and a chosen carrier offset, start timing offset and
clock error. Its scenarios are:

- +-1.125/T carrier offset (225 kHz at 200 kbit/s) with +-0.25 % clock drift,
  and 0.3/T with -0.25 %;
- +-1 % clock error alone, with one sample per clock;
- a carrier step of 1.155/T alone, with one sample every 10 clocks;
- a timing step alone.

In each scenario, the last 1000 bits must satisfy the PN11 recurrence, and the
bit count must match the symbol count. The carrier estimate must lie within
1/16 of the symbol rate. The test also counts 3- and 5-sample strobe periods,
mu wraps, carrier locks and non-zero timing errors. Each of these must occur.

The channel in these tests has no noise, so no bit error rates under noise
were measured.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_cpfsk_demod \
    -y rtl +libext+.sv -Irtl rtl/cpfsk_pkg.sv tb/tb_cpfsk_demod.sv
./obj_dir/Vtb_cpfsk_demod            # add +trace for per-symbol prints
```

Any other testbench works the same way: replace `tb_cpfsk_demod` with its
name. The full end-to-end test takes well under a second.

## Departures and limits

- **Loop gains:** these are this design's own. The timing loop is about twice
  as wide as the published target, and the carrier loop is slower than its
  published target. See the two loop sections above.
- **Wrap flags:** the dup/gap handling of the fractional-delay wrap in the
  frequency detector and the TED is an addition.
- **Carrier correction:** it is applied to the phase after the CORDIC, inside
  the frequency detector, as a phase subtraction.
- **Moving-average split:** R = 16 by M = 64 is a choice. Any split with
  R*M = 1024 samples keeps the window. A larger M costs memory, and a larger R
  delays the estimate updates.
- **Not included:**
  - the RF front end and ADC;
  - the logic that sets the data rate from a microcontroller;
  - a bit-error-rate tester.

  The core expects samples already at four per symbol, qualified by
  `in_valid`.
- **Synthesis:** the RTL has not been placed and routed on an FPGA here.
  Generic synthesis gives about 1300 flip-flop bits and a 1472-bit memory for
  the moving average. The reachable clock rate is unknown.
- **Reset:** asynchronous, active low. After reset the moving average treats
  its not-yet-filled window as zeros.
