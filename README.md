# Cyclostationary spectrum sensor with a resource-shared 2048-point FFT

A cognitive-radio secondary user may transmit in a licensed band only while the
primary user is absent, so it has to decide quickly, and at low signal-to-noise ratio,
whether the band is occupied. This design does that with cyclostationary feature
detection (CFD) in the frequency domain. Man-made signals are cyclostationary: the
lag product `x(n)·conj(x(n−μ))` of a modulated signal has spectral lines at its cyclic
frequencies, and stationary noise has none. The sensor forms that lag product over a
frame of N = 2048 samples and takes its FFT. It then checks whether the bin at the
cyclic frequency α stands out from the spread of all the bins. The result is a
test statistic `Tc`. Under noise alone `Tc` is about chi-square with two degrees of
freedom, so a fixed threshold sets the false-alarm rate.

Most of the hardware is in the FFT. Its 1024 butterflies per stage and 11 stages are
folded onto **one stage of 64 butterfly units**, which is reused 16 times per stage
and 11 times per frame. All storage is flip-flop registers, with no RAM.

## Block diagram

```
 x(n) 16+16 bit                                      +-> mac_unit W = mean(Re F)^2 --+
 ---> acm -------------> fft_core ----- F(k)/N ------+-> mac_unit X = mean(Re F Im F)+-> tscm --> tc, detect
      delay_fifo         fft_ctrl       one bin      +-> mac_unit Z = mean(Im F)^2 --+    Tc = r S^-1 r^T
      ccm, cmul16        64 x bcu       per cycle    +-> freq_select r = F(alpha) ---+
                         64 x twiddle_lut
```

| module | role |
|---|---|
| `cfd_sensor` | top level: framing, the chain above, observation ports |
| `acm` | autocorrelation module: `y(n) = x(n)·conj(x(n−MU))`, built from `delay_fifo`, `ccm` and `cmul16` |
| `fft_core` | shared-stage FFT, input register, output memory and read-out |
| `fft_ctrl` | controller of the FFT: load, compute passes, read-out |
| `bcu` | butterfly computation unit: input registers, butterfly, twiddle multiplier, halving |
| `twiddle_lut` | per-BCU twiddle table with a stage multiplexer (11:1) and a cycle multiplexer (16:1) |
| `mac_unit` | multiply-accumulate over the N bins, giving the block mean |
| `freq_select` | frequency selection: captures the bin at `alpha` |
| `tscm` | test statistic and threshold compare |
| `cfd_pkg` | shared types (`cplx16_t`, `cplx32_t`, `fft_phase_t`), formats, twiddle and bit-reverse functions |

## Number formats

* Input `x(n)`: 32 bits, as 16-bit two's-complement I and Q (`cplx16_t`).
* Lag product and all FFT data: 64-bit words with 32-bit parts (`cplx32_t`). The
  33-bit products of the 16-bit multiplier are saturated to 32 bits. The conjugate of
  −32768 saturates to +32767.
* Twiddles: 16-bit Q2.14, rounded, computed at elaboration from `$cos`/`$sin`. No
  table file is needed.
* FFT output: every butterfly halves its outputs, so the FFT returns `DFT(y)/N`.
* Covariance entries W, X, Z: 64-bit signed. Each is the mean over the N bins.
* `Tc` and `threshold`: unsigned Q16.16. `Tc` saturates at 2^32−1.

## The shared FFT stage (the part to read carefully)

**Constant geometry.** In the usual in-place FFT, the butterfly wiring changes from
stage to stage. Reusing one physical stage is then awkward. This design computes
decimation in frequency in constant-geometry (Pease) form. In *every* stage, butterfly
`j` (0 ≤ j < N/2):

* reads words `j` and `j + N/2`;
* writes `(a+b)/2` to word `2j` and `((a−b)/2)·W_N^k` to word `2j+1`;
* uses the exponent `k = (j >> s) << s`, where `s` is the stage number.

Only the twiddle depends on the stage. After log2(N) stages, bin `k` of the transform
is in word `bitrev(k)`.

**Folding onto P butterfly units.** With P = 64 BCUs, BCU `b` performs butterfly
`j = c·P + b` in cycle `c` = 0 … 15 of a stage (CYC = N/(2P) = 16). So:

* each BCU input chooses from 16 fixed register words: a 16:1 multiplexer driven by
  the cycle count;
* the 64 BCUs have 128 such inputs in total;
* each BCU's twiddle table holds 11 × 16 entries. It is read through a 16:1 multiplexer
  on the cycle and an 11:1 multiplexer on the stage.

**Registers as memory.** There are two banks of N 64-bit words. Bank A is the input
register: the serial-to-parallel converter writes one sample per cycle into it. Even
stages read A and write B. Odd stages do the reverse. After the 11th stage the result
is in bank B, which then acts as the output memory. It is read one bin per cycle in
natural order through a bit-reversed address. Each bank word is written by exactly one
BCU output in exactly one cycle of a stage. The write logic is therefore one enable
per word, with no address decoder.

**Timing of a stage.** BCUs register their operands and twiddle in the read cycle. The
results are written one cycle later. A stage therefore takes CYC + 1 = 17 cycles: the
extra cycle lets the last write land before the next stage reads the bank. An
assertion in `fft_core` checks this. A whole transform takes 11 × 17 = 187 cycles.

## Test statistic

`freq_select` gives `r = (r1, r2) = (Re F(α), Im F(α))`. It finds the bin with a 16-bit
counter that follows the output stream. The three MAC units give the 2×2 covariance
`S = [[W X][X Z]]` of the real and imaginary parts of the bins. `tscm` evaluates

```
Tc = r·S⁻¹·rᵀ = (r1²·Z − 2·r1·r2·X + r2²·W) / (W·Z − X²)
```

It uses eight multipliers in two ranks: r1², r2², r1r2, WZ, X², then r1²Z, r1r2X and
r2²W. It also uses two subtractors, one adder, a left shift for the factor 2, and a
restoring divider that produces one quotient bit per cycle. `detect = Tc > threshold`.

Special cases:

* A singular covariance gives 0 when the numerator is 0, and saturation otherwise.
* A negative numerator is clamped to 0. Only rounding can make the numerator negative.

## Interface and timing of `cfd_sensor`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `x_in`, `in_ready` | in/in/out | 1/32/1 | sample stream; a sample is taken when both valid and ready are high |
| `alpha` | in | 16 | FFT bin of the cyclic frequency (hold stable during a frame) |
| `threshold` | in | 32 | Q16.16 decision threshold |
| `tc_valid`, `tc`, `detect` | out | 1/32/1 | per-frame result |
| `stat_valid`, `r1`, `r2`, `cov_w`, `cov_x`, `cov_z` | out | | intermediate per-frame values, for observation |

Parameters:

* `N` (2048): FFT size and frame length.
* `P` (64): number of BCUs. Must be a power of two, at most N/2.
* `MU` (4): lag.

A frame is N accepted samples. `in_ready` drops after the N-th sample and rises again
when the FFT has read out all its bins. The next frame can then load while the divider
is still working on the previous result.

For a frame streamed without gaps, `tc_valid` rises 4321 cycles after the clock edge
that takes its first sample:

| step | cycles |
|---|---|
| input | 2048 |
| ACM register | 1 |
| 11 FFT passes | 187 |
| read-out | 2048 |
| closing the MAC sums | 1 |
| test statistic | 36 |
| **total** | **4321** |

A sensing time of 0.3 ms per frame therefore needs a clock of at least about 14.4 MHz.

Resources: about 2 × 2048 × 64 = 262,144 bits of data registers, 64 BCUs with four
32×16 multipliers each, three 32×32 MACs and the eight-multiplier statistic unit.
For comparison, the original FPGA implementation of this architecture reported about
597,000 registers, about 415,000 logic elements and no block memory. That
implementation's register organisation is not known in detail, so the register counts
of the two should not be expected to match.

## Where this design makes its own choices

The overall structure comes from the original description of the sensor: ACM with
FIFO, conjugator and 16-bit multiplier; a 2048-point radix-2 FFT with 11 stages folded
onto 64 BCUs with twiddle LUTs and 11:1/16:1 multiplexers, fed from a 2048-word
serial-to-parallel input register and kept in registers only; three MAC units and a
frequency selection module with a 16-bit counter in parallel; and a statistic unit of
eight multipliers, two subtractors, an adder, a shifter and a divider.

That description does not specify the following, which this design chose:

* **Lag μ.** `MU = 4`, a parameter.
* **Framing and handshake.** `in_valid`/`in_ready`, exactly N samples per frame.
* **Stage folding.** The constant-geometry ordering, the ping-pong banks, the drain
  cycle per stage and the bit-reversed read-out.
* **Arithmetic.** Halving in every butterfly (the "truncation unit"), Q2.14 twiddles,
  truncation then saturation in the twiddle product, and saturation of the lag product.
* **MAC contents.** The MACs compute the covariance of the bins' real and imaginary
  parts over *all* N bins (including α), as block means.
* **Statistic formula.** The closed form of `r·S⁻¹·rᵀ` was chosen because it uses
  exactly the listed parts.
* **Output formats.** Q16.16 `Tc`, the divider algorithm and the degenerate-case
  handling.
* **Decision.** The compare with a threshold input was added. The original chain ends
  at `Tc`.
* **Reset.** Control and result registers reset asynchronously. The FFT data banks and
  BCU operand registers are not reset, because they are always written before being
  read.

Other departures and limits:

* The reference evaluation used OFDM signals, 1000 trials per SNR point from −26 dB to
  0 dB, and 1024-, 2048- and 4096-point FFTs. The sweep here uses a real tone, whose
  lag product has a line at α = 2·k0. It runs 20 trials per point at the default
  N = 2048 only.
* Sizes 1024 and 4096 are available through the parameter `N`. The whole sensor has
  been simulated at N = 1024 and N = 4096, with one tone frame and one noise frame
  each. The FFT alone has also been simulated at N = 256, and the controller at
  N = 64.
* The quoted 0.3 ms sensing time cannot be checked without a clock frequency. The
  cycle count above is exact.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what is checked |
|---|---|
| `tb_ccm`, `tb_cmul16` | exact results against integer arithmetic, including extreme operands |
| `tb_delay_fifo`, `tb_acm` | exact delayed value and lag product with random input gaps; one-cycle latency |
| `tb_twiddle_lut` | all 11 × 16 entries of three BCU tables at N = 2048 against `cos`/`sin` |
| `tb_bcu` | exact butterfly, truncation and saturation |
| `tb_fft_ctrl` | load addresses, stage and cycle order, read/write bank alternation, 6 × 9 compute cycles, read-out order (N = 64, P = 4) |
| `tb_fft_core` | every bin against a real-arithmetic DFT/N for random, tone and impulse frames; bin numbering; latency; stage count (N = 256, P = 8) |
| `tb_mac_unit`, `tb_freq_select` | exact block means; the captured bin for various α, including one outside the frame |
| `tb_tscm` | exact `Tc` against 256-bit integer arithmetic, saturation and singular cases, latency 36/4 |
| `tb_cfd_sensor` | the whole sensor at default size (see below) |
| `tb_snr_sweep` | detection probability against SNR at default size |
| `tb_fft_sizes` (with `size_case`) | the sensor at N = 1024 and N = 4096: decisions and latency (2176 and 8626 cycles) |

`tb_cfd_sensor` runs four frames at the default size: tone, noise, weaker tone with
input gaps, and noise with input gaps. It compares r, W, X, Z and Tc with an
independent floating-point model (Tc agrees to about 10⁻⁵). It checks the decisions
and the 4321-cycle latency. It also confirms that back-pressure, all 11 FFT passes,
the frequency-selection hit, detection, non-detection, and loading during the divide
each happened.

`tb_snr_sweep` results:

* detection probability 1.0 at −5 dB and above, 0.9 at −8 dB, about 0 below −12 dB;
* no false alarms in the noise-only frames.

To run a testbench with Verilator, pass the package first:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          --top-module tb_cfd_sensor rtl/cfd_pkg.sv tb/tb_cfd_sensor.sv
./obj_dir/Vtb_cfd_sensor
```

The full-size end-to-end test compiles in about half a minute and simulates in under
a second. The SNR sweep simulates in about a minute. Lint with
`verilator --lint-only -Wall -y rtl rtl/cfd_pkg.sv rtl/cfd_sensor.sv`. The remaining
warnings are unused low or high bits of intermediate products and the reset used in
assertion `disable iff` clauses.
