# Noise standard-deviation estimators: median, RMS and P84

Many signal-processing chains (spike detection, wavelet denoising,
communication receivers) need a running estimate of the standard deviation
σ of additive white Gaussian noise to set a threshold. This RTL holds three
classic ways of estimating σ from a sample stream. They trade accuracy
against area, speed and power very differently:

| estimator | principle | cost grows with the window |
|---|---|---|
| **median** | σ ≈ median(\|x\|) / 0.6745 over a moving window | steeply: one full sorting network per window |
| **RMS** | σ ≈ sqrt(mean of x² over a moving window) | hardly: one multiplier, one square root, a delay line |
| **P84** | σ is the level that 15.9 % of the samples exceed; a feedback loop searches for it | not at all: two counters and a small controller |

The three sit side by side in `sd_estimators_top` on one input stream, each
with its own output, so that they can be compared on identical data or one of
them taken alone. The architecture follows the published FPGA comparison
of these three estimators (Bamerni and Al-Sulaifanie, "Field programmable gate arrays
implementation of different standard deviation estimation techniques",
2022). Number formats, handshakes, timing details and a few constants are this
design's own; they are listed under
[Where this design chooses for itself](#where-this-design-chooses-for-itself).

## Number formats and interface

All three estimators share one interface and one format (`rtl/sd_pkg.sv`):

* **Input** `x_in`: signed, 15 bits, 8 fractional bits (range −64 … +63.996,
  step 1/256). It is accepted in any cycle with `in_valid` high; with
  `in_valid` low nothing moves. At full rate the design takes one sample
  per clock.
* **Output** σ: unsigned, 16 bits, 8 fractional bits. A value of 256 means σ = 1.0.
* **Reset**: `rst_n`, active low, synchronous.

| top-level port | meaning |
|---|---|
| `sigma_median`, `median_valid` | median estimate; valid from the `MED_N`-th sample on |
| `sigma_rms`, `rms_valid` | RMS estimate; valid from the `RMS_N`-th sample on |
| `sigma_p84`, `p84_update` | P84 estimate; `p84_update` pulses when it changes (once per frame) |

| top parameter | default | meaning |
|---|---|---|
| `MED_N` | 32 | median window (power of two) |
| `RMS_N` | 32 | RMS window (power of two) |
| `P84_M` | 16 | P84 frame length |
| `P84_K_Q8` | 16 | P84 controller gain K in units of 1/256 (K = 1/16) |

The defaults are the window sizes at which each method was found most
accurate: 32 for the median method, 32 to 64 for RMS, and a 16-sample frame
for P84.

**Timing.** The median and RMS outputs are combinational from their window
registers. They change right after the clock edge that accepts a sample and
already include that sample. Both valid flags rise with the N-th accepted
sample, when the window is full for the first time, and stay high until reset.
Before that the outputs are computed over a window padded with zeros. The P84
estimate is registered. It changes once per frame, one clock after the edge
that accepts the frame's last sample.

## Median estimator (`median_estimator`)

```
x -> |x| -> N-deep serial-to-parallel register -> sorting network
           -> (middle-low + middle-high) -> ×1/2 -> ×1.48 -> σ
```

Each accepted sample is rectified and shifted into an N-entry window register.
A purely combinational sorting network orders the window on every cycle. For
even N the median is the mean of the two middle outputs. The factor 1.48
(≈ 1/0.6745) turns the median absolute value of Gaussian noise into σ. In the
RTL it is the constant 24248/16384 = 1.47998 (`GAIN_Q14`), and the product is
rounded half-up to 8 fractional bits. Only the window is registered. The
comparator tree has no pipeline stages.

### The sorting network (`sorting_network`, `compare_swap`)

The network is Batcher's odd–even merge sort, made of `compare_swap` cells.
Each cell outputs the lower of its two inputs on `low` and the higher on
`high`. For 8 inputs it is the familiar 19-cell network in 6 columns:

```
column 1: (1,2) (3,4) (5,6) (7,8)      sort pairs
column 2: (1,3) (2,4) (5,7) (6,8)      merge pairs into fours
column 3: (2,3) (6,7)
column 4: (1,5) (2,6) (3,7) (4,8)      merge fours into eight
column 5: (3,5) (4,6)
column 6: (2,3) (4,5) (6,7)
```

`sorting_network` generates the same structure for any power-of-two N. Column
(p, k), with p = 1, 2, 4, … N/2 and k = p, p/2, … 1, compares elements i and
i+k when (i − k mod p) mod 2k < k and both lie in the same block of 2p
elements. All other elements pass through unchanged. There are log2 N ·
(log2 N + 1)/2 columns. The number of cells grows faster than N, which is
the reason large windows are impractical:

| N | 8 | 16 | 32 | 64 | 128 | 256 |
|---|---|---|---|---|---|---|
| cells | 19 | 63 | 191 | 543 | 1471 | 3839 |
| columns (logic depth) | 6 | 10 | 15 | 21 | 28 | 36 |

Out of 32 sorted outputs, only the middle two are used. Synthesis prunes the
cells that cannot reach them, but most of the network remains. The window
size is fixed when the design is built. Changing it means a different network,
unlike the P84 frame length, which is just a counter limit.

## RMS estimator (`rms_estimator`, `isqrt`)

```
x -> x² --+--> (+) ---> S ---> >>log2 N ---> sqrt ---> σ
          |     ^       |
          |     +-- (−) <-- S delayed by one sample (Z^-1)
          +--> N-deep delay line (Z^-N) --^   (the square that leaves the window)
```

The window sum is kept recursively: S[n] = x[n]² + S[n−1] − x[n−N]². The
window therefore costs one adder and subtractor whatever N is, plus N stored
squares. The squares are 30 bits wide with 16 fractional bits. The delay line
is a circular buffer (a memory of N words with one read and one write per
sample), so it needs no reset. Instead, a fill counter forces the subtracted
term to zero until N samples have entered. Dividing by N is a right shift,
so N must be a power of two. `isqrt` is an exact restoring square root,
one result bit per step, combinational. Taking the root of a mean square
with 16 fractional bits gives σ with 8 fractional bits. The result is the
floor of the exact root of the truncated mean.

The multiplier and the 15-step square root are the long paths of this
estimator. In an FPGA the square maps onto one DSP multiplier.

## P84 estimator (`p84_estimator` and its parts)

This is the smallest estimator and the least obvious one. For zero-mean
Gaussian noise, P(x > σ) = 0.159. If an estimate s is too low, more than
15.9 % of the samples exceed it. If it is too high, fewer do. The loop counts
exceedances over a frame of M samples and steers s until the count averages
0.159·M. The method was first built as an analog circuit (comparator, RC
low-pass filter, subtractor, op-amp PI controller). This is the digital
version:

```
               +-----------------------------------------------+
               v                                               |
x --> COMP (x > s) --> Counter 2 --> Buffer --(+)--> error --> D --> I --> P --> s
                          ^  rst       ^ en   (−)0.159·M         en     en    en(+1 clk)
Counter 1 (mod M) --------+------------+-------------------------+------+------+
```

| block | module | what it does |
|---|---|---|
| Counter 1 | `p84_window_counter` | counts accepted samples modulo M; `frame_end` marks the M-th |
| COMP + Counter 2 | `p84_ones_counter` | counts samples strictly above s in the frame (replaces the analog low-pass filter) |
| Buffer and subtractor | `p84_error` | holds the frame's count and forms e = count − 0.159·M |
| D | `p84_differentiator` | d[k] = e[k] − e[k−1]/2 |
| I | `p84_integrator` | running sum I[k] = I[k−1] + d[k], saturating |
| P | `p84_proportional` | s = K·I[k], clamped to [0, 65535/256] |

**Why this is a PI controller.** In series, the chain gives
s[k] = s[k−1] + K·(e[k] − e[k−1]/2), which is the velocity form of a PI
law. Each frame applies a proportional kick K·e[k] and keeps half of the
previous one as integral action. A positive error (too many samples above s)
raises s.

**Fractional reference.** For M = 16 the target count 0.159·16 = 2.544 is
not an integer. The error therefore carries 8 fractional bits, and the
reference is round(0.159·M·256) = 651 for M = 16.

**Frame timing.** Counter 2's output includes the sample being accepted. At
the edge that accepts a frame's last sample, the buffer therefore receives
the complete count while Counter 2 restarts. The same edge loads the
differentiator's previous-error register and the integrator's running sum.
The proportional register loads one clock later, when the buffer already
holds the new count. So s changes once per frame and stays constant
within it, and the loop has one frame of delay. The first sample of a frame
is still compared with the previous estimate. After reset s = 0, and the
loop climbs from there. With σ = 1 it settles within a few tens of frames.

**Choosing K.** The loop gain per frame is roughly
g = K·M·φ(1)/σ = K·M·0.242/σ. With this controller the loop is stable for
0 < g < 4/3. With the default K = 1/16 and M = 16, g ≈ 0.24/σ, so the loop
is stable and well damped for σ above about 0.2 (in sample units). A larger
K tracks faster but jitters more. The gain scales with M. With K fixed, frames
of 64 samples and more overshoot and oscillate for small σ. The benchmark
below shows this: estimates from 128- and 256-sample frames are far off. To use
long frames, reduce `P84_K_Q8` roughly in proportion to 1/M. The loop has
69 flip-flops at the defaults.

## Where this design chooses for itself

The published architecture fixes the block structure of all three estimators,
the 15-bit input format with 8 fractional bits, the constants 1.48, 0.159 and
1/2, and the window sizes. The following are this design's own choices:

* The `in_valid` strobe, the synchronous active-low reset, and the 16-bit
  output format with 8 fractional bits.
* Valid flags and zero-padding before the first full window.
* The scale factor 1.48 of the median path. The exact value 1/0.6745 = 1.4826
  would read 0.2 % higher.
* Rounding: half-up in the median path, floor in the RMS path,
  floor(e/2) in the differentiator.
* Powers of two only for the median and RMS windows. The sorting network
  generator and the shift used for 1/N both require it.
* The RMS delay line as a circular buffer, gated by a fill counter.
* The P84 gain K = 1/16. The published design leaves K open.
* A saturating integrator, an estimate clamped at 0, and the one-clock
  offset of the proportional register.
* Combinational median and RMS outputs, with no pipelining. For a higher
  clock rate, add pipeline registers inside the sorting network or the square
  root. A valid signal must then follow the data through them.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. All testbenches have a watchdog.

* `tb_compare_swap`, `tb_sorting_network` (8 and 32 inputs, against an
  insertion sort), `tb_isqrt` (r² ≤ v < (r+1)²): exact checks.
* `tb_median_estimator`, `tb_rms_estimator`: every output on every clock
  against a model of the window. Both default windows and one smaller window
  are checked, with gaps in `in_valid` and full-scale samples. The valid flag
  must rise with exactly the N-th sample.
* `tb_p84_*`: each loop block against its equation, including integrator
  saturation. `tb_p84_estimator` compares the whole loop cycle by cycle
  with a model. It also checks that updates come every M clocks and that the
  estimate converges to within 15 % for σ = 0.5, 1.0 and 1.5. Measured: 0.52, 1.01, 1.52.
* `tb_sd_estimators_top`: the whole design at its default sizes, with Gaussian
  noise at σ = 0.5, 0.8, 1.2 and 1.5 (4096 samples each) and random input
  gaps. It checks the median and RMS outputs exactly on every clock, the mean
  of each estimator per level, and that every mechanism occurs: window fill,
  samples leaving the window, input gaps, and P84 updates in both directions.
* `tb_benchmark_workloads`: the standard wavelet test signals Blocks, Bumps,
  HeavySine and Doppler (4096 samples each, Donoho–Johnstone definitions).
  White noise of σ = 0.5 … 1.5 is added and one Haar level applied, and the
  2048 detail coefficients go through five copies of the top with windows of
  16, 32, 64, 128 and 256. It prints the mean and the mean squared error of
  every estimator.

Typical benchmark results (Blocks, σ = 0.8; mean / MSE):

| window | median | RMS | P84 |
|---|---|---|---|
| 16 | 0.840 / 0.052 | 0.801 / 0.024 | 0.791 / 0.017 |
| 32 | 0.833 / 0.029 | 0.808 / 0.012 | 0.796 / 0.017 |
| 64 | 0.827 / 0.014 | 0.812 / 0.006 | 0.783 / 0.048 |
| 128 | 0.820 / 0.007 | 0.815 / 0.003 | 1.34 / 1.42 |

With a longer window, the median and RMS errors shrink. The P84 loop works
best with short frames and, at the fixed gain, fails from 128 samples on.

## Simulating

Each testbench builds with plain Verilator 5 from the project root, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/sd_pkg.sv tb/tb_util_pkg.sv tb/tb_sd_estimators_top.sv \
    --top-module tb_sd_estimators_top
./obj_dir/Vtb_sd_estimators_top
```

To build another testbench, substitute its name. The test-only packages are
`tb/tb_util_pkg.sv`, which provides a Gaussian generator (Box–Muller on
`$urandom`) and sample quantisation. Every estimator takes its window or frame
size as a parameter, so a different size needs only a parameter override.
