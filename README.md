# Differential phase monitor for a two-channel 3 GS/s receiver

A two-channel receiver drifts with temperature: the electrical length of each
analog path changes, and with it the phase of the signal each channel
delivers. A known single tone injected into both channels reveals that
drift. This RTL measures it on the fly, next to the sample stream. For each
channel it captures a burst of 8-bit samples, splits the burst into blocks of
M = 2400 samples, and estimates for every block the tone's amplitude,
frequency and the phase of the block's first sample. It then subtracts the
I and Q phases of each block pair. When that difference moves too far from
its starting value, an anomaly flag goes up. Each channel's phase is also
tracked on its own: every block's phase is moved back to the start of the
first block, and a change from block to block raises a per-channel flag. The output is a few numbers per
block instead of megabytes of raw samples, so only these results, or data
that was flagged, need to leave the board.

Phase is estimated in two stages:

1. **Closed form.** A cheap estimate comes from the zero crossings of the
   smoothed signal and the signal's energy.
2. **Refinement.** Three Newton-type passes over the block improve that
   estimate. Each pass compares the samples with a cosine built from the
   current estimate.

Everything is synthesizable SystemVerilog on a single clock. Every module has
a self-checking testbench. A full-size testbench runs the whole two-channel
design at its default sizes: 32,768 samples per channel and 13 blocks of
2400.

## Signal path of one channel

```
4 ADC buses --> iserdes x4 --> scrambler --> sample_fifo --> sample_mux --> write_sm --> sample_ram
 (Qd,Id,Q,I)     1:8            time order    256 x 1024     32:1           -127          2400 x 8
                                                                                              |
             res (A, f, phii, phic) <-- estimator <-- compute_arrays <-- read_sm <-----------+
                                        (Eq. 1-7)     (vb, N, jvz, C2)
```

`phase_channel` holds one such chain and sequences it. `data_fpga_top`
contains two channels (I and Q), `phase_diff`, and one `phase_track` per
channel.

### Capture

The ADC interleaves its samples over four 8-bit buses, named Qd, Id, Q and I.
Each bus carries one sample per clock edge.

- **`iserdes`** collects 8 beats of one bus into a 64-bit word. The RTL takes
  one beat per clock of the single design clock, so it models the
  deserializer's function, not its DDR I/O.
- **`scrambler`** reorders the 4 × 8 samples into a single 256-bit word in time
  order. Sample `4t + l` is beat `t` of bus `l`, with the buses taken in the
  order Qd, Id, Q, I. If the board wires the buses differently, only this
  index map changes.
- **`phase_channel`** waits for a trigger. From the next whole word on, it
  writes every word into **`sample_fifo`** (256 bits × 1024 words = 32,768
  samples) until the FIFO is full. Processing starts only then.

### Block processing

The channel processes one block at a time through a single 2400-sample RAM.
Stages are counted in clocks of the design clock:

| stage | module | clocks (M = 2400) |
|---|---|---|
| copy M samples FIFO → RAM, subtract 127 | `write_sm` + `sample_mux` | M + 1 = 2401 |
| boxcar, zero crossings, running sum of squares | `compute_arrays` (via `read_sm`) | M + 2 = 2402 |
| closed-form A, f, phii | `estimator` | ≈ 219 |
| 3 refinement passes | `estimator` + `cordic` | ≈ 252,000 |

At 60 MHz one block takes about 4.3 ms. The closed-form phase is ready about
2,600 clocks (45 µs) after the block reaches the RAM. With the default
`NUM_BLOCKS` = floor(32768 / 2400) = 13, a FIFO load gives 13 results per
channel. The remaining 1,568 samples are discarded. The channel then waits for
the next trigger.

**ADC code conversion.** `write_sm` converts the ADC's offset-binary code to
two's complement by subtracting 127. Code 255 would give +128, so it is
saturated to +127 to keep `v[]` at 8 bits.

**`read_sm`** supplies samples on request: `req` returns the sample of the
next address one clock later, with its index and a `last` flag. The same
read path serves the compute-arrays pass and each of the estimator's
refinement passes. Its `data` output is the RAM's registered read data,
passed on unchanged.

## The estimator: the hard part

The inputs to `estimator` come from one pass of `compute_arrays` over the
block `v[0..M-1]`:

- **Boxcar.** `vb[j] = (v[j-1] + v[j] + v[j+1]) / 3` for `j = 1..M-2`. The
  sign used for crossings is that of the undivided sum, which is the sign of
  the exact average.
- **Zero crossings.** A crossing is counted at `j` when `vb[j-1]` and `vb[j]`
  are on opposite sides of zero, with zero counting as positive. The pass
  keeps:
  - the count `N` (8 bits, saturating);
  - the first and last crossing index, `jf` and `jl`;
  - whether the last crossing was rising (negative to positive).
- **Energy.** The running sum `C2[j] = Σ v[i]²` over `i = 0..j`, in 26 bits,
  captured at `j = jl`.

### Closed form (Eq. 1–3)

Amplitude, frequency and phase are written here as this design evaluates them:

```
A     = sqrt( 2 · C2[jl] / (jl + 1) )                   peak amplitude, ADC LSBs
f/Fs  = (N - 1) / (2 · (jl - jf))                       N-1 crossings span jl-jf samples,
                                                        two crossings per period
phii  = 1/4 turn  (+ 1/2 turn if the last crossing rose)  -  2π · (f/Fs) · jl
```

The phase formula works like this. At a falling zero crossing, a cosine is at
phase +90°. At a rising crossing, it is at −90°. Walking back `jl` samples at
the estimated rate gives the phase of sample 0.

The mean-square term divides by the number of samples summed (`jl + 1`).
That makes `A` the peak amplitude in ADC LSBs.

### Refinement (Eq. 4–7)

Let `θm = phi + 2π · (f/Fs) · m`. One pass over the block computes

```
num = Σ sin θm · (v[m] - A cos θm)        den = Σ sin² θm        phi ← phi - num / (A · den)
```

For a signal `v = A cos(θ + d)` with a small offset `d`, `num/(A·den)` is
close to `d`. This is one Newton step on the phase. `N_ITER` = 3 passes start
from `phii`. The output `phic` is the phase after the last pass.

### Arithmetic

The method was specified with 32-bit floating point. This implementation is
integer-only:

- **Phases** are 32-bit binary angles: 2^32 is one full turn, so wrap-around
  costs nothing. `phase_inc` is `f/Fs` in the same units, so `θm` is a
  running 32-bit sum.
- **Amplitude** is unsigned 16.16 in ADC LSBs. **Frequency** is reported in
  Hz as `phase_inc · F_SAMP_HZ / 2^32`.
- **Sine and cosine** of `θm` come from `cordic`: a sequential 32-iteration
  core with 1.0 = 2^30 and a result 33 clocks after `start`. The estimator
  uses them as Q1.15.
- **Sums** `num` and `den` are 48-bit integers. `num` uses `v` scaled by 2^8
  minus `A·cos θm` at the same scale.
- **Correction.** The step is `|num| · K / (A · (den >> 16))` with
  `K = 2^39 / (2π)`. This one constant converts radians to binary angle and
  undoes the scalings.
- **Shared units.** All divisions share one restoring divider (`seq_divider`,
  88/64 bits), and the square root uses one `seq_sqrt`. This keeps the
  estimator at about 1,000 flip-flops at the cost of roughly 100 clocks per
  division.

If fewer than two crossings are seen, the frequency is 0 and the phase
outputs are meaningless. This is the case for a block shorter than one
half-period or a dead input.

### How accurate it is, and why

Crossing indices are whole samples. With a 62 MHz tone at 3 GS/s, about 99
crossings fall in a block. The span `jl - jf` (about 2,390 samples) is
therefore uncertain by about one sample, so `f/Fs` is uncertain by about
0.04%.

The refinement improves the phase but keeps the frequency fixed. The best
phase for a slightly wrong frequency is off by roughly the frequency error
times the block's mid-point index: 7.44° per sample × 1,200 samples × 1/2,390
≈ 3.7°.

Single-channel phases therefore scatter by a few degrees from block to block.
The scatter is systematic, not noise: it depends on where the crossings fall.
Both channels see the same tone, so most of it cancels in the I–Q difference.
In the full-size testbench, 10 of the 13 block differences land within 0.1°
of the true value. The other three are off by 0.7°, 3° and 4.5°, in blocks
where the two channels' crossings quantize differently. The test allows 4.5°
per channel and 9° on the difference.

Noise makes this worse. `tb_phase_accuracy` runs whole channels with block
lengths of 2^8, 2^10 and 2^12 samples. The input is a tone of amplitude 100
LSB plus white Gaussian noise. The bound is that of an ideal estimator with
known frequency, `1/sqrt(M · SNR)`.

| SNR | M = 256 | M = 1024 | M = 4096 | bound, M = 256 … 4096 |
|---|---|---|---|---|
| 20 dB | 2.5° rms | 2.2° rms | 3.1° rms | 0.36° … 0.09° |
| 10 dB | 15° | 16° | 9° | 1.1° … 0.28° |
| 5 dB | 77° | 56° | 76° | 2.0° … 0.5° |

At 20 dB the crossing quantization dominates, so a longer block does not
help. At 10 dB and below, noise near each true crossing makes the 3-point
boxcar change sign several times. The crossing count `N` grows, Eq. 2
overestimates the frequency, and the refinement cannot recover. The
estimator therefore needs a clean reference tone: roughly 20 dB SNR or
better at these block lengths.

A longer block or a finer crossing position would reduce the quantization
error. Examples of a finer position are interpolation between the two
samples around a crossing, or a frequency refinement pass. Neither is built
here.

## Phase difference and anomaly flag

`phase_diff` waits until both channels have delivered the result of the same
block number, in either order. It then outputs:

- `diff = phic_I - phic_Q` modulo one turn.

The first difference after reset or `diff_clear` becomes the reference. For
every later block it also outputs:

- `drift` = difference − reference;
- `anomaly` when `|drift|`, taken the short way round the circle, exceeds
  `diff_threshold`.

The threshold is a run-time input in binary-angle units. A sample dropped in
one channel shifts that channel's phase by `360° · f/Fs` (7.44° at 62 MHz).
This is the kind of event the flag is meant to catch.

## Single-channel drift: `phase_track`

Block `m` starts `m · M` samples after block 0. Even a perfectly stable tone
therefore gives every block a different starting phase. `phase_track`
removes that expected advance:

```
phic1 = phic - m · block_step            (mod one turn)
block_step = 2^32 · frac(M · f_ref / Fs)  binary angle, a run-time input
```

For a stable signal, `phic1` is the same for every block: the phase of the
first sample of block 0. At 62 MHz, M = 2400 and 3 GS/s, the step is 49.6
turns, so `block_step` is 0.6 turn (216°).

- **Reference.** The aligned phase of block 0 of each FIFO load is the
  reference.
- **Drift.** Every later block reports `drift = phic1 - reference`.
- **Anomaly.** The flag is raised when `|drift|` exceeds `track_threshold`,
  taken the short way round.

The step uses the nominal tone frequency, not the per-block estimate. The
estimate's small error (about 0.04%) multiplied by `m · M` samples would
amount to tens of degrees by the last block. The per-block phase scatter
described above shows up in `drift` as a few degrees. Set the threshold
above that: the testbench uses 11°.

## Top level: `data_fpga_top`

Ports, all on `clk` with active-low `rst_n`:

| port | dir | meaning |
|---|---|---|
| `adc_i_lanes`, `adc_q_lanes` | in | one beat of the four ADC buses (4 × 8 bits) per clock |
| `trigger` | in | start capture in both channels (sampled while idle) |
| `diff_threshold` | in | anomaly threshold, binary angle |
| `diff_clear` | in | restart the drift reference |
| `res_i`, `res_q` | out | per-block results (`est_result_t`): valid strobe, block number, A, f, phii, phic |
| `busy` | out | either channel is capturing or processing |
| `diff_valid`, `phase_diff_o`, `diff_blk` | out | I–Q difference of one block pair |
| `drift`, `anomaly` | out | difference minus reference; drift beyond threshold |
| `block_step` | in | phase advance of the reference tone over one block, binary angle |
| `track_threshold` | in | single-channel drift threshold, binary angle |
| `trk_i`, `trk_q` | out | per channel and block (`track_result_t`): valid, block, aligned phase `phic1`, drift from block 0, anomaly |

Parameters:

| parameter | default | meaning |
|---|---|---|
| `M` | 2400 | samples per block; must be a multiple of 32 and at most 4096 (12-bit indices, 26-bit unsigned C2) |
| `NUM_BLOCKS` | 13 | blocks processed per FIFO load |
| `FDEPTH` | 1024 | FIFO words of 32 samples |
| `N_ITER` | 3 | refinement passes |
| `F_SAMP_HZ` | 3·10^9 | sample rate, used only to scale the frequency output |

Shared types and widths are in `rtl/phase_pkg.sv`.

## Where this design departs from the method it implements

- **Arithmetic.** Fixed point and binary angles replace the 32-bit
  floating-point, divider, square-root and CORDIC vendor cores. Results are
  still 32-bit integers. The CORDIC, divider and square root are this
  design's own sequential cores.
- **Equations as written here.**
  - Eq. 1 divides by the number of samples summed, not by the crossing count,
    so that `A` is the peak amplitude.
  - Eq. 2 includes the factor 2 for two crossings per period.
  - Eq. 3 drops a whole number of turns, which changes nothing modulo 360°.
    It adds half a turn when the last crossing is rising.
  - The boxcar averages three consecutive raw samples.
- **No mean removal.** The samples are used as converted, with mid-scale
  code 127 taken as zero. No block mean is computed or subtracted, and no
  running sums other than `C2` are kept. An ADC offset therefore shifts
  the zero crossings, which adds a small error to the frequency and phase
  estimates.
- **Index width.** Crossing indices are 12 bits, not 8, because a 2400-sample
  block needs them. The crossing count stays 8 bits.
- **Clocking.** There is one clock. The ADC buses really run at 375 MHz DDR
  into 1:8 deserializers, with the processing at 60 MHz. Here `iserdes` is a
  behavioural-level shift register that takes one beat per clock. A real
  board needs the FPGA's deserializer primitives and a clock-domain crossing
  in front of the FIFO.
- **Sequencing.** Blocks are processed one after another through one RAM.
  `NUM_BLOCKS` = 13 is simply how many whole blocks a FIFO load holds.
- **Speed.** The per-block time is about 2.4 times shorter than the cycle
  counts the method reports: ~2,600 clocks to `phii` and ~255,000 to `phic`,
  against about 22,200 and 618,000 clocks at 60 MHz.
- **Reference and threshold policies.** Both the phase-difference stage and
  the drift tracker choose their own reference: the first block after clear,
  or block 0 of each load. Their thresholds are run-time inputs. These are
  this design's choices.
- **Block alignment in hardware.** The method removes the block-to-block
  phase advance to compare every block with the first one. That comparison
  was made offline, against a reference computed in software. Here it is
  done in hardware by `phase_track`, with the nominal tone frequency given
  as `block_step`.
- **Not included.** The ADC devices, the analog receive chain, the board's
  host and high-speed serial links, and the serial port that reports results
  are outside this RTL. Results appear on the top-level ports.

## Verification

Every module in `rtl/` has a testbench `tb/tb_<module>.sv`. The exceptions
are the package and the shared divider and square root, which are tested
through `tb_estimator`. Each testbench computes expected values
independently, checks them, and ends with a `TB_RESULT checks=<n>
failures=<n>` line.

| testbench | what it checks |
|---|---|
| `tb_iserdes`, `tb_scrambler`, `tb_sample_mux` | bit and sample order of random words |
| `tb_sample_fifo` | fill to full, drain, flush, simultaneous read/write, flags and count |
| `tb_sample_ram`, `tb_read_sm`, `tb_write_sm` | every address, conversion incl. saturation, cycle counts |
| `tb_compute_arrays` | vb, crossing count/indices/direction and C2 against a reference model, M + 2 clocks |
| `tb_cordic` | sin/cos over the full circle and quadrant edges |
| `tb_estimator` | A, f, phii, phic for several tones against the exact values; cycle budgets |
| `tb_phase_channel` | small channel (2 blocks, 160-word FIFO) triggered twice |
| `tb_phase_diff` | either arrival order, wrap-around, threshold in both directions, clear |
| `tb_phase_track` | alignment and drift for random block steps, jumps near and beyond the threshold, new reference per load |
| `tb_data_fpga_top` | the whole design at default sizes, see below |
| `tb_phase_accuracy` | phase error against block length (2^8, 2^10, 2^12) and SNR (20, 10, 5 dB), see above |

`tb_data_fpga_top` feeds both channels a 62 MHz tone at 3 GS/s with an I–Q
phase difference of 29.22°. It drops 3 samples from the Q stream during
blocks 3 and 4. It checks:

- every block's amplitude, frequency and phase in both channels;
- every difference;
- that the anomaly flag is raised for exactly the two shifted blocks;
- that both drift trackers return every block to block 0's phase, and that
  only the two shifted Q blocks are flagged.

It also counts how often each mechanism occurred: FIFO full, compute passes,
closed-form estimates, refinement passes, differences, tracked blocks and
both kinds of anomaly. It fails if any of them never occurred. The test
takes a few seconds; `tb_phase_accuracy` takes about half a minute.

`tb/tone_pkg.sv` holds the test tone generator and degree/binary-angle
helpers.

## Simulating with Verilator

The package must come first. The other modules are found through `-y`.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_data_fpga_top \
    -y rtl -y tb +libext+.sv rtl/phase_pkg.sv tb/tone_pkg.sv tb/tb_data_fpga_top.sv
./obj_dir/Vtb_data_fpga_top
```

Replace the top module and last file name for any other testbench. Keep
`tb/tone_pkg.sv` in the list: most testbenches import it, and it does no harm
to the rest. The RTL does not rely on initial values: every register that is
read before it is written is reset. Random initial values
(`+verilator+rand+reset+2`) exercise that.

To change the block length, set `M` on `data_fpga_top` or `phase_channel`.
`NUM_BLOCKS` should then be at most `32·FDEPTH / M`. The testbenches derive
their expected values from the package constants and the tone parameters.
