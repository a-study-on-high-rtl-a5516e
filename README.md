# GMET receiver back end: joint CDR and DFE adaptation by climbing the eye

A baud-rate wireline receiver has to find two kinds of settings while it
runs: the clock phase at which it samples, and the feedback weights of its
decision-feedback equalizer (DFE). The two interact. Moving the phase changes
every cursor of the channel's pulse response, and so the best DFE weights; the
weights in turn change where the eye is tallest. The usual solutions use a
separate rule for each: a Mueller-Müller phase detector for the clock and
sign-sign LMS for the taps. Or they sweep the eye exhaustively.

This design uses one rule for all of them, gradient maximum-eye tracking
(GMET). A single measured quantity stands in for the vertical eye height:
the *biased data level* (Bdlev). Every control code (the interpolator phase,
tap 1, tap 2) is nudged one LSB at a time in whichever direction last made
Bdlev grow. The size of the last Bdlev change sets how long the loop waits
before its next nudge. Far from the optimum the eye changes steeply, so the
codes move quickly. Near the optimum the slope flattens, the waits grow, and
the codes dither slowly. Noise on the measurement then barely moves them.

The RTL here is the digital part of such a receiver. It targets a
quarter-rate front end for 28 Gb/s: four slices at 7 GHz, each with a data
comparator and an error comparator, a 2-tap DFE, and a 7-bit phase
interpolator. The analog parts are not RTL. These are the termination, CTLE,
CML summers, StrongARM comparators, current and voltage DACs, the
interpolator itself and the clock buffers. The top module takes the
comparator decisions as inputs and drives the control words of all those
parts as outputs.

## Biased data level: measuring the eye with one comparator

Each slice has an error comparator. It compares the equalized signal with a
reference that a DAC sets. The reference is adapted (`bdlev_dlf`) only on
samples that were decided as "1":

* signal above the reference: reference += alpha
* signal below the reference: reference -= beta

The loop settles where P(above) x alpha = P(below) x beta. With
alpha:beta = 1:1 that is the median of the upper eye, i.e. the main cursor h0.
With unequal weights the level drops to a lower quantile. Suppose one
residual cursor (say the first pre-cursor h-1) dominates. The "1" samples
then form two equally likely clusters, at h0 + |h-1| and h0 - |h-1|. With
1:3, three quarters of the samples lie above the level, so it settles at the
lower cluster, h0 - |h-1|. That is the inner edge of the eye, not its middle.
With two dominant residual cursors there are four clusters, and 1:7 finds the
lowest one. Anything that closes the eye (a wrong phase, a mis-set tap)
lowers this level. So Bdlev is a usable, monotonic proxy for eye height, and
it costs one comparator per slice. Noise pulls the level slightly below the
cluster: the lower cluster's tail below the level must balance the upper
cluster's tail that reaches down to it. That margin is large when the
clusters are close compared with the noise, and vanishes as they separate.

The reference is adapted separately for each of the four error comparators,
so each one also absorbs that comparator's own offset. The quantity the GMET
loops climb is the sum of the four codes (10 bits). The offsets then cancel
out of the changes that the loops look at.

Implementation: an accumulator with 8 integer bits (the DAC code) and `FRAC`
= 6 fractional bits, so a weight of 1 moves the code by 1/64 LSB. All samples
of one deserialized word are combined into one update. The accumulator
saturates at both ends. The ratio is a register (`RATIO`, 4-bit alpha and
4-bit beta) with reset value 1:3.

## GMET: one step, a variable wait

`gmet_engine` adapts one code. Time is counted in deserialized words. When
its wait timer expires, it does the following:

```
delta  = metric_now - metric_at_previous_step
dir    = (delta < 0) ? -dir : dir          // turn back only if Bdlev fell
code   = code + dir                        // one LSB
wait   = clamp(gain * 16 / |delta|, T_MIN, T_MAX)   // T_MAX if delta == 0
```

* The step is always one LSB. The gradient's magnitude acts only through
  the wait. A large change of Bdlev gives a short wait and a small change a
  long one. This gives a large loop bandwidth while far from the optimum and
  a small one after convergence, with no multiplier in the loop.
* `delta == 0` would give a zero step under a pure sign rule, and the code
  would freeze on any flat stretch of the metric. This design keeps the
  previous direction instead and waits `T_MAX`. A plateau is therefore
  crossed, and the code turns back only when Bdlev actually drops.
* The interpolator code wraps (127 -> 0), because the phase is circular. The
  tap codes saturate at 0 and 255.
* With adaptation off the code follows a manual register. Adaptation starts
  from that code `T_MIN` words after it is enabled.

Three engines run concurrently on the same metric. What keeps them from
fighting is the separation of their bandwidths, set by the gain registers.
The Bdlev loops are the fastest, since every GMET measurement relies on
them. DFE tap 1 comes next, then tap 2, because a larger cursor deserves a
faster loop. The phase loop is the slowest, because moving the phase
disturbs every other loop. The reset gains are CDR 96, tap 1 16 and tap 2 32;
a larger gain means a longer wait. With `GSHIFT` = 4 the wait is
`gain*16/|delta|` words. A 4-unit change of the summed metric (one LSB per
slice) thus makes the CDR loop wait 384 words, or 1,536 quarter-rate cycles.

A consequence worth knowing: with the DFE on, the phase settles where
h0 minus the residual after the taps is largest. That is not where h0 alone
peaks. In the end-to-end test it lands about one step (1/32 UI) earlier than
without the DFE.

## Blocks

| module | role |
|---|---|
| `gmet_rx_top` | top: wires everything below; single clock with word enable |
| `rx_des` | gathers 4 data + 4 error decisions per cycle into 16-bit words, oldest bit at bit 0, one word per 4 cycles (`word_valid`) |
| `bdlev_dlf` (x4) | biased-data-level loop per error comparator |
| `gmet_engine` (x3) | GMET loop for the interpolator code, tap 1 and tap 2 |
| `pi_code_enc` | 7-bit phase code to 2 gray-coded quadrant bits + 32-bit thermometer weight |
| `dac_therm_enc` (x6) | 8-bit code to 255 unit-cell enables of a thermometer current DAC (4 references, 2 taps) |
| `ctle_onehot_dec` | 6-bit position to the 64-way one-hot CTLE resistor-ladder select |
| `i2c_slave` | I2C target, register pointer with auto-increment |
| `rx_csr` | control/status registers (map in `rx_pkg`) |
| `iq_divider` | forwarded clock / 2 into 0/90/180/270-degree phases for the interpolator |
| `rx_pkg` | sizes, register map (`reg_addr_e`), `rx_cfg_t`, `rx_status_t` |

### Phase code format

The interpolator's code is 7 bits, 128 steps per period of the 4-phase
clock, so 32 steps per quadrant. One quadrant is one UI at quarter rate. The
two MSBs pick the quadrant in gray code (00, 01, 11, 10), and the LSB word
sets the weight as a 32-element thermometer. The weight counts up in even
quadrants and down in odd ones. As a result every pair of neighbouring codes,
including 127 -> 0, differs by exactly one thermometer element, and the
phase stays monotonic across quadrant boundaries. This direction reversal is
this design's reading of how the gray MSBs and the thermometer LSBs combine.

### Register map (8-bit registers, I2C device address 0x2A)

| addr | name | bits | reset |
|---|---|---|---|
| 0x00 | CTRL | [0] Bdlev adapt, [1] CDR adapt, [2] DFE on, [3] DFE adapt | 0x05 |
| 0x01 | RATIO | [3:0] alpha (up), [7:4] beta (down) | 0x31 (1:3) |
| 0x02 | CTLE | [5:0] ladder position | 32 |
| 0x03-0x06 | OFS0-3 | [4:0] data-comparator offset code, slice 0-3 | 16 |
| 0x07 | PI_MAN | [6:0] phase code while CDR adaptation is off | 0 |
| 0x08/0x09 | W1_MAN/W2_MAN | tap codes while DFE adaptation is off | 0 |
| 0x0A/0x0B/0x0C | G_CDR/G_W1/G_W2 | GMET gains | 96/16/32 |
| 0x10-0x13 | BDLEV0-3 | adapted reference codes (read only) | - |
| 0x14/0x15/0x16 | PI/W1/W2 | codes in use (read only) | - |

A write sends the pointer byte and then data; a read writes the pointer and
then reads after a repeated START. The pointer increments after every data
byte. With DFE on = 0 the tap DACs get code 0 (the "without DFE" mode) and
the tap loops are held.

### Interface and timing of the top

* `clk` is the quarter-rate sampling clock. All digital state runs on it,
  enabled by `word_valid` once every `DES_RATIO` = 4 cycles, so in silicon it
  could run from a divided clock. `rst_n` is asynchronous and active low.
* `d_q[s]`, `e_q[s]` are sampled on every rising edge; slice 0 is the
  earliest unit interval of the cycle.
* `rx_data` (16 bits, bit 0 oldest) and `rx_valid` come out one cycle after
  the fourth group of a word.
* A Bdlev code responds to a word on the next edge. A GMET step takes effect
  on the edge where the timer expires, and `gmet_update`/`gmet_reversal` pulse
  in that cycle. `gmet_delay` holds the wait each loop chose at its last
  step.
* The I2C inputs are synchronized with two flip-flops. `clk` must be at
  least about 8x SCL.
* `clk_fwd` clocks only `iq_divider`.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
ends by printing `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_bdlev_dlf`: 3,000 random words against an integer model of the
  weighted update. It then closes the loop on four-level "1" samples and
  checks that 1:3 settles at h0 - |h-1|, 1:1 between the main levels, and
  1:7 at the lowest level.
  Last, it adds Gaussian noise of standard deviation sigma to two levels
  h0 +/- h. It checks that 1:3 then settles below h0 - h by the margin dd
  that balances the two noise tails, P(-dd < n < 0) = P(n < -2h - dd). The
  test gets dd by bisection. It measures 4.16 against 4.20 predicted at
  h = sigma/2, and about 0 at h = 2 sigma: the margin shrinks quickly as the
  cursor grows.
* `tb_gmet_engine`: checks every step of a saturating 8-bit engine against a
  reference model: direction, LSB size, flag, the wait's value, and the
  words actually waited. The metric is a concave function of the code. It
  also checks convergence to the peak, short waits far from the peak and long
  waits near it, and a wrapping 7-bit engine that reaches its peak through
  127 -> 0.
* `tb_rx_des`, `tb_pi_code_enc`, `tb_dac_therm_enc`, `tb_ctle_onehot_dec`,
  `tb_iq_divider`, `tb_rx_csr`, `tb_i2c_slave`: exhaustive or random checks
  against independent models. The I2C controller model is in
  `tb/i2c_bfm.sv`.
* `tb_gmet_rx_top` runs the whole top at its default parameters, closed
  around `tb/rx_afe_model.sv`. That model covers a PRBS source (PRBS7 here), a
  channel+CTLE pulse response (peak 180 DAC LSBs, exponential tail giving
  h1 ~ 58, h2 ~ 18), interpolator, DFE summers, comparators with offsets,
  DACs and noise. Everything is configured over I2C. The test checks the
  offset DACs, the CTLE select, a wrong I2C address, the DFE-off and manual
  modes, and two adaptation runs:
  * Without DFE at 1:3, the phase must land within 3/32 UI of the phase that
    maximizes the 1/4 quantile of the upper eye. The testbench computes that
    phase from the model's cursors by enumerating 1,024 patterns. The Bdlev
    read-backs must lie within 10 LSB of the predicted level.
  * With DFE at 1:7, the taps, averaged over the last 20,000 words, must lie
    within 10 LSB of h1 and h2 at the mean phase. The phase must be near the
    new optimum, and the summed Bdlev well above its value without DFE. The
    average is needed because near the optimum the metric is flat, and each
    tap wanders by several LSB over tens of thousands of words. That is the
    "dither" of a sign-stepped loop on a noisy metric.

  Both runs must also recover the data with no errors, checked with the PRBS7
  recurrence. The test counts each mechanism and fails if one never happened:
  Bdlev up/down, steps and reversals of all three loops, waits getting
  shorter and longer, a quadrant change, I2C reads and writes, and the IQ
  divider toggling. It runs for about 900k cycles in a few seconds.
* `tb_gmet_rx_sweep` repeats a lab measurement. It steps the interpolator
  by hand across one UI, records the summed Bdlev at each code, then lets
  the CDR lock from the worst code. It does this without DFE and with
  adapting taps. The loop must lock within 2 codes of the sweep's maximum,
  and the DFE must raise that maximum (486 to 669 in the model).
  It then sweeps tap 1 by hand at the locked phase. Far below the first
  post-cursor, the eye level follows w1 one for one (3.98 per LSB in the
  four-slice sum). Near the optimum the slope falls to 0.63. This is why
  the tap loop moves at a steady pace until it gets close, then slows down
  by itself.
* `tb_gmet_rx_patterns` runs two receivers side by side, one on PRBS7 and
  one on PRBS31. It compares how fast the CDR reaches the optimum (about
  6,000 against 8,400 words; the test allows a factor of 4) and the dither
  after settling (4 and 5 codes peak to peak). It then checks the joint CDR
  and DFE result and error-free data for both.

`gmet_engine`, `rx_des` and `i2c_slave` also carry concurrent assertions.
They check the one-LSB step, the hold between steps, the range of the wait,
the word rate, and that the I2C target leaves SDA alone while idle. They
fire in any simulation run with `--assert`.

To run one with plain Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/rx_pkg.sv tb/tb_gmet_rx_top.sv --top-module tb_gmet_rx_top
./obj_dir/Vtb_gmet_rx_top
```

The simulator is two-state. Everything read before it is written is reset.

## Where this design departs from, or adds to, the source receiver

It follows the receiver of the source dissertation as closely as the
dissertation allows. What comes from where:

* **Taken from the source:** four quarter-rate slices with one adapted
  error-comparator reference each; the weighted Bdlev update and its 1:3 and
  1:7 ratios; the GMET rule (one-LSB step with the sign of Bdlev change times
  last step, wait = gain / |Bdlev change|); GMET applied to the phase and both
  DFE taps at once; the bandwidth ordering of the loops; 8-bit thermometer
  current DACs; 5-bit binary offset DACs; a 64-way one-hot CTLE ladder; a
  2-bit gray / 32-bit thermometer interpolator code (128 steps); an IQ
  divider; I2C access to the codes.
* **Chosen here:** the deserializer ratio and bit order; the single clock
  with enable; adapting Bdlev on "1" decisions only; the summed Bdlev as the
  GMET metric; loop gain `FRAC`, `GSHIFT`, `T_MIN`, `T_MAX`, reset gains and
  reset codes; the zero-change rule of GMET; the manual-code behaviour; the
  whole register map and I2C protocol; the odd-quadrant reversal of the
  interpolator weight; reading "8-bit thermometer" as 255 cells; DFE on/off
  as forcing the tap codes to 0.
* **Conflicting statements in the source:** the Bdlev ratio appears once as
  "3:1" and elsewhere as 1:3 (and 1:7) with the up weight first. 1:3 with
  alpha as the up weight is used; it is the only reading that puts the level
  at h0 - |h-1|. The source's clock-path frequencies (28 GHz divided to 14 GHz)
  disagree with its measurement setup (14 GHz in, 7 GHz recovered clock).
  The interpolator's delay plot fits the latter. The RTL does not depend on
  either.
* **Not verified:** timing closure at the 1.75 GHz word rate, and the
  source's actual channels. The test channel is a synthetic pulse
  response, not a measured one.
