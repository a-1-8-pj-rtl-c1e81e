# Subsampled all-digital clock and data recovery, 12.5–25 Gb/s

This is a PLL-type clock and data recovery circuit (CDR) for a serial link.
The phase detector, the loop filter and the oscillator control are all
digital, and the whole loop filter can be produced by synthesis. At 25 Gb/s
a loop filter cannot run at the bit rate, so the usual answer is to
demultiplex the input into many parallel lanes. This design does something
else: it throws away most phase-detector decisions. Only one decision in 16
bit periods reaches the loop filter, so the filter runs at 1.5625 GHz.

The ring oscillator runs at a quarter of the bit rate (6.25 GHz for
25 Gb/s) and provides eight evenly spaced phases. Four of them sample the
data, and the recovered data leaves as four parallel 6.25 Gb/s lanes. Two
others sample the data edges for the phase detector, which uses the
*Inverse Alexander* rule. With that rule the detector's dead zone behaves
well under subsampling (see below). The loop runs from about 12.5 to
25 Gb/s. Before the loop is closed, a calibration at start-up sets the
coarse frequency against a reference clock.

The design is synthesizable SystemVerilog, except for two parts. The
samplers and the oscillator are analog circuits in silicon. Here they are
behavioural simulation models, so that the closed loop can be simulated.

## Signal path and clock phases

```
 din ──► 6 samplers ──► retiming (on Clk3) ──► dout[3:0]           4 x 6.25 Gb/s
          ▲  clk0,1,2,3,5,7        │ Edge0, Dout0, Edge1
          │                        ▼
          │                  subsampler ÷4 ──► S0,S1,S2 @ 1.5625 GHz, clk_dig = Clk3/4
          │                        ▼
          │                  pd_logic  (Early, Late)
          │                        ▼
          │                  dlf ──► fine word: 7 + 7 + 31 varactor bits
          │                        ▼
          └──────────────── dco_ring (8 phases) ◄── coarse[5:0] ◄── freq_cal ◄── ref_clk
```

The DCO phases `clk0 … clk7` rise at k/8 of its period; `clk(k+4)` is the
complement of `clk(k)`. Each DCO period spans four bits. In lock the **even
phases sit on the data transitions** and the **odd phases sit in the middle
of the bits**:

| phase | sampler use | retimed name | role |
|---|---|---|---|
| clk0 | edge | `edge0` → S0 | phase detector |
| clk1 | data | `dout0` → S1, `dout[0]` | phase detector and data lane 0 |
| clk2 | edge | `edge1` → S2 | phase detector |
| clk3 | data | `dout1`, `dout[1]` | data lane 1 |
| clk4 | – | – | unused |
| clk5 | data | `dout2_n`, `dout[2]` | data lane 2 |
| clk6 | – | – | unused |
| clk7 | data | `dout3_n`, `dout[3]` | data lane 3 |

Each DCO period could give four (edge, data, edge) triples. Only the one
from `clk0, clk1, clk2` is formed, which is already a 4× subsampling. The
subsampler keeps one triple in four, so the total is 16×.

**Retiming** (`retiming.sv`) brings all six samples onto the rising edge of
Clk3. The `clk0…clk3` samples go through plain positive-edge registers. The
`clk5` and `clk7` samples are still settling when Clk3 rises. They are caught
on the falling edge of Clk3 and passed on half a cycle later. That register
type inverts, so `dout2_n`/`dout3_n` are complements; the top inverts them
back. Because of this skew, the four bits that appear together at one Clk3
edge do not all come from the same DCO period:

- `dout[0]` (clk1) comes from the current period.
- `dout[1]` and `dout[2]` (clk3, clk5) come from the previous period.
- `dout[3]` (clk7) comes from the period before that.

A deserializer downstream must use this order.

**Subsampling** (`subsampler.sv`, `clk_div2.sv`) divides Clk3 by two twice.
After each divider, an array of three registers keeps every second value of
the triple. The second divided clock, Clk3/4, is the digital clock `clk_dig`
for the rest of the logic.

## The Inverse Alexander decision

`pd_logic.sv` registers the triple and computes

```
Early = S0 xor S1      (clock samples too early  → lower the frequency)
Late  = S1 xor S2      (clock samples too late   → raise the frequency)
```

This is the conventional Alexander (bang-bang) detector with Early and Late
swapped. The swap moves the loop's stable point so that the edge samples S0
and S2 land on the transitions and S1 lands mid-bit. In the conventional
detector, the middle sample lands on the transition.

The swap matters under subsampling. Suppose the input has duty-cycle
distortion, so a lone 1 is shorter or longer than one bit period.

- **Conventional detector:** near lock it gives an Early on one clock and a
  Late on the next. Subsampling keeps only one of the two, chosen at random,
  which injects jitter into the loop.
- **Inverse detector:** in the same situation it gives Early and Late in the
  *same* decision. Subsampling keeps or drops both together. The loop filter
  reads "both" as no action.

In the 45-bit fine word the Early and Late thermometer words then cancel in
the oscillator.

Two test modes of the published chip are included:

- `conv_pd` swaps Early and Late at the loop-filter input, which turns the
  loop into a conventional Alexander loop.
- `sub32` discards every second decision, for 32× subsampling.

## Loop filter (`dlf.sv`)

The filter implements `H(z) = Kp·z^-2 + Ki·z^-9 / (1 − z^-1)` on `clk_dig`.

**Proportional path.** `kp` (0–7) is the number of ones that Early or Late
switches on in its own 7-bit thermometer word. The words drive the
oscillator's varactors directly, with no register in between. The delay
from the subsampler output is therefore the two registers of `pd_logic`:
**2 cycles**.

**Integral path.** This path runs at half rate, using a clock enable that is
high every second cycle:

1. Early/Late are demultiplexed into pairs. When `calibration` is set, the
   frequency detector's pair is used instead.
2. The pair register forms `Late_t0 + Late_t1 − Early_t0 − Early_t1`, a
   value in −2 to +2.
3. The result is shifted left by `ki_shift` and registered.
4. It is added to a 16-bit saturating accumulator, which resets to
   mid-scale.
5. The accumulator's 5 MSBs become a 31-bit thermometer word, which is
   registered.

The delay is **9 cycles** for the newer sample of a pair and 10 for the
older one.

One oscillator fine step equals 2^11 accumulator LSBs. So
Ki = 2^(ki_shift − 11) steps per decision. The published operating point
Ki = 2^-7 is `ki_shift = 4`.

`dco_char` replaces the integral word with `fixed_setting`, so the
oscillator can be characterized on its own.

The outputs are packed in `adcdr_pkg::fine_word_t`:
`{prop_early[6:0], prop_late[6:0], integ[30:0]}`, 45 varactor controls.

## Start-up frequency calibration (`freq_cal.sv`)

The bang-bang loop can only pull in over a small frequency range. Before
it is closed, the 6-bit coarse word is therefore set by counting. While
`cal_start` is high, the block works in a loop:

1. It counts `clk_dig` cycles over `ref_window` periods of `ref_clk`. The
   reference is synchronized with two flip-flops.
2. It compares the count with `target_count ± tol`.
3. If the count is outside that band, it steps `coarse` by one and gives a
   one-cycle `fd_early`/`fd_late = 2'b11` pulse. With `calibration` set,
   the loop filter integrates that pulse.

The loop ends with `cal_done`. `cal_ok` is high if the count ended inside
the band, and low if the coarse range ran out first.

Choose the values as follows:

- `target_count = ref_window · f_ref⁻¹ · f_bit / 16`.
- Set `tol` a little above half a coarse step, about 0.4 % of the target.
  Otherwise the search can end up alternating between two coarse values.

## Oscillator model (`dco_ring.sv`)

The model is a ring of four differential cells. Each cell has its own delay,
and it produces the eight phases. The frequency is

```
f = F_REF_HZ · 1.05^(current − 12) · 1.0072^(coarse − 32) · (1 + 272e-6 · n_fine)
```

`n_fine` counts the set integral and Late bits and subtracts the set Early
bits. One fine step is 1.7 MHz at 6.25 GHz. Over all settings the range is
about 3.0–9.0 GHz. Consecutive fine bits go to cells 1, 3, 2, 4, 1, …, so
one step moves one cell and the phases stay evenly spaced. The coefficients
are fitted roughly to a measured characteristic. The model has no supply
sensitivity and no gaps between coarse bands.

Phase noise is modelled as independent Gaussian jitter of `JITTER_PS_RMS`
on every cell transition. The oscillator phase then drifts as a random
walk, which is the 1/f² noise of a free-running ring. The default
0.127 ps comes from a free-running phase noise of −95 dBc/Hz at 10 MHz
offset from 6.25 GHz:

- c = L·Δf²/f0² = 8.1·10⁻¹⁶ s;
- period jitter √(c/f0) = 0.36 ps;
- 0.36 ps / √8 per transition.

Set `JITTER_PS_RMS` to 0 for a noise-free oscillator. Because the loop
tracks the drift, the testbenches measure frequency over 40 µs windows
and average edge positions over thousands of periods. The sampler
model (`saff_sampler.sv`) captures the input ideally at the clock edge and
shows it 15 ps later.

## Configuration inputs of `adcdr_top`

The published chip loads the following settings through an SPI register
bank. Its register map is not available, so here they are plain top-level
inputs:

- Loop filter: `kp`, `ki_shift`.
- Modes: `conv_pd`, `sub32`, `calibration`, `dco_char`, `fixed_setting`.
- Oscillator current: `current`.
- Calibration: `cal_start`, `coarse_init`, `ref_window`, `target_count`,
  `cal_tol`.

The top also has observation outputs: `early`, `late`, `fine`, `acc`,
`coarse`, `cal_count`. `rst_n` is asynchronous and active low. It needs a
falling edge to take effect, so start with it high and then pull it low.

Typical 25 Gb/s settings:

- Loop: `kp = 5`, `ki_shift = 4…6`, `current = 12`.
- Calibration with a 100 MHz reference: `ref_window = 64`,
  `target_count = 1000`, `cal_tol = 4`.
- Start-up sequence: hold `calibration = 1` until `cal_done`, then clear it.

## What is verified

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- **`tb_adcdr_top`** runs the closed loop at 24.9 Gb/s with PRBS7 input and
  the top at its default parameters. The test:
  - calibrates the coarse word, then closes the loop;
  - checks that the mean recovered clock equals the bit rate / 4 to within
    1 MHz;
  - checks each data lane against the PRBS recurrence over ~50,000 bits,
    with zero errors;
  - runs the 32× mode, the conventional-detector mode and the fixed-setting
    mode;
  - checks that each of these happened at least once: Early, Late, both,
    integrator up and down, coarse steps, detector pulses.

  The lane check needs no alignment: taking every fourth bit of a maximal
  LFSR sequence gives the same sequence.
- **`tb_adcdr_workloads`** runs the loop with PRBS31 at 25, 20 and
  12.5 Gb/s, and with PRBS7 at 25 Gb/s under sinusoidal jitter. The jitter
  points are 0.3 UIpp at 10 MHz and 2 UIpp at 1 MHz. Every case locks and
  recovers the data without errors.
- **`tb_adcdr_dcd`** compares the Inverse and the conventional loop under
  25 Gb/s PRBS7 input. The input has 0.2 UI duty-cycle distortion and
  0.01 UI rms random jitter. Loop settings are Kp = 5 and Ki = 2^-7, at
  N = 16 and N = 32. Results:
  - The Inverse loop puts the edge samplers on the transitions. It
    produces simultaneous Early/Late decisions and recovers all four lanes
    without errors.
  - The conventional loop puts the data samplers on the transitions, as
    expected for that rule.
  - Recovered-clock rms jitter for Inverse and conventional is
    0.073/0.075 UI at N = 16 and 0.090/0.089 UI at N = 32. That is about
    2.9 ps with the distortion. Without it the figure is 1.9 ps (see the
    sweep below), against 1.455 ps measured on silicon. The noise model
    is therefore somewhat pessimistic.
  - At N = 32 the Inverse loop made 112 errors in 150,000 bits.

  The testbench prints the jitter figures but does not check them. The
  difference between the two rules is smaller than the spread between
  random seeds. So in this model the advantage of the Inverse detector
  under subsampling appears only as the null action on simultaneous
  Early/Late. It does not appear as a clear jitter gain. With a
  noise-free oscillator and 0.3 UI distortion, the conventional loop was
  also seen to settle at the Inverse loop's phase.
- **`tb_adcdr_sweep`** sweeps the loop gains at 25 Gb/s.
  - Recovered-clock rms jitter with PRBS31 is about 1.9 ps at Kp = 5 and
    2.1 ps at Kp = 7. At Kp = 1 it is 4–6 ps, and that loop makes
    occasional bit errors with this noise model.
  - Jitter tolerance at 1 MHz is measured on a 0.5–16 UIpp doubling grid:

    | Kp | Ki | tolerance |
    |---|---|---|
    | 7 | 2^-7 | 4 UIpp |
    | 1 | 2^-7 | 0–1 UIpp |
    | 5 | 2^-10 | 4 UIpp |
    | 5 | 2^-4 | 8 UIpp |

  The test checks that the larger gain always tolerates more. Only the
  1 MHz point of each tolerance curve is simulated.
- **`tb_adcdr_idle`** tests how long the locked loop can go without phase
  decisions. Runs of identical bits in the input starve the loop filter of
  decisions, so the oscillator runs open loop. The test uses two run
  lengths:
  - 496 bits, i.e. 31 idle decisions at 16× subsampling. This is what a
    PRBS31 input produces.
  - 1600 bits, i.e. 100 idle decisions.

  Over ten seeds, the 31-decision runs drifted at most 0.26 UI and never
  slipped a bit, which the test checks. The 100-decision runs drifted up to
  about 0.5 UI and slipped about once in 30 runs. The test reports this but
  does not fail on it. Idle gaps of around 100 decisions are therefore the
  practical limit with this noise model.
- The block testbenches check:
  - the Inverse Alexander truth table and its two-cycle delay;
  - the loop-filter delays of 2 and 9/10 cycles, the accumulator sum,
    saturation and the input multiplexers;
  - the calibration search from above, from below and out of range;
  - the oscillator tuning law, phase spacing and varactor order;
  - the retiming and subsampling alignment.

These are behavioural simulations with ideal samplers and a white-noise
oscillator model. They show that the logic and the loop work. They say
nothing about bit error rates near 10⁻¹², the phase-noise spectrum or
jitter tolerance limits.

## Where this RTL goes beyond or departs from the published design

- **Half-rate integral path:** built with a clock enable, not a divided
  clock.
- **Register after the Ki scaling:** added, which brings the integral delay
  to 9 cycles.
- **Accumulator:** saturates instead of wrapping, and resets to mid-scale.
- **Sum width:** the sum needs 3 bits, although the printed block diagram
  labels it 2.
- **32× mode:** built by zeroing every second decision. How the chip does
  it is not documented.
- **Calibration:** the state machine, the tolerance input, the one step per
  measurement and the pulse format of the frequency-detector signal are
  this design's own choices.
- **Oscillator model:** the tuning law, the sign convention and the noise
  model are fitted or derived from measured figures. They are not a
  circuit description. Here, a set varactor bit raises the frequency, and
  Early lowers it.
- **Not built:**
  - the SPI register bank;
  - the I/O buffers and pads;
  - the test path that replaces the oscillator by an external clock.

## Simulating

Everything runs with Verilator 5 (`--timing` is needed by the models and
testbenches). From the repository root:

```
verilator --binary --timing --assert -Irtl rtl/adcdr_pkg.sv \
          $(ls rtl/*.sv | grep -v adcdr_pkg) \
          tb/tb_adcdr_top.sv --top-module tb_adcdr_top -o sim
./obj_dir/sim +verilator+seed+1
```

The oscillator noise and the testbench jitter use `$urandom`, so a
different seed gives a different noise sequence. The checks are chosen to
hold for any seed.

Substitute any other testbench in `tb/`. A block testbench needs only the
package and the block's own files. The full-loop tests simulate 15–90 µs of
circuit time in a few seconds. All files use `timeunit 1ps; timeprecision
1fs` so that oscillator steps of a few tens of femtoseconds can be
resolved.
