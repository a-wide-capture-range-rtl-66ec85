# Wide-range dual-loop all-digital PLL

This PLL locks onto a 1-bit square-wave reference whose frequency is not
known in advance. It covers about 3.9 kHz to 1 MHz, a range of roughly 250:1.
It keeps working when the reference is heavily corrupted, down to about one
flipped sample in six (a binary signal at 0 dB SNR).
Everything is synchronous logic on a single 100 MHz system clock: there is
no analog oscillator and no delay line. The "DCO" is a counter, and the
phase detector samples both signals with that clock.

Three ideas make the wide range and the noise tolerance possible:

* **The phase is measured in units of the DCO's own period.** A fixed fast
  clock cannot resolve short pulses at 1 MHz and overflows at 1 kHz.
  Instead, the time-to-digital converter counts the Up/Down pulse against a
  multiple of the DCO frequency (4x, 16x or 64x). The result is a phase
  *level* out of 8, 32 or 128 per period, whatever the absolute frequency.
* **Octave bands are chosen from "trigger" counts.** When the reference and
  the DCO differ by more than about 4/3x, the faster signal produces extra
  edges while the phase detector waits for the other signal. The number of
  extra edges in two consecutive rounds tells how many octaves to jump
  (thresholds 20 / 9 / 4 / 1 select x16 / x8 / x4 / x2).
* **Three states with increasingly careful loop filters:**
  acquisition (8 levels, a fast averaging integrator that sweeps the band),
  tracking (32 levels, a differentiating integrator that follows frequency),
  and phase fixing (128 levels, ±1 code steps with a stored code to fall
  back on).

Two complete loops (PFD, TDC, DCO) run side by side. They start in
different bands, so one of them usually reaches the right band sooner. The
first loop to settle in tracking becomes the **primary** and drives
`pll_out`. The other loop becomes the **secondary**: it keeps tracking in
the background. If the reference moves, the secondary notices, and it
re-seeds the primary's stored code.

## Block map

```
ref_in -> ref_noise_filter --ref_clean--+--> pfd[0] -> tdc[0] --+      +--> dco[0] -> dco_out[0]
                                        +--> pfd[1] -> tdc[1] --+      +--> dco[1] -> dco_out[1]
                                                                |      |
                    divider_control <--- trigger counts --------+      |
                           | div_lv (band per loop)                    |
                    state_control <--- levels --- loop_filter ---------+ dco_code
                           | state, primary, stored code, loads   (integrators 1..5)
```

| File | Role |
|---|---|
| `rtl/adpll_pkg.sv` | state and level-mode enums, code/band widths, level helpers |
| `rtl/ref_noise_filter.sv` | repairs noise on the sampled reference |
| `rtl/pfd.sv` | three-state phase/frequency detector, Update pulse, trigger counter |
| `rtl/tdc.sv` | Up/Down length in DCO-harmonic units (8/32/128 levels) |
| `rtl/dco.sv`, `rtl/freq_divider.sv` | counter DCO and its power-of-two band divider |
| `rtl/integrator_acq.sv` | acquisition filter (integrators 1, 2) |
| `rtl/integrator_trk.sv` | tracking filter, optionally with 8-point averaging (integrators 3, 4) |
| `rtl/integrator_fix.sv` | phase-fixing filter with code recovery and noise accumulator (integrator 5) |
| `rtl/loop_filter.sv` | routes each loop's rounds to the integrator of the current state |
| `rtl/state_control.sv` | convergence checks, primary choice, stored code |
| `rtl/divider_control.sv` | band choice from trigger counts |
| `rtl/adpll_top.sv` | the dual-loop PLL |

## The DCO and its bands

The DCO core is a phase accumulator. It adds 4 each clock and toggles its
output when the total reaches `400 - code` quarter-clocks. The half period
is therefore `(400 - code)/4` system clocks:

* code 0 gives 500 kHz;
* code 200 gives 1 MHz;
* codes 201..255 continue upward to about 1.38 MHz, overlapping the next
  band.

The resolution is a quarter clock. An average over many periods reaches
the exact fraction.

The core output is then divided by `2^d`, with d = 0..7. So band d spans
500 kHz/2^d up to 1 MHz/2^d, and the full range is 3.9 kHz..1.38 MHz.
The ideal code for frequency f in band d is `400 - 2e8/(f * 2^d)`. The
tests check against this formula. The band centre code, 133, is loaded at
every band change.

The DCO also outputs its period in quarter clocks (`period_q`). The TDC
needs it to produce the harmonic.

## Phase detector, triggers and the TDC

The PFD detects rising edges of the cleaned reference and of the divided
DCO:

* the first edge of a round raises Up (reference first) or Down (DCO first);
* the other signal's edge ends the round with a one-cycle `update`.

While Up is high, further reference edges are counted as *triggers*; while
Down is high, further DCO edges are counted. The count and its direction
are latched at `update`.

The TDC emulates a clock running at L/period of the DCO (L = 8, 32 or
128). A fractional accumulator adds `4*L` per system clock. Each time it
passes `period_q`, that is one harmonic tick, with at most two ticks per
clock. The ticks counted while Up or Down is high form the level, which
saturates at L-1. The level appears one clock after `update`, with
`lv_valid`.

## Band control

`divider_control` adds the trigger counts of the last two rounds whenever
both rounds pointed the same way. It then looks the sum up against the
thresholds:

| two-round sum | change |
|---|---|
| > 20 | 4 octaves |
| > 9 | 3 octaves |
| > 4 | 2 octaves |
| > 1 | 1 octave |

Loop 0 owns the even bands (0, 2, 4, 6) and starts at 4. Loop 1 owns the
odd bands and starts at 3. Each step of a loop is therefore two octaves,
and a request for k octaves moves k/2 steps.

A single-octave request moves a loop only when its code is pinned at the
band edge in the wanted direction (0 when too fast, 255 when too slow). A
reference in the neighbouring octave pins the code, so this rule moves the
loop one step. While the two loops are synchronised, the secondary copies
the primary's band.

## States and the choice of primary loop (`state_control`)

**Acquisition.** Every loop measures 8 levels per period. Its filter is
`y = 4*x + floor((y[n-1] + y[n-2]) / 2)`, with x = ±level. This filter
sweeps the code across the band. A loop leaves acquisition after 3 rounds
in a row with the same level and direction. These rounds do not count:

* rounds that changed band;
* rounds that saw triggers;
* rounds whose code is pinned at 0 or 255.

**Tracking.** The filter becomes `y += 4*wrap(x - x_prev)`, with 32
levels, so the code follows the frequency error. Loop 1 averages the last
eight differences and moves more cautiously; loop 0 does not. The first
loop with 5 rounds in a row at the same level becomes primary, and its
code is stored.

**Phase fixing.** The primary switches to 128 levels and starts from the
stored code. Each round moves the code one step against the phase error.
A series of thresholds {30, 15, 7, 3, 1, 0} tightens the rules:

* when the level falls below the current threshold, the code goes back to
  the stored code and the next threshold applies;
* if the code wanders more than 50 from the stored code, it is also
  restored.

Reaching level 0 raises `locked`. After that, a ±1 accumulator counts the
rounds. Phase fixing resumes only when the accumulator reaches ±10, so
isolated noisy rounds are ignored.

The secondary keeps tracking at 32 levels. It refreshes the stored code
when both of these hold:

* it sees 5 rounds whose levels differ by at most 1;
* the average of its last four codes is at least 3 away from the stored
  code.

The refresh restarts the primary's phase fixing from the new code. This is
how a drifting reference is followed without a full restart.

## Noise filter

The reference is sampled twice (`reg_1`, `reg_2`) to detect a change. An
up/down accumulator counts changes that disagree with the current repaired
output and counts down on samples that agree. The output flips only after
10 net disagreeing changes, which adds about 13 clocks of latency. Noise
on a 0 dB reference toggles the raw sample often, but those flips cancel
before they reach the threshold. Real edges persist and pass.

## Where this design departs from the original description

* **Range.** The original design makes the lowest band 400 codes wide and
  the highest band 300 codes wide, and reaches 1 kHz. Here all eight bands
  are one octave of 200 codes plus 55 overlap codes, so the lowest lockable
  frequency is about 3.9 kHz.
* **Own choices.** The original gives no value for these, so the choices
  here are:
  * the noise-filter threshold of 10 changes;
  * the integrator gains of 4;
  * the initial bands 4 and 3;
  * the wrap of tracking differences into one period;
  * the rules that exclude band-change, trigger and pinned rounds from the
    convergence runs;
  * the pinned-edge rule for single-octave requests;
  * the secondary's refresh rule (±1 level, 4-round average, 3-code
    distance).
* **Counted, not clocked.** The PFD and TDC are rebuilt as synchronous
  logic, not as flip-flops clocked by the signals themselves. The harmonic
  clock is produced by a fractional accumulator rather than a real
  multiplied clock.
* **Not shown.** The original evaluates lock rate over thousands of runs;
  the testbenches here run selected frequencies only.

## Simulation

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/adpll_pkg.sv tb/tb_adpll_top.sv \
          --top-module tb_adpll_top -Mdir obj -o sim && ./obj/sim
```

`tb_adpll_top` runs the PLL at its default parameters and takes a few
seconds. It locks at:

* 100 kHz and 700 kHz;
* 30 kHz and 8 kHz with 15.9 % of samples flipped (0 dB);
* 240 kHz.

For each lock it checks the band, checks that the code is within 2 of the
ideal code, and checks that lock holds for 100 more periods. It then steps
a locked 100 kHz reference to 104 kHz and requires the secondary to
refresh the stored code and the primary to lock again. It counts these
mechanisms and fails if any never occurs:

* band changes;
* trigger rounds;
* state changes;
* locks;
* refreshes;
* repaired noise flips.

Lock took 29 to 76 reference periods in these runs.

The block testbenches compare each module against a model that the
testbench computes itself:

* the noise filter's flip window;
* PFD rounds and trigger counts;
* TDC levels at all three resolutions;
* DCO periods per code and band;
* each integrator's equation;
* the band rules;
* the state sequence.
