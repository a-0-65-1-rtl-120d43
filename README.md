# Synthesizable fractional-N ADPLL with a 2x4 MIMO time-to-digital converter

This is a fractional-N all-digital PLL for the 0.65–1.35 GHz range. Apart
from its oscillators, it is made only of logic that a standard-cell flow
can synthesize. Its main idea is in the phase detector. A ring-oscillator
TDC has a quantisation step of roughly 20 ps, which limits the jitter of the
loop. Here four slightly different gated ring oscillators each measure the
same REFCLK-to-FBCLK time interval twice:

- once directly;
- once more, a few nanoseconds later, from a delayed copy of the same pulse,
  with the ring switched to a second speed.

That gives eight observations of one interval on eight different
quantisation grids. A weighted average of them has a quantisation noise
about sqrt(2·4) times smaller than that of one channel. Plain parallel
channels would give only sqrt(4). The weights are the channels'
resolutions in ps per count. These are not known after fabrication, so they
are learned while the loop runs. The learning uses the phase steps that the
fractional divider's sigma-delta modulator creates on purpose; those steps
are known exactly.

The rest of the loop is conventional, built from standard-cell parts:

- a DCO made of 16 parallel ring oscillators whose nodes are shorted
  together;
- a type-2 digital loop filter;
- a MASH 1-1-1 modulated multi-modulus divider;
- a counting lock detector;
- a small sequencer.

## Loop structure

```
 refclk ──►┌──────────┐ err  ┌─────────────┐ ctrl ┌─────────────┐ ring_en,fcw ┌─────────────┐
           │ mimo_tdc │─────►│ loop_filter │─────►│ dco_ctrl_   │────────────►│ dco_ring_   │──► dco_clk
 fbclk ───►│ (2x4)    │      │ Kp, IIR, K1 │      │ decoder     │             │ array       │
    ▲      └──────────┘      └─────────────┘      └─────────────┘             └─────────────┘
    │           ▲ sdm,frac         ▲ en, K3                                      ▲ cells │
    │           │                  │                                             │       │
 ┌──┴──────────┐│  ┌───────────┐  ┌┴───────────┐   ┌──────────────┐            ┌─┴───────┴──────┐
 │frac_divider │◄──│mash111_sdm│  │ adpll_ctrl │◄──│lock_detector │            │dco_calibration │◄── cal_clk
 │ ÷(NI+1+y)   │   │   (F)     │  └────────────┘   └──────────────┘            └────────────────┘
 └─────────────┘   └───────────┘
```

The output frequency is `f_dco = NF · f_ref`, with `NF = NI + F/256`:

- `ni` is NI, nominally 8..12;
- `frac` is F, 8 bits.

The digital back end runs on FBCLK, the divided DCO clock. That covers:

- TDC read-out and combining;
- resolution estimation;
- loop filter;
- modulator;
- sequencer.

Each FBCLK edge ends one comparison, so each block then sees one new phase
error per reference period.

Start-up sequence (`adpll_ctrl`):

1. **CAL.** The loop is open. The DCO runs at its centre code and
   `dco_calibration` chooses 3, 5 or 7 delay cells per ring.
2. **ACQ.** The loop is closed with the error multiplied by K3 = 4 (wide
   bandwidth). The TDC is in SIMO mode, one conversion per comparison,
   because pulses can still be long.
3. **TRACK.** Entered at coarse lock (the first 4096-cycle window whose
   counts agree within 0.1 %). K3 returns to 1.
4. **LOCKED.** Entered at lock (two consecutive passing windows). The TDC
   switches to MIMO mode and resolution estimation starts. A failing window
   goes back to TRACK.

## The 2x4 MIMO TDC

This is the part that needs the most explanation. It consists of
`mimo_tdc` and its sub-blocks.

**Phase detector** (`phase_detector`). A two-flop PFD.

- A REFCLK rise sets UP and an FBCLK rise sets DN; when both are set, both
  clear.
- So only one of the two is high, for exactly the time between the two
  rising edges.
- UP means the reference led (positive error).

**Channels** (`gro_ring` + `gro_counter_bank`). Each channel is a
seven-stage gated ring oscillator.

- It oscillates only while its enable input is high.
- Every ring node drives an 8-bit counter. One conversion is the sum, over
  the seven nodes, of the count increments during the enable pulse. That
  equals the number of half-periods that elapsed, i.e. the pulse width
  divided by the resolution.
- The ring phase is not reset between pulses. The residue of one
  measurement carries into the next, which is what makes the quantisation
  error noise-like.
- Conversions are 11-bit two's complement. The sign comes from the
  detector: DN gives a negative count. Magnitudes saturate at 1023.
- The `gear` input models tristate buffers across the stages that speed
  the ring up. With the gear off, channel i resolves
  `18.5 + 3i` ps per count; with it on, `17 + 3i` ps per count.
  That gives `<18.5,17> <21.5,20> <24.5,23> <27.5,26>` ps.

**Second conversion** (`clone_delay` + the channel input multiplexer).

- `clone_delay` is a 5 ns copy of the UP/DN pulse.
- In MIMO mode, when a channel's first conversion ends (falling edge of
  the pulse), the channel raises its gear and switches its input to the
  clone. It then converts the same interval again, on the second grid.
- The first result is held, and both are presented together once the
  second ends.
- The clone must start after the first pulse has ended and end before the
  next comparison. With references up to 100 MHz and the ±2 ns pulses
  seen in lock, a delay between 4 and 8 ns is safe; 5 ns is used.
- In SIMO mode the gear stays off and the clone is ignored.

**Combiner** (`tdc_postproc`).

```
MIMO:  err = Σ_i  n1_i·T1_i + n2_i·T2_i        (8 products)
SIMO:  err = 2 · Σ_i n1_i·T1_i                  (4 products, doubled)
```

- `T` are 5-bit weights in whole ps. Each product is therefore an
  estimate of the interval in ps.
- The sum of eight is eight times their average. `err` (20 bits) is thus
  the phase error in units of 1/8 ps, and it has the same scale in both
  modes.

**Resolution estimator** (`tdc_res_estimator`).

- Between two comparisons, the divider's modulus changes the feedback
  edge by a known amount:
  `ΔS = ((1+y)·256 − F)/256 · T_dco`, where y is the modulator output.
- Each channel's count changes by about `ΔS / T`.
- A sign-data LMS filter on the first differences converges each estimate
  to the true resolution:
  `T ← T + 2^-10 · (ΔS − T·ΔN) · sign(ΔS)`.
- Correlating with the known step makes the loop's own residual phase
  average out.
- The estimates start at the typical values, keep 8 fractional bits, and
  the weights are their rounded integer part.
- `T_dco`, the nominal DCO period in ps, is a configuration input
  (`tdco_ps`). Set it to `1e12 / (NF · f_ref)`.
- The modulator value must be paired with the conversion it caused. In
  this loop that is two FBCLK cycles later (parameter `LAG`): one cycle
  from the modulator register to the divider reload, one from the end of
  the conversion to its read-out. With the wrong pairing the step and the
  counts are uncorrelated, and every estimate drifts to full scale.

## DCO and its calibration

**`dco_ring_array`** is a behavioural model of the oscillator core.

- 16 rings of 3, 5 or 7 delay cells have their stage outputs tied
  together. Each extra ring drives the shared nodes harder and raises the
  frequency (coarse tuning).
- Each delay cell has a 4-bit fine code (FCW) that trims its delay.
- The model's frequency is
  `f = SPEED · (5/cells) · (488 + 64·(rings−1) + Σ(FCW−1)) MHz`,
  about 1 MHz per control LSB. With 5 cells that covers 488–1511 MHz.
- `SPEED` stands for the process/voltage/temperature corner.
- These constants are chosen to cover the design's range. They are not
  silicon data.

**`dco_ctrl_decoder`** maps the 10-bit control word to the array.

- `ctrl[9:6]` enables `1 + ctrl[9:6]` rings.
- The 6-bit fine value f is spread over the seven cells as
  `FCW_c = 1 + floor((f + c)/7)`. Every fine step therefore changes
  exactly one cell by one code, and the tuning is monotonic.

**`dco_calibration`** runs once, before the loop closes.

- It counts DCO cycles at the centre code over 256 cycles of `cal_clk`.
- Fewer than 2048 counts (below 800 MHz at 100 MHz cal_clk) selects three
  cells. More than 3200 (above 1.25 GHz) selects seven. Otherwise five.
- The count window crosses into the DCO domain through a two-flop
  synchroniser.

## Loop filter

`loop_filter` is a type-2 filter evaluated once per FBCLK cycle.
Integer constants stand in for the real-valued gains:

```
e   = K3 · err                      (K3 = 4 while acquiring, else 1)
acc = sat(acc + e)                  integral path
x   = KP · e + acc                  KP = 1591: zero near 10 kHz
y  += (x − y) · 624/2^16            first-order IIR, 1−α = 0.00952
ctrl = sat(512 + y · 2577/2^36)     overall gain K1
```

- The overall gain targets a 100 kHz loop with a 12 ps TDC step.
- It is scaled by 1/96 because `err` counts 1/8 ps: 12 · 8 = 96.
- The filter clears to the centre code while the loop is open.

## Fractional division

**`mash111_sdm`** cascades three first-order 8-bit cores (`sdm_core`). Each
core is an accumulator whose carry is the 1-bit output. The stages are
combined as `c1 + (1−z⁻¹)c2 + (1−z⁻¹)²c3`. That sum lies in −3..4; it is
shifted by −1 to the 4-bit signed range −4..3.

**`frac_divider`** is a down-counter.

- It reloads with `NI + 1 + y` at terminal count, so its average ratio is
  `NI + F/256`.
- FBCLK is registered and rises on the reload. It therefore has no
  glitches and a fixed delay from the DCO edge.

## Lock detection

**`lock_detector`** counts FBCLK with a Gray-coded counter. The counter
is synchronised into the REFCLK domain, and at the end of every 4096-cycle
reference window the difference is checked against 4096 ± 4 (0.1 %).

- `coarse_lock` is set by the first passing window and stays set.
- `lock` needs two passing windows in a row.

## Behavioural parts and synthesis

Three parts are analogue standard-cell circuits in silicon. They are
written as delay-based models with the real parts' ports:

- `gro_ring`, the ring oscillators;
- `clone_delay`, the matched delay line;
- `dco_ring_array`, the DCO core.

Synthesis tools ignore the delays, so these models synthesize to
combinational loops; these loops are the oscillators themselves. The
phase detector's clear path (output → AND → async clear) is also reported
as a loop, and it is intended.

Everything else is ordinary synchronous or asynchronously reset logic.

Simulation notes:

- The phase detector flops have no reset input. If both power up set, the
  clear is already high and only takes effect at the next clock edge.
- Every file uses `timescale 1ps/1fs`.

## Departures and limits

- **Acquisition input range.** The 11-bit conversion format holds ±1023
  counts, i.e. ±17 ns to ±28 ns depending on the channel. Acquisition
  pulses of up to 40 ns therefore saturate, which only slows the frequency
  pull-in.
- **Start frequency.** The loop always starts from the centre control word
  (about 1 GHz at five cells). Targets near the ends of the range take
  longer to acquire: about 65 500 reference cycles for 1347.5 MHz, against
  12 300 for 1030 MHz.
- **Weight width.** Weights are rounded to whole ps (5 bits). Their rounding
  error, not the quantisation, dominates the error of the combined output
  for large inputs.
  - Measured over ±2 ns inputs with the start weights, the combined output
    is off by 21.8 ps RMS in SIMO mode and 9.1 ps RMS in MIMO mode.
  - The models have no jitter or mismatch. The 7 ps / 11 ps effective
    resolutions expected for the silicon cannot be reproduced here.
- **Design choices.** The following are this design's own choices:
  - the estimator's exact form (sign-data LMS on first differences,
    step 2^-10);
  - the `tdco_ps` input;
  - the lock rule of two windows;
  - the calibration thresholds;
  - the control-word split (4 coarse + 6 fine bits);
  - the FBCLK clocking of the back end.
- **Reference frequency.** References up to 110 MHz work in these models.
  In silicon, the clone window limits MIMO operation to references of at
  most 100 MHz.
- **Bypassed cells.** The DCO model adds up the fine codes of all seven
  cells, even when calibration bypasses two or four of them. In silicon,
  the codes of bypassed cells would have no effect, so with 3 or 5 cells
  some fine steps would be flat.
- **Weight range.** The weights are 5 bits, so no resolution above
  31.5 ps can be represented. The slowest ring (27.5 ps typical) therefore
  tolerates at most about 14 % slow-down.
- **Not modelled.** Noise, jitter and power.

## Verification

Every block has a self-checking testbench in `tb/`, named `tb_<module>`.
Each prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it establishes |
|---|---|
| `tb_phase_detector` | UP/DN width equals the edge difference, both clear afterwards |
| `tb_clone_delay` | pulses, also much shorter than the delay, reappear unchanged after the set delay |
| `tb_gro_ring` | edges counted per window match window/resolution for both gears; frozen when disabled |
| `tb_gro_counter_bank` | SIMO/MIMO sequencing, sign, saturation, counter wrap |
| `tb_tdc_postproc` | combiner arithmetic in both modes against a model |
| `tb_tdc_res_estimator` | estimates converge to wrong-on-purpose true resolutions |
| `tb_mimo_tdc` | error equals 8·Δt within weight rounding; MIMO no worse than SIMO |
| `tb_dco_ctrl_decoder` | all 1024 codes: ring count, no FCW of zero, fine sum linear and monotonic |
| `tb_dco_ring_array` | frequency formula for rings, fine codes and cell counts |
| `tb_dco_calibration` | slow/nominal/fast corners and the cycle count to `done` |
| `tb_loop_filter` | response against a floating-point model, K3, saturation |
| `tb_lock_detector` | offsets of 0, 0.05, 0.2 and 5 %: coarse lock, lock, loss of lock |
| `tb_mash111_sdm` | output range, bounded running error, exact mean, cycle match with a reference model |
| `tb_frac_divider` | every FBCLK period equals NI+1+y DCO cycles |
| `tb_adpll_ctrl` | state sequence and fall-back on loss of lock |
| `tb_adpll_top` | whole loop at default parameters |
| `tb_adpll_workloads` | whole loop across the operating range |
| `tb_adpll_corner` | whole loop with a 30 % slow DCO (three-cell rings) and 10 % slow TDC rings (estimator tracking) |

`tb_adpll_top` runs the complete design with no parameter changes:
100 MHz reference, NF = 10 + 77/256.

- It passes through calibration, boosted acquisition, coarse lock (at
  reference cycle 8194) and lock with MIMO switched on (cycle 12292).
- Averaged over 2000 reference periods, the DCO is at 1030.10 MHz, against
  1030.08 MHz expected.
- It counts each mechanism and fails if one never happens:
  - calibration;
  - K3 boost;
  - coarse lock and lock;
  - SIMO and MIMO conversions;
  - negative and positive modulator steps;
  - resolution estimation.
- After lock, every estimated weight must still equal the rings' true
  resolution to within one LSB. It does: 19/17, 22/20, 25/23, 28/26 ps.

`tb_adpll_workloads` repeats the check at three operating points:

- 800 MHz (100 MHz × 8), locked after about 32 800 reference cycles;
- 1000 MHz (80 MHz × 12.5), locked after about 8 200;
- 1347.5 MHz (110 MHz × 12.25), locked after about 65 500.

`tb_adpll_corner` runs 1030.08 MHz at a slow corner:

- `DCO_SPEED = 0.7`: calibration chooses three-cell rings, and the loop
  locks after about 28 700 reference cycles.
- `TDC_SCALE = 1.1`: every TDC ring is 10 % slower than typical. Starting
  from the typical weights, the estimator settles within one LSB of the
  true resolutions (21/19, 24/22, 27/26, 31/29 ps against
  20.35/18.7 … 30.25/28.6 ps).

## Simulating

The package must come first. Everything else is found by module name:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/adpll_pkg.sv tb/tb_adpll_top.sv --top-module tb_adpll_top
./obj_dir/Vtb_adpll_top
```

Swap in any other testbench name for `tb_adpll_top`. The full-loop
testbenches take from a few seconds to about two minutes.

The top's parameters, defaults first:

| Parameter | Default | Meaning |
|---|---|---|
| `DCO_SPEED` | 1.0 | process corner of the DCO model |
| `TDC_SCALE` | 1.0 | process corner of the TDC rings: true / typical resolution |
| `KP` | 1591 | proportional gain |
| `ALPHA_Q16` | 624 | IIR coefficient 1−α, in 2^-16 |
| `K1_Q36` | 2577 | overall gain, in 2^-36 |
| `LOCK_WIN` | 12 | log2 of the lock window |
| `CAL_WIN` | 256 | calibration window in cal_clk cycles |

The TDC resolutions, the clone delay and the estimator's step size are
parameters of `mimo_tdc` and `tdc_res_estimator`. Shared widths and types
are in `adpll_pkg`.
