# VHF frequency synthesizer with a free-running first divider stage

This is a phase-locked-loop frequency synthesizer for the local oscillator of an
aircraft VOR navigation receiver. It generates every frequency from 98 MHz to
108 MHz in 50 kHz steps (200 channels; with a 10 MHz IF that tunes the 108–118 MHz
navigation band). A voltage-controlled oscillator (VCO) is divided by an integer N
and phase locked to a 50 kHz crystal reference. In lock F_o = N × 50 kHz, so one
step of N moves the output by one channel.

The main idea is in the divider. At about 100 MHz there are only 9–10 ns between
input pulses. That is not enough time to reset a counter that has reached N, so
the fastest counter here is never reset. How the divider still divides by an
arbitrary N is explained below; it is the part of the design that needs the most
care.

The design dates from the era of discrete emitter-coupled logic. This repository
gives synthesizable SystemVerilog for its digital parts: the variable divider,
the reference divider, the phase-detector flip-flops and the channel encoder. It
also gives behavioural models of the analog parts (crystal oscillator, VCO,
sample-and-hold, loop filter, coarse-tuning network), so the whole loop can be
simulated and seen to lock.

## The loop

```
 500 kHz crystal ─► ÷10 ─► F_R (50 kHz) ─► phase detector ─► sample & hold ─► filter ─┐
                                              ▲ set                                   │ fine
                                              │                                       ▼
 thumbwheels ─► frequency select ─► W X Y Z ─► variable divider ÷N ◄──────────── VCO ─┬─► F_o
                      │                                                        ▲ coarse
                      └──────────────────────► coarse-tuning network ──────────┘
```

* **Frequency select** (`freq_select`). The channel is dialled as decimal digits of
  the frequency in MHz. N = F_o / 50 kHz = 20 × F[MHz], so the hundreds, tens and
  units of MHz go straight to W, X and Y. The fraction of a MHz becomes Z = 0…19
  (Z = 2 × tenths, plus 1 if the hundredths digit is 5). For example,
  105.75 MHz gives W=1 X=0 Y=5 Z=15, and N = 2115. `valid` flags legal channels
  from 98.00 to 108.95 MHz.
* **Variable divider** (`variable_divider`) divides F_o by
  N = 2000W + 200X + 20Y + Z.
* **Phase detector** (`phase_detector`, plus `sample_hold_model`) turns the delay
  from the reference edge to the divider edge into a voltage.
* **Loop filter** (`loop_filter_model`) is a second-order Butterworth low-pass at
  2.5 kHz followed by a 25 kHz RC section. It suppresses the 25 kHz and 50 kHz
  ripple of the detector, which would otherwise appear as sidebands on the VCO.
* **Coarse tuning** (`coarse_tuning_model`) is a weighted resistor network
  switched by the MHz digits. It steps the VCO to within about a MHz of the
  channel, because the narrow filter limits how far the loop can pull in by itself.
* **VCO** (`vco_model`) has separate coarse and fine tuning inputs.
* **Reference** (`ref_osc_model`, `ref_divider`) is a 500 kHz crystal oscillator
  divided by ten.

`synthesizer_top` wires all of these together.

## The variable divider

### Why a conventional divider does not work

A programmable counter that counts N input pulses and then resets must finish its
reset within one input period, here about 10 ns. That was beyond the logic of the
time. In this design the first stage runs freely. Its "reset" is done by slower
control logic that changes *which* of its states is taken as the end of a count.

### Structure

| stage | modulus | weight | compared with | reloaded at end of cycle to |
|---|---|---|---|---|
| 1A (first stage) | 20, free running | 1 | (Z, via control logic) | never reset |
| 2 | 10 | 20 | Y (0–9) | **9** |
| 3 | 10 | 200 | X (0–9) | 0 |
| 4 | 2 | 2000 | W (0–1) | 0 |

The divider output is produced when stages 2, 3 and 4 all equal Y, X and W at the
same time. The output pulse reloads stages 2–4 and starts the next cycle.

### How Z is counted without resetting the first stage

The first-stage control (`vd_first_stage`) has two more mod-20 counters:

* **1B** counts *down*. A comparator fires whenever the free-running 1A equals 1B.
  That pulse is the clock to stage 2 and it also decrements 1B. With 1B fixed,
  the pulses come every 20 input cycles. Each time 1B is decremented, the next
  match comes after only **19** cycles.
* **1C** counts down from 20 together with 1B. When it reaches Z, an **inhibit**
  stops both 1B and 1C. From then on the pulses to stage 2 come every 20 cycles
  again. The divider output reloads 1C with 20, which removes the inhibit.

So in every divider cycle exactly 20 − Z intervals are one input cycle short. To
make up for this, stage 2 is reloaded with 9 instead of 0, so it needs Y + 1
pulses to reach Y. Counting input cycles over one divider cycle:

```
N = 20 · (100W + 10X + Y + 1) − (20 − Z) = 2000W + 200X + 20Y + Z
```

The 20 − Z short intervals remove 20 − Z cycles. The extra pulse into stage 2
adds 20. The net effect is +Z. Only the 1A/1B comparison and the 1A counter run
at the full input rate. Everything else happens at most once per 19 input cycles.

**A detail the scheme depends on.** When stage 2 has been reloaded with 9, its
first step (9 → 0) is the extra pulse, and it must not count as a carry into
stage 3. Otherwise N would come out 200 too small. `vd_stage` therefore marks
itself "fresh" after a reload to a nonzero value. In that state its first wrap
gives no carry and its comparator does not fire. The original hardware must have
achieved the same effect in some way that is not recorded; this flag is this
implementation's way of doing it.

### Timing of this implementation

* All divider flip-flops are clocked by the VCO output. Stages 2–4 use clock
  enables instead of the rippled clocks of the original. The count sequence is the
  same, and the design is an ordinary single-clock synchronous circuit.
* `div_out` is a one-clock pulse every N clocks. It is combinational from the
  stage registers (the AND of the three comparators). It reloads the stages at
  the next clock edge.
* The first output after reset comes early. From the second one on, the period
  is exactly N.
* A change of W, X, Y or Z takes effect in the divider cycle after the next
  output.
* The scheme needs 100W + 10X + Y ≥ 20 − Z so that all short intervals fall
  inside one cycle. This always holds in the band (N ≥ 1960).

## The phase detector and sample-and-hold

Flip-flop F1 is **set** by the divider output and **reset** by the reference, so
Q1 is low from a reference edge to the next divider edge. The low time is the
phase error, a pulse-duration-modulated signal. Every reset of F1 toggles
flip-flop F2. Successive error pulses therefore go to alternate capacitors. The
four (Q1, Q2) states are decoded into four gate signals:

| Q1 | Q2 | action |
|---|---|---|
| 0 | 1 | charge C2 (for the phase-error time) |
| 1 | 1 | discharge C1 |
| 0 | 0 | charge C1 |
| 1 | 0 | discharge C2 |

Each capacitor goes through the cycle discharge → charge for the error time →
hold for a whole reference period. Meanwhile the other capacitor does the same
half a cycle later. The larger of the two voltages is the error voltage. Compared
with averaging the PDM signal directly, this leaves much less ripple for the
filter to remove.

Differences from the original in `phase_detector`:

* F1 and F2 are synchronous to a sampling clock. In the top this is the VCO
  output, so the phase error is measured in VCO periods (about 10 ns out of
  20 µs). Both inputs pass through two flip-flops, and the detector acts on their
  rising edges.
* When the set and reset edges arrive in the same clock, set wins and F2 still
  toggles.
* F2 toggles only when a reference edge finds Q1 high. If the VCO is far too slow
  and two reference edges arrive without a divider edge, the same capacitor simply
  keeps charging. The voltage then saturates, which pushes the VCO up.

The behavioural `sample_hold_model` charges linearly at a rate that makes one full
reference period (2π of phase) worth K_p·2π, with K_p = π/6 V/rad. This is the
detector gain used in the loop's stability analysis. The model leaves out
capacitor leakage and mismatch between the two charge circuits, which in the real
circuit cause the 50 kHz and 25 kHz ripple.

## Loop dynamics

The analysis behind the loop treats it as a type-1 loop with open-loop gain
K_p·K_v·F(s)/(s·N):

* K_p = π/6 V/rad
* K_v = 2π·1.8 MHz/V
* F a second-order Butterworth with a 2.5 kHz cutoff

This is worst case at N = 1960. The unity-gain crossover is near 480 Hz. The
gain is about 6 dB below unity where the phase reaches −180°. The extra 25 kHz RC
section adds too little phase at the crossover to matter.

The behavioural models use K_p, K_v and both filter corners. The VCO offset, its
coarse gain (4 MHz/V) and the coarse-network step (0.25 V per MHz) are this
model's own values. They are chosen so that the coarse voltage puts the VCO within
0.5 MHz of the channel. With them, the simulated loop locks in about 2–2.6 ms,
including a 10 MHz step. The original hardware needed up to 15 ms for that step.
Lock times from this model are therefore illustrative only.

## Files

| file | kind | content |
|---|---|---|
| `rtl/synth_pkg.sv` | package | moduli, reset value of stage 2, band limits, `nsel_t` (W, X, Y, Z) and `n_of()` |
| `rtl/vd_first_stage.sv` | RTL | 1A, 1B, 1C, comparators, inhibit |
| `rtl/vd_stage.sv` | RTL | one slower stage with comparator (used for stages 2, 3, 4) |
| `rtl/variable_divider.sv` | RTL | the divide-by-N divider |
| `rtl/freq_select.sv` | RTL | digits → W, X, Y, Z, valid |
| `rtl/ref_divider.sv` | RTL | 500 kHz → 50 kHz |
| `rtl/phase_detector.sv` | RTL | F1, F2, gate decoding |
| `rtl/sample_hold_model.sv` | behavioural | capacitors C1/C2 and output combining |
| `rtl/loop_filter_model.sv` | behavioural | Butterworth + inverter + RC, time-stepped |
| `rtl/coarse_tuning_model.sv` | behavioural | weighted-resistor coarse voltage |
| `rtl/vco_model.sv` | behavioural | VCO with coarse and fine inputs |
| `rtl/ref_osc_model.sv` | behavioural | 500 kHz crystal oscillator |
| `rtl/synthesizer_top.sv` | top | the complete loop |

The behavioural models use `real` signals and delays. They are for simulation
only; a synthesis flow should take only the RTL files, with `variable_divider`
or the individual digital blocks as its top. `vco_model` uses a delay computed
at run time. The model limits the frequency to 90–120 MHz, so the delay is
always positive.

## Simulation

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops by itself, including through a
watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert --no-sched-zero-delay -y rtl \
          rtl/synth_pkg.sv tb/synthesizer_top_tb.sv --top-module synthesizer_top_tb
./obj_dir/Vsynthesizer_top_tb
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. The package must be
named explicitly, ahead of the testbench. Replace the testbench and top-module
name to run another testbench. `--no-sched-zero-delay` tells Verilator that no
delay is ever zero. This is true here, and it avoids a warning about the
run-time delay in `vco_model`.

What the testbenches establish:

* `variable_divider_tb` measures the output period for the band edges (N = 1960
  and 2160), the 98.55 MHz and 105.75 MHz examples, 108.95 MHz, 25 random N in
  the band and one small N. The period must equal 2000W + 200X + 20Y + Z exactly.
* `vd_first_stage_tb` checks every Z from 0 to 19. In each divider cycle it looks
  for exactly 20 − Z intervals of 19 cycles, the inhibit timing and the cycle
  length.
* `phase_detector_tb` checks that the charge time equals the imposed phase
  error, that the capacitors alternate, that discharge precedes charge, and what
  happens with a missing divider pulse and with zero error.
* `synthesizer_top_tb` runs the full-size loop with every parameter at its
  default. It dials 105.75, 98.00, 108.00, 98.55 and 105.75 MHz. On each channel
  it requires lock within 15 ms. After lock, the VCO cycle count over 200
  reference periods must be 200·N within 4 cycles. The divider output must have
  the 20 µs reference period. The testbench also counts how often each mechanism
  occurred: short intervals, inhibit, reload of stage 2, carry into stage 4,
  charging of both capacitors, coarse steps, locks and channel switches. It runs
  in a few seconds.
* `channel_sweep_tb` dials every 50 kHz channel from 98.00 to 108.95 MHz through
  `freq_select` into `variable_divider`. For each one it checks that the divider
  period is F / 50 kHz, and that out-of-band settings are flagged invalid.
* `pull_in_tb` offsets the coarse tuning so that the loop starts 0.5, 1.0 and
  1.2 MHz below and above the channel. It checks that the loop still locks
  within 15 ms onto N × 50 kHz. It then checks hold-in: from lock, the coarse
  voltage is moved in 0.25 MHz steps up to 2.0 MHz above and below its proper
  value, and the loop must stay locked at every step. At a 3.5 MHz offset it
  must be out of lock.
* The model testbenches check the oscillator periods, the sample-and-hold gain
  and hold, the filter gain at dc, 250 Hz, 2.5 kHz, 25 kHz and 50 kHz, the
  coarse steps and the VCO tuning law.

## Where this differs from the original and what is missing

* **Synchronous clocking.** The original uses rippled stage clocks and
  input-triggered flip-flops. This implementation clocks everything from one
  clock with enables (divider, phase detector) and samples the reference.
* **Carry suppression after the reload to 9** (see above). This is required for
  N to come out right, but it is this implementation's mechanism.
* **Frequency-select encoder and `valid` flag.** The original only says the
  fraction is "encoded" into Z.
* **Analog parts are models,** not circuits. Ripple, sidebands, noise,
  temperature drift and the 0.005 % crystal stability are not represented,
  except for an optional ppm offset on the crystal. The coarse network and the
  VCO tuning curve use invented constants, since no values are given for them.
* **Hold-in and pull-in range.** The original loop held lock over about 4.7 MHz
  and pulled in over about 2.4 MHz. In the models the fine-tuning range is the
  full detector swing (K_p·2π ≈ 3.3 V) times K_v, about 5.9 MHz. Pull-in is
  verified to cover at least ±1.2 MHz, and hold-in at least ±2.0 MHz, about
  the measured 4.7 MHz in all (`pull_in_tb`). Lock is lost at ±3.5 MHz. The
  exact limits lie between those values and have not been searched for.
* **Not built:** the variant for the communications band (108–126 MHz, 25 kHz
  channels, 25 kHz reference and a divide-by-40 first stage). The first-stage
  modulus is a parameter of `vd_first_stage`, but the package, the encoder and
  the models are set up for the 50 kHz navigation design only.
