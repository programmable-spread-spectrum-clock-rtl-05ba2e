# Programmable spread-spectrum clock generator (1.25 GHz, triangular down-spread)

A clock that sits at one frequency puts all its energy into one narrow
spectral line and its harmonics, which is what electromagnetic-emission limits
punish. A spread-spectrum clock generator (SSCG) sweeps the clock frequency
slowly and by a small amount. Here the sweep is a triangle between the nominal
frequency and `(1 - delta)` times that frequency. The energy of each line then
spreads over a band about `delta * f` wide, and the peak drops by roughly
`10 log10(delta * n * f0 / f_m)` dB at harmonic `n`.

This design is a fractional-N PLL. The fractional part does not come from
switching the feedback divider between two ratios. Instead the PLL has an
8-phase VCO, and a sigma-delta modulator steps the VCO phase that feeds the
feedback divider. Each step to an earlier phase removes 1/8 of a VCO period
from one feedback period. The frequency jumps are therefore eight times
smaller than with a divider-modulus change. Both the spread ratio and the
modulation frequency are programmable:

| programming word | width | sets | at the defaults |
|---|---|---|---|
| `pro_sr` | 5 bit | spread ratio | `delta = 168 * pro_sr / 2^16`, so about 2563 ppm per step. Codes 1..20 cover 2563..51270 ppm |
| `mod_div` | 6 bit | modulation frequency | `f_m = f_ref / (336 * mod_div)`. Codes 6..62 cover 310..30.0 kHz at `f_ref` = 625 MHz |
| `cp_code` | 2 bit | charge-pump current | `(cp_code + 1) * 25 uA` |
| `lf_code` | 2 bit | loop-filter resistor R2 | `(lf_code + 1) * 500 ohm`. Together with `cp_code` it sets the loop bandwidth |
| `ssc_en` | 1 bit | SSC / non-SSC mode | 0 gives a clean 1.25 GHz |

## Signal chain

```
ref_clk ─► PFD ─► charge pump ─► loop filter ─► VCO ─8 phases─► phase MUX ─► feedback divider ─┐
  ▲                                                               ▲  (÷N_FB)                    │
  └──────────────────────────── fdiv ◄────────────────────────────┼────────────────────────────┘
                                                                  │ one-hot S1..S8
   fdiv ─► programmable divider ─CLK_tri─► triangle generator ─► MASH 1-1 ─► MUX controller
            (÷mod_div)                     (step pro_sr)        (2-bit code)   (3-bit phase acc)
```

The digital part (`ssc_modulator`) runs entirely on `fdiv`, the feedback
clock. Once the loop is locked, `fdiv` runs at the reference frequency. Every
`fdiv` cycle:

1. **Programmable divider** (`prog_divider`). A 6-bit down-counter reloads
   `mod_div` after its end-of-count detector sees the state `000010`. The
   reload register adds one clock of delay, so the counter steps through
   `N .. 1` and pulses `tick` once every `N` clocks. That pulse is CLK_tri.
2. **Triangle generator** (`triangle_gen`). On each CLK_tri it adds `pro_sr`
   to a 12-bit accumulator while `sel` is low and subtracts it while `sel` is
   high. A counter flips `sel` every `STEPS` = 168 CLK_tri pulses. The output
   is a staircase from 0 up to `168 * pro_sr` and back down, repeating every
   `2 * 168 * mod_div` clocks. `sel` is brought out as the test pin that shows
   the modulation frequency.
3. **MASH 1-1 modulator** (`mash11_sdm`). Two cascaded 12-bit first-order
   accumulators. The second one integrates the registered residue of the
   first. The outputs combine as `y = c1(n-1) + c2(n) - c2(n-1)`, and the
   output is registered, so `Y = f z^-2 + (1 - z^-1)^2 E2`. Its mean is
   `f / 4096` and each value is -1, 0, 1 or 2.
4. **MUX controller** (`mux_controller`). It reads `y` as a phase step `-y`
   and adds it to a 3-bit phase index modulo 8. It then decodes the index to
   a registered one-hot word, S1 for index 000 up to S8 for 111.

| 2-bit code | y | phase step | meaning |
|---|---|---|---|
| 00 | 0 | 0 | hold |
| 01 | +1 | -1 | one phase earlier |
| 10 | +2 | -2 | two phases earlier |
| 11 | -1 | +1 | one phase later |

The code is simply `y mod 4`.

### Why a phase step changes the frequency

The feedback divider (`fb_divider`, ÷`N_FB` with `N_FB` = 2) counts the
rising edges at the MUX output. Suppose the MUX moves to a phase that is `k`
eighths later. The next rising edge it passes then comes `k/8` of a VCO period
late, so that one divider period stretches by `k/8`. In lock, one divider
period equals one reference period, so on average

```
f_vco = f_ref * (N_FB - mean(y) / 8) = f_ref * (N_FB - f / (8 * 4096))
delta = f_peak / (8 * 4096 * N_FB)
```

Zero input gives `f_vco = N_FB * f_ref` = 1.25 GHz. That is the top of the
profile: the modulation is a down-spread. The PLL low-pass filters the
staircase and the shaped sigma-delta noise, so the VCO frequency follows a
smooth triangle.

`N_FB` = 2 is forced by the spread range. One phase step per reference cycle
is worth `1 / (8 * N_FB)` of the frequency. A MASH 1-1 with a 12-bit input
can average at most just under one step per cycle. Reaching about 5 % spread
therefore needs `N_FB <= 2.5`. The reference runs at 625 MHz, and the 12-bit
adders must settle within its 1.6 ns period.

### Glitch-free phase switching (the delicate part)

The select word changes on a rising edge of `fdiv`. That edge is itself a
rising edge of the selected phase `p_k`. Switching immediately would glitch
on a step to a later phase: `p_k` is high while `p_(k+1)` is still low, so the
divider would see an extra edge. A step is safe only while the old and new
phases are at the same level. For steps of -2, -1 and +1, all phases involved
(`p_(k-2)` to `p_(k+1)`) are high between 1/8 and 1/4 of a VCO period after
the edge. That window is 100 to 200 ps at 1.25 GHz.

The multiplexer model therefore applies a new select `T_SEL` = 165 ps after
it arrives. This stands for the clock-to-output delay of the controller
flip-flop plus one gate. In silicon, this timing is a constraint on the
controller and MUX layout. If you change the VCO frequency or the number of
phases, you must move `T_SEL` into the new window. `tb_phase_mux` catches a
select path without delay (its fault copy produces glitches).

## The PLL models

The PFD, charge pump, loop filter, VCO and phase MUX are behavioural models,
written with `real` signals and delays. They exist so that the digital
modulator can be simulated in closed loop, and they are not meant for
synthesis.

- `pfd`: two set/reset flops and a reset path with a delay of 60 ps. In lock,
  UP and DN both pulse for about 60 ps, which avoids a dead zone.
- `charge_pump`: net current `+-I` with `I = (cp_code + 1) * 25 uA`.
  Mismatch and charge sharing are not modelled.
- `loop_filter`: C1 = 10 pF in parallel with R2 + C2 (C2 = 120 pF), then
  R3 = 1 kohm / C3 = 2 pF as a third pole. The model integrates the node
  equations in steps of at most 10 ps and also at every current change, so
  pulse widths are exact.
- `vco`: a ring of four differential delay cells (`vco_delay_cell`), closed
  with a crossed pair, so one edge runs round it and the period is eight cell
  delays. Phases 0-3 are the true outputs of the cells and phases 4-7 their
  complements, so phase `k` lags phase 0 by `k/8` of a period. Each cell
  delays by `1/(8 f)`, with the linear tuning law
  `f = 1.25 GHz + 680 MHz/V * (vctrl - 0.6 V)` taken at the moment its input
  switches. The circuit's second, negative-skewed input on each cell raises
  its top speed. Here that effect is folded into the cell delay. The
  frequency rises with `vctrl` to match the pump polarity. A cell whose latch
  slows it as `vctrl` rises would need the UP and DN currents swapped.

With `cp_code` = 3 and `lf_code` = 1, the open-loop unity-gain bandwidth is
about 5 MHz, with about 50 degrees of phase margin. That is more than ten
times the 300 kHz maximum modulation frequency, which keeps the triangle
undistorted, and well below the 625 MHz reference. The component values were
chosen for this model. Only the topology, the 2-bit programmability, 1.25 GHz
and 680 MHz/V are taken from the original design.

## Measured in simulation

`tb_sscg_workloads` runs the top at its default parameters. It checks the
following (frequency = mean over 128 VCO periods):

| target | words | delta / f_m built | f_max | f_min (expected) |
|---|---|---|---|---|
| non-SSC | `ssc_en`=0 | - | 1.250000 GHz | 1.250000 |
| 5000 ppm, 30 kHz | 2 / 62 | 5127 ppm / 30.0 kHz | 1.2500 | 1.2436 (1.2436) |
| 32500 ppm, 30 kHz | 13 / 62 | 33325 ppm / 30.0 kHz | 1.2500 | 1.2084 (1.2083) |
| 50000 ppm, 30 kHz | 20 / 62 | 51270 ppm / 30.0 kHz | 1.2500 | 1.1859 (1.1859) |
| 5000 ppm, 150 kHz | 2 / 12 | 5127 ppm / 155.0 kHz | 1.2500 | 1.2436 (1.2436) |
| 5000 ppm, 300 kHz | 2 / 6 | 5127 ppm / 310.0 kHz | 1.2499 | 1.2436 (1.2436) |
| 2500 ppm, 300 kHz | 1 / 6 | 2563 ppm / 310.0 kHz | 1.2499 | 1.2468 (1.2468) |

The programming words quantise the targets. Spread lands within +2.6 % of
the target and modulation frequency within +3.3 %.

`tb_sscg_spectrum` estimates the spectrum of the clock's fundamental. It
takes the edge times over one modulation period, which gives a resolution
bandwidth equal to `f_m`, and computes
`X(f) = sum_k exp(-j 2 pi f t_k) (t_(k+1) - t_k)`. For an unspread clock the
peak of `|X|` equals the captured time span, so the peak reduction is
`20 log10(span / peak)`. The estimate `10 log10(delta * f0 / f_m)` is the
ideal spreading of a triangle profile.

| Profile | Peak reduction | Estimate |
|---|---|---|
| 5127 ppm, 30 kHz | 18.9 dB | 23.3 dB |
| 33326 ppm, 30 kHz | 27.1 dB | 31.4 dB |
| 51270 ppm, 30 kHz | 29.0 dB | 33.3 dB |
| 5127 ppm, 155 kHz | 11.9 dB | 16.2 dB |
| 5127 ppm, 310 kHz | 9.0 dB | 13.2 dB |

The reduction grows with spread and falls with modulation frequency as the
estimate does, and stays a steady 4.3-4.4 dB below it. The estimate assumes
a perfectly flat spread band. In every case the measured peak sits near the
low edge of the band (for example 1.2441 GHz for a band that ends at
1.2436 GHz). There the frequency dwells while the triangle turns, and the
spectrum ripples up above its flat level.

The loop-bandwidth words trade noise against tracking. At 5127 ppm and 30 kHz,
the rms change of the output period from one cycle to the next is 0.033 ps
with `cp_code` = `lf_code` = 3, against 0.008 ps with both at 0: the narrow
loop smooths more of the modulator's phase steps. The other side of the
trade, a narrow loop rounding off a fast profile, does not show in this
model. At 2563 ppm and 310 kHz with both words at 0, the loop is also less
damped, and it overshoots the profile instead of flattening it.

Absolute jitter and eye diagrams were not checked. They depend on the transistor-level
circuits, and the models here reproduce only ideal transfer functions.

## Where this design makes its own choices

The following are choices of this implementation, and are not given by the
structure above:

- **Frequency plan**: a 625 MHz reference with `N_FB` = 2, and `STEPS` = 168.
  The latter puts 30 kHz exactly at `mod_div` = 62 and gives about 2.5 kppm
  per `pro_sr` step.
- **Clocking**: a single clock (`fdiv`) for all digital logic. The triangle
  generator uses an enable rather than a separately divided clock.
- **Reset**: an asynchronous active-low reset of all digital state, which
  leaves phase S1 selected and the triangle at 0.
- **Non-SSC mode**: `ssc_en` = 0 clears the triangle generator. `pro_sr` = 0
  has the same effect.
- **Limits**: `pro_sr` above 24 overflows the 12-bit staircase at
  `STEPS` = 168. An assertion in `triangle_gen` reports it. `mod_div` values
  0 and 1 act as 2.
- **MUX select path**: the one-hot select is registered. Its delay `T_SEL`
  is a model parameter, as described above.
- **Analog values**: all of them except the VCO centre frequency and gain.
- **VCO slope**: frequency rises with `vctrl`, and the pump charges on UP.
  The delay-cell description would suggest the opposite sign. That would
  swap the UP and DN currents and leave the loop dynamics the same.
- **Not built**: a 3-bit word that chooses among eight preset profiles. The
  top takes `pro_sr` and `mod_div` directly.

## Files

`rtl/` holds one unit per file:

- `sscg_pkg`: widths and the code enum.
- Digital, synthesizable: `prog_divider`, `triangle_gen`, `mash11_sdm`,
  `mux_controller`, `ssc_modulator` (the four wired together) and
  `fb_divider`.
- Behavioural models: `pfd`, `charge_pump`, `loop_filter`, `vco` (with
  its `vco_delay_cell`) and `phase_mux`.
- `sscg_top`: the whole generator.

`tb/` has one self-checking testbench per unit (`tb_<unit>`), plus
`tb_sscg_top` and `tb_sscg_workloads`:

- `tb_sscg_top` covers lock, the largest spread, a bandwidth-word change and
  the return to non-SSC mode. It also counts every modulator code, phase
  wrap-around, `sel` toggle and divider reload.
- `tb_sscg_workloads` covers the profiles in the table above.
- `tb_sscg_spectrum` measures the peak reduction.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

Verilator 5 with timing support. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sscg_pkg.sv tb/tb_sscg_workloads.sv \
          --top-module tb_sscg_workloads -o sim && obj_dir/sim
```

Replace the testbench name to run any other test. Every file sets
`timeunit 1ps` / `timeprecision 1fs`. The end-to-end tests simulate about
40 µs of circuit time per second and finish within seconds.

To synthesise only the digital core, use `ssc_modulator` (plus `fb_divider`)
as the top. `sscg_top` contains `real`-valued models and is for simulation
only.
