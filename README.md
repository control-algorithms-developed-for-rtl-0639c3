# ERFA amplifier control in SystemVerilog

ERFA (Enhanced Radial Field Amplifier) drives the radial field coils of the JET
tokamak to correct fast plasma disturbances. It is built from four identical
units whose outputs are in series. Each unit has a DC-link capacitor bank of
about 3 kV, an H-bridge inverter and a thyristor converter that charges the
link. Each inverter applies +3 kV, 0 V or -3 kV, so the amplifier output takes
one of nine levels from -12 kV to +12 kV.

The amplifier works by moving energy back and forth between the capacitors and
the coil inductance. Its converters only have to replace the losses. The
control therefore has two jobs:

1. Follow an unpredictable voltage demand at once. Whenever the demand moves by
   one step, the units to switch must already be known.
2. While doing that, decide which units carry the output, so that the DC links
   stay balanced and no IGBT overheats.

This RTL puts the whole real-time control in synthesizable logic. That covers
the fast functions (vector table, transition filter, current takeover,
staggered switching). It also covers the unit-selection processes that would
otherwise run on a processor (energy evaluation, anticipation, equalization),
the DC-link reference and the current regulation of the four converters.

## Signal flow

```
                                                  dig_level ─┐
 i_ref_ext / wavegen ─ current_loop ─┐                       │
                         ana_demand ─┴─ mux ─ ref_quantizer ─┴─ mux ─ limit to ±navail ─ hf_filter ─ takeover ─ stagger ─┐
                                                                                                                         │ level
          ┌──────────────── vector_mem (9 vectors, one per level) ◄──────────────────────────────────────────────────────┘
          │                    ▲ writes
          ▼                    │
   unit_switch_out ──► unit_cmd[4], unit_bypass[4]
          │ present vector, switch events
          ▼
   switch_history ─► unit_energy_eval ─► unit_ranker ×2 ─► anticipation_ctrl (even irq)
        (irq every 50 us from erfa_timebase)             └► equalizer        (odd irq)

   dclink_vref (shared) ─► converter_reg ×4 ─► conv_u[4]
```

Everything runs on one clock, 40 MHz by default (`CLK_PER_US = 40`).
`erfa_timebase` produces a 1 µs tick for all the timers. Every 50 µs it also
raises an interruption, alternately even and odd.

## Choosing the units: the core of the design

The hard part is deciding which units produce a given level. The vector memory
holds one switching vector (the state of all four units) for each of the nine
levels. A change of demand is then only a table read, and the unit commands
follow three clock cycles after the demand changes. The table is rewritten in
the background.

### Unit energy (`unit_energy_eval`, `switch_history`)

At every interruption, each available unit gets:

* **dev**: the DC-link energy deviation, `Vdc_i² − mean(Vdc²)`. The mean is
  taken over the available units only. The value is scaled by 2⁻¹², which gives
  about ±200 for a ±10 % unbalance at 3 kV.
* **pen**: a penalty, `kc/16 · (Tjmax_i + hist_i)`.
  * `Tjmax` is the larger of the IGBT junction temperature and the output
    filter resistor temperature. The resistor temperature is first scaled so
    that 400 °C on the resistor counts as 90 °C on the IGBTs.
  * `hist` is a recency value. It jumps to 15 when the unit switches and falls
    by one at each interruption.
  * `kc` is an adjustable weight in Q4.4.
* **imbal**: a flag raised when any unit's energy differs from the mean by
  more than 10 %.

### Two rankings (`unit_ranker`)

What a unit does depends on the sign of its voltage relative to the current:

* With the same sign, the unit **delivers** energy to the coil and its link
  discharges.
* With the opposite sign, the unit **recovers** energy and its link charges.

A unit holding more energy than average is the better one to deliver, and the
worse one to recover. A hot unit, or one that has just switched, is worse in
both roles. The ranker therefore sorts the units twice:

* deliver priority = `dev − pen`
* recover priority = `−dev − pen`

Ties go to the lower unit index. Bypassed units always rank last.

### Vector for one level (`vector_gen`)

The role follows from the level's sign and the current's sign. The vector for
a target level is then built with the fewest unit switchings:

* **Same polarity as now, larger magnitude:** keep the active units and add
  the best-ranked idle ones.
* **Same polarity, smaller magnitude:** switch off the worst-ranked active
  units.
* **Zero, or a change of polarity:** pick the best-ranked units afresh.

A vector never mixes +3 kV and −3 kV. It uses only available units. A level
beyond the number of available units is limited to that number.

### Anticipation and equalization

* **Anticipation (`anticipation_ctrl`, even interruptions).** Writes all nine
  table entries, one per clock cycle. Each entry is computed from the vector
  applied at that moment, so it is always a single step away from the present
  state.
* **Equalization (`equalizer`, odd interruptions).** Runs only when the
  imbalance flag is set. At the present level, the worst-ranked active unit is
  exchanged with the best-ranked idle unit. For delivering, that means the
  active unit with the least energy hands over to the idle unit with the most.
  The result is written into the table entry of the present level. The units
  therefore rotate while the output voltage stays the same. A swap happens only
  when all of these hold:
  * the level is not 0;
  * the swap improves the ranking;
  * no staggered stage or filter hold is running;
  * the table is not being rewritten.

## Reference path

| stage | behaviour |
|---|---|
| `current_loop` | Only in the current modes. A PI regulator, updated every microsecond, turns the current error into a voltage demand. |
| `ref_quantizer` | Voltage demand in volts (analogue input or `current_loop` output), converted to a level. The level changes only when the demand leaves `level·3000 ± (1500 + hyst)` V. |
| select and limit | `ref_mode` chooses the digital nine-state demand or the quantized voltage demand. The level is then limited to ±(number of available units). |
| `hf_filter` | Keeps switching below 10 kHz. If two transitions arrive less than 40 µs apart, the second one passes and every change is ignored for the next 100 µs. When the hold ends, the output takes the present input. |
| `takeover` | Watches \|I\| against two adjustable thresholds. **`th_zero`:** demands that would push the current further are replaced by 0 V. **`th_rev`:** the output goes to full voltage of the opposite polarity. Each state steps back once \|I\| falls below its threshold minus `dec`. Both thresholds are scaled by navail/4. |
| `stagger` | A step to ±12 kV from anywhere other than ±9 kV goes through ±9 kV for 100 µs, which halves the filter's resonant peak. |
| `vector_mem` → `unit_switch_out` | Table read and command register. Bypassed units are forced to 0 V and their bypass is commanded. |

The takeover comes after the filter so that a current limit is never delayed by
a filter hold. A forced full-voltage step is still staggered.

## Current-amplifier modes

For commissioning and tests the amplifier can regulate its own output current.
Two of the four `ref_mode` values select this:

* `REF_CURRENT`: the reference is the `i_ref_ext` input.
* `REF_WAVEGEN`: the reference comes from `wavegen`, the internal scenario
  player.

`current_loop` is a PI regulator:

* gains of 10 V/A and about 0.012 V/A per microsecond;
* output limited to ±13.5 kV;
* the integrator holds while the proportional part alone saturates;
* the integrator is cleared whenever a voltage mode is selected.

Its output is a voltage demand, so the rest of the reference path
(quantizer, filter, takeover, stagger) applies unchanged. Because the output
voltage moves in 3 kV steps, the current ripples around the reference.

A `wavegen` scenario is a table of up to 16 segments. Each segment has a
duration in microseconds (`wg_dur`) and a slope in A/µs, Q8.8 signed
(`wg_slope`; 256 = 1 A/µs). Segments are written through `wg_we`/`wg_addr`
while no scenario runs. Writes during a scenario are ignored. The scenario
behaves as follows:

* `wg_start` begins it at 0 A.
* Each segment ramps the reference by its slope for its duration. The
  reference saturates at ±8191 A.
* It ends after the last entry, or before an entry of zero duration. At the
  end `wg_done` pulses and the reference holds its last value.

## DC-link charging

`dclink_vref` computes the DC-link reference from the energy balance
½·C·(V0² − Vref²) = ½·L·I². This gives Vref = √(V0² − (L/C)·I²):

* `k_lc` is L/C in Q8.8 Ω². It can also absorb the share of the coil energy
  that falls on one unit.
* The result is floored at 1000 V.
* The square root is computed one bit per clock. The result is ready 14 cycles
  after `start`.

Each `converter_reg` drives its unit's converter as a current source:

1. The current target is 3 A per volt of DC-link shortfall. It is limited to
   300 A, or to 100 A when `conv_hot` is set.
2. The reference rises by at most 5 A per update and falls at once.
3. A PI loop turns the current error into the converter voltage demand
   `conv_u`, limited to 0 … 4000. Its integral gain drops to a quarter while
   the current is more than 50 A below its reference or above 250 A. The
   integrator is cleared when the reference is zero.

The four regulators update once per interruption.

## Top-level interface (`erfa_ctrl_top`)

| port | width | meaning |
|---|---|---|
| `ref_mode` | `ref_mode_t` | `REF_DIGITAL` (nine-state), `REF_ANALOG`, `REF_CURRENT` or `REF_WAVEGEN` |
| `dig_level` | signed 4 | digital demand −4 … +4 |
| `ana_demand`, `hyst` | s16, 12 | analogue demand and hysteresis, volts |
| `i_out` | s14 | output current, A |
| `i_ref_ext` | s14 | current reference for `REF_CURRENT`, A |
| `wg_we`, `wg_addr`, `wg_dur`, `wg_slope`, `wg_start` | 1, 4, 16, s16, 1 | scenario table write and start |
| `i_ref`, `wg_running`, `wg_done` | s14, 1, 1 | current reference in use; scenario status |
| `to_th_zero`, `to_th_rev`, `to_dec` | 13 | takeover thresholds and decrement, A, for 4 units |
| `unit_ok` | 4 | unit available (0 = bypassed) |
| `vdc`, `tj_igbt`, `t_res` | 4×12, 4×10, 4×10 | DC-link volts; IGBT and filter-resistor temperatures, °C |
| `kc` | 8 | weight of temperature and history, Q4.4 |
| `conv_enable`, `v0`, `k_lc`, `idc`, `conv_hot` | | converter settings and measurements |
| `unit_cmd` | `vector_t` | per unit `U_POS` / `U_ZERO` / `U_NEG` |
| `unit_bypass`, `out_level` | 4, s4 | bypass commands; level now applied |
| `vdc_ref`, `conv_iref`, `conv_u`, `conv_ki_reduced` | | converter references and demands |
| `to_state`, `to_event`, `hf_holding`, `hf_hold_start`, `stg_active`, `stg_start`, `eq_swap`, `antic_done`, `irq`, `energy_imbal`, `energy_avg` | | status and event pulses |

All inputs are sampled on the rising edge of `clk`. `rst_n` is an asynchronous
reset, active low. After reset the vector table holds all-zero vectors until
the first anticipation, 50 µs later.

Parameters: `CLK_PER_US` (40), `IRQ_US` (50), `MIN_GAP_US` (40), `HOLD_US`
(100) and `STAGGER_US` (100). The number of units (4) and the 3 kV step are
fixed in `erfa_pkg`.

## How far it follows the original design

Taken from the published description of the ERFA control:

* four units and nine levels;
* the 50 µs interruption, with anticipation on even and equalization on odd
  interruptions;
* nine precomputed vectors held in memory;
* the polarity rule;
* energy as Vdc², merged with Tj max, the 400 °C → 90 °C resistor scaling,
  switching-history penalty and correction factor;
* the 10 % equalization threshold;
* takeover to 0 V or to full opposite voltage, with adjustable threshold and
  decrement, and limits that shrink with bypassed units;
* the ±9 kV stage of about 100 µs;
* the 40 µs / 100 µs transition filter;
* the analogue demand with adjustable hysteresis;
* a closed-loop current mode and an internal waveform generator (named only);
* equation (1) for the DC-link reference;
* the 300 A / 100 A current source with ramped reference and a variable
  integral gain.

Choices made here, where the description gives the function but not the
mechanism:

* the two-role priority formula;
* the minimum-switching vector rule;
* the swap conditions;
* the two-threshold takeover state machine, with the decrement used as
  hysteresis;
* the hysteresis band shape;
* the catch-up at the end of a filter hold;
* the proportional outer law and all gains of the converter loop;
* the PI current regulator and the segment format of the scenarios;
* every number format and width, and the 40 MHz clock.

Not included:

* the data acquisition system;
* the PLC supervisor and its plant interfaces;
* the fibre links;
* gate-pulse and firing-angle generation;
* all power hardware.

The reduced switching frequency with bypassed units is not a separate
mechanism here. It follows from having fewer units to rotate.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/erfa_pkg.sv \
          tb/tb_erfa_ctrl_top.sv --top-module tb_erfa_ctrl_top
./obj_dir/Vtb_erfa_ctrl_top
```

`tb_erfa_ctrl_top` runs the whole control at its default parameters for
about 25 ms of simulated time, which takes a few seconds. It connects the control to
a model of the power circuit: a 5 mH coil, 50 mF DC links and lagging
converters, with one DC link starting 300 V low. The run goes through level
steps, a filter hold, a staggered step to +12 kV, both takeovers, the analogue
demand, the current loop at 500 A, a waveform-generator scenario (ramp to
1000 A, hold, ramp down), a bypassed unit and a hot converter. It checks two things:

* **Rules, every cycle:** no mixed polarity, bypassed units at 0 V, and no
  direct step to full voltage.
* **Outcomes:**
  * the latency from a demand to the units is at most 4 cycles;
  * the ±9 kV stage lasts 100 µs;
  * the DC-link spread shrinks;
  * every mechanism occurred at least once.

The block testbenches compare against models written independently of the RTL:

* `tb_vector_gen` checks the selection rules on 20 000 random cases;
* `tb_hf_filter` and `tb_takeover` compare cycle by cycle with behavioural
  models;
* `tb_dclink_vref` compares with an exact integer square root;
* `tb_converter_reg` closes the loop around a first-order converter model;
* `tb_current_loop` checks the PI law exactly and closes the loop around a
  5 mH coil;
* `tb_wavegen` compares every microsecond of a scenario with a model.

Some block testbenches shorten the microsecond timers with parameters.

## Files

* `rtl/erfa_pkg.sv`: types (`level_t`, `unit_state_t`, `vector_t`, `order_t`,
  `ref_mode_t`, `takeover_t`) and helper functions.
* `rtl/erfa_ctrl_top.sv`: the top.
* One file per block: `erfa_timebase`, `switch_history`, `unit_energy_eval`,
  `unit_ranker`, `vector_gen`, `anticipation_ctrl`, `vector_mem`, `equalizer`,
  `ref_quantizer`, `hf_filter`, `takeover`, `stagger`, `unit_switch_out`,
  `dclink_vref`, `converter_reg`, `current_loop` and `wavegen`.
* `tb/tb_<module>.sv`: the testbench for each module.
