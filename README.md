# 3-D nearest-level SVPWM with voltage balancing for a cascaded 3-level NPC converter

This is a space-vector PWM modulator for a three-phase cascaded converter.
Each phase is a series string of h cells, and each cell is a 3-level
neutral-point-clamped (NPC) H-bridge. A cell has two 3-level arms and two
dc capacitors, C1 and C2, so it can put out -2, -1, 0, +1 or +2 units.
The phase therefore has n = 4h+1 levels. The default is h = 2: nine phase
levels and 17 line-voltage levels.

The modulator works without sector tables, trigonometry, multipliers or
dividers. It maps the three phase references onto three line-voltage axes
(the "3-D" coordinate system). Sign tests and integer parts then find the
vertex of the modulation triangle. After that, the problem is the same as
for a two-level converter: each phase spends part of the switching period on
level Wx and the rest on Wx+1. Everything is done with additions,
subtractions and comparisons.

The same level sequence is then used to balance the converter's capacitors
in two ways:

- **Mutual-cell balancing.** When the phase level steps by one unit, exactly
  one cell changes its output by one unit. The cell is chosen from the cells'
  dc-link voltages and the sign of the current.
- **Inner-cell balancing.** Inside a cell, the output levels +1 and -1 can each
  be made by two arm-state pairs. The pair is chosen so that the phase current
  charges or discharges whichever capacitor needs it.

Balancing therefore adds no switching transitions to the ones the modulation
needs anyway.

## Signal flow

```
 v_ref (Va,Vb,Vc) ──► svpwm_core ──► nlm_level_gen ──► mutual_cell_balance ──► inner_cell_balance ──► gates
                     (4-stage pipe)   (per period)      (one per phase)         (one per cell)
                      W, D, region    phase level        cell levels C1..Ch      pair {S1,S2}, 8 switches
 m_asc / m_desc ─────────┘  ▲ next_desc   │                    ▲                      ▲
 disc_mode ──────────────┘  └─────────────┘      vc1+vc2, i_pos/i_neg          vc1, vc2, i_pos/i_neg
```

| file | role |
|---|---|
| `rtl/svpwm_pkg.sv` | number formats, structs and enums |
| `rtl/line_voltage_gen.sv` | Va,Vb,Vc → Vm,Vn,Vp |
| `rtl/vertex_detect.sv` | bottom vertex S and redundant vector S+m(1,1,1) |
| `rtl/remainder_calc.sv` | remainder vector relative to that vertex |
| `rtl/duty_calc.sv` | region and duty cycles (continuous or discontinuous) |
| `rtl/svpwm_core.sv` | the four steps above, one pipeline register each |
| `rtl/nlm_level_gen.sv` | period ramp, ascending/descending level pattern |
| `rtl/mutual_cell_balance.sv` | phase level → levels of the h cells |
| `rtl/inner_cell_balance.sv` | cell level → switching pair and gate signals |
| `rtl/svpwm_cmc_top.sv` | the whole modulator for three phases |

## The 3-D coordinates

All voltages are normalised so that one converter level is 1.0. A phase
reference then runs from 0 to n-1. The three axes are the line voltages:

```
Vm = Va - Vb      Vn = Vb - Vc      Vp = Vc - Va        (Vm + Vn + Vp = 0)
```

A switching state (Sa, Sb, Sc) of integer phase levels maps onto
(Sm, Sn, Sp) = (Sa-Sb, Sb-Sc, Sc-Sa). All states that differ only by a
common offset, such as (0,2,0), (1,3,1) and (2,4,2), land on the same point.
These are the redundant states of one space vector. The one with the
smallest component equal to 0 is called the *bottom* vector. Adding
m(1,1,1) to it gives the other redundant states.

## Finding the vertex: areas, integer parts and the m factor

Only the signs of two line voltages are needed to find the vertex nearest
the origin of the triangle that holds the reference (`vertex_detect`):

| area | condition | bottom vector (Sa, Sb, Sc) |
|---|---|---|
| 1 | Vn ≥ 0, Vp ≤ 0 | (int(Vm+Vn), int(Vn), 0) |
| 2 | Vm ≤ 0, Vp ≥ 0 | (0, int(Vn+Vp), int(Vp)) |
| 3 | Vm ≥ 0, Vn ≤ 0 | (int(Vm), 0, int(Vm+Vp)) |

Inside each area every argument of int() is non-negative. The integer part
is therefore just the fixed-point value with its fraction bits dropped.

The output vector is S + m(1,1,1). The factor m picks which of the redundant
states is used:

- m = 0 uses the bottom vector.
- Larger m lifts all three phases together. This changes the common-mode
  voltage and which cells carry the load, but not the line voltages.

The top takes two m values:

- `m_asc` is used for ascending periods.
- `m_desc` is used for descending periods.

A well-known example is m = 1 for ascending and m = 0 for descending. In a
five-level converter that gives the phase sequence 3 → 4 → 3 → 2 over two
periods.

m is clamped so that the highest phase, plus the extra level it reaches
during the period, stays at or below n-1 (see Departures).

## Remainder and duty cycles

With the vertex known, the reference is moved to it (`remainder_calc`):

```
Vm1 = Vm - Sm      Vn1 = Vn - Sn      Vp1 = Vp - Sp
```

The remainder lies inside the unit two-level hexagon around the vertex.
The signs of the remainders give one of six regions. Each phase duty cycle
Dx is the fraction of the period spent on level Wx+1, and is a short sum of
remainders (`duty_calc`).

**Continuous mode.** The zero-vector time is split evenly between (0,0,0)
and (1,1,1) of the local hexagon:

| signs | Da | Db | Dc |
|---|---|---|---|
| Vm1, Vn1 alike | (1-Vp1)/2 | (1-Vm1+Vn1)/2 | (1+Vp1)/2 |
| Vm1, Vp1 alike | (1+Vm1-Vp1)/2 | (1-Vm1-Vp1)/2 | (1-Vn1)/2 |
| Vn1, Vp1 alike | (1-Vn1-Vp1)/2 | (1+Vn1+Vp1)/2 | (1-Vn1+Vp1)/2 |

**Discontinuous mode** (`disc_mode = 1`). Only one of the two zero vectors is
used, so one phase does not switch during that period:

| signs | Da | Db | Dc |
|---|---|---|---|
| Vm1 +, Vn1 + | 1 | 1-Vm1 | 1+Vp1 |
| Vm1 -, Vn1 - | 0 | -Vm1 | Vp1 |
| Vm1 +, Vp1 + | 1-Vp1 | 1+Vn1 | 1 |
| Vm1 -, Vp1 - | -Vp1 | Vn1 | 0 |
| Vn1 +, Vp1 + | 1+Vm1 | 1 | 1-Vn1 |
| Vn1 -, Vp1 - | Vm1 | 0 | -Vn1 |

A duty cycle carries one more fraction bit than a voltage. The halving in
the continuous table is therefore exact and costs nothing. A remainder of
exactly zero is treated as positive; both candidate rows give the same
result on that boundary. Results are clamped to 0..1, so a reference outside
the hexagon cannot wrap around.

## Levels within a switching period

`nlm_level_gen` turns (Wx, Dx) into a staircase. In every period each phase
is on Wx for (1-Dx)·Ts and on Wx+1 for Dx·Ts:

- **Ascending period:** Wx first, then Wx+1 once the ramp reaches 1-Dx.
- **Descending period:** Wx+1 first, while the ramp is below Dx, then Wx.

Alternating the two directions (`dir_sel = DIR_ALT`) is the usual setting.
An ascending period ends on Wx+1 and the next descending period starts
there. A phase whose base level does not change therefore makes no step at
the period boundary. Alternation also lets the two directions use
different m.

The period ramp is a CAR_W-bit phase accumulator that advances by `car_inc`
every clock:

- Ts = 2^CAR_W / car_inc clocks.
- The switching frequency can be changed on line. A new car_inc sets the
  ramp speed from the next clock, so only the period in progress has an
  intermediate length.
- With a 50 MHz clock, 5 kHz needs car_inc = 1678 and 2 kHz needs 671.

Wx and Dx are latched when the accumulator wraps. `next_desc` tells the
modulator the direction of the coming period, so it can apply the matching
m factor.

`f_rise` and `f_fall` pulse for one clock at each level step of a phase.
In the top, the balancing blocks watch the level itself and act on the same
steps. The pulses are left unconnected there, and the top's `step_up` and
`step_dn` outputs report the steps instead.

## Spreading a phase level over the cells (mutual-cell balancing)

Each phase keeps a vertical vector [C1 … Ch] of cell levels, each in -2…+2,
whose sum is the phase level minus 2h (`mutual_cell_balance`). When the
phase level steps by one unit, exactly one cell moves by one unit.

With positive current, a cell whose output rises takes energy, so its
dc link charges. The cell to move is therefore chosen as follows:

| level step | current > 0 | current < 0 |
|---|---|---|
| rises | lowest Vdc | highest Vdc |
| falls | highest Vdc | lowest Vdc |

The rules also say:

- Only cells that can still move in that direction are eligible.
- Ties, and zero current, go to the highest-index cell.
- With two cells this reproduces the published two-cell rule exactly.
- A cell's Vdc is taken as Vc1 + Vc2.

When the base level jumps by more than one unit at a period start, the
vector follows one unit per clock until its sum matches the phase level.

## Inside a cell (inner-cell balancing and gate decoding)

An arm state S is 2, 1 or 0: the arm output is tied to P, to the neutral
point O, or to N. The cell level is S1 - S2. `inner_cell_balance` uses:

| level | pair {S1,S2} | used when |
|---|---|---|
| +2 | {2,0} | always |
| +1 | {2,1} | Vc1 < Vc2 and i > 0, or Vc1 > Vc2 and i < 0 |
| +1 | {1,0} | otherwise |
| 0 | {1,1} | always |
| -1 | {1,2} | Vc1 > Vc2 and i > 0, or Vc1 < Vc2 and i < 0 |
| -1 | {0,1} | otherwise |
| -2 | {0,2} | always |

The first choice for +1 passes the current through C1; the second passes it
through C2. {0,0} and {2,2} also give level 0. They are not used, because
{1,1} is one arm step away from every +1 and -1 pair. The pair is chosen
again only when the cell level changes. A balancing decision therefore
never causes a transition of its own.

Arm states decode to the four switches of an NPC leg, two of them on:

- 2 → Sx1, Sx2
- 1 → Sx2, Sx3
- 0 → Sx3, Sx4

`gates[3:0]` drives S_x11..S_x41 (arm 1) and `gates[7:4]` drives
S_x51..S_x81 (arm 2). No dead time is inserted: the gate drivers are
expected to add it.

## Number formats and timing

Word lengths are set in `svpwm_pkg`:

| name | value | meaning |
|---|---|---|
| FRAC_BITS | 12 | fraction bits of a voltage (1 level = 4096) |
| REF_W | 18 | signed voltage word; references below 32 levels |
| DUTY_FB / DUTY_W | 13 / 14 | duty fraction bits / word (1.0 = 8192) |
| LVL_W | 5 | phase level 0…31 |
| M_W | 4 | m factor 0…15 |
| VM_W | 12 | capacitor voltage measurement (any unit; only compared) |

Parameters:

- `svpwm_cmc_top #(N_CELLS = 2, CAR_W = 24)`.
- `svpwm_core` and `vertex_detect` take `N_LEVELS`. The top sets it to
  4·N_CELLS+1.
- With the default word lengths the core works up to 31 levels.
- 40 levels would need REF_W = 19 and LVL_W = 6.

Timing:

- `svpwm_core` is a four-stage pipeline. It has a latency of 4 clocks and
  accepts a new sample every clock.
- In the top the core runs continuously on the live references. Its result
  is sampled at each period start.
- `nlm_level_gen` outputs are registered.
- `cell_level` follows a phase-level step by one clock.
- `cell_pair` and `gates` follow by two clocks.
- All registers use an asynchronous active-low reset, `rst_n`.

Top-level inputs and outputs:

- Inputs:
  - `v_ref`: three vfix_t values.
  - `m_asc`, `m_desc`, `disc_mode`, `dir_sel`, `car_inc`, `bal_en`.
  - `i_pos[x]` / `i_neg[x]`: sign of the phase current. Both are low for
    "about zero".
  - `vc1[x][k]`, `vc2[x][k]`: capacitor voltages of cell k in phase x.
- Outputs:
  - `phase_level[x]`, `cell_level[x][k]`, `cell_pair[x][k]`,
    `gates[x][k][7:0]`.
  - For observation: the latest `duty`, `region`, `period_start`, `desc`,
    `step_up`, `step_dn`.

## Departures from the published method, and choices it leaves open

- **m range.** The method allows m up to n-1-max(S). In a period each phase
  also visits Wx+1, so that upper value would request level n, which does
  not exist. Here m is clamped to n-2-max(S), and to 0 when that is
  negative.
- **Discontinuous zero vector.** One sentence of the method's description
  puts (1,1,1) in region 2 and (0,0,0) in region 5. Its discontinuous duty
  table does the opposite with respect to its own region table. The duty
  table is followed.
- **Falling-step rule.** The method's flow chart prints the same voltage
  and current test for a rising and a falling step. Its equation for the
  falling step, and the energy argument around it, use the opposite test.
  The equation is followed: with positive current, the cell with the higher
  dc-link voltage steps down.
- **Arm decoding.** The listed switch states for arm state 1 disagree with
  the worked example (two inner switches on). The worked example, the
  standard NPC clamped state, is followed.
- **More than two cells.** Mutual-cell balancing is stated for two cells.
  The rule above generalises it to h cells. The published three-cell level
  path was not reproduced step by step.
- **Saturation.** The following are saturated rather than wrapped:
  - integer parts beyond n-1;
  - duty cycles outside 0…1;
  - Wx+1 beyond n-1;
  - cells already at ±2.
- **Choices the method leaves open.** These are this design's own:
  - when a pair is re-chosen (only on level changes);
  - tie-breaking;
  - the pipeline split;
  - the carrier as a phase accumulator;
  - the direction policy;
  - reset values: all cells at 0, phase level 2h.
- **Not included.**
  - The power stage.
  - The reference (sine) generator.
  - Voltage and current measurement.
  - Any split of the logic over several FPGAs.
  - The top expects references, capacitor voltages and current signs as
    inputs.
- **Resource figures.** The published logic-cell count, and a computation
  time of about 226 ns, are for an unstated device and clock. This RTL has
  not been synthesised for comparison. At 50 MHz its four-clock latency is
  80 ns.

## Testbenches

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Each has a watchdog. Expected values come from a separate reference model,
`tb/svpwm_ref_pkg.sv`. That model finds the bottom vertex by subtracting the
lowest phase and flooring. It computes duty cycles from the ordering of the
phases' fractional parts, not from the sign tables.

| testbench | what it shows |
|---|---|
| `tb_line_voltage_gen`, `tb_vertex_detect`, `tb_remainder_calc`, `tb_duty_calc` | each step against the model, random and corner cases |
| `tb_svpwm_core` | pipeline results and the 4-clock latency; the five-level m = 1 example; m clamp |
| `tb_svpwm_core_levels` | the core at 15, 25 and 31 levels side by side |
| `tb_nlm_level_gen` | ascending/descending patterns, step counts, on-line frequency change |
| `tb_mutual_cell_balance` | the cell-selection rule for 2 and 3 cells, one-unit steps |
| `tb_inner_cell_balance` | pair table, gate decoding, pair held while the level holds |
| `tb_svpwm_cmc_top` | the default 9-level top for three fundamental cycles (both duty modes, alternating and ascending periods, m changes, m clamp, balancing decisions), checked by `cmc_monitor` |
| `tb_svpwm_cmc_levels` | the top with 1 cell (5 levels) and 3 cells (13 levels); the five-level example sequence (3,3,1)→(3,4,1)→(4,4,1)→(4,4,2), then (3,3,1)→(3,3,0)→(2,3,0)→(2,2,0) |
| `tb_svpwm_cmc_balance` | closed loop with a behavioural capacitor model |

`tb_svpwm_cmc_balance` starts from unbalanced capacitors: differences of 80
units inside a cell and 40 between cells. With balancing on, both shrink to
about 1 unit within 20 fundamental cycles. With balancing off they grow.
The capacitor model is simple and idealised:

- A capacitor's voltage changes in proportion to the current it carries.
- One source per phase holds the total.

To build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/svpwm_pkg.sv tb/svpwm_ref_pkg.sv tb/tb_svpwm_cmc_top.sv \
    --top-module tb_svpwm_cmc_top
./obj_dir/Vtb_svpwm_cmc_top
```

Replace the last file and the top name for the other testbenches.
`svpwm_ref_pkg.sv` is only needed by testbenches that import it; listing it
does no harm. The default top testbench runs in well under a minute.

## Changing the design

- **Number of cells.** Set `N_CELLS`. The level count follows. Keep
  4·N_CELLS+1 ≤ 31, or widen `LVL_W` and `REF_W` together.
- **Switching frequency.** Adjust `car_inc` at run time. `CAR_W` sets the
  resolution.
- **Voltage resolution.** `FRAC_BITS` sets the voltage resolution.
  `DUTY_FB` follows it.
- **Measurements.** A different ADC width only changes `VM_W`.
