# Multiplier-free space vector PWM controller for a three-phase inverter

This is a digital space vector pulse width modulator (SVPWM) for a two-level,
three-phase voltage source inverter. Three phase reference samples go in, and
six gate signals for the bridge switches S1..S6 come out.

The usual SVPWM algorithm uses a Clarke transform with constants 1/3 and
1/sqrt(3), an arctangent to find the sector, and sine functions to get the
dwell times. This design replaces all of that with shifts, adders,
subtractors and one magnitude comparison:

1. Two scaled intermediate variables, `xd` and `xq`, stand in for the
   d-q components.
2. The sector comes from the signs of `xd` and `xq`, plus one test,
   |xd| > |xq/2|.
3. The dwell times come from a per-sector 2x2 matrix. Its entries are 0, ±1
   and ±1/2, so it needs no multiplier.
4. A counter turns the times into a centre-aligned seven-segment pulse
   pattern.

Everything up to the pulse generator is combinational.

## Signal chain

```
 va,vb,vc ──► svpwm_xdq ──xd,xq──► svpwm_sector ──sector──┐
                        │                                 ▼
                        └──────────xd,xq──────────► svpwm_times ──tn,tn1,t0──► svpwm_pwm_gen ──► gate[6:1], pwm
                                                                                 (counter, clk)
```

| File | Role |
|---|---|
| `rtl/svpwm_pkg.sv` | `sector_e`: sectors 1..6, binary-coded 3'd1..3'd6 |
| `rtl/svpwm_xdq.sv` | `xd = 2va - vb - vc`, `xq = 2(vb - vc)` (combinational) |
| `rtl/svpwm_sector.sv` | sector decision (combinational) |
| `rtl/svpwm_times.sv` | dwell times `tn`, `tn1`, `t0` (combinational) |
| `rtl/svpwm_pwm_gen.sv` | counter, per-sector edge positions, gate outputs (clocked) |
| `rtl/svpwm_top.sv` | wires the four together |

## The intermediate variables and their scale

The real d-q components of a balanced reference are Vd = A·cos(alpha) and
Vq = A·sin(alpha). The design uses

    xd = 2va - vb - vc = 3·A·cos(alpha)
    xq = 2(vb - vc)    = 2·sqrt(3)·A·sin(alpha)

So xd = k·cos(alpha) and xq = (2/sqrt(3))·k·sin(alpha), with k = 3A. At that
ratio the sector boundary of 60° is exactly the line |xd| = |xq/2|. The
time equations below also come out exact at that ratio.

**Departure from the source algorithm.** In the source algorithm, xq is
written as `vb - vc`. That is half the value its own sector rules and
decomposition matrix need: with it, the first sector boundary would sit near
74° instead of 60°, and the dwell times would be wrong. This design follows
the sector rules and the matrix, and doubles xq with a second one-bit shift.
As a result, `xq` is always even and `xq >>> 1` is exact.

Widths: the `VW`-bit inputs give `VW+2`-bit `xd` and `xq`, which cannot
overflow. The default `VW = 6` gives the 8-bit `xd` and `xq` of the original
controller.

## Sector decision

| xd | xq | 2·abs(xd) > abs(xq) | sector |
|---|---|---|---|
| ≥0 | ≥0 | yes | 1 |
| any | ≥0 | no | 2 |
| <0 | ≥0 | yes | 3 |
| <0 | <0 | yes | 4 |
| any | <0 | no | 5 |
| ≥0 | <0 | yes | 6 |

The test |xd| > |xq/2| is done as 2·|xd| > |xq|. For the even `xq` of this
chain the result is the same, and it avoids rounding an odd value. On an exact
boundary the table picks one of the two neighbouring sectors. The pulses do
not depend on which one: at a boundary one of the two times is zero, and the
same physical vector gets the other time.

## Dwell times

| sector | tn (vector Vn) | tn1 (vector Vn+1) |
|---|---|---|
| 1 | xd − xq/2 | xq |
| 2 | xd + xq/2 | xq/2 − xd |
| 3 | xq | −xd − xq/2 |
| 4 | −xd + xq/2 | −xq |
| 5 | −xd − xq/2 | xd − xq/2 |
| 6 | −xq | xd + xq/2 |

`t0 = TPWM − tn − tn1`.

These times are exactly `k·sin(n·60° − alpha)/sin 60°` and
`k·sin(alpha − (n−1)·60°)/sin 60°`. They are already in clock ticks, because
the input scale is fixed: **the DC-link voltage corresponds to TPWM/2 LSBs of
the phase inputs**. One consequence is worth knowing: the average line
voltage over a period, in input LSBs, equals the difference of the inputs.
For example, (on-time of A − on-time of B)/(2·TPWM) · Vdc = va − vb.

Over-modulation means `tn + tn1 > TPWM`. This design handles it in its own
way:

- `t0` becomes 0.
- `tn` is limited to `TPWM`.
- `tn1` gets the rest.
- `overmod` is raised.

With the defaults (6-bit inputs, TPWM = 128), no input can over-modulate: the
largest line voltage is 63 LSBs, below Vdc = 64 LSBs. A smaller `TPWM` makes
over-modulation reachable.

## Pulse pattern

One PWM period is `2·TPWM` clock cycles. In each period a counter runs from
0 to `2·TPWM−1`, and the switching state goes

    000 (t0/2) → first active vector → second active vector → 111 (t0) → second → first → 000 (t0/2)

The pattern is symmetric about the centre of the period. In odd sectors Vn
comes first; in even sectors Vn+1 comes first. Each phase has one rise count
`off`, and is high while `off ≤ cnt < 2·TPWM − off`. With h = floor(t0/2):

| sector | A | B | C |
|---|---|---|---|
| 1 | h | h+tn | h+tn+tn1 |
| 2 | h+tn1 | h | h+tn+tn1 |
| 3 | h+tn+tn1 | h | h+tn |
| 4 | h+tn+tn1 | h+tn1 | h |
| 5 | h+tn | h+tn+tn1 | h |
| 6 | h | h+tn+tn1 | h+tn1 |

The upper switches are S1 (A), S3 (B) and S5 (C). The lower switches S4, S6
and S2 are their complements. **No dead time is inserted.** A real bridge
needs a dead-time stage between `gate` and the drivers.

## Timing and interface of `svpwm_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `va`, `vb`, `vc` | in | VW | two's-complement phase references (Vdc = TPWM/2 LSBs) |
| `sample` | out | 1 | the inputs are taken at the end of this cycle |
| `gate[6:1]` | out | 6 | gate k drives switch Sk |
| `pwm[2:0]` | out | 3 | {A,B,C} upper-switch states |
| `sector` | out | 3 | sector of the period being output |
| `overmod` | out | 1 | the period being output was limited |
| `period_start` | out | 1 | first output cycle of each period |

- **Sampling.** `sample` is high in the last counter cycle of a period. The
  inputs need to be valid only in that cycle. The sampled values set the
  whole next period, so a period never changes half-way.
- **Latency.** The outputs are registered and lag the counter by one clock.
  The period built from a sample appears at the outputs from the second
  clock edge after the sampling cycle on, marked by `period_start`.
- **After reset.** All six gates stay low until the first period starts.
- **Defaults.** `VW = 6` and `TPWM = 128` give a 256-cycle period, which is
  2.56 µs (about 390 kHz) at a 100 MHz clock. For a lower switching frequency,
  raise `TPWM` and scale the inputs to Vdc = TPWM/2; `VW` may be raised too.

Coarse synthesis of the default top gives 51 flip-flop bits and about 120
word-level cells.

## Choices not fixed by the source algorithm

- The input width, the value of `TPWM`, and the input scaling that removes
  the time multiplier.
- The factor 2 on `xq` (see above).
- Sampling once per period, registered outputs, and gates low after reset.
- How over-modulation is limited.
- For odd `t0`, the extra tick goes to the 111 vector.
- No dead time.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb/tb_svpwm_xdq.sv` | all 2^18 inputs against the floating-point Clarke transform |
| `tb/tb_svpwm_sector.sv` | all 2^16 (xd, xq) pairs against `atan2`, with either neighbour accepted on exact boundaries |
| `tb/tb_svpwm_times.sv` | every xd and every even xq against the trigonometric dwell-time formulas; both the linear and the over-modulation regimes |
| `tb/tb_svpwm_pwm_gen.sv` | 300 periods with random inputs between samples; time in each switching state, per-phase on-time, symmetry, vector order, complementary gates, period length, quiet gates after reset |
| `tb/tb_svpwm_top.sv` | end to end at `TPWM = 32` over a rotating reference of growing amplitude, then random samples |
| `tb/tb_svpwm_top_full.sv` | end to end at the default parameters |

The end-to-end checks in `tb_svpwm_top` do not reuse the RTL's formulas:

- The line-voltage identity above: the on-time difference of A and B is
  4·(va − vb).
- The zero-vector time is split evenly.
- Over-modulation is flagged exactly when 2·(vmax − vmin) > TPWM, and the
  phases then saturate.
- The reported sector matches the Clarke angle.

The test also counts each mechanism: every sector, linear and over-modulated
periods, zero-vector-only periods, and inputs changing between samples. A
mechanism that never occurs counts as a failure. `tb_svpwm_top_full` runs the
same checks at the defaults, where over-modulation cannot happen.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    --top-module tb_svpwm_top rtl/svpwm_pkg.sv tb/tb_svpwm_top.sv
./obj_dir/Vtb_svpwm_top
```

Each testbench finishes in well under a second.
