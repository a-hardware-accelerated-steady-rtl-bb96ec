# Gauss-Seidel power-flow solver in fixed-point hardware

A power-flow (load-flow) calculation finds the steady-state complex voltage,
magnitude and phase angle, at every bus of an electrical grid, given what each
bus consumes or generates and the admittances of the lines that join them. This
RTL solves it with the Gauss-Seidel scheme. Each bus voltage is repeatedly
replaced by

    V_k  <-  (1 / Y_kk) * ( (P_k - jQ_k) / conj(V_k)  -  sum_{n != k} Y_kn V_n )

where `P_k` and `Q_k` are the real and reactive power injected at bus k and `Y`
is the bus admittance matrix. Unlike Newton-Raphson, the scheme needs no
Jacobian and handles a flat start (all voltages 1.0 at angle 0). Each bus update
needs only that bus's row of `Y` and the current voltages, so the buses can be
updated side by side in hardware.

The design follows a published FPGA prototype that solves a 5-bus grid. It has
one swing bus, one voltage-controlled bus and three load buses, all numbers are
signed 32-bit Q16.16 fixed point, and all problem data is fixed when the design
is built. The RTL is written from that description. Where the description gives
only the function of a part, the part is built in the simplest way that gives
that function. The section "Departures and open points" below lists where the
RTL differs from the description and which choices are this design's own.

## Bus types

| bus (default index) | known | unknown | unit |
|---|---|---|---|
| swing (0, "A") | \|V\| = 1.0, angle 0 | - | none, never updated |
| voltage-controlled (2, "C") | P, \|V\| | Q, angle | `pv_bus_unit` |
| load (1, 3, 4 = "B", "D", "E") | P, Q | \|V\|, angle | `pq_bus_unit`, one per bus |

The default grid has lines A-D, B-D, B-E, C-E and D-E. The line impedances,
loads, generation and limits in the top-level parameters are this design's
example values. The original description lists these quantities as build-time
inputs but gives no numbers for them.

## Number format

`fxp_pkg` defines `fx_t`, a signed 32-bit value with 16 fractional bits
(resolution 1.5e-5, range +/-32768), and `cplx_t`, a packed pair `{re, im}`.
`fx_mul` keeps the full 64-bit product and rounds it to nearest. Complex add,
subtract, conjugate and multiply are functions built on it. All ports carry
these types. CORDIC angles are in radians.

## One iteration step (`gs_solver`)

```
            start
              |
        +-----v------+   N_BUS words, 1/cycle
        |  init_rom  |-------------------------+
        +------------+                         v
                                       voltage registers v[0..4]
                                               |
      +----------------+--------------+--------+------+
      v                v              v               v
 pv_bus_unit      pq_bus_unit    pq_bus_unit     pq_bus_unit
  (bus 2)           (bus 1)        (bus 3)         (bus 4)
      |                |              |               |
      +---- all done --+--------------+---------------+
                       v
          write all new voltages back, next step
```

After `start` the controller copies the initial voltages out of `init_rom`
(N_BUS + 1 cycles). It then runs `N_ITER` = 100 steps. In a step, all bus units
start in the same cycle and read the voltages from the start of the step. The
controller waits until every unit has pulsed `done` and then writes all results
back at once. Within a step every unit therefore sees the previous step's
values: this is a Jacobi-style sweep, which is what updating the buses in
parallel implies. The voltage-controlled unit is by far the slowest, so a step
lasts as long as that unit takes plus 2 cycles. There is no convergence test.
The run ends after `N_ITER` steps and `done` pulses.

Outputs: `v_out` (all bus voltages, held after `done`), `iter_count`,
`cycle_count`, `q_pv` (the reactive power of the voltage-controlled bus in the
last step), `q_limited` (whether that Q was clamped in the last step) and
`limit_hits` (the number of steps in which it was clamped).

## Regular (load) bus update (`pq_bus_unit`)

Four stages run in sequence:

1. **Multiply-and-add.** Two `cx_mac` units run at the same time. One sums
   `Y_kn V_n` over the buses numbered below k, the other over the buses
   numbered above k. Each computes one complex product per cycle.
2. **Divide by the conjugate.** `cx_div` forms `(P - jQ) / conj(V_k)`.
3. **Subtract** both sums from the quotient.
4. **Multiply** by `1/Y_kk`. This value is a build-time constant (`INV_YKK`),
   so the unit needs no second division.

Latency: `max(k, N_BUS-1-k) + NR_ITERS + 8` cycles, which is 16 or 17 cycles
for the default sizes.

## Voltage-controlled bus update (`pv_bus_unit`)

At this bus P and |V| are fixed, but Q is unknown and must be estimated in each
step. The fixed magnitude is stored as its natural logarithm (`LN_VMAG`), so
that a voltage of that magnitude at angle d is the complex exponential
`exp(ln|V_spec| + j d)`. The unit runs these stages:

1. **To polar.** The `cordic` unit in vectoring mode gives the angle d_k of
   the present voltage V_k. It then computes `e^LN_VMAG` in hyperbolic mode and
   rotates that magnitude by d_k. The result, V_k^s, is V_k moved onto the
   set-point magnitude with its angle kept.
2. **Accumulate.** One `cx_mac` forms the injected current
   `I_k = sum_n Y_kn V_n` over all buses, with V_k^s in place of V_k.
3. **Power.** `Q = Im(V_k^s conj(I_k))`. The result is clamped to
   `[Q_MIN, Q_MAX]`, and `q_limited` records the clamp. A real generator has
   reactive power limits: when one is hit, the bus can no longer hold its
   voltage.
4. **Gauss-Seidel.** An embedded `pq_bus_unit` runs the regular update from
   V_k^s with P and the clamped Q and gives an intermediate voltage V'.
5. **Exponentiate.** The `cordic` unit takes the angle of V' and rotates the
   set-point magnitude by it: `V_k = exp(ln|V_spec| + j angle(V'))`.

If Q was clamped in stage 3, stage 5 is skipped and V' is the new voltage:
for that step the bus behaves as a load bus with Q at its limit, and its
magnitude is free. Computing Q from V_k^s rather than from V_k matters here.
Its value then does not depend on how far the magnitude drifted while the bus
was clamped, and the bus does not flip between its two behaviours on
alternate steps.

One `cordic` unit serves all five CORDIC operations. Latency:
`N_BUS + max(k, N_BUS-1-k) + NR_ITERS + 5*ITERS + 30` cycles, which is 142
cycles for bus 2 with the defaults, and `2*ITERS + 6` fewer (96) when Q is
clamped.

## Operators

**Divider (`fx_div`).** The operator does not divide directly. It computes the
reciprocal of |b| by Newton-Raphson, `x <- x (2 - |b| x)`, and then multiplies
that reciprocal by a. The seed needs no table. If the leading 1 of |b| is at
bit p of the 32-bit word, the seed is a single 1 at bit `32 - p - 1`. For
example, a leading 1 at bit 27 gives a seed bit at position 4. As a Q16.16
number the seed is between half of 1/|b| and 1/|b|, so the iteration converges,
rising from below, and the error squares in each step. `NR_ITERS` = 5 steps
bring the worst case below 2^-32. The reciprocal is kept with 32 fractional
bits. The quotient is rounded to nearest and saturates on overflow. Division by
zero returns the largest value of the right sign and sets `div_by_zero`.
Latency: `NR_ITERS + 3` cycles, or 2 cycles when b = 0.

**Complex divider (`cx_div`).** It computes `a / b = a conj(b) / |b|^2`: one
cycle for the products, then two `fx_div` units run in parallel for the real
and imaginary parts. Latency: `NR_ITERS + 4` cycles.

**CORDIC (`cordic`).** It performs one shift-and-add micro-rotation per cycle
and has 24 fractional bits inside (8 guard bits). Modes:

| `mode` | operation | outputs |
|---|---|---|
| 0 rotate | `(x + jy) e^(jz)`, \|z\| <= pi | x_out, y_out |
| 1 vector | magnitude and atan2 | x_out = \|x + jy\|, z_out = angle |
| 2 exp | hyperbolic rotation of (1/K_h, 0) | x_out = e^z, y_out = e^-z, \|z\| < 1.118 |

The circular modes first turn the input by a quarter turn, so that the whole
circle is covered. The hyperbolic mode repeats steps 4 and 13. One multiply at
the end removes the CORDIC gain. The tables hold `round(atan(2^-i) * 2^24)` and
`round(atanh(2^-k) * 2^24)`. From step 8 on, both tables equal `2^(24-i)`.
Latency: `ITERS + 2` cycles, or `ITERS + 4` cycles for exp.

**ROM (`init_rom`).** It holds the initial voltages, returns one word per
address and has a registered read.

## Timing and results

With the default parameters, a full solve (100 steps) takes
`N_BUS + 1 + 100 * 144` = 14,406 cycles (each step is the
voltage-controlled update plus 2 cycles). The default grid converges to these
voltages:

| bus | \|V\| | angle |
|---|---|---|
| A (swing) | 1.000 | 0.00 deg |
| B | 0.958 | -6.17 deg |
| C (voltage-controlled) | 1.020 | -4.66 deg |
| D | 0.974 | -3.70 deg |
| E | 0.988 | -5.55 deg |

Q at bus C settles near 0.41, which lies inside the default limits of
[-0.3, 0.5]. The fixed-point results agree with a double-precision run of the
same iteration to within 2e-3.

The original prototype needed 2.13 us (213 cycles at 100 MHz) for a
regular-bus update, 8.09 us for a voltage-controlled update and 818 us for a
full solve. Its operators were not pipelined and ran like subroutine calls.
This RTL needs 16-17 cycles and 142 cycles for the two updates. It has no
timing or frequency results of its own: it has only been simulated, not
placed and routed.

## Departures and open points

- **Sign of Q.** The update uses `P - jQ` over `conj(V_k)`, the usual form for
  injected power. The original write-up of the formula shows `P + jQ`.
- **Stages of the voltage-controlled update.** The original names the stages
  "convert V_k to polar", "accumulate angle contributions" (repeated),
  "compute real power", the regular-bus stages and "exponentiate to compute
  new voltage". It gives no formulas for them. This RTL computes the power in
  rectangular form from the summed current, not as a sum of angle terms. It
  calls the result Q, not real power, because P is given at this bus while Q
  has limits. The order of the stages follows the original, with a second
  polar conversion (of the updated voltage) before the exponential.
- **Reactive limits.** The original lists the limits as inputs but does not
  say how they act. Here a clamped bus is treated as a load bus for that step,
  the common practice, with Q computed at the set-point magnitude.
- **Parallel, Jacobi-style steps.** The buses update in parallel from the
  previous step's values. Whether the original fed new values forward inside
  a step is not known.
- **Iteration count.** `N_ITER` = 100 is fixed, with no stopping test. The
  original gives no stopping rule. Its run time of 818 us at 8.09 us per
  voltage-controlled update suggests about 100 steps.
- **Divider seed.** The seed rule (a 1 at bit 32 - p - 1) is the original's.
  Read as Q16.16, it is a *lower* bound on the reciprocal; the original text
  calls it an upper bound. The lower bound is what makes the iteration
  converge.
- **Own choices.** These were all chosen for this RTL: the iteration counts
  (`NR_ITERS`, `ITERS`), the 32-bit-fraction reciprocal, the CORDIC guard bits
  and range folding, one product per cycle in `cx_mac`, two dividers in
  `cx_div`, one shared CORDIC per voltage-controlled unit, the start/done
  handshakes, asynchronous active-low reset, and the example grid.
- **Not built.** The platform around the FPGA that ran the original solver is not part
  of this RTL: the host computer, its interconnect and I/O chip, the QDR SRAM
  banks and their controllers, the configuration FPGA and the register-access
  core. The solver's start, done and results are plain ports instead.
- **Scaling.** The design is dense and uses one unit per bus. `N_BUS`,
  `SWING_BUS` and `PV_BUS` are parameters, and any number of load buses gets
  its own `pq_bus_unit`. The controller supports exactly one
  voltage-controlled bus. A grid of thousands of buses would need a sparse
  admittance store and shared, pipelined units, which this RTL does not have.
- **Precision.** `1/Y_kk` is a Q16.16 constant. For the default grid it has
  only about 11 significant bits, so the solution differs from an exact
  calculation by about 1e-3 per unit. The testbenches compare against a
  double-precision model that uses the same constants.

## Files

| file | content |
|---|---|
| `rtl/fxp_pkg.sv` | Q16.16 and complex types, arithmetic functions |
| `rtl/fx_div.sv` | Newton-Raphson divider |
| `rtl/cx_div.sv` | complex divider |
| `rtl/cx_mac.sv` | complex multiply-and-add over an index range |
| `rtl/cordic.sv` | CORDIC rotate / vector / exp |
| `rtl/pq_bus_unit.sv` | regular-bus update |
| `rtl/pv_bus_unit.sv` | voltage-controlled-bus update |
| `rtl/init_rom.sv` | initial-voltage ROM |
| `rtl/gs_solver.sv` | top: step controller, voltage registers, bus units |
| `tb/tb_<block>.sv` | self-checking testbench of each block |
| `tb/tb_grid_pkg.sv` | default grid constants and double-precision reference solver |
| `tb/tb_gs_solver.sv` | end to end: default solver and one with a tight Q limit |
| `tb/tb_gs_solver_full.sv` | one solve with every parameter at its default |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. To run one
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/fxp_pkg.sv tb/tb_grid_pkg.sv tb/tb_gs_solver.sv --top-module tb_gs_solver
./obj_dir/Vtb_gs_solver
```

For the block testbenches, replace the last file and the top module
(`tb_grid_pkg.sv` is needed only by the two solver testbenches). The
end-to-end test also counts how often each mechanism occurs: the units running
in parallel, steps computed from the initial voltages loaded from the ROM,
steps in which Q was clamped and steps
in which it was not. It fails if any count stays at zero.

To solve a different grid, override the `gs_solver` parameters `Y_MATRIX`,
`INV_YKK`, `P_SPEC`, `Q_SPEC`, `Q_MIN`, `Q_MAX`, `LN_VMAG` and `V_INIT`, all
in Q16.16. Set `LN_VMAG` to the natural logarithm of the voltage set-point of
the voltage-controlled bus. It must lie within +/-1.1.
