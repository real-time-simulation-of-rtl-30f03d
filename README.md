# Real-time model of three parallel PWM rectifiers

This design is a hardware-in-the-loop simulator for the input stage of a
traction converter. In that stage, three single-phase H-bridge PWM rectifiers
are fed from three secondary windings of one transformer and charge one
common DC-link capacitor.

A real converter control unit (ECU) drives the twelve IGBT gate signals of
the simulated bridges. In return it reads the circuit's response as analog
signals:
- the primary voltage and current;
- the three branch currents;
- the DC current and the DC-link voltage.

To be believable to the controller, the model must compute one integration
step of the whole circuit every h = 6.25 µs. At 40 MHz that is 250 clock
cycles. Every value is double-precision floating point. The budget is small:
two floating-point multipliers and two floating-point adders.

The model follows a published LabVIEW FPGA implementation on a Virtex-5
board. The circuit equations, conduction states and switching rules come
from that implementation, and so do the operator budget, the step length and
the loop rates. The scheduling of the arithmetic, the floating-point units,
the host and DAC interfaces and all formats are this design's own.

## The circuit and its state-space form

Branch *i* (i = 1..3) consists of:
- a secondary winding with voltage u_as,i = p_i · u_ap, where p_i is the
  transformation ratio and u_ap the primary voltage;
- a series resistance R_i = R_as,i (+ R_c while charging);
- an inductance L_i;
- an H-bridge of transistors T1..T4 with anti-parallel diodes D1..D4.

All three bridges feed the DC link C1, which is loaded by the current i_l.

The model has four state variables and six inputs:
- state x = (i_as1, i_as2, i_as3, u_d);
- input u = (u_as1, u_as2, u_as3, i_l, U_D, U_T), where U_D and U_T are the
  forward voltages of a diode and a transistor.

The bridge is reduced to a controlled voltage u_av between the winding and
the DC link:

    u_av = k·u_d + aS·u_as + aD·U_D + aT·U_T
    L di_as/dt = u_as − R·i_as − u_av
    C1 du_d/dt = Σ k_i·i_as,i − i_l

The coefficients (k, aS, aD, aT) are fixed by what conducts. There are seven
conduction states. The sixteen raw combinations drop to seven because leg
shorts are excluded and pairs that look the same from outside are merged.

| state | conducting            | k  | aS | aD | aT | u_av            |
|-------|-----------------------|----|----|----|----|-----------------|
| 1     | nothing (open)        | 0  | 1  | 0  | 0  | u_as            |
| 2     | D1 & D4               | +1 | 0  | +2 | 0  | u_d + 2U_D      |
| 3     | D3 & D2               | −1 | 0  | −2 | 0  | −u_d − 2U_D     |
| 4     | D3 & T1 (or D2 & T4)  | 0  | 0  | −1 | −1 | −(U_D + U_T)    |
| 5     | T2 & D4 (or D1 & T3)  | 0  | 0  | +1 | +1 | U_D + U_T       |
| 6     | T4 & T1               | +1 | 0  | 0  | −2 | u_d − 2U_T      |
| 7     | T2 & T3               | −1 | 0  | 0  | +2 | 2U_T − u_d      |

The step is explicit Euler with matrices pre-multiplied by h:
x ← x + hA·x + hB·u. The outputs are y = C·x + D·u.

The outputs are, per branch:
- u_av, the bridge voltage;
- u_R = R·i_as;
- u_L = u_as − u_R − u_av.

There are also two overall outputs:
- the DC current i_d = Σ k_i·i_as,i;
- the primary current i_ap = Σ p_i·i_as,i.

Most matrix elements are always zero. Only 52 can be non-zero: 9 of hA, 10
of hB, 15 of C and 18 of D. Only these are built (`matrix_builder`) and
multiplied. The formulas are in the header of `rtl/matrix_builder.sv`. All
state-dependent factors are 0, ±1 or ±2, so the matrices are built by sign
flips and exponent increments, with no multiplier.

## Choosing the next conduction state

This is the subtle part of the model (`rtl/switch_manager.sv`). After the
Euler step, each branch decides its state for the next step. The decision
uses:
- the new current i_as;
- the present u_as;
- the previous step's u_R and u_L, through v = u_as − u_R − u_L;
- the new u_d;
- the gate word.

**Groups.** The states are split by current direction:
- group 1 = {2, 5, 7}, where the current flows positive;
- group 2 = {3, 4, 6}, where the current flows negative;
- the open state 1 belongs to neither.

Each group has a function that returns the highest state of the group whose
condition holds, or 1 if none holds. A state's condition has two parts:
- it may need certain gates on:
  - state 5 needs T2 or T3; state 7 needs T2 and T3;
  - state 4 needs T1 or T4; state 6 needs T1 and T4.
- and then either current is already flowing in the group's direction
  (i ≥ I_min or i ≤ −I_min, and non-zero), or the voltage v is enough to
  make that path start conducting.

| state | voltage that starts conduction |
|-------|--------------------------------|
| 2     | v ≥ u_d + 2U_D                 |
| 3     | v ≤ −(u_d + 2U_D)              |
| 4     | v ≤ −(U_D + U_T)               |
| 5     | v ≥ U_D + U_T                  |
| 6     | v ≤ u_d − 2U_T                 |
| 7     | v ≥ 2U_T − u_d                 |

**Infinitesimal open state.** Which function runs depends on the previous
state:
- If the branch was in a group, that group's function runs first.
- If it returns 1, the current has died or reversed within the step. The
  branch is then taken to pass through the open state for an instant, with
  i = 0, u_R = 0 and u_L = 0. The other group's function is evaluated with
  i = 0 and v = u_as.
- From the open state, both functions run and the higher result wins.

This lets a branch go from one group to the other in a single step, e.g. from
state 5 (T2 & D4) to state 3 (D3 & D2). The branch neither sticks in the
open state for one step nor oscillates. A branch whose contactors are open
is forced to state 1.

**Open-state correction.** If a branch ends in state 1 but its current is
non-zero after the Euler step, that current is cleared. Its contribution
hA(4,i)·i_as,i is then subtracted from the new u_d. The solver keeps that
product from the Euler step for this purpose.

Branches are handled one after the other, 1 to 3. Each uses the u_d already
corrected by the branches before it, which is why the state switch is
sequential.

## The solver: 148 clocks on four floating-point units

`rtl/solver.sv` runs a fixed micro-program (`solver_pkg::build_prog`,
132 instructions). It works on a register file of 108 binary64 words plus
the 52 matrix elements.

Instructions:

| instruction       | what it does                                                                      |
|-------------------|-----------------------------------------------------------------------------------|
| `MUL`             | dst = a·b                                                                         |
| `ADD` / `SUB`     | dst = a ± b                                                                       |
| `SUBC`            | subtract only if branch `br` has just gone open; this is the open-state correction |
| `SW br`           | run the switch manager for one branch                                             |
| `BUILD`           | latch new matrices                                                                |
| `END`             | end of the step                                                                   |

The program has five phases:
1. Transformer and constants: u_as,i = p_i·u_ap, R_i, hR_i/L_i, 2U_D, U_D + U_T,
   2U_T, v_i. Then `BUILD` (new R, same states).
2. Euler step over the sparse elements, keeping hA(4,i)·i_as,i.
3. For each branch:
   - thresholds u_d + 2U_D and u_d − 2U_T from the current u_d;
   - `SW`;
   - `SUBC` on u_d.
4. `BUILD` with the new states.
5. Outputs u_av, u_R, u_L, i_d and i_ap.

**Issue rules.**
- Up to two instructions issue per clock, in program order, to one of the
  two multipliers and two adders.
- A pending bit per register holds back any instruction whose source or
  destination is still being computed.
- The destination address of each operation in flight rides in a small tag
  FIFO beside its unit. The FIFO is popped when the unit raises `rdy`.
- `SW`, `BUILD` and `END` wait until nothing is in flight.

With 6-cycle units a step takes 148 clocks. That leaves 102 of the 250
available. The original implementation needed 208 ticks for its loop.

The floating-point units (`fp_mul`, `fp_add`) follow the interface of the
Xilinx Floating-Point Operator:
- ports a, b, operation_nd, operation_rfd, sclr, ce, rdy and result;
- `operation_nd` marks valid input, and `rdy` marks valid output.

Behaviour and choices of this design:
- Each unit accepts one operation per clock, with LATENCY = 6.
- Rounding is IEEE round-to-nearest-even.
- Subnormal numbers are flushed to zero. They never arise at the circuit's
  magnitudes.
- Infinities and NaNs are not produced.

## Around the solver

`rtl/rect_hil_top.sv` is the complete FPGA design. It contains:

| block                                     | what it does                                                                                                                                                                                                                                                       |
|-------------------------------------------|--------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------|
| step timer                                | Starts a step every STEP_TICKS = 250 clocks. A start that finds the solver busy is refused and counted in `overruns`.                                                                                                                                                 |
| `pwm_input`                               | Two-flop synchronisers for the 12 gate signals. Gate word bit 0 = T1 … bit 3 = T4. Flags a leg short (T1 & T2 or T3 & T4) live in `shoot_through` and sticky in `pwm_fault` until `fault_clr`. The model keeps simulating by its own rules.                            |
| `connection_logic`                        | The four contactors S0 (start voltage), S1 (charging), S2 (line) and S3 (load), `sw[j]` = S_j, shared by all branches. See the table below.                                                                                                                          |
| `host_input`                              | 1024-word FIFO from the host. Each frame is two doubles: u_ap, then i_l. Both take effect together once the second word arrives. The solver samples them at the next step start.                                                                                      |
| `analog_output`                           | Every DECIM = 10 steps (16 kHz), writes seven signed 16-bit DAC codes: u_ap, i_ap, i_as1..3, i_d, u_d. Code = round(value·2^shift) with a per-channel `ao_shift`, rounding half away from zero and saturating. Codes appear one clock after the step ends, with a one-clock `ao_update`. |
| `host_logger`                             | Every tenth step, one 17-word frame to the host FIFO (see below). If the FIFO lacks room for a whole frame, the frame is dropped and counted (`t2h_dropped`), so the host never sees a torn frame.                                                                     |
| `sync_fifo`                               | First-word-fall-through FIFO used by both host streams.                                                                                                                                                                                                            |

Contactor mapping in `connection_logic`:
- S0 open sets every p to 0, so there is no secondary voltage.
- A branch is connected when S1 or S2 is closed.
- S2 open puts R_c in series.
- S3 open sets i_l to 0.

`sys_state` reports the connection step:

| code | meaning                             |
|------|-------------------------------------|
| 0    | off                                 |
| 1    | primary only                        |
| 2    | charging over R_c                   |
| 3    | R_c bridged                         |
| 4    | operation                           |
| 5    | failure: S2 without S1 (no R_c)     |
| 6    | failure: load on while charging     |
| 7    | a combination outside the table     |

`failure` is raised for codes 5 and 6.

Frame to the host (`host_logger`), 17 words of 64 bits:

| word | content |
|------|---------|
| 0    | `A5` sync byte, `sys_state`, failure, overrun-seen, shoot-through[2:0], states of branches 3, 2, 1 (3 bits each, bits 42..34), step number (bits 31..0) |
| 1–3  | i_as1..3 |
| 4    | u_d |
| 5–7  | u_av1..3 |
| 8–10 | u_R1..3 |
| 11–13| u_L1..3 |
| 14   | i_d |
| 15   | i_ap |
| 16   | u_ap |

The host must set the model constants on `par`:
- per branch: R_as, R_c, h/L and p;
- shared: U_D, U_T, h/C1 and I_as_min.

h/L and h/C1 must use the same h as STEP_TICKS times the clock period. `mo`
holds every result of the last step, including the gate words the step was
computed with. `step_cycles` says how many clocks it took.

## Departures and choices

- **The host sends u_ap, not the three u_as.** The original text says the
  host sends the secondary voltages. However, its model computes them from
  the primary voltage by the transformation ratios, and it sends the primary
  voltage to the ECU. This design follows the latter: one u_ap per step, with
  u_as,i = p_i·u_ap inside the solver.
- **Switching conditions.** Only the conditions of state 3 were given
  explicitly. The others are written from the conducting elements of each
  state, mirrored between the groups.
- **No i_d clamp.** An earlier, simpler variant forced i_d to zero whenever
  it went negative. The grouped switching manager with open-state correction
  replaces it, and no separate clamp is applied.
- **Disconnected branches.** The original removes a branch by giving it a
  huge R_as and p = 0. Here the contactor logic forces such a branch open
  directly. The huge-R_as method still works through `par`.
- **Free choices of this design.** The following were not given and were
  chosen freely:
  - the floating-point unit latency;
  - FIFO depths;
  - the frame formats and the DAC scaling;
  - the synchroniser depth;
  - the overrun handling;
  - reset behaviour (synchronous, active high, everything cleared, all
    branches open).

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb/rect_ref_pkg.sv` is an independent real-valued model of one step. It is
written straight from the equations above, with sums taken in the same order
as the hardware. Results agree to within 1e-9 relative.

| testbench                | what it covers                                                                                                                                                                                                                                     |
|--------------------------|----------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------|
| `tb_fp_mul`, `tb_fp_add` | Random and edge-case operands against real arithmetic, back-to-back issue, latency.                                                                                                                                                                  |
| `tb_switch_manager`      | Directed cases per state and group transition, plus random cases against the reference.                                                                                                                                                             |
| `tb_matrix_builder`      | All 7³ state combinations against the formulas.                                                                                                                                                                                                     |
| `tb_solver`              | 3000 steps: charging, bridging, load, 900 Hz sine-triangle PWM, one branch removed. Every output and state of every step against the reference; every state 1–7, a current reversal through the open state, an open-state correction, an overrun, and the 250-clock limit. |
| `tb_rect_hil_top`        | The whole design at its default parameters (see below).                                                                                                                                                                                             |

`tb_rect_hil_top` runs 3200 steps, about 0.8 million clocks. In it:
- The host streams a 50 Hz, 500 V primary voltage and a 6.65 A load.
- The gates are driven by three carriers offset by a third of a period.
- The contactors go through every row of the connection table, including
  both failure states.
- One leg is shorted briefly.
- The host stops reading for 800 steps so that frames are dropped.

It checks:
- every step against the reference;
- one step per 250 clocks;
- every logged frame against the step it names;
- every DAC code.

It counts each mechanism and fails if one never happened.

`tb_rect_hil_workloads` runs the design at default size in the two
situations the simulator is built for, judged only from the 16 kHz host
stream:

- **One rectifier.** Branches 2 and 3 are removed by R_as = 1e10 Ω, p = 0
  and gates off. The remaining branch sees a 250 V, 50 Hz secondary voltage
  and a 6.65 A load. The removed branches carry exactly zero current. The
  DC link rises to about 426 V after 0.14 s under open-loop modulation. The
  charge balance C1·du_d/dt = i_d − i_l holds over the window to about 1 %.
- **Two rectifiers.** Same inductances, carriers first in phase, then
  shifted by a quarter carrier period. A DFT of the logged primary current
  over 0.1 s shows the ripple power within ±300 Hz of twice the carrier
  frequency fall from 7.4 A² to 0.22 A².

Simulate with plain Verilator 5, packages first. For example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rect_hil_top \
      rtl/fp_pkg.sv rtl/rect_pkg.sv rtl/solver_pkg.sv tb/rect_ref_pkg.sv \
      rtl/sync_fifo.sv rtl/fp_mul.sv rtl/fp_add.sv rtl/switch_manager.sv \
      rtl/matrix_builder.sv rtl/connection_logic.sv rtl/pwm_input.sv \
      rtl/host_input.sv rtl/host_logger.sv rtl/analog_output.sv rtl/solver.sv \
      rtl/rect_hil_top.sv tb/tb_rect_hil_top.sv -o sim && obj_dir/sim

This run takes about ten seconds including the build. For a unit test,
replace the top module and the last file, and drop the modules it does not
use.

## Limits

- The step program is a constant list built for three branches. Changing
  NBR means rewriting `build_prog`.
- Arithmetic is binary64 without subnormals, infinities or NaNs. A model
  that diverges saturates nothing; the DAC codes clip.
- The analog front end, the optical gate-signal link, the real-time
  controller that forwards the host streams, and the PC are outside this
  RTL. The design ends at the DAC codes, the synchronised gate inputs and
  the two 64-bit streams.
