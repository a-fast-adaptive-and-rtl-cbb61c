# Glitch-driven digital LDO with a fine voltage stabilizer

A digital low-dropout regulator (DLDO) feeds a load from a bank of PMOS
switches between VDD and the output V_OUT. It turns more of them on when V_OUT
is low and fewer when V_OUT is high. A classic DLDO moves one switch per clock
edge through a shift register, so its speed is tied to its clock and its idle
current rises with the clock rate. This design splits the job in two loops:

* **A clockless coarse loop.** It acts only when V_OUT leaves a voltage
  window [V_REF_LOW, V_REF_HIGH]. Each crossing of a window edge produces a
  short *glitch* pulse. The pulse runs down a delay chain and clocks 16
  flip-flops one after the other. Each flip-flop samples the comparator
  output UP_DN and sets one large PMOS switch. No clock is involved, so the
  whole coarse array can change within a few nanoseconds of a load step.
* **A clocked fine loop, the fine voltage stabilizer.** While V_OUT is
  inside the window, it moves a 128-switch array of unit PMOS devices toward
  V_REF on each edge of F_CLK. While the comparator keeps giving the same
  answer, the step size grows 1, 2, 4, 8. When the answer flips, it steps one
  switch at a time.

The RTL in `rtl/` holds the digital control logic as synthesizable
SystemVerilog. The analog parts have behavioural models, so the whole
regulator can run in closed loop in an ordinary SystemVerilog simulator.
Those parts are the comparators, the delay elements and the PMOS arrays.

## Signals and conventions

| signal | meaning |
|---|---|
| `up_dn` | LTTC comparator: 1 when V_OUT > V_REF, 0 when below |
| `high` | 1 when V_OUT > V_REF_HIGH |
| `low` | 1 when V_OUT > V_REF_LOW |
| `lock` | `high ^ low`: 1 exactly while V_OUT is inside the window |
| `trigger` | `~(high ^ low)`: changes level at every window crossing |
| `glitch[i]` | positive pulse, the clock of coarse flip-flop *i* |
| `c_sw[15:0]`, `f_sw[127:0]` | PMOS **gate levels**: 0 = switch conducting |
| `rst` | active high. Coarse gates are forced off; the fine code is reset. |

Every switch vector carries gate levels, not enables. A coarse flip-flop can
therefore take UP_DN as it is: UP_DN = 0 means V_OUT is below V_REF, and the
same 0 on the gate turns that switch on.

## The coarse loop (`fast_adaptive_controller`)

This is the least obvious part of the design. Follow one load step:

1. The load current jumps and V_OUT falls through V_REF_LOW. `low` falls, so
   `trigger` rises (`edge_detector`).
2. `glitch_generator` XORs `trigger` with a copy of itself delayed by
   `GLITCH_PS`. Every edge of `trigger`, rising or falling, gives one pulse
   `GLITCH_PS` wide on `glitch[0]`.
3. `glitch[0]` passes through 15 `delay_cell`s to make `glitch[1..15]`,
   spaced `STAGE_PS` apart. Flip-flop *i* samples `up_dn` on the rising edge
   of `glitch[i]`.
4. During the droop `up_dn` is 0 at every sampling instant. The 16 coarse
   switches turn on one after another, `STAGE_PS` apart.
5. V_OUT rises back through V_REF_LOW, and `trigger` falls. A second glitch
   runs down the chain. Early stages may still see V_OUT below V_REF and stay
   on. Stages reached after V_OUT has passed V_REF see `up_dn` = 1 and turn
   off.

How many switches stay on therefore depends on how fast V_OUT moves. This is
the "adaptive" part: each stage of the chain takes a later sample of the same
recovery. Leaving the window at the top works the same way in the other
direction.

Timing rules:

* A flip-flop output changes right after its glitch edge. Switch *i* moves
  `i * STAGE_PS` after switch 0.
* `delay_cell` is an inertial delay, so it swallows pulses shorter than its
  delay. `STAGE_PS` must stay below `GLITCH_PS`. The defaults are 200 ps and
  300 ps.
* Two window crossings closer together than `GLITCH_PS` merge into one
  pulse. Only the first crossing is then sampled.

`pmos_driver` holds every coarse gate off while `rst` is high. The flip-flops
are also set to OFF by `rst`, so the coarse array stays off until the first
glitch.

## The fine loop (`fine_voltage_stabilizer`)

On each rising edge of `clk` (F_CLK):

* `lock` = 0: the switch count is held and the step counter is cleared. The
  coarse loop is in charge.
* `lock` = 1 and `up_dn` equals its value on the previous edge: the count
  moves by 2^k and k grows by one, up to k = 3. A run of equal samples moves
  the count by 1, 2, 4, 8, 8, …
* `lock` = 1 and `up_dn` has changed, or this is the first sample since the
  counter was cleared: the count moves by 1 and k returns to 0.

`up_dn` = 0 adds switches and `up_dn` = 1 removes them. The count saturates at
0 and 128. The 128 gates form a thermometer code: switch *i* is on when
*i* < count. This is the same thing a bidirectional shift register holds. The
`n_on` and `step` outputs exist for observation.

## Files

| file | kind | role |
|---|---|---|
| `rtl/dldo_pkg.sv` | package | array sizes, largest step exponent, gate encoding |
| `rtl/dldo_top.sv` | top | wires all blocks together; V_OUT in, pass current out |
| `rtl/fine_voltage_stabilizer.sv` | RTL | fine loop |
| `rtl/fast_adaptive_controller.sv` | RTL (uses delay cells) | coarse loop: glitch chain and 16 flip-flops |
| `rtl/glitch_generator.sv` | RTL (uses a delay cell) | one pulse per Trigger edge |
| `rtl/edge_detector.sv` | RTL | Trigger from High/Low |
| `rtl/pmos_driver.sv` | RTL | start-up gating of the coarse gates |
| `rtl/delay_cell.sv` | behavioural | analog delay element |
| `rtl/lttc_comparator.sv` | behavioural | logic-threshold comparator, V_OUT vs V_REF |
| `rtl/voltage_range_detector.sv` | behavioural | two comparators and an XOR: High, Low, Lock |
| `rtl/pmos_switch_array.sv` | behavioural | PMOS array as on-count × G_UNIT × (VDD − V_OUT) |

The behavioural models use `real` ports and `#` delays. Synthesis drops the
delays. Without them the glitch generator's XOR folds to a constant, and the
coarse flip-flops are optimised away. A netlist therefore needs hand-placed
delay cells, kept out of logic optimisation, in place of `delay_cell`. The
comparators and the switch arrays are analog and have to be custom designs.

`dldo_top` leaves the output capacitor and the load out. It takes the sensed
`vout` as an input and returns `i_pass`, the current from both arrays. A
testbench closes the loop by integrating `(i_pass - i_load) / C_OUT`.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_FINE` | 128 | design (fine array F_SW[128]) |
| `N_COARSE` | 16 | design (16 coarse switches) |
| `MAX_STEP_EXP` | 3 | design (steps up to 8) |
| `FINE_INIT_ON` | 0 | own choice |
| `CMP_PD_PS` | 300 | own choice: comparator delay |
| `GLITCH_PS`, `STAGE_PS` | 300, 200 | own choice |
| `G_FINE`, `G_COARSE` | 0.3125 mS, 40 mS | own choice: 16 coarse switches give 32 mA at 50 mV dropout, above the 23 mA maximum load; the full fine array equals one coarse switch |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test:

```
verilator --binary --timing --assert -y rtl rtl/dldo_pkg.sv tb/tb_dldo_top.sv \
          --top-module tb_dldo_top -o sim && ./obj_dir/sim
```

Use the same command for `tb_<block>` with its own name. Each block has a
testbench that checks it against an independent model:

* the fine loop runs 4,000 random cycles against a model of the flow chart,
  plus directed step, saturation and hold cases;
* the coarse loop's ripple timing is checked stage by stage, including a
  partial turn-on when UP_DN flips while the glitch is still in the chain.

The two system testbenches use the top at its default parameters, with
C_OUT = 0.1 nF, F_CLK = 500 MHz and a ±30 mV window:

* **`tb_dldo_top`**, at VDD 1.2 V and V_REF 1.15 V:
  * Light load, 0.5 mA: V_OUT stays in the window, with a ripple of about
    ±25 mV.
  * A 22.4 mA load step with a 1 ns edge: V_OUT droops about 125 mV and is
    back inside the window 2.7 ns after the step. The test requires less than
    19.1 ns. About 14 coarse switches turn on during the droop, and 11 stay
    on afterwards.
  * The fine loop then holds V_OUT within ±0.05 mV of V_REF.
  * The test counts glitches, coarse switches turned on and off, fine 1-steps,
    binary steps and 8-steps, and fine holds with Lock low. It fails if any of
    these never happens.
* **`tb_dldo_supply`** repeats the regulation at VDD 1.1 V with V_REF 1.05 V,
  and at VDD 0.6 V with V_REF 0.55 V, including the 22.4 mA step at 0.6 V.

A run takes well under a second.

## Limits of the control law, seen in simulation

These follow from the two loops as described. They are not bugs in the
models:

* **Parking above the window.** With Lock low the fine loop holds its code,
  and the coarse loop acts only at a window crossing. Suppose V_OUT ends up
  above V_REF_HIGH with the coarse array already off. If the fine code alone
  then supplies more than the load, V_OUT stays above the window and nothing
  brings it back. This happens after a fast supply step.
* **No line-regulation result.** Stepping VDD from 1.1 V to 1.2 V at V_REF
  1.05 V did not recover, with any load or switch size tried. Before reaching
  the new level, V_OUT limit-cycles through the window or parks above it.
  `tb_dldo_supply` prints this case without checking it.
* **Light-load ripple.** At light load the output node is slow compared with
  F_CLK. The growing steps of the fine loop then overshoot, and V_OUT
  limit-cycles inside the window.
* **Start-up is not covered.** The testbenches precharge V_OUT to V_REF during
  reset. Starting from 0 V, the coarse flip-flops miss the window crossings
  that happen while reset is held.
* **Merged glitches.** A sweep through the whole window faster than
  `GLITCH_PS` gives one glitch instead of two.

## Choices not fixed by the design

* Comparator polarity and the meaning of High, Low and Lock were read from
  the regulator's operational waveform. Low is high in steady state and falls
  during a droop; Lock = High XOR Low is therefore high inside the window. The
  fine loop runs while Lock is high.
* The edge detector is an XNOR of High and Low. The edge detector is specified
  as reacting to transitions of High and Low, while the glitches are said to
  come from changes of Lock. Both descriptions give the same signal, since
  Lock is High XOR Low.
* The coarse controller has 16 flip-flops. Its delay chain has 15 cells and
  carries 16 glitches, `glitch[0..15]`.
* The coarse flip-flops reset to OFF. The design only says the drivers keep
  the switches off at start-up.
* UP_DN and Lock go into the fine loop without a synchronizer.
* The window voltages, F_CLK, all delays and all switch conductances are
  unspecified. The values above are this implementation's.
