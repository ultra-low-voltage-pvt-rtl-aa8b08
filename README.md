# PVT-robust clock system for sub/near-threshold logic

At supply voltages near or below the transistor threshold (0.2 to 0.5 V), gate delay depends strongly on process, voltage and temperature. A delay-locked loop with many taps suffers from random mismatch between its taps. A clock tree that is balanced at one temperature becomes skewed as soon as two parts of the die are at different temperatures.

This design handles both problems. It has two halves:

1. **A programmable clock generator.** A single reference pulse circulates eight times through one delay line. Every output pulse therefore goes through the same gates, and tap mismatch disappears. The delay line is first tuned coarsely from a ring-oscillator measurement of the current speed of the gates. It is then tuned finely by binary search, and finally tracked. A divider produces M/N times the reference frequency, with M in {1, 8} and N in {2, 4, 6, 8}.
2. **A thermally robust buffered H-tree.** Each of its 15 buffers has its own temperature code. A look-up table turns that code into a buffer width, so that a hot or cold buffer keeps the delay it has at 25 °C.

The top, `clock_system_top`, feeds the generator's output into the tree. The temperature sensors beside the buffers are not part of this RTL. Their 10-bit codes, and the actual die temperature used by the timing model, are inputs of the top.

## How to read and run it

- All files are SystemVerilog-2017.
- `rtl/` holds one module or package per file. `tb/` holds one self-checking testbench per module.
- Each testbench ends by printing `TB_RESULT checks=N failures=M`.

The analog parts are behavioural timing models that use `real` delays:

- the pulse generator;
- the ring oscillator;
- both delay lines;
- the tunable-width inverter.

They simulate but do not synthesize. Everything else is synthesizable logic.

With plain Verilator (5.x):

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_clock_system_top \
    rtl/clkgen_pkg.sv rtl/logical_effort_pkg.sv rtl/*.sv tb/tb_clock_system_top.sv
./obj_dir/Vtb_clock_system_top
```

Swap the testbench name to run any other block. `tb_clock_system_top` runs the whole design at its default parameters in well under a second.

The testbenches start with reset de-asserted and pull it low one time unit later. This gives the asynchronous resets a real edge, because Verilator starts flops at random values.

## Clock generator

### Loop structure (`programmable_clock_generator`)

The loop is built from these parts:

- **Pulse generator.** `pulse_generator` turns each rising edge of the reference clock into a 2 ns pulse, `P_REF`.
- **Path multiplexer.** While `SEL` is 1, `P_REF` enters the delay line. While `SEL` is 0, the line's own output `P_OUT` is fed back, so the pulse circulates.
- **Delay line.** Two delay lines in series make up the loop: first the PVT-compensation line, then the lock-in line.
- **Counter.** `circulation_counter` counts output pulses. It is cleared by every reference pulse and raises `countE8` at the eighth.
- **Phase detector.** `phase_detector` compares the next reference pulse with the eighth output pulse. It reports `LEAD` (the eighth pulse came first, so the loop is too fast) or `LAG`.
- **Divider.** `frequency_divider` divides `P_DIV` by 2, 4, 6 or 8. `P_DIV` is `P_REF` when `FS[2]`=0 (M = 1) and `P_OUT` when `FS[2]`=1 (M = 8).

| FS[2:0] | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| f_out / f_ref | 1/8 | 1/6 | 1/4 | 1/2 | 1 | 4/3 | 2 | 4 |

### Control sequence (`clkgen_controller`)

The controller is clocked on the falling edge of the reference, away from the pulses.

- **Reset** (1 cycle).
- **PVT** (1 cycle):
  - The ring oscillator is switched on for exactly one reference period.
  - `pvt_comp` counts its cycles.
  - The count is decoded into the coarse code `D`.
- **SAR** (12 cycles):
  - The code `C[5:0]` of the lock-in line is found by binary search, MSB first, starting at `100000`.
  - Each bit takes two reference cycles. In the first, the phase detector is released and the pulse circulates. In the second, the result is read and the detector cleared.
  - A bit is kept if the eighth pulse led (more delay is needed). Otherwise it is cleared.
  - "No eighth pulse at all" counts as lagging.
- **Lock** (from cycle 14 on):
  - Every two cycles, `C` moves by ±1 (saturating) to follow slow drift.
  - `SEL` then follows `P_REF | countE8`. Each eighth pulse is therefore cut off from the loop, and the next reference pulse restarts it. Phase error therefore never accumulates beyond one reference period.

`sel_generator` makes `SEL` during SAR. It toggles on every falling edge of `P_REF`, so the pulse runs on one cycle and the line is reloaded on the next.

### Coarse compensation (`pvt_comp`, `pvt_ring_oscillator`, `pvt_comp_delay_line`)

This is the least obvious arithmetic in the design.

**Ring oscillator.** It is one NAND plus 62 inverters. Its period is therefore about 128 inverter delays, or 64 FO2-NAND delays.

**Count.** During one reference period T, the counter reaches `count = T / (64·D_NAND)`.

**Target delay.** The loop must delay each pulse by T/8 = 8·count·D_NAND. The coarse line gives 32·D_NAND per step of `D`, so the ideal coarse code is count/4. The decoder takes two steps off this, to leave the remainder to the fine lock-in line:

```
D = max(count/4 - 2, 0)          (count/4 is a 2-bit right shift)
```

**Lock-in line.** It spans 4 to 130 NAND delays, here `(4 + 2·C)·D_NAND`. It covers the remaining 64 NAND delays plus the rounding error of the shift.

### Default numbers

| Quantity | Value |
|---|---|
| Reference | 5 MHz (200 ns) |
| `D_NAND_NS` | 0.068 ns (an FO2-NAND at 0.5 V) |
| Ring-oscillator count | 45 |
| `D` | 9 (19.6 ns) |
| `C` | 37 to 38 (about 5.4 ns) |
| Time per circulation | 25 ns |

The PVT count is 8 bits wide, so the reference period must not exceed 255·64·D_NAND.

### Frequency divider (`frequency_divider`)

The divider is a twisted ring (Johnson counter) of four flip-flops with the inverted last output fed back. `FS[1:0]` picks, through three multiplexers, how many of the flip-flops are in the ring:

| FS[1:0] | Flip-flops in the ring | Divide by |
|---|---|---|
| 11 | 1 | 2 |
| 10 | 2 | 4 |
| 01 | 3 | 6 |
| 00 | 4 | 8 |

The duty cycle is always 50%.

## Thermally robust H-tree

### Why widths change with temperature

For a buffer of width W driving a fixed load, the logical-effort delay is roughly `τ·(g·h + p)`, where `g·h ∝ g(V,T)/W`.

Near threshold, g(V,T) varies strongly with temperature. It falls as the die heats up (inverse temperature dependence). Scaling the width with g keeps the delay constant:

```
W(T) = W1 · g(V,T)
```

Here W1 is the width at 25 °C: 128X at 0.5 V and 64X at 0.3 V.

Two fits for a 65 nm process are used. Both are in `logical_effort_pkg`.

**Moderate inversion (0.33 to 0.5 V):**

```
1/g = B(T)·V² + C(T)·V + D(T)
```

B, C and D are quadratics in T.

**Weak inversion (below 0.33 V):**

```
1/g = E(T)·exp(F(T)·(V − V_T0))
```

E is a quartic and F a quadratic in T.

Only the ratio g(T)/g(25 °C) at the same supply matters, so the fits' scale factors cancel. V_T0 does not cancel. It is fixed at 0.338 V, from the condition that the weak fit gives 1/g = 1 at 25 °C and 0.33 V.

| T (°C) | −50 | −25 | 25 | 125 |
|---|---|---|---|---|
| W at 0.5 V, W1 = 128X | 215 | 171 | 128 | 100 |
| W at 0.3 V, W1 = 64X | 255 (clipped from 287) | 159 | 64 | 24 |

The inverse temperature dependence is much stronger at 0.3 V: the gate is about 6.7 times slower at −25 °C than at 125 °C.

### Buffer and table

**`tunable_width_inverter`** has eight binary-weighted legs (1X to 128X), enabled by `B[7:0]`, so its width is 1X to 255X.

- Its model delay is `P_NS + D_REF_NS · g(V,T) · 128 / B`.
- `D_REF_NS` is fitted to one published point: the skew without compensation for a −25 °C / 125 °C split.
  - At 0.5 V it is 1.9 ns (the default), giving 3.15 ns of skew.
  - At 0.3 V it is 34.7 ns with W1 = 64, giving 220 ns.
- `temp_c` is the real die temperature. It is an environment input, not a logic input.

**`width_lut`** computes the whole 1024-entry table at elaboration with a constant function.

- The temperature code is taken as quarter degrees above −50 °C, so codes 0 to 700 cover −50 to 125 °C.
- Codes above 700 are clipped to 125 °C.
- With `comp_en` low, the table is bypassed and the width stays at W1. This is the uncompensated tree, kept for comparison.

**`thermal_robust_buffer`** is one table plus one inverter.

### Tree (`h_tree`)

There are four levels: 1 + 2 + 4 + 8 buffers, numbered like a binary heap.

- Buffer 0 at the centre drives the 10 mm trunk to buffers 1 and 2.
- These drive 10 mm vertical branches to buffers 3 to 6.
- These drive 5 mm branches to the eight leaf buffers.

The two leaves at the centre of the top edge are `leaf[1]` and `leaf[4]` (points A and B). They are physically close but are fed through opposite halves of the tree, so they are where temperature skew shows most. Wires are not modelled: they are symmetric, and at these supplies the buffers dominate the delay.

## Results of the included testbenches

**`tb_h_tree`** runs 21 temperature pairs. The left half of the tree is at TL, the right half at TR, and both range from −25 to 125 °C. It prints the A–B skew with and without compensation:

- Without compensation: up to 3.15 ns.
- With compensation: at most 36 ps, limited by rounding to whole unit widths.
- Average reduction: 97%.

**`tb_h_tree_subthreshold`** runs the same 21 pairs at 0.3 V (W1 = 64X, `D_REF_NS = 34.7`):

- Without compensation, the skew is within 2% of the published transistor-level value for every pair, from 7.6 ns to 220 ns. Only one pair was used for fitting, so this is a real test of the weak-inversion model and of the derived V_T0.
- With compensation, the skew is at most 2.9 ns. It comes only from rounding the widths (24X for 23.5X at 125 °C). The testbench checks it against that rounding residue.

**`tb_clock_generator_corners`** runs five generators side by side. Each one's `D_NAND_NS` stands for a process, supply and temperature corner:

| Case | `D_NAND_NS` | Reference | D | C at lock |
|---|---|---|---|---|
| 0.5 V, fast | 0.048 ns | 5 MHz | 14 | 35 |
| 0.5 V, typical | 0.068 ns | 5 MHz | 9 | 38 |
| 0.5 V, slow | 0.102 ns | 5 MHz | 5 | 41 |
| 0.2 V | 1.0 ns (assumed) | 625 kHz | 4 | 34 |
| 0.2 V | 1.0 ns (assumed) | 156.25 kHz | 23 | 30 |

All five lock in 14 cycles and give 4× output at FS = 111.

This is where the coarse PVT step earns its place. Suppose D stayed at the typical value 9. The fast corner would then need C = 114 and the slow corner C = −23, both outside the 0..63 range of the lock-in line.

**`tb_clock_system_top`** checks:

- lock after 14 reference cycles;
- all eight FS ratios at the leaves;
- skew of 3.15 ns without compensation and 12 ps with it.

It also counts every mechanism and fails if one never happens:

- the PVT step;
- SAR bits kept and cleared;
- tracking steps up and down;
- FS changes;
- the compensation mode switch.

## Where this design departs from, or adds to, the original

**The default operating point is 0.5 V.**
- The top's defaults are the near-threshold case (`VDD_MV = 500`, `W1 = 128`, `D_REF_NS = 1.9`).
- The 0.3 V tree is obtained with `VDD_MV = 300`, `W1 = 64`, `D_REF_NS = 34.7`.
- The weak-inversion threshold voltage (0.338 V) is derived here, not given.
- The generator at 0.2 V differs only in `D_NAND_NS` and in the reference period. The NAND delay at 0.2 V (1.0 ns in the corner testbench) is an assumption.

**Skew reduction is better than the silicon-level estimate.**
- The model's skew reduction is close to 100% because the buffer delay follows the same g model that the table inverts.
- A transistor-level simulation of the real buffers shows a much smaller average reduction: around 65% at 0.5 V and around 80% at 0.3 V, with a best case near 98%.
- Treat the tree's skew numbers as a check of the mechanism, not a prediction.

**The temperature sensor is not included.** Its code format is this design's choice: 10 bits, quarter degrees, offset −50 °C.

**The delay-line internals are not built.**
- Both lines are single behavioural delays: `32·D·D_NAND` and `(4 + 2·C)·D_NAND`.
- The real ones are nested lattice delay lines. The linear code law of the lock-in line is this design's choice.
- The pulse generator is a fixed 2 ns pulse, not a flip-flop and delay line.

**Several choices here are not taken from the original:**
- the two-cycle timing of the phase-detector reset;
- the start value of the binary search;
- saturation of `C`;
- the order of the two delay lines;
- the `P_DIV` multiplexer;
- the counter being cleared by `P_REF`;
- all reset values.

**The gate types inside the SEL generator, the phase detector and the divider** were chosen to match the behaviour described for them.

**Absolute timing depends on `D_NAND_NS`.**
- The PVT count and the D and C codes follow from it. The default 0.068 ns is an estimate for an FO2 NAND at 0.5 V in 65 nm.
- The lock time in reference cycles (14) does not depend on it.
