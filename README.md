# TEI-aware PMIC controller

Chips that run at near- or sub-threshold supply voltages get *faster* as they
warm up. This is temperature effect inversion (TEI): the threshold voltage drops
with temperature, and that outweighs the loss of carrier mobility. Such a chip's
clock is set at its coldest corner. Whenever it is warmer than that corner, it has
timing slack, and the supply can be lowered without slowing the clock. This is
TEI-aware voltage scaling (TEI-VS). For the reference chip, the minimum supply at
50 MHz falls from 0.54 V at -40 °C to 0.44 V at 80 °C. That saves about a third of
the SoC's power.

Using TEI-VS in practice needs three things:

- a way to know the lowest safe voltage at *any* temperature, although the chip
  was only measured at a few;
- a check that the DC-DC converter does not burn more power than the lower supply
  saves;
- a guarantee that the supply is never below the safe minimum when the chip cools
  down.

This repository holds SystemVerilog RTL for a small controller that does this. It
is an APB peripheral for an ultra-low-power SoC that has no FPU. The controller
contains its own small floating-point datapath. It follows the controller in
*"Developing a TEI-Aware PMIC for Ultra-Low-Power System-on-Chips"* (Lee, Park,
Choi, Jeon and Lee). The interface, the number formats and several models are
choices made for this implementation; the last section lists them.

## What one computation does

Software writes a temperature to the `TEMP` register, or a sensor sample arrives
on `sensor_valid`/`sensor_temp`. The controller then runs these steps (`pmic_core`):

1. **Section lookup** (`temp_segment`). The optimal-voltage curve is a cubic spline
   through per-chip calibration points, taken every 10 °C from -40 °C to 80 °C.
   That gives 13 points and 12 sections. The block picks section *k*, which holds T,
   and forms the offset `x = T - (-40 + 10k)` as a float. Below -40 °C and at or
   above 80 °C, the edge sections are extrapolated and `STATUS[6]` is set.
2. **Vopt and the present saving, in parallel.** `vopt_calc` evaluates
   `Vopt = p3·x³ + p2·x² + p1·x + p0` with the section's coefficients. At the same
   time, `ps_calc` computes the saving `PS_TEI-VS(VDD)` at the present supply.
3. **Saving at Vopt and converter loss, in parallel.** `ps_calc` computes
   `PS_TEI-VS(Vopt)`, and `psc_calc` computes the converter loss
   `P_SC(Vopt, I_SC)`.
4. **Decision.** Three float comparisons (`fp_cmp`) decide the outcome:

| condition | decision (`STATUS[3:2]`) | VDD |
|---|---|---|
| Vopt > VDD (the chip got colder) | `RAISE` (2), safety protection | set to Vopt at once |
| 1st comparator: PS(Vopt) > PS(VDD), **and** 2nd comparator: PS(Vopt) > P_SC(Vopt) | `LOWER` (1) | set to Vopt |
| otherwise | `KEEP` (0) | unchanged |

The safety row overrides the two comparators. Raising the supply costs power, so
the comparators would reject it, but running below the minimum voltage breaks
timing. `STATUS[4]` and `STATUS[5]` report the two comparator results.

When VDD changes, the new value appears on `vdd_set`, `vdd_update` pulses, and
`STATUS.done` and `irq` rise.

## The Vopt calculator: eight float operations in four cycles

The Vopt calculator decides the controller's latency. Evaluating the cubic takes
five multiplications (x², x³, p1·x, p2·x², p3·x³) and three additions. Done one
after another, that is eight steps. `vopt_calc` has two multipliers and one
adder, and schedules them so the result is ready in four cycles:

| cycle | multiplier 0 | multiplier 1 | adder |
|---|---|---|---|
| 1 | x2 = x·x | p1x = p1·x | – |
| 2 | x3 = x2·x | p2x2 = p2·x2 | s = p1x + p0 |
| 3 | p3x3 = p3·x3 | – | s = s + p2x2 |
| 4 | – | – | Vopt = s + p3x3 |

Each unit is combinational. Its result is registered at the end of the cycle, so
one cycle holds one multiply or add in series. The same pattern is used in
`ps_calc` (4 cycles) and `psc_calc` (3 cycles).

**Why the cubic uses the offset, not T.** The cubic is evaluated at the offset x
inside the section (0 to 10 °C), not at T itself. With a global T, the
coefficients of a section near 80 °C would multiply T³ ≈ 5·10⁵ and cancel to a
result near 0.5 V. Single precision cannot do that accurately. With the local
offset, the natural spline through the reference data has coefficients between
about 10⁻⁷ and 0.54 in magnitude. The testbenches check that the result is
within 1e-5 V of the exact cubic.

## Savings and converter loss

The controller compares powers, so it needs a model of the SoC's power and of the
converter's loss. Both are programmable. The saving follows the usual power
equation `P = αCV²f + V·I_off`:

    PS_TEI-VS(v) = P_REF − (A2·v² + A1·v)          (ps_calc)
    P_SC(v)      = (V_IN − v) · I_SC + P_Q          (psc_calc)

- `P_REF` is the SoC power at the worst-case supply.
- `A2` is the dynamic term `αCf`; `A1` is the leakage current.
- The loss model is the converter's input-to-output drop carried by the load
  current, plus a fixed loss.

The reset values give savings in percent of the worst-case power:

| register | reset value | why |
|---|---|---|
| `P_REF` | 100 | savings come out in percent |
| `A2` | 100/0.54² | 0.54 V is the worst case at 50 MHz |
| `A1` | 0 | dynamic power only |
| `V_IN` | 0.54 V | |
| `P_Q` | 3 | about the difference between the measured savings with and without the converter |
| `I_SC` | 0 | |
| `VDD` | 0.54 V | |

With these values, the model gives a 33.6 % saving at 0.44 V. The measurement it
approximates was 35.65 %. Software should load the chip's own characterisation.

## Number formats

- **Floats.** All computation is IEEE-754 single precision (`pmic_pkg::fp_t`),
  rounded to nearest with ties to even. Subnormals are flushed to zero, overflow
  gives infinity, and NaN is never produced. The controller only handles finite
  values of moderate size.
- **Temperatures.** Signed 16-bit fixed point with 8 fraction bits, in °C. The
  range is -128 to +127.996 °C, and one step is 1/256 °C.
- **Calibration range.** `pmic_pkg` sets the range: `T_MIN = -40`, `T_STEP = 10`,
  `N_SEG = 12`. Changing these changes the number of coefficient words
  (`4·N_SEG`) and the register window that holds them.

## Register map (APB, 32-bit, byte addresses)

| addr | name | access | content |
|---|---|---|---|
| 0x000 | CTRL | rw | [0] accept sensor samples, [1] interrupt enable |
| 0x004 | STATUS | r / w1c | [0] busy, [1] done (write 1 to clear), [3:2] decision, [4] 1st comparator, [5] 2nd comparator, [6] T outside the spline |
| 0x008 | TEMP | rw | temperature (Q8.8); writing starts a computation |
| 0x00C | ISC | rw | converter output current (float) |
| 0x010 | VDD | rw | present supply (float); the controller updates it |
| 0x014 | VOPT | r | last Vopt |
| 0x018 | PSOPT | r | PS_TEI-VS(Vopt) |
| 0x01C | PSCUR | r | PS_TEI-VS(VDD) |
| 0x020 | PSC | r | P_SC(Vopt) |
| 0x024–0x034 | PREF, A2, A1, VIN, PQ | rw | models above |
| 0x100 + 16k + 4j | COEF | rw | coefficient p_j of section k (k = 0..11, j = 0..3) |

The bus has no wait states. `PSLVERR` flags an unmapped address, and a write to a
read-only register. A temperature that arrives while a computation runs is
dropped, whether it comes from the bus or the sensor; software should check
`STATUS.busy`. A bus write to `VDD` also pulses `vdd_update`.

**Start-up sequence.** Write the 48 coefficients, then `ISC`, and optionally the
models, `VDD` and `CTRL`. After that, each `TEMP` write (or sensor sample) yields
one decision.

## Timing

- From the clock edge that completes the `TEMP` write, `irq`/`STATUS.done` rise
  after 13 edges. One edge is spent in the register file and twelve in the core:
  one to latch the section, four for step 2, a handover, four for step 3, and two
  for the decision.
- `vdd_set` changes on the same edge as `STATUS.done`.
- In the end-to-end test, 20 random temperatures take 480 cycles, including the
  testbench's own bus traffic. That is 5 two-cycle APB transfers per temperature,
  plus waiting. The published SoC prototype reports 266 cycles for the same 20
  temperatures, measured through its own software and interconnect. The two
  figures are not directly comparable.

## Files

`rtl/`: the package, then the blocks from the top down:

- `pmic_pkg.sv`: float type, temperature format, spline range, decision
  encoding, register map.
- `pmic_controller.sv`: top. It wires the register file, the coefficient store
  and the core.
- `pmic_apb_regs.sv`: APB slave, registers, start, done flag, interrupt.
- `spline_coeff_mem.sv`: 48 × 32-bit coefficient store in flip-flops. One port
  serves the bus; the other reads all four words of a section at once.
- `pmic_core.sv`: sequencing, the comparators, and the decision.
- `temp_segment.sv` with `int2fp.sv`: section lookup and conversion of the
  fixed-point offset to a float.
- `vopt_calc.sv`, `ps_calc.sv`, `psc_calc.sv`: the calculators.
- `fp_mul.sv`, `fp_add.sv`, `fp_cmp.sv`: the float units.

`tb/`: one self-checking testbench per block (`tb_<module>.sv`), plus helpers:

- `tb_fp_pkg.sv`: conversion between `real` and single precision, used for
  reference values.
- `tb_spline_pkg.sv`: the 13 calibration voltages and a natural-spline fit that
  gives the coefficients.
- `apb_if.sv`: APB bundle with master tasks.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test at the default configuration:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      rtl/pmic_pkg.sv tb/tb_fp_pkg.sv tb/tb_spline_pkg.sv tb/apb_if.sv \
      tb/tb_pmic_controller.sv --top-module tb_pmic_controller -o sim
    obj_dir/sim

To run another testbench, replace `tb_pmic_controller` in both places.

What the testbenches establish:

- **Float units.** Bit-exact against correctly rounded references, over tens of
  thousands of random and edge-case operands.
- **Calculators.** Within 2 ulp of a step-by-step rounded reference, and close to
  the exact real value. Their latencies of 4, 4 and 3 cycles are checked.
- **`temp_segment`.** Every 3/256 °C from -60 °C to 100 °C.
- **`pmic_core` and `pmic_controller`.** Compared with a real-arithmetic model of
  the whole algorithm, on random and directed temperatures. The test counts
  lowering, safety raising, rejection by each comparator, sensor starts, dropped
  temperatures, extrapolation and bus errors, and fails if any of them never
  occurs.

## Where this implementation makes its own choices

These parts follow the published design:

- the steps of the algorithm, and the main blocks (Vopt calculator, PS_TEI-VS
  calculator, P_SC calculator, 1st and 2nd comparators);
- the cubic spline over 13 points every 10 °C from -40 °C to 80 °C;
- single-cycle float add and multiply units instead of a full FPU;
- the four-cycle Vopt evaluation on two multipliers;
- APB as the bus;
- the requirement that the algorithm protects the chip when it cools down.

These are this implementation's own choices:

- single-precision floats, and the Q8.8 temperature format;
- evaluating the cubic at the offset inside the section (see above);
- the form of the saving and loss models, and their reset values;
- reading the 2nd comparison as "the saving at Vopt exceeds the converter loss";
- the safety rule (raise to Vopt at once when Vopt is above VDD);
- overlapping the calculators;
- the register map, the sensor port, the interrupt and the converter interface.

Options the original work suggests but leaves open are not implemented:

- a voltage guard band above Vopt, lowered gradually;
- alternating between a higher value and Vopt.

Quantising Vopt to the converter's voltage step is not implemented either; the
float set-point is handed on as it is.

The controller synthesises to about 2,500 flip-flop bits, 1,536 of which are the
coefficient store. The published FPGA prototype reports 1,367 flip-flops for its
controller. The original work does not say how it stores the coefficients, so
this difference is not explained.

Outside this RTL:

- The switched-capacitor converter connects through `vdd_set`/`vdd_update`.
- The temperature sensor connects through `sensor_valid`/`sensor_temp`.
- The processor cores, interconnect, memory and peripherals of the SoC reach the
  controller over APB.
