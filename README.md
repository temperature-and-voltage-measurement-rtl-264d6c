# Temperature and voltage monitor from aging-tolerant ring oscillators

A ring oscillator's (RO's) frequency depends on both the die temperature and the supply voltage. Different gate types and loads weight those two dependences differently. So if three ROs that react differently sit next to each other, their three frequencies give enough information to solve for both quantities. This design counts the frequencies of such a three-RO monitor (a TVM) and converts the counts into a temperature and a supply voltage, using linear equations fitted beforehand by multiple regression:

    T = T0 + a_T*dF1 + b_T*dF2 + c_T*dF3 + d_T
    V = V0 + a_V*dF1 + b_V*dF2 + c_V*dF3 + d_V

Here dF_i is the change in RO i's count since a reference measurement taken at a known condition (T0, V0).

Three refinements make this accurate enough for a field test (a periodic check of a chip already in service), which needs about 1 °C and a few mV:

* **Aging-tolerant ROs.** Each oscillator is built from NAND or OR-NAND gates and has an En and a Start input. When idle, every PMOS is kept off, so NBTI stress (threshold drift of PMOS transistors kept switched on) does not shift the frequency over the chip's life.
* **Per-monitor calibration.** One measurement at (T0, V0) gives each monitor its reference counts F0. It also gives each RO a ratio F_typ / F(T0,V0) that removes the global process shift (die-to-die variation) from the differences.
* **Hierarchical calculation.** A full-range equation first estimates V coarsely. That estimate selects one of three voltage sub-ranges, and within it a sub-range equation estimates T. That T selects one of three temperature sub-ranges. Finally, one of nine sub-range equation pairs gives the final T and V. Linear fits over small sub-ranges have much smaller errors than one fit over the whole range.

The top level, `tvm_chip_top`, is arranged like a 180 nm test chip. It has:

* six monitors;
* one controller that measures all of them at once;
* the calibration and calculation datapath in hardware;
* four heating circuits of 1000 ROs each, used to warm the die to a chosen activity level.

## Monitor (`tvm`, `ro_nand2`, `ro_ornand4`, `ro_counter`)

Each monitor holds three oscillators:

| RO  | gates                   | stages | fan-out |
|-----|-------------------------|--------|---------|
| RO1 | 2-input NAND            | 51     | 1       |
| RO2 | 4-input OR-NAND         | 19     | 4       |
| RO3 | 2-input NAND            | 21     | 7       |

The 4-input OR-NAND gate is NAND(OR(a,b), OR(c,d)). The loop runs through `a`, `b` is tied low, and `c`/`d` carry the control signal.

The two control inputs give three modes:

| En | Start | mode             | state of the loop                                        |
|----|-------|------------------|----------------------------------------------------------|
| 0  | 0     | non-oscillation  | all NAND outputs high, all PMOS off (no NBTI stress)     |
| 1  | 0     | initialisation   | gate 0 held high, the following gates alternate 0/1      |
| 1  | 1     | oscillation      | the loop runs                                            |

Gate 0 takes Start as its side input, and every other gate takes En. Initialisation therefore leaves the ring in a known alternating state before Start is raised.

The oscillators are **behavioural models**, because the real ones are analog. Their timing works as follows:

* Outside oscillation, the static level of every gate is computed gate by gate, so the mode table above can be checked at each stage through `dut.s`.
* During oscillation, only the output is modelled. It toggles every `STAGES` stage delays.
* The stage delay follows an alpha-power transistor model in which the threshold voltage falls with temperature: `Vth = (Vth0 + dVth)(1 - alpha*(T - 25 °C))`, scaled by `Vdd/(Vdd - Vth)`. On top of this comes a mobility factor `((T + 273.15)/298.15)^mu`.
* `dVth` stands for a process shift. All model constants (`D0_PS`, `VTH`, `ALPHA`, `MU_EXP`) are this design's own choices. `tvm` sets a different set for each RO, so the three ROs weight T and V differently enough for the regression to be well conditioned.
* The inputs `temp_mc`, `vdd_uv` and `dvth_uv` feed only these models.

Each RO drives its own 16-bit saturating counter, `ro_counter`:

* The counter is clocked by the RO.
* The counting window arrives from the system clock through a two-flop synchroniser.
* `clr` clears it asynchronously.

After counting, the three counts are loaded into a 48-bit shift register. They shift out most significant bit first, in the order RO1, RO2, RO3, one bit per `shift` cycle on `sdo`.

## Measurement sequence (`tvm_controller`)

One request measures every monitor in parallel. All times assume a 100 MHz system clock:

1. Clear the counters for 2 cycles.
2. Initialise for 10 cycles (En=1, Start=0).
3. Oscillate without counting for 100 cycles (1 µs), so the frequencies settle.
4. Count for 5000 cycles (50 µs).
5. Wait 8 drain cycles, so the synchronised window has closed in every RO domain.
6. Stop the ROs. They return to the non-oscillation mode.
7. Load and shift out 48 bits.
8. Send one record per monitor on a valid/ready stream. Each record carries the monitor index, the calibration flag and the three counts.

From request to last record takes about 5180 cycles, or 52 µs. The 100 µs budget of a field test is respected. Window and settle lengths are parameters.

## Calibration (`tvm_calib`, `udiv_seq`)

A record marked as calibration is taken at (T0, V0). It does the following:

* It stores the three counts as that monitor's F0.
* It runs three sequential divisions `(F_typ << 14) / F_i`, 30 cycles each, to form the ratios r_i in Q2.14.
* It saturates each ratio at its maximum. A zero count gives the maximum.
* It pulses `cal_done` and sets the monitor's `cal_ok` bit.
* It passes nothing downstream.

`F_typ` is the count a typical-process monitor gives at (T0, V0). It is an input, because it comes from characterisation.

A measurement record produces `dFc_i = r_i * (F_i - F0_i)` as signed 34-bit numbers with 14 fraction bits, one cycle after it is accepted.

Multiplying the differences by the ratio is equivalent to scaling the regression coefficients per monitor. It keeps one shared equation table for all monitors.

## Hierarchical T and V calculation (`tv_hier_calc`, `tv_lin_eval`)

`tv_lin_eval` evaluates one equation as follows:

* Inputs: coefficients a, b and c in Q16.16, 32 bits signed, and the Q14 differences.
* It sums the three products exactly (68 bits) and rounds the sum to the nearest integer.
* It adds the offset d, an integer in m°C or µV.
* It saturates the result to 24 bits signed.

`tv_hier_calc` holds two 13-entry tables, one for T equations and one for V equations. Both are written through the `cfg_*` port and are indexed as:

| entry            | used for                                                   |
|------------------|------------------------------------------------------------|
| 0                | full-range V (V table)                                      |
| 1 + vsub         | T inside V sub-range vsub (T table)                          |
| 4 + 3·vsub + tsub | final T and V inside sub-range pair (vsub, tsub) (both tables) |

Each step adds its equation's result to T0 or V0:

1. Full-range V.
2. Pick vsub.
3. T in that V sub-range.
4. Pick tsub.
5. Final T and V.

A result leaves 5 cycles after its input.

The sub-range boundaries are 0/40/80/120 °C and 1.65/1.75/1.85/1.95 V. Each sub-range includes its upper edge.

A value outside the full range is handled in two ways:

* **During selection:** it uses the nearest sub-range and sets `res_oor`.
* **At the end:** the final result is checked against the full range as well. A final value outside it also sets `res_oor`.

The tables are loaded from outside; the design does not fit them. The regression itself belongs to characterisation: SPICE or silicon measurements at a grid of (T, V) points. `tb_tvm_chip_top` shows the procedure. It performs a least-squares fit against the RO models, then widens each sub-range fit a little beyond its edges.

## Heating circuits (`heating_circuit`, `heating_ctrl`)

Each heating circuit has 1000 nine-stage inverter ROs with individual enables. These ROs exist only to burn power. They do not need to be aging-tolerant.

`heating_ctrl` stores one per-mille setting per circuit, written through `heat_we`/`heat_idx`/`heat_pm` and clipped at 1000. It enables the first `round(pm·1000/1000)` ROs of that circuit as a thermometer code, gated by `heat_on`. The enables change two cycles after a write or a change of `heat_on`.

The model toggles all enabled ROs in phase. It reports `heat_active` (the number of enabled ROs) and an activity monitor bit per circuit. Heat flow itself is not modelled.

## Number formats

| quantity                          | format                                   |
|-----------------------------------|------------------------------------------|
| RO count                          | 16 bits unsigned, saturating             |
| calibration ratio                 | Q2.14 unsigned (1.0 = 16384)             |
| calibrated difference             | 34 bits signed, 14 fraction bits         |
| coefficients a, b, c              | Q16.16, 32 bits signed                   |
| offset d, T0, V0, T and V results | 24 bits signed, in m°C and µV            |

The constants are in `rtl/tvm_pkg.sv`.

## Simulating

Every block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb -Irtl \
        rtl/tvm_pkg.sv rtl/ro_model_pkg.sv tb/tb_tvm_chip_top.sv \
        --top-module tb_tvm_chip_top
    ./obj_dir/Vtb_tvm_chip_top

`tb_tvm_chip_top` runs the complete system at its default size: 6 monitors and 4×1000 heater ROs. It takes about 2 seconds:

1. It fits the equations against the RO models and loads them.
2. It briefly runs the heaters.
3. It calibrates all monitors at 60 °C / 1.8 V. Each monitor has a different threshold shift, from −8 mV to +12 mV.
4. It measures three rounds: the nine sub-range centres, points near the range edges together with one out-of-range supply, and random points.
5. It stalls the result stream once to test back-pressure.

The worst errors are about 0.6 °C and 8 mV. The check limits are 2.5 °C and 12 mV.

## How far it can be trusted, and where it departs from the published design

* **Analog behaviour is modelled, not designed.** The RO models reproduce the mode behaviour and a plausible frequency dependence on T, V and Vth. They are not transistor-level. The accuracy figures above describe the arithmetic and the method on these models, not silicon.
* **The RO set follows the test chip.** The RO-selection study lists another combination of types (4-input OR-NAND ×3, 2-input NAND ×2, 4-input NAND ×2). The three ROs used here match the monitor that was evaluated in simulation and fabricated.
* **The calculation is on chip.** The published test chip counted on chip and calculated off chip. The method allows either place, and here the calculation is hardware.
* **No non-volatile memory.** The published flow keeps the counts in a non-volatile memory, on or off chip. Here, registers in `tvm_calib` hold the reference counts, and the raw counts appear on `raw_*` for external storage.
* **Own choices not given by the source:**
  * clock frequency;
  * window, settle and initialisation lengths;
  * counter width;
  * all number formats;
  * out-of-range handling;
  * heater enable coding;
  * serial bit order;
  * scheduling all monitors at once.
* **Aging of the ROs is not modelled.** Only a static threshold shift is. The idle mode removes the stress by design, which the mode checks confirm.
* **Only the 180 nm ranges are built in.** The sub-range boundaries are parameters of `tv_hier_calc`. Other ranges, such as −40…110 °C or 0.91…1.09 V, need new boundaries and newly fitted tables.
* **The behavioural models do not synthesise.** `ro_nand2`, `ro_ornand4`, `heating_circuit` and `ro_model_pkg` use real-valued parameters and delays, so synthesis stops at them. The controller, counters, calibration, calculation and heater control are ordinary synthesizable RTL.
