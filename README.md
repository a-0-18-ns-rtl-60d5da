# Digital LDO regulator with a TDC front end and an adaptive PI controller

A digital low-drop-out regulator (D-LDO) keeps V_OUT near a reference. It
does this by switching a bank of identical PMOS pass devices between the
supply V_IN and the output. The classic digital LDO compares V_OUT with the
reference using a single comparator, then shifts one cell on or off per
clock. It therefore needs tens of cycles to recover from a load step.

This design instead measures V_OUT as a multi-bit number every clock. A
capacitor-based voltage sensor turns the voltage into a delay, and a
time-to-digital converter (TDC) counts that delay in buffer delays. A PI
controller then moves as many cells as the error calls for in one step. Its
gains change with the size of the error: high proportional gain when far
from the target, high integral gain when close.

The defaults follow the published operating point: 63 TDC cells, 63 PMOS
cells, a 0.145 ns buffer delay, a 450 fF / 100 uA sensor, a 40 MHz clock and
V_OUT = 0.95 V from V_IN = 1.0 to 1.2 V with up to 100 mA of load.

## The loop

```
          +--------------- V_OUT (load: C_L, R_L / current, outside dldo_top) ----+
          |                                                                     |
  voltage_sensor --OUT--> tdc --63b therm--> digital_controller --u[62:0]--> pmos_array
   (clk low: sample,       (buffer chain      digital_sub: err = V_REF - V_OUT   (63 cells,
    clk high: delay dt)     + 63 DFFs)        error_detector: State[1:0]          V_IN -> V_OUT)
                                              pi_controller: cells on
```

`dldo_top` holds the whole loop except the output node itself. V_OUT comes
in as a `real` voltage, and the current of the pass devices goes out as a
`real` (`i_pmos`). The testbench integrates `C_L dV/dt = i_pmos - i_load`.

Only the digital controller (`digital_sub`, `error_detector`,
`pi_controller`, `digital_controller`) is synthesizable. The voltage sensor,
the TDC delay line and the PMOS array are behavioural models: they use
`real` values and `#` delays and are meant for simulation only.

## One clock cycle

| phase | what happens |
|---|---|
| clk low | the sensor's capacitor is pre-charged to V_OUT; the sensor output OUT is low |
| rising edge of clk | the controller registers a new cell count from the code captured in the previous cycle; the sensor starts its delay; the edge enters the TDC buffer chain |
| dt after the edge | OUT rises; the TDC flip-flops capture how far the edge has travelled |
| next rising edge | that thermometer code is used by the controller |

A V_OUT sample taken at edge *n* changes the gate code at edge *n+1*. The
cells then act on V_OUT before the sample at edge *n+1* is taken. Seen from
the controller, the loop therefore has two clock periods of delay.

## Measuring V_OUT: sensor and TDC

The sensor's delay after the rising edge is

    dt = T_OFFSET + C_C * V_OUT / I_C = 1.85 ns + 4.5 ns/V * V_OUT

The TDC captures bit *i* = 1 when (i+1) * t_d < dt. Its code is therefore
about dt / 0.145 ns:

    code ≈ 12.75 + 31.0 * V_OUT      (one code ≈ 32 mV)

The slope follows from the sensor's charge balance with the published
component values. The 1.85 ns offset is this model's choice. It makes 0 V
read 12.75 codes, matching the intercept of the published converter
characteristic. That characteristic bends slightly, which is not modelled.
The published figure of "about 25 mV" per code comes from that measured
curve; this model gives 32 mV per code.

With these numbers, reference code 42 regulates V_OUT into 0.942–0.974 V.
The TDC saturates at 63 codes (dt > 9.1 ns). The sensor clamps dt to 12 ns
so that OUT always rises within the 12.5 ns high phase.

## Error and error ranges

`digital_sub` counts the ones of the thermometer code. Counting makes it
tolerant of a bubble. It then forms the signed error `err = V_REF - V_OUT`,
from -63 to +63. A positive error means V_OUT is low.

`error_detector` classifies the magnitude:

| abs(error) | State[1:0] | PI gains K'p / K'i |
|---|---|---|
| ≥ 32 | 11 | 1.2 / 0.1 |
| ≥ 8 | 10 | 1 / 0.7 |
| ≥ 1 | 01 | 0.8 / 4 |
| 0 | 00 | hold |

The published state table also gives a gate-level form that tests only bits
5, 3 and 0 of the error. Taken literally, that form would class an error of
16 or 2 as "zero". This implementation follows the thresholds instead. The
two agree whenever the tested bit is the highest bit set.

## The adaptive PI controller

`pi_controller` implements the positional PI of the loop model:

    u[n]     = K'p * e[n] + acc[n]
    acc[n+1] = acc[n] + K'i * e[n]

Here *u* is the number of cells on (0..63). It leaves the block as a 63-bit
thermometer gate code: `u[i] = 1` turns cell *i* on. K'p and K'i are
re-selected every cycle from State. In State 00 both the output and the
integrator hold, so an error of zero freezes the gate code.

The following are this implementation's choices:

* **Number format.** Coefficients are unsigned Q4.8, with 8 fractional bits
  in 12. The parameter defaults are 205, 1024, 256, 179, 307 and 26. These
  give 0.801, 4.0, 1.0, 0.699, 1.199 and 0.102. The integrator is stored in
  the same 1/256-cell units.
* **Units.** The gains are in cells per TDC code.
* **Rounding and clamping.** The output is rounded to the nearest cell and
  clamped to 0..63. The integrator is clamped to 0..63 cells (anti-windup).
* **Reset.** Reset is asynchronous and active low, and turns every cell off.
* **Latency.** There is one register stage, so `u` follows `e` by one clock.

The published gain schedule is stable only where one cell moves V_OUT by a
small fraction of a code. In the small-error range, K'i = 4 adds four cells
per code of error every cycle. Combined with the two-cycle loop delay, the
loop rings when the cell-to-code gain exceeds about 0.3 codes per cell.

With the linear PMOS model used here, that gain is (V_IN − V_OUT) / n per
cell:

* At V_IN = 1.0 V it is small, under 0.25 codes per cell. The loop settles
  in 100–225 ns after a 40 mA step.
* At 100 mA it rises with the supply. The loop settles up to V_IN = 1.1 V
  and limit-cycles at 1.15 V and 1.2 V.

The published results show clean regulation over 1.0–1.2 V, so the real
power stage probably has a lower per-cell gain than this model. To run at
high supply with this model, lower `KI_SMALL`.

## The pass devices

`pmos_array` models each cell that is on as a conductance `G_CELL` from V_IN
to V_OUT, which is the linear region near drop-out. With 63 cells and 100 mA
at a 50 mV drop-out, each cell is 31.75 mS. This device model is an
assumption: the design only specifies 63 identical PMOS cells and a 100 mA
maximum load.

## Files

| file | contents |
|---|---|
| `rtl/dldo_pkg.sv` | widths (63 cells, 6-bit codes, 7-bit signed error), State encoding, Q8 format |
| `rtl/digital_sub.sv` | thermometer-to-binary count and subtractor (combinational) |
| `rtl/error_detector.sv` | error ranges, State[1:0] (combinational) |
| `rtl/pi_controller.sv` | adaptive PI, registered output, gate code |
| `rtl/digital_controller.sv` | the three blocks above, wired |
| `rtl/voltage_sensor.sv` | behavioural sensor model |
| `rtl/tdc.sv` | behavioural delay line with flip-flops |
| `rtl/pmos_array.sv` | behavioural power stage |
| `rtl/dldo_top.sv` | complete loop |
| `tb/pi_ref_pkg.sv` | reference model of the PI controller used by testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_dldo_sweep` |

## Simulating

Every file sets `timescale 1ns/1ps`. The models need Verilator's timing
support. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_dldo_top \
    -y rtl -y tb +libext+.sv rtl/dldo_pkg.sv tb/pi_ref_pkg.sv tb/tb_dldo_top.sv
./obj_dir/Vtb_dldo_top
```

Each testbench ends with `TB_RESULT checks=N failures=M`.

* **Block testbenches.**
  * `tb_error_detector` runs all 127 errors.
  * `tb_digital_sub` runs all thermometer codes and a bubble.
  * `tb_pi_controller` and `tb_digital_controller` compare with a reference
    model every cycle. This includes latency, hold and both clamps.
  * `tb_voltage_sensor` checks the interval to 2 ps.
  * `tb_tdc` checks captured codes against tap counts.
  * `tb_pmos_array` checks the current law.
* **`tb_dldo_top`** runs the full loop at default parameters.
  * It covers start-up, ±40 mA load steps, a small supply step, and
    reference steps that reach the largest error range and both output
    clamps.
  * Every cycle it checks the TDC code against the sensor formula and the
    cell count against the PI reference model.
  * It counts each mechanism and fails if one never occurs.
* **`tb_dldo_sweep`** repeats the published sweeps:
  * load capacitance 480–580 pF;
  * load steps of 20–45 mA;
  * static loads of 20–100 mA;
  * supply 1.0–1.2 V.

  It reports the recovery time for each point. Typical results are 125–150 ns
  after a load step up and 225 ns after a 40 mA step down, for any C_L in
  the range.

For a 40 mA step with 0.5 nF, this model gives about 68 mV of undershoot and
36 mV of overshoot below and above 0.95 V. The published figures are 36 mV
and 33 mV, with recovery in 143 ns and 186 ns. The larger undershoot here
comes from the behavioural power stage and the 32 mV code step. The RTL is
not the cause.

To change the operating point, use the parameters of `dldo_top` (`TD_NS`,
`C_C_FF`, `I_C_UA`, `T_OFFSET_NS`, `G_CELL_S`) and the reference code
`vref`. The PI gains are parameters of `pi_controller` and
`digital_controller`.

## What differs from the published design

* **Analog parts.** The sensor, TDC and power stage are behavioural models.
  None of them is a transistor-level description. Corner behaviour, the bow
  in the converter's curve, quiescent current and efficiency are not
  modelled.
* **Error detector.** It uses magnitude thresholds rather than single-bit
  tests (see above).
* **PI details.** The signed error and the PI number format, rounding,
  clamping and reset are choices made here.
* **TDC count.** It is the number of taps strictly inside dt, which is
  ceil(dt/t_d) − 1 for non-integer ratios. The published formula is
  ceil(dt/t_d).
* **Supply range.** With the linear cell model and the published gains, the
  loop does not settle above V_IN ≈ 1.1 V at 100 mA.
* **Baseline.** The comparator-and-shift-register baseline LDO used for
  comparison in the source is not included.
