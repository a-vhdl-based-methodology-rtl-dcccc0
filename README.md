# Digitally corrected and calibrated pipeline A/D converter

This is a 10 MS/s pipeline analog-to-digital converter with a digital back end that corrects and
calibrates it. The output has at most 13 bits and the target is 10 bits of accuracy. The analog
half is five pipeline stages and a final flash quantizer. Each stage can be programmed for 2 or 3
bits, and one of those bits is always redundancy. The redundancy lets the digital half absorb
comparator errors, and the calibration removes the DAC and offset errors of the first two stages.

The repository holds two kinds of SystemVerilog:

* **The digital part, `dcad`**, is synthesizable RTL. It clocks the analog part, aligns the stage
  subcodes, adds them into the output code with a ripple-carry correction array, measures and
  stores the calibration errors, and drives the test and calibration modes.
* **The analog part, `adc_analog`**, is a behavioural model built on `real` numbers. It has the
  input sample-and-hold, the stages and the last quantizer, each with static errors (gain, DAC
  levels, offset, comparator offset) and dynamic errors (incomplete settling). It lets the whole
  mixed-signal loop be simulated, including calibration, where the digital part drives the analog
  part. It is not meant for synthesis.

`pipeline_adc` connects the two and is the top of the design.

```
            +------------------------ adc_analog (behavioural) ------------------------+
  vin ----->| SH --> STG_1 --> STG_2 --> STG_3 --> STG_4 --> STG_5 --> A/D_k (3-bit)   |
            |         |d1       |d2       |d3       |d4       |d5        |dl            |
            +---------|---------|---------|---------|---------|----------|-------------+
               ^      v         v         v         v         v          v
  phi1/phi2,   |  +--------------------------- dcad -------------------------------+
  cal_force,   +--| dcad_clkgen  shr_array -> cfr_array -> code register -> code    |
  bx              | dcad_ctrl    bx_gen       ^   |q (back-end sums)               |
                  |                           |   v                                |
                  |                   err_regbank <- cal_avg                       |
                  +----------------------------------------------------------------+
```

## Stages, subcodes and digital correction

A stage programmed for m raw bits (`res3[i]` = 1 for m = 3, 0 for m = 2) has gain G = 2^(m-1)
and 2G-2 comparators, placed at (2j-2G+1)/(2G) of the reference. It therefore resolves m-1
effective bits plus one bit of redundancy. Its subcode d runs from 0 to 2G-2, around the middle
code c = G-1. Its residue is

    v_out = G * v_in - (d - c) * VREF

The residue stays within +-VREF/2 when the comparators are exact. A comparator error up to
VREF/(2G) only moves the residue within the following stage's range, so the later stages make up
for it. The last quantizer is a 3-bit flash over +-VREF.

Stage i's subcode carries the weight 2^w_i, where w_i = 2 + the sum of (m_j - 1) over the stages
after i. With all stages at 3 bits the weights are 2^10, 2^8, 2^6, 2^4 and 2^2. The output is then

    D = sum_i d_i * 2^w_i + d_last

The constant offsets of the subcodes (the -c terms) cancel exactly against the last quantizer's
offset, so D is simply floor((vin/VREF + 1) * 2^(B-1)) for an ideal converter. Neighbouring
subcodes overlap by one bit, and the additions absorb the carries.

`cfr_array` computes this sum as a chain of cells, one per stage, starting at the last quantizer
and ending at STG_1. Each cell holds two ripple-carry adders (`rca_add`). The first adds the
shifted subcode. The second subtracts that stage's stored calibration error, as two's complement
with a carry-in. The sums are kept in quarter LSBs:

    q[5] = 4*d_last
    q[i-1] = q[i] + 4*d_i*2^w_i - err_i
    code = round(q[0] / 4)

The result is clamped to 0 .. 2^B - 1 and left-justified to 13 bits. B is 13 with all stages at
3 bits and 8 with all at 2 bits. Because the code is left-justified, code/2^13 is always the
input as a fraction of full scale. `ovr` and `udr` flag a code at the top or bottom of the range.
An ideal redundant pipeline saturates there by itself, so the flags mean "at or beyond full
scale".

The partial sums `q[i]` matter in their own right. `q[i]` is the code that the back end after
STG_i makes of that stage's residue, and calibration uses it.

## Clock phases and subcode alignment

There is one master clock, CkM (`clk`). Each CkM cycle is one phase, and phi1 and phi2 alternate,
so 10 MS/s needs a 20 MHz CkM. The phases are clock enables, not separate clocks. `dcad_clkgen`
produces phi1, phi2 and Ckb. Ckb is the computation strobe and marks phi1. Reset holds phi1, and
the first cycle after reset is phi2.

The analog part moves a sample forward by one stage per phase. Call t0 the edge at the end of a
phi1 cycle, when the S/H takes a sample. STG_i then takes that sample at edge t0+i, on the phase
opposite to its predecessor's. The last quantizer, which is index 6, takes it at t0+6. Each stage
holds its subcode for two phases.

`shr_array` undoes this spread. It loads each stage's subcode one phase after the stage produced
it. Odd stages load at the end of phi1, and even stages and the last quantizer load at the end of
phi2. Each subcode then shifts along a chain of floor((6-i)/2)+1 registers, on that same phase.
All chain tails hold the same sample during the cycle that ends at t0+8. That edge is a Ckb edge,
and it is when the output register takes the corrected code.

| event                                   | CkM edge |
|-----------------------------------------|----------|
| S/H samples vin                         | t0       |
| STG_i produces its subcode              | t0+i     |
| last quantizer code                     | t0+6     |
| subcodes aligned (chain tails)          | t0+7     |
| `code` registered, `code_vld` high next | t0+8     |

The latency is 8 CkM cycles, which is 4 conversion periods, and the throughput is one code per 2
CkM cycles. The testbenches check both numbers. Without the input S/H (`USE_SH = 0`), STG_1
samples vin itself at t0+1, so the latency counted from the sampling instant becomes 7 cycles.

## Calibration

Calibration measures, for every subcode k of a stage, how far that stage's real residue is from
the ideal one, and then subtracts that amount from every later conversion that uses subcode k.

**Measurement.** `bx_gen` forces one stage (`cal_force`, one-hot) and gives it the external
subcode `bx`. A forced stage ignores its comparators and uses bx. It also samples a calibration
voltage, (bx - c)·VREF/G, the centre of bx's decision interval, instead of its normal input. An
ideal stage would then produce a zero residue, so the back end would read the mid code
2^w_i - 1/2. `cal_avg` takes the deviation

    e = q[i] - 4*2^w_i + 2      (quarter LSBs)

over 2^AVG_LOG2 = 16 samples. It rounds the mean, clamps it to 10 bits and writes it into the
register bench `err_regbank` at (stage, k). Before each window, `bx_gen` waits WAIT = 6 samples
so that the pipeline holds only forced samples.

**Order.** A run calibrates stages STG_depth down to STG_1, with `cal_depth` = 1 or 2. Stored
errors are already applied during a run. So when STG_1 is measured, the back end after it has
already been corrected for STG_2. With 3-bit stages a run takes depth × 7 subcodes ×
(6 + 16) samples. For depth 2 that is 308 samples, or 616 CkM cycles.

**Use.** In `MODE_CAL`, the bench returns the error of each calibrated stage's current subcode
(`err_regbank` has one combinational read port per stage), and `cfr_array` subtracts it. In
`MODE_NOCAL` the bench reads as zero.

**What it does not correct.** The measurement is taken at the centre of each decision interval.
It therefore removes DAC level errors, amplifier offset, and the gain error at those points.
Across one interval, an interstage gain error still leaves a residual G·ΔG·(v - v_k). Calibrating
the interstage gain itself would need another measurement, and it is not built. With the default
model errors, the worst code error over a full-scale ramp drops from 28 LSB to 3 LSB at 13 bits.
ENOB rises from 9.2 to 11.5 bits.

## Modes and control

| input                | meaning                                                                 |
|----------------------|-------------------------------------------------------------------------|
| `mode = MODE_NOCAL`  | correction only                                                         |
| `mode = MODE_CAL`    | correction plus the stored errors                                       |
| `mode = MODE_TEST`   | `bx_gen` sweeps the DAC codes of stage `test_stage`, round and round     |
| `cal_req` (pulse)    | start a calibration run (ignored in MODE_TEST or while one runs)        |
| `cal_depth`          | number of stages to calibrate, 1 or 2                                   |
| `res3[4:0]`          | per-stage resolution. After changing it, recalibrate.                   |

`dcad_ctrl` is the glue logic. When a run is requested, it clears the bench for one cycle, starts
`bx_gen`, holds `cal_busy`, and sets `calibrated` when the run is done.

In test mode the forced stage converts its calibration points. `code` then steps through the
stage's DAC levels, and `test_step` pulses once per level. `sub_al` gives the aligned raw
subcodes for observation.

## The analog model

`stg_model` applies all of the following errors to the ideal residue:

* a relative interstage gain error `GAIN_ERR`;
* a DAC error per level, (d-c)·`DAC_ERR` + (d-c)²·`DAC_INL`, which stands for capacitor
  mismatch;
* an amplifier offset `OFFSET`;
* a common comparator offset `COMP_OFS`;
* single-pole settling. In each phase of length `T_HALF_NS`, the output moves from its previous
  value towards the target with time constant `TAU_NS`.

`sh_model` has a gain error, an offset and the same settling, and `flash_model` has uniform
thresholds. In `adc_analog`, stage i gets stage 1's error values scaled by 2^-(i-1).

The default values (stage 1: gain -0.2 %, DAC +0.3 %, DAC_INL 0.1 %, offset 2 mV; comparators
20 mV; τ = 5 ns) are illustrative values for a switched-capacitor prototype, not measured ones.

Setting `USE_SH = 0` drops the input S/H. STG_1 then samples the moving input directly, and its
comparators decide on the input as it was one phase before the MDAC samples it. The resulting
error is absorbed while it stays within the redundancy margin. That margin is VREF/8 minus the
comparator offset for a 3-bit first stage and VREF/4 minus the comparator offset for a 2-bit one.
Above that, resolution collapses. For a 0.95 full-scale sine at 10 MS/s, the onset is about
0.35 MHz with a 3-bit first stage and about 0.8 MHz with a 2-bit one.

## Measured behaviour

These figures come from the testbenches, with the default parameters unless a row says otherwise.

| measurement                                      | result              |
|--------------------------------------------------|---------------------|
| worst ramp error, no calibration / calibrated    | 28 LSB / 3 LSB (13-bit) |
| ENOB at 10 MS/s, 0.27 MHz: none / STG_1 / STG_1+2 | 9.2 / 10.5 / 11.5   |
| ENOB at 20 and 40 MS/s (settling, STG_1+2 cal)   | 9.5 and 6.1         |
| ENOB without S/H at 1.6 MHz (with S/H)           | 2.9 (11.5)          |
| no S/H, 2-bit STG_1: ENOB at 0.27 / 0.51 / 1.21 MHz | 10.4 / 10.5 / 5.3 |
| no S/H, 3-bit STG_1: ENOB at 0.51 MHz            | 7.7                 |
| latency / throughput                             | 8 CkM cycles / 1 code per 2 cycles |
| calibration run, depth 2, 3-bit stages           | 616 CkM cycles      |

## Design choices and departures

The architecture is specified at the level of its named parts and how they fit together. The
following points are this design's own choices:

* **Stage split.** There are six quantizing stages: five programmable 2/3-bit stages and a fixed
  3-bit last quantizer, giving 5 × 2 + 3 = 13 bits at most. The last quantizer is not
  programmable here.
* **Stage arithmetic.** The stage transfer function (1.5-bit / 2.5-bit style with one redundant
  bit), the threshold placement and the calibration input voltage are standard choices.
* **Clocking.** One clock is used with phase enables, and the phase relationship and latency
  above follow from it.
* **Calibration algorithm.** It measures each subcode at its interval centre, averages over 16
  samples, calibrates from the back stage forwards, and stores 10-bit errors in quarter LSBs in a
  2 × 7 register bench. Interstage-gain calibration is not implemented.
* **Mode set.** The three modes and the test sweep are this design's own. The original set of
  test modes is not known in detail.
* **Output format.** The code is left-justified on 13 bits, and the range flags mean
  "code at a limit".
* **Reset.** Reset is synchronous and active-low. It clears all registers, including the error
  bench.
* **Model.** All analog error values, the settling law and the one-phase comparator skew without
  S/H are model choices.

## Files

| file | contents |
|------|----------|
| `rtl/adc_pkg.sv` | sizes, types (`mode_e`, `err_wr_t`, ...), weight functions |
| `rtl/pipeline_adc.sv` | top: analog model + digital part |
| `rtl/dcad.sv` | digital part |
| `rtl/dcad_clkgen.sv`, `shr_array.sv`, `cfr_array.sv`, `rca_add.sv`, `cal_avg.sv`, `err_regbank.sv`, `bx_gen.sv`, `dcad_ctrl.sv` | digital blocks |
| `rtl/adc_analog.sv`, `sh_model.sv`, `stg_model.sv`, `flash_model.sv` | behavioural analog models |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_pipeline_adc.sv` | end-to-end run at default parameters: ramps, latency, range, calibration, test mode, 2-bit stages |
| `tb/tb_enob.sv` | ENOB versus sampling rate, input frequency, S/H and calibration depth |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

## Simulating

With Verilator 5 (two-state, `--timing`):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/adc_pkg.sv tb/tb_pipeline_adc.sv \
          --top-module tb_pipeline_adc -o sim
./obj_dir/sim
```

Replace `tb_pipeline_adc` with any other testbench name. Each one runs in well under a second.
Only the digital modules (`dcad` and below) are for synthesis. The analog models use `real` and
are simulation-only.

## Changing it

* **Stage count.** `NSTG` is set in `adc_pkg`. `shr_array` requires it to be odd, because of the
  phase on which the last quantizer loads.
* **Number of calibrated stages.** `NCAL` sizes the error bench. The `cal_depth` port has
  $clog2(NCAL)+1 bits.
* **Error format.** `EW` and `FRAC` set the width and the fractional bits of the stored errors.
* **Calibration timing.** `AVG_LOG2` (window of 2^AVG_LOG2 samples) and `WAIT` are parameters of
  `dcad`. The run length scales with (WAIT + 2^AVG_LOG2).
* **Analog model.** The error and timing values are parameters of `pipeline_adc` and
  `adc_analog`.
