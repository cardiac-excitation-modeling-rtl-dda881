# Luo-Rudy phase-I cardiac cell on an FPGA

This RTL simulates the electrical activity of a single mammalian ventricular
cell in hardware, in real time or faster. The cell model is the Luo-Rudy
phase-I (LR-I) model. It has eight ordinary differential equations:

* the membrane voltage Vm;
* six Hodgkin-Huxley gates (m, h, j of the fast sodium current, d and f of
  the slow inward current, x of the time-dependent potassium current);
* the intracellular calcium concentration [Ca]i.

Six ionic currents drive Vm. A periodic stimulus current starts each action
potential. The solver is a pipelined, fixed-point, forward-Euler integrator.
It sits inside a stand-alone FPGA wrapper: an enable switch starts and stops
it, and every step's Vm goes out as a 16-bit word for a DAC that feeds a data
logger.

The structure follows the HDL Coder LR-I design described in *Cardiac
Excitation Modeling: HDL Coder Optimization towards FPGA stand-alone
Implementation*:

* the equations and their constants;
* the signed 36-bit / 22-fraction-bit number format;
* lookup tables in place of exponentials and logarithms;
* a pipelined datapath;
* the switch → solver → 16-bit DAC arrangement.

That description gives no HDL, no time step, no pipeline schedule, no table
sizes and no I/O timing. Everything of that kind here is this design's own
choice, and each choice is listed below.

## The model as computed

```
dVm/dt   = -(Iext + INa + Isi + IK + IK1 + IKp + Ib) / Cm          Cm = 1 uF/cm^2
dy/dt    = alpha_y(Vm) (1 - y) - beta_y(Vm) y                      y = m, h, j, d, f, x
d[Ca]/dt = -1e-4 Isi + 0.07 (1e-4 - [Ca])                          (mM, ms)

INa = 23     m^3 h j (Vm - 54.7942)
Isi = 0.09   d f     (Vm - ESi),     ESi = 7.7 - 13.0287 ln[Ca]
IK  = 0.282  x Xi(Vm)    (Vm + 77.5673)
IK1 = 0.6047 K1inf(Vm)   (Vm + 87.8925)
IKp = 0.0183 Kp(Vm)      (Vm + 87.8925)
Ib  = 0.03921            (Vm + 59.87)
```

The conductances, reversal potentials, the ESi constants and the calcium rate
0.07 are the design's values. The alpha/beta rate functions and the Xi,
K1inf and Kp factors are those of the published LR-I model (Luo and Rudy,
1991). They are written out in `lr1_pkg::rate_value`.

Integration is forward Euler with dt = 0.005 ms. Units are mV, ms and uA/cm^2.

## Number format

Every datapath word is `lr1_pkg::fix_t`: signed, 36 bits, 22 fraction bits.
This gives a range of ±8192 and a resolution of 2.4e-7. A product keeps all
72 bits and is rounded to nearest back to 22 fraction bits (`lr1_pkg::fmul`).
Constants are converted once, at elaboration (`to_fix`).

Two places needed care to keep this format accurate:

* **Calcium is held in uM, not mM.** In mM, the recovery term
  `dt*0.07*(1e-4 - [Ca])` is about 0.15 LSB per step. It rounds to zero, so
  [Ca]i would never return to rest. Scaled by 1000, the same equation moves
  [Ca]i by about 150 LSB per step. The unit change is folded into the ESi
  constant (`+13.0287*ln 1000`). The `cai` output of the core is therefore
  in uM.
* **Product order in INa.** `23*(Vm-ENa)` is multiplied by the gates one at a
  time: `((g·dV·m)·(h·j·m))·m`. This keeps the intermediate values large
  compared with the LSB. Computing m^3 first would underflow while m is
  small.

## One step: the seven-phase pipeline

The hardest part to follow is the timing. The whole model is a feedback loop:
every state variable of the next step depends on all of this step's state.
So pipeline registers cannot overlap steps. Instead, one step is spread over
`NPH = 7` clock phases, and the registers between phases shorten the critical
path. `step_ctrl` drives a one-hot phase vector `ph`. Every block acts only in
its phases:

| phase | name        | what happens |
|-------|-------------|--------------|
| 0 | `PH_LUT`    | every rate table (`vm_lut`, addressed by the committed Vm) and the logarithm table (`esi_calc`, addressed by the committed [Ca]i) are read into registers |
| 1 | `PH_P1`     | gates: alpha·(1-y), beta·y. Currents: g·(Vm-E), h·j, gSi·d, x·Xi. ESi is formed. Ib is final |
| 2 | `PH_P2`     | gates: y_next = y + dt·(difference). INa: ·m twice. Isi: ·f and Vm-ESi. IK, IK1, IKp are final |
| 3 | `PH_P3`     | INa: product of the two partial products. Isi is final |
| 4 | `PH_P4`     | INa: last ·m. All currents are now valid |
| 5 | `PH_SUM`    | Itot = Iext + sum of currents (`membrane`). d[Ca]/dt (`ca_uptake`) |
| 6 | `PH_COMMIT` | Vm, [Ca]i and all six gates take their new values together |

Because every state variable changes only in `PH_COMMIT`, a block may read
any state variable in any phase and still see the old value. This is what
makes the step a correct explicit Euler step. The testbenches check that no
state moves outside `PH_COMMIT`.

`STEP_CYCLES` (a parameter of `step_ctrl`, `lr1_core` and `lr1_fpga_top`)
sets the clocks per step. The default is 7, which runs as fast as the
pipeline allows. Larger values add idle cycles. Real time means one step per
5 us of wall time, so `STEP_CYCLES = f_clk × 5 us`. For example, 118 at
23.6 MHz.

A step that has started always runs to its commit, even if `run` falls
mid-step. The model can therefore be paused at any time without leaving it
half updated.

## Lookup tables

No exponential or logarithm is computed in the clocked logic.

* **Voltage tables (`vm_lut`).** There are fifteen: alpha and beta for six
  gates, plus Xi, K1inf and Kp. Each has 4096 entries of 36 bits and covers
  -128 … +128 mV in 1/16 mV steps. The read returns the nearest entry and
  clamps out-of-range voltages to the end entries. The contents are computed
  when the ROM is initialised, from the real-valued formula in `lr1_pkg`, so
  there is no data file. Entry i holds f(-128 + i/16). Values that exceed
  the number range (only beta_m below about -127 mV) saturate.
* **Logarithm table (`esi_calc`).** [Ca]i, as a raw integer, is `2^p·(1+u)`.
  A leading-one detector finds p. The next 8 bits address a 256-entry table
  of `13.0287·ln(1+(k+0.5)/256)`. The result is then
  `ESi = C0 - p·13.0287·ln2 - table[k]`. The error is below 0.05 mV over
  1e-5 … 1e-1 mM.

Total ROM is 15 × 4096 × 36 + 256 × 36 bits ≈ 2.2 Mbit. A Virtex-6 LX240T
has about 15 Mbit of block RAM, so this fits easily.

## Stand-alone wrapper (`lr1_fpga_top`)

```
sw_enable ─► switch_sync ─► run ─► lr1_core ─► vm ─► ap_dac_format ─► dac_code / dac_valid
stim_amp[14:0] ────────────────────┘   (stimulus, step_ctrl, currents, calcium, membrane)
```

* **`switch_sync`** passes the switch through a two-flip-flop synchroniser.
  The output changes only after the synchronised input has been stable for
  2^DB_BITS cycles (65536 by default, 2.8 ms at 23.6 MHz).
* **`stimulus`** produces Iext = -stim_amp for WIDTH_STEPS steps, every
  PERIOD_STEPS steps, starting at step START_STEPS. The defaults are 0.5 ms
  pulses every 500 ms from 100 ms on. `stim_amp` is unsigned, in uA/cm^2,
  with 8 fraction bits; 80 uA/cm^2 is 20480. The sign is negative because a
  negative current depolarises the cell in dVm/dt = -(Iext+Iion)/Cm.
* **`ap_dac_format`** rounds Vm to 1/256 mV, saturates it to 16 bits and
  writes it as offset binary: code 0 is -128 mV, 32768 is 0 mV and 65535 is
  +127.996 mV. This suits a unipolar 0–2.5 V DAC. A word appears two clocks
  after each commit, with a one-cycle `dac_valid`.
* **Not in the RTL.** The DAC mezzanine card, its connector, the data logger
  and the board oscillator are outside the FPGA logic. Their digital
  interface is not specified, so the word and its strobe are top-level ports.

## Accuracy and verification

Every block has a self-checking testbench in `tb/`. The reference is
`tb/lr1_ref_pkg.sv`, a double-precision model of the same equations with
exact rate functions and the same Euler step. Most testbenches compare
against it. The main results:

* **`tb_lr1_fpga_top`** runs the full design at default parameters. It
  covers 1500 ms of model time (300000 steps): three stimulated action
  potentials, a bouncing switch, and a pause in the middle. Results:
  * Vm stays within 0.13 mV of the double-precision model;
  * peak about +42.5 mV;
  * about 3–7 mV 100 ms into the plateau;
  * back at -83 mV before the next beat.

  Every DAC word is checked against the Vm it encodes. The run takes about
  3 s in Verilator.
* **`tb_lr1_core`** runs one beat and checks the rest potential, peak,
  action potential duration (about 359 ms at -60 mV), the step period (7
  clocks) and that `run` pauses the model.
* **Unit testbenches** cover each current with its gates, the gate
  integrator, the tables, ESi, calcium, the membrane sum, the stimulus
  timing, the sequencer, the debouncer and the DAC coding. Each compares
  with independently computed values.

Known limits:

* The slow gate x drifts by up to about 2e-4 from the reference over
  thousands of steps, because rounding accumulates in its small increments.
  This has no visible effect on Vm.
* With dt = 0.005 ms, forward Euler on m is stable only while
  dt·(alpha_m + beta_m) < 2. That holds above about -94 mV; rest is -84 mV.
  A larger dt can make the model unstable at rest.

## Choices made here

These points are not fixed by the source design:

* time step 0.005 ms;
* the 7-phase schedule and the `STEP_CYCLES` pacing;
* table range, size and nearest-entry read;
* the exponent/mantissa split of the logarithm;
* the uM scaling of calcium;
* division by Cm done as a multiplication by -dt/Cm;
* initial state: -84 mV, gates at their steady state there, [Ca]i = 2e-4 mM;
* stimulus timing and amplitude scaling;
* debounce length;
* DAC code format;
* a synchronous, active-low reset.

The calcium uptake rate is 0.07 per ms, as in the published LR-I model.

Further differences from the source design's block diagram:

* There, ESi passes through a unit delay after the calcium table, so it lags
  [Ca]i by one step. Here ESi is computed from the current step's [Ca]i.
* There, the stimulus function takes a time input. Here the stimulus counts
  steps.
* There, the membrane current is divided by a capacitance constant of -1.
  Here it is multiplied by the constant -dt/Cm.
* Of the DAC's two channels, only one (Vm) is driven.

The number format is set by `WL`/`FL` in `lr1_pkg`. The default is 36/22.
The two wider formats of the source design's word-length study, (60,40) and
(50,30), also build and run. Set the two constants and rerun `tb_lr1_core`:
at either width, Vm stays within 0.012 mV of the double-precision model,
and the remaining error comes from the table resolution. The unit
testbenches of `vm_lut`, `esi_calc` and `ap_dac_format` use 22-bit constants
and apply to the default format only.

## Files

| file | contents |
|------|----------|
| `rtl/lr1_pkg.sv` | number format, rounding multiply, phase numbers, model constants, rate formulas for table initialisation |
| `rtl/lr1_fpga_top.sv` | stand-alone top: switch, core, DAC word |
| `rtl/lr1_core.sv` | the solver: sequencer, stimulus, six currents, ESi, calcium, membrane |
| `rtl/step_ctrl.sv` | phase sequencer and step pacing |
| `rtl/current_na.sv`, `current_si.sv`, `current_k.sv` | currents with their gates |
| `rtl/current_k1.sv`, `current_kp.sv`, `current_b.sv` | time-independent currents |
| `rtl/gate_euler.sv` | Euler integrator of one gate |
| `rtl/vm_lut.sv` | voltage-indexed table ROM |
| `rtl/esi_calc.sv` | ESi through the logarithm table |
| `rtl/ca_uptake.sv` | calcium integrator |
| `rtl/membrane.sv` | current sum and Vm integrator |
| `rtl/stimulus.sv` | stimulus pulse train |
| `rtl/switch_sync.sv` | switch synchroniser and debouncer |
| `rtl/ap_dac_format.sv` | Vm to 16-bit DAC word |
| `tb/tb_<module>.sv` | testbench of each module |
| `tb/lr1_ref_pkg.sv` | double-precision reference model |
| `tb/tb_phase_gen.sv` | phase driver used by the unit testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` at the end. For
example, the full design:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/lr1_pkg.sv tb/lr1_ref_pkg.sv $(ls rtl/*.sv | grep -v lr1_pkg) tb/tb_lr1_fpga_top.sv \
  --top-module tb_lr1_fpga_top -Mdir obj
./obj/Vtb_lr1_fpga_top
```

For a unit testbench, list the package files, the module and what it
instantiates. Add `tb/tb_phase_gen.sv` where the testbench uses it. Lint
with `verilator --lint-only -Wall -Irtl rtl/lr1_pkg.sv rtl/<module>.sv`.

To change the model, edit the constants or formulas in `lr1_pkg`. The tables
follow automatically, because they are computed from the formulas at
initialisation.
