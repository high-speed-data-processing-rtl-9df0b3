# Streaming particle identification for the BigRIPS separator

This RTL identifies every ion that passes through the BigRIPS fragment
separator of the RIKEN RI Beam Factory. For each event it returns two
numbers: the mass-to-charge ratio **A/Q** and the atomic number **Z**. It
computes them from the raw detector data, in real time, with the
**TOF-Bρ-ΔE** method:

* **TOF.** The time of flight between the plastic scintillators at focal
  planes F3 and F7 gives the velocity β. The flight path is 46.6 m.
* **Bρ.** The ion's position and angle, measured by parallel-plate avalanche
  counters (PPACs) at F3, F5 and F7, give the magnetic rigidity Bρ of the two
  sections F3-F5 and F5-F7.
* **ΔE.** The energy loss in the six-anode ion chamber at F7 gives Z through
  the Bethe-Bloch formula.

The point of the design is **task parallelism**. Each step of the analysis is
a separate hardware task. Tasks are joined by FIFOs and all of them run at the
same time, so the kernel takes a new event every clock while earlier events
are still moving through the later steps. It is meant for a data-centre FPGA
card (Alveo U50 class). The card's memory holds the raw segments and receives
the results. The same pipeline could sit behind a direct network input.

## Dataflow

```
 F3/F5/F7 PPAC load ─► PPAC cal+ana ─►[4 PPAC layers]─► PPAC reco ─┬─[F3 x]──────────┐
        (×3)                (×3)                           (×3)     ├─[F5 x, F5 a]─┐   ▼
                                                                    │              ├► trajectory 3-5 ─[Bρ35]─┐
                                                                    │              └► trajectory 5-7 ─[Bρ57]─┤
                                                                    └─[F7 x, F7 a]────────▲                  │
 F3/F7 PL load ─► PL cal+ana ─[F3 t],[F7 t]─► TOF ─[TOF]──────────────────────────────────────────────────────┤
 F7 IC load ─► IC cal+ana ─[F7 ΔE]────────────────────────────────────────────────────────────────────────────┤
                                                                                                              ▼
                                                 A/Q write ◄─[A/Q]─ PID (TOF-Bρ-ΔE) ─[Z]─► Z write
```

Brackets are FIFOs (`stream_fifo`). The F5 track feeds both trajectory tasks
through `stream_fork`, and so does the PID result for the two writers.

| Task | Module | Computes |
|---|---|---|
| load (×6) | `raw_load` | reads the raw segment of events 0…nchunk-1 |
| PPAC cal+ana (×3) | `ppac_calana` | x = gain·(TX1−TX2) − offset per layer; fired if TX1, TX2 ≠ 0 and TX1+TX2 is inside a window |
| PPAC reco (×3) | `ppac_reco` | least-squares line through the fired layers: position x [mm], angle a [mrad] |
| trajectory (×2) | `trajectory` | δ[%] = c_xup·x_up + c_xdn·x_dn + c_adn·a_dn; Bρ = Bρ0·(1 + δ/100) |
| PL cal+ana (×2) | `pl_calana` | t = (g_l·TL + g_r·TR)/2 + offset |
| TOF | `tof_calc` | TOF = t7 − t3 + offset |
| IC cal+ana | `ic_calana` | ΔE = gain·(∏(raw_i − ped_i))^(1/6) + offset |
| PID | `pid_calc` | β, A/Q, Z (below) |
| A/Q write, Z write | `result_write` | stores the results at consecutive addresses |

`pid_top` wires all of these together. `pid_pkg` holds the shared types,
constants and pipeline depths.

## The PID arithmetic

`pid_calc` joins four streams (Bρ35, Bρ57, TOF, ΔE) and evaluates:

```
β     = (L/c) / TOF                        L/c = 46.6 m / c = 155.44 ns
Bρ    = Bρ57 + w35·(Bρ35 − Bρ57)           w35 is a run-time weight
A/Q   = Bρ · sqrt(1 − β²) / (3.1071 · β)   Bρ in Tm (3.1071 Tm = m_u·c/e)
dE_v  = ln(ionpair · β² / (1 − β²)) − β²
Z     = zc0 · β · sqrt(ΔE / dE_v) + zc1
```

The logarithm is formed as `ln2·(log2 β² − log2(1−β²)) + ln(ionpair)`. This
avoids a fourth divider.

The hardware has three dividers, two square-root units and two log2 units.
All of them sit in one pipeline that stalls as a unit. Side values (β, Bρ,
ΔE, the validity bit) travel beside the arithmetic units in `pipe_delay`
shift registers of matching depth. With the default 32-bit format the depth
is `2·DIV_LAT + SQRT_LAT + LOG2_LAT + 5 = 147` clocks.

An event is **invalid** in any of these cases:

* a PPAC plane has fewer than two fired layers;
* a plastic has a missing PM time;
* an ion-chamber channel is at or below its pedestal;
* TOF ≤ 0, β is not in (0,1), or dE_v ≤ 0.

An invalid event still produces both results, set to `0x80000000`. This keeps
the output one-to-one with the input.

How the two Bρ values combine is this design's choice: a weighted mean. So is
the reduced form of Bethe-Bloch, which is the one common in BigRIPS analysis.
Set `w35 = 0` to use Bρ57 only.

## Number format and arithmetic units

Every calibrated quantity is signed **Q15.16** fixed point (`fx_t`, 32 bits,
16 fraction bits). Its range is ±32768 and its step is 1.5·10⁻⁵. Raw detector
values are 16-bit unsigned. The published HLS version of this kernel worked
in double precision. Fixed point was chosen here so that every unit can be
fully pipelined at one event per clock. The testbenches show that the
precision is enough:

* A/Q is within 5·10⁻⁴ of a double-precision reference;
* Z is within 0.02.

| Unit | Method | Depth |
|---|---|---|
| `fxp_div` | restoring division, one quotient bit per stage; saturates on overflow or division by 0 | FXW+FXF+2 = 50 |
| `fxp_sqrt` | digit-by-digit root of x·2^16 | (FXW+FXF)/2+1 = 25 |
| `fxp_log2` | leading-one detection, then one squaring per fraction bit | FXF+1 = 17 |
| `fxp_exp2` | product of constants 2^(2^−k) for the set fraction bits, then a shift | FXF+2 = 18 |

The exp2 constants are computed at elaboration by repeated integer square
roots starting from 2. No table file is needed.

Two places need more precision than Q15.16:

* **Track fit (`ppac_reco`).** The two PPACs of a focal plane each have two
  layers only a few centimetres apart. If only one PPAC fires, the fit's
  determinant D = n·Σz² − (Σz)² is tiny. So the sums are kept with 32
  fraction bits in 64-bit registers. Before the dividers, the numerators and
  D are shifted right by a common amount that fits the largest of them into
  32 bits. The quotient does not change and D keeps its significant bits.
* **Ion-chamber mean (`ic_calana`).** The geometric mean is taken in the log
  domain, `2^(Σ log2 v_i / 6)`. The division by 6 is a multiplication by
  round(2²⁴/6).

## Flow control

Every stream is **valid/ready**. A word moves when both are high. A producer
must hold its word until it is taken; `stream_fifo` asserts this.

* **Compute tasks** are single pipelines with a shift register of valid bits.
  The pipeline advances when its last stage is empty or its output is taken.
  It takes one event per clock, stalls as a whole, and never drops a word.
* **Joins** (`tof_calc`, `trajectory`, `pid_calc`) take an event only when
  every input is valid.
* **Forks** (`stream_fork`) release an input word once every output has
  taken it.
* **Load tasks** issue a read only while their output buffer has room for
  every reply still outstanding (credit-based). The memory may take any
  number of clocks to reply, but must reply in order. Full rate needs
  `LOAD_DEPTH` ≥ read latency + 2. The default 8 covers a 6-clock memory. A
  slower memory lowers the rate to `LOAD_DEPTH/(latency+2)` events per clock.

## Kernel interface (`pid_top`)

| Port | Meaning |
|---|---|
| `start`, `nchunk` | pulse `start` for one clock to process `nchunk` events; the base addresses and `par` must stay stable |
| `done` | high when both writers have stored `nchunk` results (also high while idle) |
| `par` (`kernel_par_t`) | every calibration constant: PPAC gains, offsets, TSum windows and layer z [m]; trajectory coefficients and Bρ0; plastic gains and offsets; TOF offset; IC pedestals, gain and offset; PID constants |
| `ppac_*[3]`, `pl_*[2]`, `ic_*` | read ports: `rd_req`/`rd_ready`/`rd_addr` for the request, `rd_valid`/`rd_data` for the in-order reply |
| `aoq_*`, `z_*` | write ports: `wr_en`/`wr_ready`/`wr_addr`/`wr_data` |

Each event's raw segment of a detector group is one memory word at
`base + event`:

* PPAC: 4 × (TX1, TX2), 128 bits;
* plastic: (TL, TR), 32 bits;
* ion chamber: 6 ADC values, 96 bits.

Results are 32-bit Q15.16 words at `aoq_base + event` and `z_base + event`.

Parameters:

* `FIFO_DEPTH` = 2 (the depth of the result FIFOs in the HLS version);
* `T_FIFO_DEPTH` = 3 (the plastic-time FIFOs);
* `LOAD_DEPTH` = 8;
* `AW` = 32.

## Performance

With a memory that answers in 3 clocks and never stalls, the end-to-end
testbench measures:

* 214 clocks from `start` to the first result;
* then one event per clock (400 events in 613 clocks).

The published HLS kernel reached an initiation interval of 5 clocks and a
latency of about 1000 clocks at 220 MHz. This RTL meets both bounds, and the
testbench checks them. No clock frequency has been measured for this RTL.
Each pipeline stage holds at most one 32×32 (in `ppac_reco`, 64×64)
multiply or one add/compare chain.

## What this design leaves out

These parts have no RTL here:

* the card memory (HBM) and its controllers: the top brings out plain memory
  ports instead;
* the PCIe shell, the host software and the runtime that launch the kernel;
* the QSFP28 / Aurora 64B/66B link for direct streaming;
* the detectors and digitisers.

The drift-chamber analysis and the AI-engine ideas were future plans with no
design behind them, so they are not included either.

## Choices made here, not given by the source design

These items are this design's own choices. Check them against your own
setup:

* **Raw word layout.** Each PPAC layer carries only the X delay-line pair
  (TX1, TX2), because only x and a are used downstream.
* **PPAC position and fired rule.** The position formula and the TSum gate
  (TX1+TX2 inside [tsum_lo, tsum_hi]) follow the usual BigRIPS convention.
* **Trajectory.** The inverse transfer matrix is a first-order linear map.
  Its coefficients are run-time constants.
* **Plastic ok rule.** Both PM times must be non-zero.
* **Ion-chamber ok rule.** Every channel must be above its pedestal.
* **Bρ combination** (`w35`) and the **reduced Bethe-Bloch** form.
* **Number format.** Fixed point replaces doubles.
* **One track fit per focal plane.** The HLS version ran all three focal
  planes through one PPAC loop with a single shared fit function. A fit unit
  shared by three planes can start a new event at most every third clock.
  Here each focal plane has its own `ppac_calana` and `ppac_reco`. This costs
  about three times the fit logic and allows one event per clock.
* **Protocols.** The memory protocol, the start/done handshake and the
  synchronous active-low reset (`rst_n`) are all assumed.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M`. `tb/tb_fx_pkg.sv` holds the
real-number conversions and the reference PID formulas. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pid_pkg.sv tb/tb_fx_pkg.sv tb/tb_pid_top.sv --top-module tb_pid_top
./obj_dir/Vtb_pid_top
```

Replace `pid_top` with any other module name to run its own testbench.

`tb/tb_fxp_units.sv` tests the four arithmetic units together. It feeds
them random operands every clock, plus division by zero, overflow, negative
roots, log2 of 0 and out-of-range exp2, and pauses their enable now and then.

`tb_pid_top` runs the whole kernel at its default parameters. It uses
behavioural memories and 400 generated events. It computes the expected A/Q
and Z from the same raw words in double precision, through every step of the
analysis. It makes two runs:

1. **No stalls.** It checks the latency and the rate.
2. **Random read and write stalls, unfired PPAC layers and missing plastic
   times.** It counts read stalls, write stalls, PID output stalls, full
   FIFOs, unfired layers and invalid events, and fails if any of these never
   happens.

The unit testbenches check:

* each block's pipeline depth;
* one event per clock;
* results against real-arithmetic references, under random input gaps and
  output stalls.
