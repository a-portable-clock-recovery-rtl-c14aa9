# All-digital clock recovery by bit-width capture

A serial NRZ receiver has to rebuild the clock the transmitter used. The
usual answer is a PLL, with an analog loop filter, a VCO, long lock times and a
design that has to be redone for every process. This circuit uses no loop
filter and no oscillator tuning. It **measures the width of one data bit with a
travelling pulse, and then makes the same pulse chase its own tail**:

1. A rising data edge launches a short pulse down a tapped inverter delay line.
2. The next falling data edge freezes, in a row of pulsed flip-flops, the tap
   the pulse has reached. This is the length of a "1" bit, counted in taps.
3. The frozen tap selects the same-numbered phase of a second, identical delay
   line. That phase, cleaned up by a Schmitt trigger, is the recovered clock.
   It is fed back into the edge detector that launched the pulse, which closes
   a ring whose round trip is one bit cell.

The ring then oscillates at the bit rate with no further input. Every rising
data edge relaunches the pulse, which pulls the clock phase back onto the
data. Every falling edge measures the period again. From reset the clock
runs after two data transitions. Since nothing in it is analog except gate
delays, the circuit is described entirely at gate level.

This repository holds a **timed SystemVerilog model** of that circuit. Gate
delays are picosecond parameters, and the one analog node (the clock
multiplexer output) is a numeric level. It runs in Verilator with `--timing`
and reproduces the capture, free-running, re-timing, interpolation and
phase-recovery behaviour. It is not logic to be synthesized: a real
implementation is a hand-placed chain of standard cells whose delays do the
work.

## The loop, block by block

```
          din ──► crc_ped ──CLK0──► crc_delay_line (CK) ──CK1..CKn──┐
      ┌──────────►  (positive     ──P0──► crc_delay_line (P) ──P1..Pn──┤
      │            edge det.)                                          ▼
      │   din ──► crc_ned ──T, Tb──────────────────────────────► crc_pccm
      │            (negative edge det.)                      (flip-flops +
      │                                                       phase mux)
      │                                                            │ Clkfb (level)
      └──────────── clk_out ◄── crc_schmitt ◄──────────────────────┘
```

| File | Role |
|---|---|
| `rtl/crc_top.sv` | the complete loop |
| `rtl/crc_ped.sv` | positive-edge detector: pulse on a rising edge of delayed `din` **or** of `clk_out`, then a fixed odd inverter delay |
| `rtl/crc_ned.sv` | negative-edge detector: complementary pulses `t`/`tb` on a falling edge of `din` |
| `rtl/crc_delay_line.sv` | tapped inverter line, tap *i* after 2*i* inverters; used twice |
| `rtl/crc_pff.sv` | pulsed flip-flop: transparent while `t & ~tb` |
| `rtl/crc_pccm.sv` | one flip-flop per tap + transmission-gate mux onto the shared `clkfb` node |
| `rtl/crc_schmitt.sv` | hysteresis restoring `clkfb` to `clk_out` |
| `rtl/crc_inv_chain.sv` | N-inverter chain helper |
| `rtl/crc_pkg.sv` | node level type and Schmitt thresholds |

### Positive-edge detector (PED)
Each input drives a NAND gate directly and through three inverters. The NAND
output is therefore low for three inverter delays after a rising edge, and
nothing happens on a falling edge. More inverters on that path (`N_PW`) give a wider
pulse. A second NAND merges the two inputs. A data
edge and a clock edge that arrive together give **one** pulse, which is how an
in-phase data edge re-times the loop without disturbing it. An odd number of
inverters (`N_FIXED`) then delays the pulse. This fixed delay is the part of
the ring that is not in the tapped line, so it sets which band of bit rates
lands inside the line. The data input first passes a **matching delay**
(`MATCH_DLY`). This delay balances the delays the feedback path has and the
data path does not: the mux node, the Schmitt trigger, and the position of the
capture window after the falling edge.

### Capture and phase selection (NED, flip-flops, mux)
On a falling edge the NED opens all flip-flops together for a short window.
Each flip-flop copies its tap of the P line, so after the window the flip-flops
hold a snapshot of where the pulse was. Each flip-flop that holds a 1 turns on
the transmission gate of the same-numbered tap of the CK line. Because the two
lines are identical, the CK pulse passes that gate exactly one measured bit
width after it was launched.

### Interpolation
The pulse (45 ps) is wider than one tap (30 ps), so the snapshot holds either
one tap or two neighbouring taps. With two taps, two phases 30 ps apart drive
the same node. The node sits at mid-supply while only the earlier phase is
high, and rises fully when the later one is. Its crossing of the Schmitt
threshold therefore falls between the two phases' own crossings. This doubles
the resolution, from 30 ps to 15 ps. In the model the node is a first-order RC
(time constant `TAU_STEPS` ps) driven towards *(phases high / phases
selected)* of the supply. At the defaults the periods for taps 10, 10+11 and
11 are 476, 491 and 506 ps, an exact midpoint.

### Schmitt trigger
It rises when the node reaches 70 % of the supply and falls at 20 %. The
70 % threshold has a purpose: one of two selected phases (50 %), or two of
three (67 %), must **not** fire it (see the next section). The low 20 %
threshold keeps `clk_out` high long enough for the PED to regenerate a
full-width pulse on every turn. Without it the pulse shrinks each turn and the
ring dies out.

## Timing at the default parameters

Gates are 15 ps, so a tap is 30 ps and the pulse is 45 ps.

| quantity | value |
|---|---|
| PED, feedback input to pulse out | (N_FIXED+3)·15 = 120 ps |
| PED, data input to pulse out | 120 + MATCH_DLY = 238 ps |
| capture window after a falling edge | 45–90 ps (`t` high 45–90, `tb` low 60–105) |
| captured position E (time from launch to end of window) | E = cell − 148 ps |
| tap *i* is high for E in | [30·i, 30·i + 45) |
| loop period | 120 + 30·k + node crossing (≈24) + T_ST (27) ≈ cell |
| clock rising edge after a data rising edge | ≈ 112 ps (about MATCH_DLY) |
| usable cells, default sizes | about 370–640 ps, with the phase-step recovery below fully covered up to about 510 ps |

`MATCH_DLY = 118` and `T_ST = 27` are calibrated values: with them a 500 ps
cell falls in the middle of the one-tap region of tap 11 and gives exactly
500 ps. If you change `T_INV`, `TAU_STEPS` or the thresholds, recalibrate these
two (run `tb_crc_top` and watch the period).

## Phase steps and the stale pulse

This is the subtle part. Suppose the data jumps by half a bit. The next rising
edge launches a new pulse, but the old pulse is still circulating, so the ring
now holds two pulses and `clk_out` runs at twice the rate. Nothing in the
circuit aims at the old pulse, so the model clears it as follows:

* The delay line is long enough (18 taps, 30–585 ps) that at any falling
  edge **both** pulses are somewhere in the line. The snapshot then holds two
  separate positions.
* With two non-adjacent phases connected, the node reaches only 1/2 (or 2/3)
  of the supply when either pulse passes, which is below the 70 % threshold.
  The ring **stops**.
* The next rising edge launches a single pulse, and the next falling edge
  captures only it. At that moment its phase is already high on the CK line, so
  the clock restarts in phase with the data.

Steps from 50 to 450 ps at a 500 ps cell all recover this way. The clock is
back in phase from the second to fourth rising data edge after the step; the
half-cell step is the slowest. This puts two constraints on the line. It must span about one
period, or a stale pulse can hide outside it. It must also be shorter than
E + one period, or the locked pulse from the previous turn would be captured
too. That is why the default line has 18 taps and why `N_FIXED` is small.

## Accuracy, drift and data coding

Between data edges the clock free-runs, and its period error adds up. The
period can only take values 15 ps apart, so a cell that is not on that grid
runs with up to about ±7 ps of error per bit. Each falling edge measures again
and corrects the frequency, and each rising edge corrects the phase. Two
consequences:

* If a run of equal bits builds the drift past about 15 ps, the rising data
  edge's pulse half-overlaps the loop pulse. The merged pulse spans three taps
  at the next capture, and the loop stops until the capture after that. Data
  should therefore be coded for frequent transitions. The rate sweep below
  uses runs of at most two equal bits.
* Cells whose captured position lies within about 3 ps of a 15 ps step
  boundary toggle between two settings. They lose lock from time to time even
  with short runs. With 30 ps taps and 30 ps steps of fixed delay, one bit cell
  in every 15 ps of rate is in this position.

At 500 ps with 6-bit pseudo-random data (runs of up to six), every period is
within 1 ps of 500.

## Measured behaviour (from the testbenches)

| case | result |
|---|---|
| 1011111111 at 500 ps, from reset | first clock edge after 2 transitions; free-running period 500 ps, spread ≤ 1 ps |
| 2 × 63 bits of x⁶+x⁵+1 at 500 ps | all periods 500 ± 1 ps; every rising data edge has a clock edge about 112 ps later |
| 250 ps phase step at 500 ps | loop stops, restarts in phase, period 500 ps again |
| steps of 50–450 ps at 500 ps | all back in phase from rising data edge 2, 3 or 4 after the step; one clock edge per bit afterwards |
| 400 ps cell, same sizes | locks; taps 7 and 8 selected together (interpolated) |
| 515 ps cell | two neighbouring taps selected, period held within 25 ps |
| cells 400–1000 ps, N_FIXED per cell | 9 of 13 average within 0.05 %; 450, 600, 750 and 900 ps are marginal, as above |

For other rates, set `N_FIXED` to the nearest odd integer to
(cell − 383 ps)/15 ps − 3. This keeps the capture at the same place in the
line, and it is the only parameter that changes.

## Simulating

Every file starts with `timeunit 1ps`. The testbenches print one line
`TB_RESULT checks=N failures=M`.

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv rtl/crc_pkg.sv \
          tb/tb_crc_top.sv --top-module tb_crc_top
./obj_dir/Vtb_crc_top
```

| testbench | what it checks |
|---|---|
| `tb_crc_top` | the whole loop at default sizes: acquisition, free running, pseudo-random data, half-cell step, 400 and 515 ps cells; counts every mechanism |
| `tb_crc_rate_sweep` | 13 copies, cells 400–1000 ps, prints the period/error table |
| `tb_crc_phase_step` | 9 copies at 500 ps, data phase steps of 50–450 ps, recovery time and period afterwards |
| `tb_crc_delay_line`, `tb_crc_ped`, `tb_crc_ned`, `tb_crc_pff`, `tb_crc_pccm`, `tb_crc_schmitt` | each block against hand-computed delays and pulse widths |

The simulator has two states, so `rst_n` clears the flip-flops, the node and
the Schmitt state. Hold it low for about 2 ns so the inverter chains settle.

## Where this model departs from the circuit it describes

* **Delays and sizes are this model's.** Gate delay (15 ps), tap count (18),
  fixed delay (5), matching delay, node time constant and thresholds are not
  taken from silicon. Only the 3-inverter pulse width, the odd fixed chain and
  the architecture are.
* **Gate count.** The circuit is meant to need fewer than 100 gates. This
  configuration, at 15 ps per gate, has about 140: 72 inverters in the two
  lines, 18 flip-flops and 18 transmission gates.
* **Matching delay placement.** It sits on the PED's data input. The value is
  calibrated, not derived from a PCCM/Schmitt delay.
* **Stale-pulse removal** (previous section) and the 70 %/20 % thresholds it
  depends on are this model's mechanism.
* **Analog effects not modelled.** Supply and temperature noise, and the
  slightly shorter PED delay when a data edge and a clock edge coincide. In
  silicon that gives two period modes about 10 ps apart. The model is
  noiseless, so its period jitter is that of its 1 ps time step.
* **Resolution.** The model's period moves in 15 ps steps, which causes the
  marginal rates above. A real interpolating node is continuous.
* **Reset.** `rst_n` is an addition, for deterministic start-up.
* **NED gate types.** The combining gates in `crc_ned` are chosen for
  function (pulses only on falling edges). The extra inverter in the `tb` path
  makes `tb` lag `t` by one gate delay.
