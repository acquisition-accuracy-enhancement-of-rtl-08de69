# Dynamic phase alignment for tapping a parallel storage interface

A logic-analyser-style acquisition system that listens on a storage interface (for example
the eight DAT lines between an application processor and an eMMC device) cannot join the
host's own link training: it has to stay electrically and logically transparent. It samples
the lines with its own free-running clock, so each line arrives with an unknown phase
relative to that clock. Lines also arrive with different delays from one another, sometimes
more than a whole clock period apart. Sampling blindly then produces two kinds of errors:

* **phase errors**: a line changes close to the sampling edge and is read at random;
* **cycle errors**: bits that were launched together are captured in different cycles.

This RTL removes both while the system runs, with no training patterns. It has three steps,
applied to every line separately except the last:

1. **Phase difference detection (PDD).** Measure where in the sampling period the line's
   edges fall, to 1/64 of a period.
2. **Signal phase adjustment (SPA).** Delay the line so its edges fall half a period away
   from the sampling edge. The sampling edge then sits in the middle of the eye.
3. **Cycle adjustment (CA).** Use the protocol's start bit, which is sent on all lines at
   once, to find lines that are still one cycle early, and delay those by one cycle.

The defaults are a 200 MHz (5 ns) sampling clock, 64 phase steps of 78.125 ps, and 8 lanes.

```
            +--------------------- per lane i ----------------------+
 sig_in[i] -+-> PDD: 64 FFs on PSS clocks -> 2-FF sync -> encoder --+--> ps[i]
            |                                                        |
            +-> SPA: delay by pa = lambda - ps (compensator, front, rear delay) -> phase_aligned[i]
            +--------------------------------------------------------+
 clk_samp -> clock phase shifter -> pss_clk[63:0] (clock k delayed by k/64 period)
 phase_aligned[7:0] -> CA: SFF/DSFF per lane + cycle selector -> dout[7:0]
```

## Phase encoding

A phase is an integer from 0 to PHASES-1. Each unit is one step of PERIOD_PS/PHASES:
78.125 ps, or 5.625 degrees, at the defaults. Phase 32 is half a period (pi) and phase 16 is
a quarter period (pi/2). Every phase value in the design counts forward from the rising
edge of the undelayed sampling clock `clk_samp`.

## Measuring the edge phase (`phase_diff_detector`)

The **clock phase shifter** makes 64 copies of the sampling clock, delayed by 0, 1, ...,
63 steps. Flip-flop k of the **PSS flip-flop array** samples the line on copy k. One
sampling period therefore yields 64 snapshots of the line, evenly spaced in time. Each
snapshot goes through a **two-flop synchronizer** into the system clock domain. A window
register then holds one complete period of snapshots.

The **phase encoder** compares neighbouring snapshots (`chg[k] = s[k] ^ s[k+1]`). The last
snapshot is compared with the first snapshot of the next period. A set bit means the line
changed between phases k and k+1. Near a slow or noisy edge, several neighbouring snapshots
can read at random, which gives several set bits. The encoder therefore finds the first set
bit (priority encoder) and the last (reverse priority encoder), and reports their midpoint
`floor((first+last)/2)` as the edge phase. Take a 16-step example where the line is noisy from
step 2 to step 4: the result is step 3, i.e. 67.5 degrees.

The detector updates its output `phase` in every system clock cycle whose window contains a
change. In cycles without a change, it holds the last value. `upd` pulses on each update,
and `phase_valid` stays high once the first measurement exists. An edge takes about four
system clock cycles to reach `phase`. During the first four cycles after reset, changes are
ignored so that the reset values are not mistaken for an edge.

**Assumption about the system clock.** `clk_sys` is taken to have the sampling clock's
frequency and to be edge-aligned with it. In the testbenches both are the same net. Each
captured window then covers exactly one period, in phase order. With a different system
clock, the window would begin at another phase and the encoder's "first/last" would refer to
that rotated order.

## Moving the eye onto the sampling edge (`signal_phase_adjuster`)

Call the measured edge phase Ps. The adjuster adds a delay `Pa = lambda - Ps`:

| data rate (`dr`) | Ps range     | lambda           | edge ends up at |
|------------------|--------------|------------------|-----------------|
| SDR              | [0, pi)      | pi (32)          | pi              |
| SDR              | [pi, 2pi)    | 3pi (96)         | 3pi = pi of the next period |
| DDR              | [0, pi/2)    | pi/2 (16)        | pi/2            |
| DDR              | [pi/2, 2pi)  | 5pi/2 (80)       | pi/2 of the next period |

The hardware (`phase_adj_calc`) matches this table. A 4-to-1 multiplexer selects one of the
four lambda constants, using `dr` and one bit of Ps: bit 5 (the pi boundary) for SDR and
bit 4 for DDR. A 7-bit subtractor follows, and only its low 6 bits are kept. The result is
therefore taken modulo one period. Because 96 ≡ 32 and 80 ≡ 16 (mod 64), the delay that
actually comes out is `(32 - Ps) mod 64` for SDR and `(16 - Ps) mod 64` for DDR. The range
selection only decides whether a line ends up in "this" period or "the next", and the cycle
adjuster takes care of that. Using bit 4 alone for the DDR range gives the same 6-bit result
for every Ps.

The **signal delay adder** builds the delay from a chain of three programmable delay
elements: a compensator, a front element and a rear element. One element with 5-bit taps
reaches only 31 steps (just under pi). Two are needed for the full 0..63 range. The **delay
amount generator** loads the front element first, up to 31 steps. The rest goes to the rear
element, also up to 31. The single remaining step needed for Pa = 63 goes to the
compensator, on top of its fixed setting `COMP_BASE_TAPS` (default 0). The three taps are
registered on `clk_sys`. The tap values in force when an input transition arrives decide
that transition's delay.

Pa is registered whenever `ps_valid` is high, and it is 0 until the first measurement.
A change of edge phase is therefore reflected in the delay within about two system clock
cycles after the new `ps`.

After this stage, lines that arrived less than half a period apart are sampled on the same
edge. Lines that straddle the pi boundary are sampled one edge apart: one was moved to pi,
the other to 3pi.

## Lining up the cycles (`cycle_adjuster`)

Each lane has two flip-flops clocked by the undelayed sampling clock. The **SFF** samples
the phase-aligned line, and the **DSFF** holds the previous SFF value. The shared **cycle
selector** waits, in its ARMED state, for any SFF to show the start bit (`START_BIT`, 0 for
eMMC). The lanes that show it in that first cycle are the early ones. From then on, the
selector takes those lanes from their DSFF and all other lanes from their SFF, and it moves
to LOCKED. Only one cycle of spread can remain after the SPA, so every other lane must show
its start bit one cycle later. If one does not, `range_err` pulses for one cycle.

`dout` is registered. The aligned start bit appears on all lanes of `dout` together, two
sampling clock cycles after the early lanes' start bit reached their SFF. `start_pulse` is
high in that same cycle. The selector returns to ARMED after all output lanes have been idle
(the opposite of the start bit) for `IDLE_CYCLES` consecutive cycles. The next packet then
gets a fresh lane selection. An assertion checks that the selection stays constant while
LOCKED.

Together, the SPA and the CA handle lanes whose arrival times differ by up to two sampling
periods.

## Top level (`dpa_top`)

| parameter        | default  | meaning |
|------------------|----------|---------|
| `LANES`          | 8        | parallel interface signals (eMMC DAT0-DAT7) |
| `PHASES`         | 64       | phase steps per sampling period (4 to 64, power of two) |
| `PERIOD_PS`      | 5000.0   | sampling clock period in ps, used by the behavioural delays |
| `COMP_BASE_TAPS` | 0        | fixed compensator delay in steps |
| `START_BIT`      | 0        | level of the protocol's start bit |
| `IDLE_CYCLES`    | 8        | idle cycles before the cycle selector re-arms |

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_samp` | in | 1 | sampling clock |
| `clk_sys` | in | 1 | system clock of PDD and SPA (same frequency and phase as `clk_samp`) |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `dr` | in | `data_rate_e` | `DR_SDR` or `DR_DDR` edge placement |
| `sig_in` | in | LANES | tapped interface lines |
| `dout` | out | LANES | phase- and cycle-aligned lines, registered on `clk_samp` |
| `phase_aligned` | out | LANES | lines after the SPA (before the CA) |
| `ps`, `ps_first`, `ps_last` | out | LANES x log2(PHASES) | measured edge phase, first and last change |
| `ps_valid`, `ps_upd` | out | LANES | measurement exists / updated this cycle |
| `pa` | out | LANES x log2(PHASES) | applied phase adjustment |
| `ca_sel` | out | LANES | lanes taken from the DSFF |
| `ca_locked`, `ca_start`, `ca_range_err` | out | 1 | cycle selector status |

`dpa_pkg` defines the `data_rate_e` and `ca_state_e` enums.

## Synthesizable parts and behavioural models

`pdd_ff_array`, `pdd_synchronizer`, `phase_encoder`, `phase_diff_detector`,
`phase_adj_calc`, `delay_amount_generator` and `cycle_adjuster` are plain synthesizable
logic.

Two files are behavioural models with transport delays, standing in for FPGA delay
primitives:

* `clock_phase_shifter` makes the 64 phase-shifted clocks.
* `delay_module` is one tap-programmable delay element: `tap * PERIOD_PS/PHASES`, plus
  `INTRINSIC_PS` (default 0).

`signal_delay_adder`, `signal_phase_adjuster` and `dpa_top` instantiate these models. To
build for an FPGA, replace the two models with the device's delay-line and clock-phase
primitives. Then set `COMP_BASE_TAPS` to cancel their insertion delay. In the models that
insertion delay is zero.

## Limits and departures

* **DDR capture is not complete.** `dr = DR_DDR` gives the DDR edge placement (pi/2), and
  the testbenches check it. However, the cycle adjuster samples on the rising edge only. In
  addition, at two bits per period a window can hold two edges, and the first/last-midpoint
  rule does not separate them. End-to-end capture has been verified for SDR data at one bit
  per sampling period.
* **Data rate and sampling rate.** The design assumes the data's bit period equals the
  sampling period (SDR). The intended eMMC HS400 use runs 333 Mbps data against a 200 MHz
  sampling clock sampled on both edges. That relation is outside what has been built and
  verified here.
* **Edges at a boundary.** An edge whose phase wobbles across pi (Ps 31 vs 32 in SDR) moves
  between the "this period" and "next period" targets. That lane then slips by a cycle
  until the next start bit re-aligns it. An edge whose noisy region wraps through phase 0
  gives first = small, last = large, and its midpoint is wrong. The method has no
  hysteresis. In one simulation of the three skewed-lane models, every transition got
  random timing jitter of up to ±150 ps. Two lanes had their edges within about 100 ps of
  the sampling edge, and bit errors appeared at every resolution from 1/8 to 1/64, all on
  such a lane. At 1/4 there were none, and with clean edges there were none at any
  resolution. So in this model finer resolution does not by itself lower the error rate;
  a real delay line with noisy edges may well behave differently.
* **The first packet after a delay change trains the detectors.** Alignment comes from the
  line's own transitions, and an idle line has none. Packets are captured correctly from
  the next one on.
* **Release of the cycle selection** after `IDLE_CYCLES` idle cycles is a choice of this
  design. A payload that holds all lanes at the idle level for that long would re-arm the
  selector early. `range_err` is likewise an addition. A DAT0-only busy or CRC-status
  token on an eMMC bus would also be taken as a start bit.
* The delay compensator is a single element, and its base setting is a parameter, because
  the amount of compensation the hardware needs depends on the delay primitive used.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_phase_encoder` | first/last/median against a two-ended scan, 3000+ windows including noisy and random ones, the 16-step example |
| `tb_phase_adj_calc` | all 64 phases x both data rates against the lambda table computed in radians, and the 67.5° → 112.5° example |
| `tb_delay_amount_generator` | tap split for every Pa |
| `tb_delay_module`, `tb_clock_phase_shifter` | delays measured in simulation time |
| `tb_pdd_ff_array`, `tb_pdd_synchronizer` | sample capture against edge time; two-cycle latency |
| `tb_phase_diff_detector` | measured phase for clean and noisy edges at random delays |
| `tb_signal_delay_adder`, `tb_signal_phase_adjuster` | output edge lands at pi (SDR) or pi/2 (DDR) |
| `tb_cycle_adjuster` | 30 packets with random 0/1-cycle lane offsets, payload compared word by word; out-of-range report; re-arm |
| `tb_dpa_top` | full design at default parameters: 8 delay configurations switched while running, noisy lanes, eye placement of every adjusted edge, payload compared after the start pulse, DDR placement, range error; counts each mechanism and fails if one never happened |
| `tb_dpa_models` | three skewed-lane models (per-lane extra delays up to 5.8 ns) with checkerboard and random payloads: zero bit errors after alignment; the error rate of unaligned sampling is printed for comparison (about 9-19 %) |
| `tb_dpa_precision` | the same models with 4, 8, 16, 32 and 64 phase steps per period side by side |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/dpa_pkg.sv tb/tb_dpa_top.sv --top-module tb_dpa_top
./obj_dir/Vtb_dpa_top
```

The behavioural delay models make Verilator warn that a delay value is not known at
compile time (ZERODLY); the warning is expected, hence `-Wno-fatal`.

Each testbench finishes in a few seconds of wall time.
