# Self-checking CLB for on-line testable FPGAs

An FPGA logic cell that notices its own hardware faults while it is running.
It detects any single transistor fault in the cell: a stuck-open or
stuck-close pass transistor, a faulty inverter, or a stuck memory cell. It
does this without duplicating the logic and without a diagnosis pass over a
group of cells. A fault is flagged in the cycle it first disturbs a value,
and the flag names the faulty cell itself. The FPGA can then swap that cell
for a spare by reconfiguring it.

Two cheap sensors make this possible:

* **Voltage-window checkers on every multiplexer.** The cell's multiplexers
  are pass-transistor circuits. A faulty transistor in them does not produce
  a clean wrong logic level. It produces an output voltage that sits between
  the logic thresholds: a short between two inputs, or a node left floating.
  Two inverters with different switching thresholds spot that voltage.
* **A current sensor on the memory elements.** All SRAM bits and the
  flip-flop share one built-in current sensor (BICS). A stuck transistor that
  fights the stored value draws supply current, and the sensor flags it.

Each sensor gives a *check pair* (e1, e2). A fault-free unit gives 00 or 11,
and a faulty one gives 01 or 10. A two-rail parity checker merges all pairs
into the cell's 2-bit error output.

The architecture follows the cell published as "A Self-Checking Cell Logic
Block for Fault Tolerant FPGAs" (Pontarelli, Cardarilli, Leandri, Ottavi, Re,
Salsano). The voltage abstraction, fault numbering, configuration map and
reset behaviour described below are this implementation's own choices.

## Cell structure

```
 route_in[0][3:0] ─► MUX4 ─ I1 ─┐
 route_in[1][3:0] ─► MUX4 ─ I2 ─┤              ┌────────┐
 route_in[2][3:0] ─► MUX4 ─ I3 ─┼─► MUX16 ─ F ─┤ D-FF   ├─ Q ─┐
 route_in[3][3:0] ─► MUX4 ─ I4 ─┘     ▲        └────────┘     ▼
                     ▲ sel            │ data              MUX2 ──► clb_out
               config SRAM      LUT SRAM 16x1   F ───────────►▲ out_sel
               (10 bits)
 every MUX ── e1,e2 ──┐
 BICS (27 memory elements) ── e1,e2 ──┴─► two-rail parity checker ──► err[1:0]
```

| Part | Module | What it is |
|---|---|---|
| MUX4 ×4 | `sc_mux #(.N_SEL(2))` | routing selectors. Each one picks one of four lines as a LUT input. |
| MUX16 | `sc_mux #(.N_SEL(4))` | reads F(I1..I4) from the LUT SRAM. I1 is the least significant select. |
| MUX2 | `sc_mux #(.N_SEL(1))` | gives F (out_sel = 0) or the flip-flop (out_sel = 1) as the output. |
| LUT SRAM | `sc_mem #(.N_BITS(16))` | the truth table. |
| config SRAM | `sc_mem #(.N_BITS(10))` | the routing selects, out_sel and ff_init. |
| D-FF | `sc_dff` | the registered mode. |
| BICS | `bics` | the current sensor on all 27 memory elements. |
| error controller | `err_ctrl` | two 7-input XOR trees. |
| whole cell | `sc_clb` | the top level. |

Shared types are in `sc_pkg`.

## How a multiplexer checks itself (`sc_mux`)

This is the core of the design and the part that needs the most care.

**Circuit.** A 2^n-input multiplexer is a binary tree of CMOS transmission
gates. sel[0] steers the leaf level and sel[n-1] steers the gate next to the
output. Each select bit has an inverter that makes its complement. The
self-checking version adds three transistors' worth of parts:

* **A weak nMOS (M21) that pulls the output towards Vref.** Vref sits between
  the checker thresholds (VT1 < Vref < VT2, for example VDD/2). When the
  output is left floating, or is driven only through a single degraded
  transistor, it drifts into the window between the thresholds. When a
  fault-free path drives the output, it stays near the rails (about 10 % and
  90 % of VDD).
* **Two inverters on the output node**, with switching points VT1 and VT2:

  | output voltage | e1 | e2 | meaning |
  |---|---|---|---|
  | below VT1 | 1 | 1 | valid 0 |
  | between VT1 and VT2 | 1 | 0 | fault |
  | above VT2 | 0 | 0 | valid 1 |

**Why each fault ends in the window:**

* **Stuck-close pass transistor.** The fault matters only when three things
  hold at once:
  * its own input is not selected;
  * the shorted gate joins that input to the selected path;
  * the two inputs carry different values.

  The output then sits on a resistive divider between a 0 and a 1, which lies
  inside the window for suitable transistor sizes.
* **Stuck-open pass transistor.** The other transistor of the transmission
  gate still conducts, but it passes one of the two values only weakly. An
  nMOS alone passes a degraded 1, and a pMOS alone passes a degraded 0. M21
  pulls that weak level into the window.
* **Faulty select inverter.** The complement line follows the select line.
  Two sibling gates then conduct through the same transistor type at once. If
  their inputs differ, the two drivers fight. If the inputs are equal, the
  level passed is degraded.
* **Faulty checker inverter.** Its output is flipped, so e1 and e2 disagree
  all the time.

**Model.** `sc_mux` models the transistor circuit but reduces the output node
to three voltage classes: `V_LOW`, `V_MID` and `V_HIGH` (`sc_pkg::vlevel_t`).
Every tree node records which drivers reach it (`drive_t`): a full-swing 0
or 1, or a degraded 0 or 1. A transmission gate passes these sets according
to which of its two transistors conduct. The fault decides that: stuck-open
never conducts, and stuck-close always conducts. The output node is then
resolved by four rules:

* it has both a 0 and a 1 driver: `V_MID` (contention);
* it has a full-swing 0 only: `V_LOW`;
* it has a full-swing 1 only: `V_HIGH`;
* anything else (degraded drivers only, or none): `V_MID`, because M21 wins.

These rules stand in for the transistor sizing of the real circuit. They are
assumptions of the model, not measured values. Downstream logic reads the
output through `y`, which is 1 only for `V_HIGH`. A window voltage is
therefore read as 0; the real reading of such a voltage is undefined.

Faults in M21 itself are not modelled.

## Memory elements and the current sensor

`sc_mem` and `sc_dff` store the value that was written or clocked in. Their
fault model is a cell held at 0 or 1 by a stuck transistor:

* the cell reads the forced value;
* while the intended value differs from the forced one, the cell reports
  anomalous supply current (`iddq`).

A stuck cell that happens to hold the correct value draws no current and
changes nothing. `bics` raises its pair to 10 when any element reports
current, and gives 00 otherwise. The analog current threshold and faults
inside the sensor are not modelled.

## Error output

`err_ctrl` builds `z[1]` as the XOR of all e1 bits and `z[0]` as the XOR of
all e2 bits, each as a balanced tree of two-input XORs (6 per tree for 7
pairs). `sc_clb.err` gives the result:

* 00 or 11: no fault;
* 01 or 10: a fault has been detected.

Both fault-free codes occur in normal operation. Keep both rails: a fault in
one XOR tree then also shows up as 01 or 10, so the checker is self-checking
too. The design targets single faults. Two units flagging in the same cycle
cancel each other in the parity.

## Interface and timing of `sc_clb`

| Port | Dir | Width | Use |
|---|---|---|---|
| clk | in | 1 | clock for the flip-flop and the configuration writes |
| rst_n | in | 1 | synchronous, active low; loads the flip-flop with ff_init |
| cfg_we, cfg_addr, cfg_din | in | 1, 5, 1 | writes one configuration bit at a rising edge |
| route_in | in | [4][4] | the four candidate lines of each LUT input |
| flt | in | `fault_t` | single-fault injection; hold `flt.en` = 0 for normal use |
| clb_out | out | 1 | the cell's output |
| err | out | 2 | the two-rail error code |

Configuration map (`cfg_addr`):

| Address | Bit |
|---|---|
| 0–15 | LUT entry for {I4,I3,I2,I1} |
| 16+2k, 17+2k | select of routing multiplexer k (k = 0 drives I1) |
| 24 | out_sel (0 = combinational, 1 = registered) |
| 25 | ff_init, the flip-flop's reset value |

Timing:

* With out_sel = 0, clb_out follows route_in combinationally.
* With out_sel = 1, clb_out shows F as sampled at the previous rising edge.
* `err` is combinational from the present state. A fault is flagged in the
  same cycle in which it drives a wrong value anywhere in the cell.

The SRAM has no reset, so program all 26 bits before use.

**Fault injection.** `flt` is a `fault_t` with these fields:

* `en`: turns the fault on.
* `unit`: which part is faulty, using the codes of `sc_pkg::unit_t`:
  * 0–3: routing multiplexers;
  * 4: MUX16;
  * 5: MUX2;
  * 6: LUT SRAM;
  * 7: configuration SRAM;
  * 8: flip-flop.
* `idx`: which transistor or cell. Inside a multiplexer with n select bits
  and NTG = 2^(n+1) − 2 transmission gates, the numbering is:
  * 2g and 2g+1: the nMOS and pMOS of gate g. Gates are numbered in heap
    order from the output: gate g connects tree node g+2 to its parent.
  * 2·NTG + k: the inverter of select bit k.
  * the next two: the e1 and e2 checker inverters.
* `kind`: `FK_OPEN` or `FK_CLOSED` for transistors, `FK_STUCK0` or
  `FK_STUCK1` for memory cells.

## Parameters

`sc_clb` has two parameters:

* `K` (default 4): the number of LUT inputs.
* `RS` (default 2): the number of select bits of each routing multiplexer.

The SRAM sizes (2^K LUT bits and K·RS + 2 configuration bits), the BICS width
and the checker width all follow from them. The `unit_t` names in `sc_pkg`
are spelled out for K = 4. For another K the codes follow the same order:
routing multiplexers 0..K−1, then K upwards. With the defaults, the cell has
the published counts:

* 27 memory elements (16 + 10 + 1);
* six checked multiplexers;
* two 7-input XOR trees.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_err_ctrl`: all 2^14 input combinations. The expected result comes from
  counting the faulty pairs.
* `tb_bics`: no current, each single element drawing current, and random
  sets of elements.
* `tb_sc_mem`, `tb_sc_dff`: writes, reset values, and every stuck cell with
  its current flag.
* `tb_sc_mux`, with `tb_sc_mux_harness`: tests MUX2, MUX4 and MUX16 (all
  patterns for the small ones, random patterns for MUX16) against the voltage
  table, fault-free and under every single fault. It checks three things:
  * a wrong `y` is never silent;
  * every fault is flagged by some input pattern;
  * two worked cases read e1,e2 = 1,0. One is a stuck-close gate on I0
    while I1 is selected with I0 = 1 and I1 = 0. The other is a stuck-open
    nMOS passing a 0.
* `tb_sc_clb`: the end-to-end test at the default size. A reference model
  computes the cell's function from the configuration written. The test
  covers both modes, the mode switch, reset and the absence of false alarms.
  It then injects all 164 single-fault sites of the cell, each as two fault
  kinds (328 faults in all). Each fault runs 120 random cycles under a fresh
  random configuration. Whenever clb_out is wrong, the error code must
  already have shown 01 or 10. The test also counts each mechanism and fails
  if any one never happened: each mode, reset, both fault-free codes, and
  detection of each fault class.

* `tb_sc_clb_activation`: programs the cell as F = I1 in combinational
  mode, so that clb_out shows routing multiplexer 0. It then sweeps every
  select value and every line pattern under each fault of that multiplexer.
  The error code must appear exactly when the fault is activated:
  * a stuck-close gate flags only when its line is unselected, the gate
    joins it to the selected path, and the values differ;
  * a stuck-open transistor flags only when it sits on the selected path and
    the selected value is the one its partner transistor passes weakly.

Run a testbench with plain Verilator, for example the cell test:

```
verilator --binary --timing --assert --top-module tb_sc_clb \
  rtl/sc_pkg.sv rtl/sc_mux.sv rtl/sc_mem.sv rtl/sc_dff.sv rtl/bics.sv \
  rtl/err_ctrl.sv rtl/sc_clb.sv tb/tb_sc_clb.sv
obj_dir/Vtb_sc_clb
```

For the multiplexer test, list `tb/tb_sc_mux_harness.sv` before
`tb/tb_sc_mux.sv`. Every test runs in well under a second.

## Limits

These are what to keep in mind before trusting the model beyond its scope:

* **Transistor-level behaviour is abstracted.** The three voltage classes
  stand in for SPICE-level behaviour. The model shows which faults the
  scheme catches, provided the transistors are sized so that every
  contention or degraded level falls inside the window. It cannot confirm
  that sizing. Delays, the speed penalty of the extra output load and the
  transistor-count area figures (300 transistors for a plain cell against 396
  for the self-checking one, about 32 % overhead) are not modelled.
* **The current sensor is functional only.** Its circuit comes from earlier
  work on current-monitored SRAMs and is not reproduced.
* **Routing outside the cell is not modelled.** Only the cell's four input
  multiplexers are included; the lines they choose from are the `route_in`
  ports.
* **Some details are this design's own choices:** the configuration bit
  order, the bit-wide write port, the flip-flop's synchronous reset to a
  configured value, the BICS output coding (00 normal, 10 fault), and the
  reading of a window voltage as 0 downstream.
