# Reconfigurable digital chip tester for 74-series gate chips

A small FPGA design that checks whether the gates of a 14-pin quad 2-input
logic chip (74LS00, 74LS02, 74LS08, 74LS32, 74LS86, 74LS386) work. The chip
sits in a socket wired to the FPGA. The design applies every input
combination to all four gates at once and compares each gate's output with
the value a good gate would give. Each gate drives its own green (pass) and
red (fail) LED. A chip with one dead gate is therefore not simply "bad": the
LEDs show which of its gates are still usable.

The tester is *reconfigurable* in the FPGA sense. The chip type is a
build-time parameter, and testing another chip type means rebuilding the
design and reloading the FPGA. No hardware changes are needed besides the
socket and LEDs.

## How a test runs

```
            +------------------+   da (A) ---+--> pin map --> socket pins (chip inputs)
 clk ------>| stimulus_counter |   db (B) ---+
 ena ------>|  2-bit ripple    |             |
 aclrn ---->+------------------+             v
                                      +--------------+  c (expected)
                                      | truth_table  |---------+
                                      +--------------+         v
 socket pins (chip outputs) --> pin map --> op[g] --> compare_cell[g] --> pass_led[g] / fail_led[g]
```

1. **Stimulus.** A 2-bit counter produces the vector (A, B). A is the low bit,
   so the vector runs (A,B) = 00, 10, 01, 11 and repeats. This is the
   complete truth table of a 2-input gate. The counter steps once per clock
   period.
2. **Drive.** Every gate of the chip gets the same vector. A goes to the A
   input pin of all four gates and B to all four B input pins.
3. **Expected response.** A single truth-table block turns (A, B) into `c`,
   the output a good gate of the selected function must give.
4. **Compare.** One compare cell per gate checks that gate's output pin
   against `c`. `pass` is 1 when they agree, and `fail` is 1 when they differ.
   Exactly one of the two is high at any time.

The whole path from vector to LEDs is combinational. Only the counter holds
state. The LEDs always show the verdict for the vector that is applied *now*,
and nothing latches a failure. A gate that is wrong on some vectors and right
on others shows fail only during the vectors where it is wrong. Here are two
examples:

- A stuck-at-0 OR gate fails 3 of the 4 vectors.
- A stuck-at-1 AND gate fails 3 of the 4 vectors.

At board clock rates the eye averages this. A partly failing gate therefore
lights its red LED for part of each sweep and its green LED for the rest. A
gate that is wrong on every vector, for example one whose output is inverted,
shows solid red. The source design works this way, and this RTL keeps that
behaviour.

## The stimulus counter

`stimulus_counter` is a ripple counter of two JK flip-flops (`jkffe`). J and K
are tied high, so each flip-flop toggles on its clock:

- **Stage 1** is clocked by the inverted board clock. It produces `da` and
  toggles on every **falling** edge of `clk`.
- **Stage 2** is clocked by the inverse of `da`. It produces `db` and toggles
  each time `da` falls.

`{db, da}` therefore counts 00, 01, 10, 11. One sweep of the four vectors
takes four clock periods. Because the counter ripples, `db` settles one
flip-flop delay after `da`. For one moment at the 01→10 step, the vector
passes through 00. The LEDs are combinational, so this brief state also
reaches them. It lasts only a delay, far too short to see.

Both flip-flops share two controls:

- `ena`: count enable, active high.
- `aclrn`: asynchronous clear, active low.

In simulation the clear acts on its falling edge. A testbench must therefore
start with `aclrn` high and pull it low, not hold it low from time zero.

`jkffe` has the usual JKFFE ports (J, K, ENA, CLRN, PRN). Clear and preset
share one asynchronous load, so it maps onto a register with a single
asynchronous input. One consequence: if `clrn` falls while `prn` is already
low, the change is only seen at the next clock edge or release. The counter
ties `prn` high, so this never arises here.

## Supported chips and their pins

The chip type is the parameter `DEVICE` of type `tester_pkg::device_e`. It
sets the gate function and the pin assignment. Pin 7 is GND and pin 14 is
VCC on all six chips, and the design never drives either of them.

| `DEVICE`       | function | gate 1 A,B→Y | gate 2   | gate 3    | gate 4     |
|----------------|----------|--------------|----------|-----------|------------|
| `DEV_74LS00`   | NAND     | 1,2→3        | 4,5→6    | 9,10→8    | 12,13→11   |
| `DEV_74LS02`   | NOR      | 2,3→1        | 5,6→4    | 8,9→10    | 11,12→13   |
| `DEV_74LS08`   | AND      | 1,2→3        | 4,5→6    | 9,10→8    | 12,13→11   |
| `DEV_74LS32`   | OR (default) | 1,2→3    | 4,5→6    | 9,10→8    | 12,13→11   |
| `DEV_74LS86`   | XOR      | 1,2→3        | 4,5→6    | 9,10→8    | 12,13→11   |
| `DEV_74LS386`  | XOR      | 1,2→3        | 5,6→4    | 8,9→10    | 12,13→11   |

The pinouts of the 74LS00, 74LS02, 74LS08 and 74LS86 come from their
published connection diagrams. For the 74LS32 and 74LS386 the table uses the
manufacturers' standard pinouts. These two are the entries to check against
your parts' data sheets.

The truth tables are stored in `tester_pkg::fn_table` as 4 bits indexed by
`{B, A}`. For example, OR is `4'b1110`: the output is 0 only for A=B=0.

To support another quad 2-input chip, follow these steps:

1. Add a value to `device_e`.
2. Add its function to `device_fn`.
3. Add its pins to `pin_a`, `pin_b` and `pin_y`.
4. If its function is new, add it to `gate_fn_e` and `fn_table`.

## Socket interface of the top

`chip_tester_top #(DEVICE, GATES)` sees the socket as 14 bidirectional pins.
Each of the three socket vectors below is indexed by pin number 1..14, and
bit 0 is unused.

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1     | board clock; the vector steps on its falling edge |
| `ena`         | in  | 1     | 1 = run the sweep, 0 = hold the current vector |
| `aclrn`       | in  | 1     | 0 = clear the vector to 00 at once |
| `sock_pin_o`  | out | 15    | value driven onto each socket pin |
| `sock_pin_oe` | out | 15    | 1 where the tester drives the pin (the chip's input pins only) |
| `sock_pin_i`  | in  | 15    | level read on each socket pin |
| `pass_led`    | out | GATES | green LED of gate g+1 in bit g, active high |
| `fail_led`    | out | GATES | red LED of gate g+1 in bit g, active high |

On an FPGA, connect each socket pin to a tristate I/O, using `sock_pin_oe` as
its enable. For a given `DEVICE` every enable is a constant, so the synthesis
tool reduces the pins to plain inputs and outputs. Synthesis also reports
about 22 of the top's 38 output bits as constant: the enables, and the pins
that are never driven.

The pin assignment lives in the top as two small `always_comb` loops. It is
pure routing, so it is not a module of its own.

### Original board mapping

The reference build targeted a FLEX 10K device on a university development
board, with the socket wired to its expansion header FLEX_EXPAN_A. It used
one fixed FPGA pin per signal, for the 74LS32:

| signal | FPGA pin | header hole | | signal | FPGA pin | header hole |
|---|---|---|---|---|---|---|
| CLK | 91 | – | | ena | 29 | – |
| pb (clear) | 28 | – | | | | |
| DUT_A1..A4 | 46, 54, 82, 75 | 16, 22, 44, 38 | | DUT_B1..B4 | 49, 56, 84, 78 | 18, 24, 46, 40 |
| DUT_op1..op4 | 51, 62, 87, 80 | 20, 26, 48, 42 | | | | |
| pass1..pass4 | 45, 50, 55, 63 | 15, 19, 23, 27 | | fail1..fail4 | 67, 72, 76, 81 | 31, 35, 39, 43 |

On that board, pins 28 and 29 are push buttons that read 0 when pressed:

- **pin 28 (clear):** pressing it clears the counter.
- **pin 29 (`ena`):** the counter runs while the button is released and holds
  while it is pressed.

With the 14-pin socket interface above, these FPGA pin numbers become your
own board constraints.

## Files

| file | what it is |
|---|---|
| `rtl/tester_pkg.sv` | device and function enums, truth tables, pin tables |
| `rtl/jkffe.sv` | JK flip-flop with enable, async clear and preset |
| `rtl/stimulus_counter.sv` | 2-bit ripple counter for the test vector |
| `rtl/truth_table.sv` | expected output for a function (parameter `FN`) |
| `rtl/compare_cell.sv` | pass/fail for one gate |
| `rtl/gate_test_block.sv` | one truth table and `GATES` compare cells |
| `rtl/chip_tester_top.sv` | counter, pin assignment and test block |
| `tb/quad_gate_chip_model.sv` | behavioural model of the chip in the socket, with per-gate faults (stuck-at-0, stuck-at-1, inverted) and its own copy of the pinouts |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two for the top |

## Verification

Every testbench checks the design against values it computes on its own and
ends with a line `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_jkffe` | 400 random clock edges against a reference JK model; async clear and preset |
| `tb_stimulus_counter` | order 00,01,10,11 on falling edges; a sweep takes exactly 4 periods; hold while `ena`=0; immediate clear |
| `tb_truth_table` | all five functions against logic expressions |
| `tb_compare_cell` | all four input combinations |
| `tb_gate_test_block` | replays a reference OR-gate run; random vectors and outputs on all six devices |
| `tb_chip_tester_top` | see below |
| `tb_chip_tester_full` | see below |

The reference run in `tb_gate_test_block` uses four fixed output patterns:

- op1 follows B.
- op2 follows A.
- op3 is always 0.
- op4 is always 1.

The testbench checks all 16 pass bits and 16 fail bits of that run.

`tb_chip_tester_top` builds one tester and one chip model for each of the
six devices. It checks:

- the good chips;
- chips with a fixed fault pattern, then random fault patterns;
- the hold while `ena` is low;
- a clear in mid-period;
- that exactly the right socket pins are driven, with the right values.

It counts each mechanism and fails if any never occurred. The mechanisms are:
each of the four vectors, complete sweeps, pass, fail, each fault kind,
hold and clear.

`tb_chip_tester_full` runs the top with its default parameters (74LS32). It
first sweeps with a good chip, where all four gates must pass. It then sweeps
with gate 4 stuck at 0, where gate 4 must fail on exactly three vectors and
gates 1–3 must pass throughout.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tester_pkg.sv \
    tb/tb_chip_tester_top.sv --top-module tb_chip_tester_top -Mdir obj
./obj/Vtb_chip_tester_top
```

Replace the testbench name to run any other. Every run finishes in well
under a second.

## Limits and departures

- **Run-time chip selection is not built.** The chip type is fixed at build
  time. A front-panel button to pick the device at run time is a natural
  extension.
- **Chips up to 32 pins.** Only 14-pin quad 2-input chips are covered.
  Supporting bigger chips would need a wider socket interface and more
  general stimulus.
- **One truth-table module.** The functions are one parameterised
  `truth_table` rather than one module per function. The socket is modelled
  as bidirectional pins with the pin assignment in RTL, instead of fixed FPGA
  pins chosen in the vendor tools.
- **The JK flip-flop's clear/preset priority** (clear wins) is this design's
  choice.
- **Not verified here:** timing on real hardware, including the ripple
  counter's brief intermediate state and settling of the chip's outputs
  before the LEDs are read. The functional test assumes the chip's
  propagation delay is far shorter than a clock period. For 74LS parts it is
  tens of nanoseconds.
