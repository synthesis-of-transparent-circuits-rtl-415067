# Transparent modules for single-cycle hierarchical test

A system built from several modules is hard to test after integration: the
inputs of an embedded module cannot be driven from the chip pins, and its
outputs cannot be seen there. The approach implemented here gives every module a
second mode of operation. With its transparency control `T = 0` a module does
its normal job; with `T = 1` it becomes a plain combinational pass-through that
copies every input bit to some output bit. To test one module, that module is
left in normal mode and all others are made transparent. Test vectors written
for the module alone then reach it unchanged from the chip inputs, and its
responses reach the chip outputs unchanged, in the same clock cycle. There is no
scan chain, no multi-cycle transport, and no translation of test vectors.

The multiplexer that selects between the two modes sits inside each module's
own description, not around it, so synthesis can merge it with the module's
logic. Transparency only works if the buses are wide enough to carry all the
bits that must pass through. Some ports are therefore wider than the normal
function needs, and a few pins are added to the chip.

This repository contains that architecture for a five-module example system
(`system_s`). It also contains the small combinational example module that
shows the idea on four bits (`transparent_m`).

## The transparent module

`transparent_m` shows the technique on a single module. In normal mode it maps a
4-bit code `x` onto a 2-bit group number `z`:

| group `z` | codes `x`      |
|-----------|----------------|
| 0         | 1, 3, 12, 14   |
| 1         | 0, 2, 5, 7     |
| 2         | 6, 9, 11, 15   |
| 3         | 4, 8, 10, 13   |

A 2-bit output cannot carry four input bits. The transparent version therefore
has a second 2-bit output `y`. With `t = 1`, `z = x[3:2]` and `y = x[1:0]`. In
normal mode `y` is zero.

Sequential modules (here the GCD unit and the sequencer) follow the same rule.
With `t = 1` their outputs are a combinational function of their inputs only.
Their registers keep their values, which has the same effect as stopping their
clock. When `t` returns to 0 they continue where they stopped.

## The example system S

```
            X1[16] X2[16]
                |    |
            +---v----v---+
            | M0  16x16  |
            | multiplier |
            +-----+------+
                  | 32
            +-----v------+
            | M1  GCD    |---------------------------+ 16 (bits 31:16)
            +-----+------+                           |
                  | 16 (bits 15:0; 6 used normally)  |
  TI[5] ---+      |                                  |
 Z2[4:0] --+->+---v---------+                        |
  (loop)      | M2 Barcode  | (core external)        |
              +---+-----+---+                        |
         5 (20:16)|     | 16 (15:0; 15 used normally)|
                  |  +--v----------+                 |
                  |  | M3 Kalman   |--16-----------+ |
                  |  |(core ext.)  |               | |
                  |  +--+----------+            +--v-v--+
                  |     | 16                    |  mux  |--> Z1[16]
              +---v-----v---+                   +-------+
              | M4 Am2910   |--> Z2[16] (bits 4:0 also back to M2), Z2X[5]
              +-------------+
```

The five modules are M0, a 16x16 combinational multiplier fed from X1 and X2;
M1, a GCD unit; M2, a barcode-reader benchmark; M3, a Kalman-filter benchmark;
and M4, an Am2910 microprogram sequencer. The GCD result goes to the chip output
Z1 through a multiplexer that it shares with the Kalman output. Its low 6 bits
also go to Barcode. The 18-bit Barcode output feeds Kalman (15 bits) and the
sequencer (5 bits). The sequencer drives Z2, and bits 4:0 of Z2 return to
Barcode's 5-bit input. This forms a feedback loop through M2 and M4.

### Bus widths

Each bus has a normal width (what the functions need) and a widened width (what
transparency needs). The table gives both:

| edge | from -> to        | normal | widened | note |
|------|-------------------|-------:|--------:|------|
| W0   | X1,X2 -> M0       | 32 | 32 | |
| W1   | M0 -> M1          | 32 | 32 | |
| W2   | M1 -> split F0    | 16 | 32 | GCD output widened |
| W3   | F0 -> Z1 mux      | 16 | 16 | |
| W4   | F0 -> M2          |  6 | 16 | Barcode input widened |
| W5   | loop / TI -> M2   |  5 |  5 | loop opened in test mode |
| W6   | M2 -> split F1    | 18 | 21 | Barcode output widened |
| W7   | F1 -> M4          |  5 |  5 | |
| W8   | F1 -> M3          | 15 | 16 | Kalman input widened |
| W9   | M3 -> Z1 mux      | 16 | 16 | |
| W10  | M3 -> M4          | 16 | 16 | |
| W11  | M4 -> Z2 (+Z2X)   | 16 | 21 | 5 new chip outputs |

The widened widths follow two rules, applied to every module `Mj` that is to be
tested:

* **Justification.** For each module between the chip inputs and `Mj`, every
  output bus must be no wider than all its input buses together. Otherwise
  the pass-through could not fill it.
* **Propagation.** For each module between `Mj` and the chip outputs, every
  input bus must be no wider than all its output buses together. Otherwise
  some response bits would be lost.

The set of widths above meets both rules for all five modules while adding few
wires. For example, testing the multiplier needs all 32 product bits to reach
the pins. The GCD output therefore grows to 32 bits: 16 bits go to Z1 and 16 to
Barcode. The Barcode output then grows to 21 bits, so the widened inputs of
Kalman and the sequencer can be driven. The sequencer output grows to 21 bits,
so its 16+5 inputs can all be observed.

The bus from M0 to M1 keeps its 32 bits. The two rules force this width: the GCD
must pass 32 bits in both directions.

At the two split points F0 and F1 the widened bus is divided, not copied. F0
sends GCD output bits 31:16 to Z1 and bits 15:0 to Barcode. F1 sends Barcode
output bits 20:16 to the sequencer and bits 15:0 to Kalman. In normal mode the
modules put the old fan-out values on these bits:

* the GCD drives `{result, 10'b0, result[5:0]}`;
* Barcode drives `{core[17:13], 1'b0, core[14:0]}`. Core bits 14:13 therefore
  reach both consumers, as they did on the original 18-bit bus.

## Test sessions

Three pins `tsel` select the session (`test_ctrl`). A decoder replaces one
`T` pin per module, because at most one module is in normal mode during a test.

| `tsel` | M0 | M1 | M2 | M3 | M4 | meaning |
|-------:|----|----|----|----|----|---------|
| 0      | normal | T | T | T | T | test the multiplier |
| 1      | T | normal | T | T | T | test the GCD |
| 2      | T | T | normal | T | T | test Barcode |
| 3      | T | T | T | normal | T | test Kalman |
| 4      | T | T | T | T | normal | test the sequencer |
| 5      | T | T | T | T | T | interconnect test: all transparent |
| 6, 7   | normal | normal | normal | normal | normal | normal operation |

In every test session (codes 0 to 5) the feedback loop is opened. Barcode's
5-bit loop input is then driven from the new pins `TI` instead of Z2[4:0].
Without this, Barcode's inputs would depend on the sequencer's outputs and
could not be set from outside. The loop multiplexer sits inside `barcode_t`.
The transparent path of M2 takes its 5 bits straight from `TI`, which is
equivalent because M2 is only transparent while the loop is open. As a
result, the transparency multiplexers form no combinational loop.

The transparency pins cost 13 new chip pins: 5 `TI`, 5 `Z2X` and 3 `tsel`.

Where the test data enters and where the responses come out:

| session | stimulus | response |
|---------|----------|----------|
| M0 | X1, X2 = operands | Z1 = product[31:16] (`z1_sel=0`), Z2 = product[15:0] |
| M1 | X1, X2 = operands | Z1 = GCD (`z1_sel=0`), Z2 = GCD[5:0]; `gcd_done` marks a new result |
| M2 | X2[5:0] and TI reach the Barcode core | Z2X = core[17:13], Z2 = core[14:0] (also Z1 with `z1_sel=1`) |
| M3 | X2[14:0] reaches the Kalman core | Z1 = first output (`z1_sel=1`), Z2 = second output |
| M4 | X2 = {I, D}, TI = {CC_n, CCEN_n, CI, RLD_n, OE_n} | Z2 = {FULL_n, PL_n, MAP_n, VECT_n, Y} |
| all transparent | X1, X2, TI | Z1 = X1 (`z1_sel=0`) or X2 (`z1_sel=1`), Z2 = X2, Z2X = TI |

All of these paths are combinational. A test vector for a combinational module
is applied and observed in the same cycle. For a sequential module, a test
sequence is applied at its own clock rate.

## The modules

* **`mult_t` (M0).** Unsigned 16x16 -> 32 product. When transparent it outputs
  `{a, b}`.
* **`gcd_t` (M1).** Loads both 16-bit operands from its input and runs Euclid's
  algorithm by subtraction, one step per clock. It then publishes the result,
  pulses `done` and loads new operands. An operation that needs `k` subtractions
  finishes `k + 2` clocks after the edge that loaded its operands. The worst
  16-bit case, (65535, 1), takes 65 536 clocks. `gcd(a, 0) = a`.
* **`barcode_t` (M2) and `kalman_t` (M3).** These contain only the transparency
  multiplexers and the widened ports. `barcode_t` also holds the loop
  multiplexer. The cores of the barcode-reader and
  Kalman-filter benchmarks are not part of this RTL. Their inputs and outputs
  are top-level ports of `system_s` (`m2_core_*`, `m3_core_*`), so any
  implementation can be attached outside or placed inside later.
* **`am2910_t` (M4).** A sequencer that follows the Am2910:
  * a 12-bit next address `Y` chosen from the direct input `D`, the
    register/counter `R`, the top of a 5-deep stack, or the microprogram
    counter;
  * all 16 instructions, from `JZ` to `TWB` (codes are in `am2910_pkg`);
  * `uPC <= Y + CI` on each clock edge;
  * a condition that passes when `CCEN_n = 1` or `CC_n = 0`;
  * `RLD_n = 0`, which loads `R` from `D` during any instruction;
  * active-low `PL_n`, `MAP_n` and `VECT_n` enables, and `FULL_n`, which is low
    while the stack holds five words.

  A push onto a full stack overwrites its top, and an empty stack reads as zero.
  The 16+5 input and 16 output bits of the sequencer are the same width as its
  buses in the system. `OE_n = 1` forces `Y` to zero, because a two-state model
  has no high-impedance outputs.
* **`test_ctrl`.** The session decoder. It also produces `test_mode`, which
  opens the feedback loop in `barcode_t`.
* **`out_mux`.** Puts the GCD path (`sel = 0`) or the Kalman path (`sel = 1`)
  on Z1.
* **`tsys_pkg`.** Holds all the bus widths from the table above and the session
  codes.

Clocking: `gcd_t` and `am2910_t` are clocked by `clk` and have a synchronous,
active-low reset `rst_n`. Everything else is combinational.

## What is and is not here, and how far to trust it

* **Architecture (from the published approach):** the transparency
  multiplexers, every bus width in the table above, the split points, the loop
  opened in test mode, the decoded session select, the shared Z1 multiplexer,
  and the example module `transparent_m`.
* **Design choices made here:**
  * which bits go where on the widened buses;
  * which 5 bits of Z2 form the loop bus;
  * the session codes, including the interconnect code and the normal-mode
    codes;
  * the `z1_sel` polarity;
  * the `gcd_done` output;
  * the subtraction GCD algorithm and its sample/compute loop;
  * holding registers in transparent mode, rather than leaving their next state
    undefined;
  * the reset style;
  * the pin order of the sequencer.
* **Missing:** the functional cores of Barcode and Kalman. Their behaviour
  is not available, so `system_s` exposes their ports instead. The other
  benchmarks and processor modules that the approach was also applied to
  (diffeq, lru, dhrc, and the LEON integer-unit and peripheral modules) are not
  included.
* **Sequencer:** `am2910_t` is a model written from the sequencer's published
  behaviour. It is checked against an independent reference model. It has not
  been compared with a real part or with a gate-level netlist.

Every block has a self-checking testbench. Reference values come from
independent models: Euclid's algorithm by division for the GCD, and a
queue-based model of the sequencer. Each testbench also fails when a single
deliberate fault is placed in its module. The system testbench runs at the
default sizes. It checks normal operation, all five module sessions, the interconnect session, the open and closed loop, and
both Z1 selects, and it counts each of these events.

## Simulating

The design is SystemVerilog-2017. Packages must come first on the command line.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/tsys_pkg.sv rtl/am2910_pkg.sv tb/am2910_model_pkg.sv \
  tb/system_s_tb.sv --top-module system_s_tb -o sim
./obj_dir/sim
```

Replace `system_s_tb` with any other testbench in `tb/` (`<module>_tb.sv`) to
test one block. Every testbench prints `TB_RESULT checks=N failures=M` and
stops itself with a watchdog if it hangs. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/tsys_pkg.sv rtl/am2910_pkg.sv rtl/<module>.sv`.

Files:

* `rtl/`: `system_s` (top), `mult_t`, `gcd_t`, `barcode_t`, `kalman_t`,
  `am2910_t`, `test_ctrl`, `out_mux`, `transparent_m`, and the packages
  `tsys_pkg` and `am2910_pkg`.
* `tb/`: one `<module>_tb.sv` per module, and `am2910_model_pkg`, the reference
  model of the sequencer.
