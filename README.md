# GCD-processor ALU, with and without built-in self test

This is an 8-bit arithmetic and logic unit built for a small GCD
processor. Besides addition and subtraction it computes the greatest
common divisor of two unsigned operands in two different ways: by
Euclid's algorithm in its subtraction form and by Stein's binary
algorithm. It comes in two variants:

* **`gcd_alu`**: the plain ALU. Operands are loaded, an operation is
  selected, and `done` reports when the result is ready.
* **`gcd_alu_bist`**: the same datapath with an off-line built-in self
  test. Two linear feedback shift registers (LFSRs) generate
  pseudo-random operand pairs, and both GCD engines compute the GCD of
  each pair. The two results are then compared. Because the two
  algorithms have nothing in common, a fault in either datapath
  normally shows up as a disagreement.

`gcd_alu_top` places both variants side by side. They share only the
clock.

## Operations

| opcode / sel | operation | result on |
|---|---|---|
| `00` | gcd(A, B) by Euclid's algorithm | `Y` (plain), `gcd` (BIST) |
| `01` | gcd(A, B) by Stein's algorithm | `Y1` (plain), `gcd1` (BIST) |
| `10` | A + B, modulo 256 | `Y2` (plain), `data_out` (BIST) |
| `11` | A − B, modulo 256 | `Y2` (plain), `data_out` (BIST) |

The codes are in `gcd_alu_pkg::alu_op_e`. Sums and differences wrap to
8 bits, with no carry or borrow output. For example, 43 + 245 gives 32.
Zero operands are allowed: gcd(a, 0) = a, gcd(0, b) = b and
gcd(0, 0) = 0.

## The two GCD engines

Both engines are small iterative datapaths with the same handshake:

* Pulse `start` for one clock with `a` and `b` valid.
* `done` falls on the next edge. It rises again when `result` is
  valid.
* `result` and `done` then hold until the next `start`.

Each engine applies one rule per clock and needs one more clock to
finish. The latency therefore depends on the operands.

**Euclid (`euclid_gcd`).** The engine keeps two registers x and y.
Each clock, the larger one is replaced by the difference:
gcd(a, b) = gcd(a − b, b) when b < a, and gcd(a, b − a) when a < b.
It stops when x = y or when either register is zero. The modulo form
(gcd(b, a mod b)) is not used, because it would need a divider. The
cost is a long worst case: gcd(255, 1) takes 254 subtractions, so 255
clocks. The average over all 8-bit pairs is about 20 clocks.

**Stein (`stein_gcd`).** The engine keeps u, v and a shift count k. It
applies these rules, one per clock:

| condition | new u, v | note |
|---|---|---|
| u, v both even | u/2, v/2 | k ← k + 1 (common factor of 2) |
| u even, v odd | u/2, v | |
| u odd, v even | u, v/2 | |
| both odd, u ≥ v | (u − v)/2, v | |
| both odd, u < v | (v − u)/2, u | the operands swap roles |
| u = 0 or v = 0 | stop | result = (other operand) << k |

The engine needs only shifts, one subtractor and comparators. At
8 bits the worst case is 16 clocks, reached by gcd(128, 129). The
average is about 11 clocks.

## Plain ALU (`gcd_alu`)

Ports: `clk`, `rst`, `load`, `A[7:0]`, `B[7:0]`, `opcode[1:0]`,
`Y[7:0]`, `Y1[7:0]`, `Y2[7:0]`, `done`.

* **Load.** While `load` is 1, A and B are captured and both GCD
  engines start on them. The engines run in parallel, so one load
  produces both `Y` (Euclid) and `Y1` (Stein). The two results stay
  valid until the next load.
* **Arithmetic.** The adder/subtractor (`addsub_unit`) works on the
  captured operands. While opcode is `10` or `11`, its result is
  registered into `Y2` every clock. Under `00` and `01`, `Y2` holds.
* **`done` follows the selected operation:**
  * `00`: the Euclid engine has finished.
  * `01`: the Stein engine has finished.
  * `10` or `11`: `Y2` holds the result of that operation. This is one
    clock after the opcode is selected or after `load` falls.
* **Reset.** `rst` is synchronous and active high. It clears every
  output, including `done`.

A typical sequence: reset, then load A = 10 and B = 2. Then step the
opcode through 00, 01, 10 and 11 without loading again. The outputs
are Y = 2, Y1 = 2, Y2 = 12 and then Y2 = 8.

## ALU with self test (`gcd_alu_bist`)

Ports: `clk`, `reset`, `data11`, `data22`, `sel`, `datao1`, `datao2`,
`data_out`, `gcd`, `gcd1`, `bist_out`, `bist_match`,
`pattern_count[15:0]`.

The self test uses the usual BIST structure:

* **Test pattern generator.** Two 8-bit LFSRs (`lfsr`) shift towards
  the most significant bit. The new low bit is the XNOR of the tapped
  bits. With XNOR feedback the all-zero state is legal, so both LFSRs
  reset to 0. All-ones is the state that would lock up.
  * Taps `8'hA2` (bits 7, 5, 1) give 0, 1, 3, 6, 12, 25, 51, 103,
    207, … This sequence has period 24.
  * Taps `8'h8C` (bits 7, 3, 2) give 0, 1, 3, 7, 14, 29, 59, 118,
    236, … This sequence has period 254.
  * Together they produce 3048 distinct pairs before repeating.
  * The textbook XOR form is also available: set `INVERT = 0` and give a
    non-zero `SEED`. `tb_lfsr` runs the 3-bit example that way: taps
    `3'b110`, seed 1, visiting all 7 non-zero states.
* **Circuit under test.** The two GCD engines, both fed the same
  pattern pair.
* **Output response analyzer** (`bist_ora`). It compares the two
  results.
  * `bist_match` is the latest outcome.
  * `bist_out` stays 1 only while every comparison since reset has
    matched.
  * `pattern_count` counts the comparisons. It saturates.

A two-state controller sequences the test:

1. START: start both engines on the current pair.
2. WAIT: wait until both engines report done. In that same clock, hand
   the results to the analyzer and step both LFSRs.

Each pattern therefore takes 3 + max(Euclid steps, Stein steps)
clocks. The first nine pairs give the GCDs 0, 1, 3, 1, 2, 1, 1, 1, 1.
`gcd` and `gcd1` always show the last finished results, whatever `sel`
is.

The arithmetic path is not part of the self test. It works on the
external inputs `data11` and `data22`: `data_out` is registered from
their sum (`sel = 10`) or difference (`sel = 11`), and holds under
`00` and `01`.

Limits of the test:

* It only sees faults that make the two engines disagree. A fault in
  the shared pattern generator, or one that corrupts both results in
  the same way, passes.
* With period-24 and period-254 generators, the test covers at most
  3048 of the 65536 operand pairs.
* No signature is compacted. The pass/fail flag is the only verdict.

## Where this design makes its own choices

The behaviour of the operations, the opcode coding, the port names, the
8-bit width and the LFSR structure come from the published design. The
following are this implementation's choices. Change them if a different
reading suits you better.

* **Handshake.** The start/done handshake of the engines, and starting
  both engines on every load.
* **Registered arithmetic.** `Y2`/`data_out` are registered only for
  opcodes 1x and hold otherwise.
* **Reset.** Synchronous, active-high reset. All outputs clear to 0 and
  `done` is 0 after reset.
* **LFSR taps.** The taps were fitted to the published pattern
  sequences. Those sequences do not fix bit 7, which was added as a tap
  so that every bit feeds back. The XNOR form was chosen because the
  published patterns start from all zeros.
* **BIST timing.** In the published waveforms, new patterns appear
  every clock. Here the sequential engines are reused, so each pattern
  takes several clocks. The sequence of pairs and their GCDs is the
  same.
* **Analyzer.** The analyzer compares the Euclid and Stein results. It
  has a sticky pass flag, a latest-match output and a pattern counter.
* **`data_out` values.** Under `sel = 00`/`01`, `data_out` holds its
  last value. The published waveform shows values under those codes
  that this design does not reproduce.

The surrounding processor is not part of this RTL. Its control unit,
memory and instruction set are not specified, so the ALU's `opcode` and
`load` are plain ports.

## Files

| file | contents |
|---|---|
| `rtl/gcd_alu_pkg.sv` | opcode enum, data width |
| `rtl/euclid_gcd.sv`, `rtl/stein_gcd.sv` | the two GCD engines |
| `rtl/addsub_unit.sv` | 8-bit adder/subtractor |
| `rtl/gcd_alu.sv` | ALU without BIST |
| `rtl/lfsr.sv`, `rtl/bist_ora.sv` | pattern generator and response analyzer |
| `rtl/gcd_alu_bist.sv` | ALU with BIST |
| `rtl/gcd_alu_top.sv` | both variants side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

All parameters default to the 8-bit configuration. `WIDTH` can be
changed. If you do, give the LFSRs taps of the new width.

## Simulating

Each testbench checks its module against values computed
independently. It ends with a line `TB_RESULT checks=N failures=M`.
Where latency is defined, the testbenches check the exact clock count.
The engine testbenches, for example, compare the cycle counts with a
step-count model. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gcd_alu_pkg.sv tb/tb_gcd_alu_top.sv --top-module tb_gcd_alu_top
./obj_dir/Vtb_gcd_alu_top
```

What each testbench covers:

* **`tb_gcd_alu_top`** runs both variants at their default parameters.
  * Plain ALU: over 300 operand pairs through all four opcodes.
  * BIST ALU: 600 self-test patterns, with the arithmetic path driven
    at random.
  * It counts how often each mechanism happened: every opcode, loads,
    wrap-around and borrow, zero operands, both Euclid directions, all
    five Stein rules, LFSR steps and analyzer comparisons. A mechanism
    that never happened counts as a failure.
* **`tb_euclid_gcd`** and **`tb_stein_gcd`** check thousands of
  operand pairs, with Stein checked exhaustively below 64. They also
  check the exact latency of each pair.
* **`tb_addsub_unit`** is exhaustive.
* **`tb_lfsr`** checks both published sequences, both periods and the
  3-bit XOR example.

All testbenches pass.
