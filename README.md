# Majority-gate BCD adder (n digits)

This is a decimal adder for binary-coded decimal (BCD) operands. It is written
as a netlist of three-input majority gates and inverters. Those are the native
logic elements of quantum-dot cellular automata (QCA), a proposed successor
technology to CMOS. In QCA, a wire or a gate costs cells and clock phases. So
the figure of merit is the number of majority gates (MGs) on the carry path,
not the number of transistors.

The adder follows the classic BCD scheme. It adds the two digits in binary,
detects a sum above nine, and adds six to bring the digit back into range.
The difference is how each step is mapped onto majority gates:

* The binary adder moves its carry across **two bit positions per majority
  gate** on the carry path.
* The "+6" correction adder is reduced to the few gates that adding 0 or 6
  actually needs.

The RTL keeps that gate structure, so gate counts and logic depth can be read
straight from the source. It is plain synthesizable SystemVerilog that
simulates and synthesizes like any other combinational logic.

## The majority gate

`maj3` computes `M(a,b,c) = ab + bc + ca`. With one input tied to 0 it is an
AND of the other two. With one input tied to 1 it is an OR. Inverters are
written as `~` where a netlist needs them.

## One digit: ADD1 → CL → ADD2

```
 dA[3:0] ─┐                    ┌──────── bS[3:0] ───────────┐
 dB[3:0] ─┼─► ADD1 ─ bS, bcout ┤                            ├─► ADD2 ─► dS[3:0]
 cin ─────┘                    └─► CL ─► dcout ─────────────┘
                                         └──────────────────────────► dcout
```

`bcd_digit_adder` is built from three stages:

* `add1` adds the digits and the carry-in in binary. Its result is
  `{bcout, bS}`, with a value from 0 to 19.
* `cl` sets the decimal carry `dcout` when that value exceeds nine.
* `add2` adds `0110` to `bS` when `dcout` is set and drops the carry out of
  bit 3. Sums 10..19 thus wrap back to 0..9.

One digit uses 29 majority gates and 8 inverters: 16 + 4 in ADD1, 3 in CL
and 10 + 4 in ADD2.

### ADD1: a carry across two bits in one gate

In a majority-gate ripple adder each bit position costs one gate:
`c(i+1) = M(dA_i, dB_i, c_i)`. ADD1 uses this for the odd carries `c1` and
`c3`. For the even carries it uses

```
c2 = M(cin, M(dA1, dB1, dA0), M(dA1, dB1, dB0))
c4 = M(c2,  M(dA3, dB3, dA2), M(dA3, dB3, dB2))
```

Here is why this is right. When `dA1 = dB1`, both inner gates output `dA1`:
the bit pair generates a carry or kills it, whatever `cin` is. When
`dA1 ≠ dB1`, the inner gates reduce to `dA0` and `dB0`, so the outer gate
computes `M(cin, dA0, dB0) = c1`: bit 1 propagates the carry from bit 0. The
inner gates depend only on the operands and settle in parallel. The carry
itself therefore passes through a single gate per two bit positions. Unlike
the textbook look-ahead form, this needs no separate generate or propagate
signals.

Each sum bit is the majority form of a full-adder sum:
`bS_i = M(~c(i+1), c_i, M(dA_i, dB_i, ~c(i+1)))`.

`c3` is derived from `c2` by one more gate. Deriving it from `c1` would cost
more gates and gain no speed. The longest path is
`cin → c2 → c4 → ~ → M → M → bS3`: five gates and one inverter.

### CL: is the digit above nine?

The condition is `dcout = bcout | bS3 & (bS2 | bS1)`. In three gates:

```
dcout = M( M(1, bcout, bS3), M(bS3, bS2, bS1), bcout )
```

When `bcout = 1`, two inputs of the last gate are 1. When `bcout = 0`, the last
gate is the AND of `bS3` and `M(bS3, bS2, bS1)`, which is `bS3 & (bS2|bS1)`.

### ADD2: adding 0 or 6

The correction has bit pattern `0 dcout dcout 0`, so ADD2 is built bit by bit:

| bit | gates | function |
|-----|-------|----------|
| 0 | wire | `dS0 = bS0` |
| 1 | `g1 = M(bS1,dcout,0)`, `M(bS1,dcout,1)`, `M(~g1, OR, 0)` | `bS1 ^ dcout`; `g1` is the carry into bit 2 |
| 2 | `c3 = M(bS2,dcout,g1)`, then a full-adder sum | `bS2 ^ dcout ^ g1` |
| 3 | `M(1, M(~dcout,bS3,0), M(0, M(~bS3,bS1,0), dcout))` | bit 3 of the corrected digit |

Bit 3 relies on the fact that only sums 0..19 reach ADD2:

* Without correction, `dS3 = bS3`.
* A corrected sum of 10..15 (where `bS3 = 1`) becomes 0..5, so `dS3 = 0`.
* A corrected sum of 16..19 (where `bS3 = 0`, `bS = 0..3`) becomes 6..9, so
  `dS3 = bS1`.

## n digits

`bcd_adder_n` chains `DIGITS` one-digit adders. The `dcout` of each digit
drives the `cin` of the next one up. Digit 0 is the least significant. Per
digit, the carry passes through ADD1's carry path (two gates from `cin` to
`bcout`) and through CL, so delay grows linearly with the number of digits.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | `DIGITS` × 4 (`bcd_digit_t` array) | BCD operands, each digit 0..9 |
| `c` | in | 1 | carry-in |
| `s` | out | `DIGITS` × 4 | BCD sum |
| `cout` | out | 1 | decimal carry-out of the top digit |
| `bs` | out | `DIGITS` × 5 (`bin_sum_t` array) | per digit, the uncorrected binary sum `{bcout, bS}` (0..19), for observation |

`DIGITS` defaults to 1, the one-digit adder, whose ports are `a[3:0]`,
`b[3:0]`, `c`, `s[3:0]`, `bs[4:0]` and `cout`. Set `DIGITS = 32` for 128-bit
operands.

**Timing and state.** The whole design is combinational. There is no clock,
no reset and no handshake. Outputs are valid once the inputs have propagated
through the gates.

**Invalid inputs.** Digits 10..15 are not valid BCD, and the outputs for them
are not specified. ADD1 alone is a correct binary adder for any 4-bit values.

The types `bcd_digit_t` (4 bits) and `bin_sum_t` (5 bits) are defined in
`bcd_pkg`.

## What is taken from the source design, and what was chosen here

These parts follow the published design:

* the majority-gate function;
* the three-stage digit structure;
* ADD1's carry equations, including `c3` from `c2`;
* ADD1's gate count (16 MGs and 4 inverters) and critical path (five MGs and
  one inverter);
* CL as three gates with a constant 1;
* ADD2's size (10 gates and 4 inverters): the direct wire on bit 0, the XOR
  on bit 1, the full-adder sum on bit 2, and the AND/AND/OR structure on
  bit 3;
* the ripple connection of digits.

These points were chosen here:

* **Gate inputs in CL and in bit 3 of ADD2.** The published drawings do not
  fully fix which signal enters which gate input. The assignments above keep
  the published gate count and structure and compute the required function
  for every reachable input.
* **Operand width.** The number of digits of the proposed n-digit adder is not
  fixed by the source. The default of one digit is the size whose simulation
  and FPGA synthesis results were published: 8 slices, 14 LUTs and 22 I/O
  pins on the FPGA.
* **Width of `cout`.** The published one-digit simulation shows a 4-bit
  `cout`. Here `cout` is 1 bit, the decimal carry. This accounts for 3 of the
  22 pins.
* **The `bs` outputs.** They are extra observation ports, taken from the
  published one-digit waveform.
* **Physical realisation.** This RTL does not describe the QCA layout: the
  cell placement and the clock-zone assignment that pipeline a real QCA
  circuit. Delays here are logic depth only.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_maj3` | all 8 input combinations |
| `tb_add1` | all 16 × 16 × 2 operand and carry combinations against integer addition |
| `tb_cl` | every binary sum 0..19 |
| `tb_add2` | pass-through of all 16 values, and correction of every sum 0..19 |
| `tb_bcd_digit_adder` | all 200 digit and carry combinations, both `dS`/`dcout` and the binary sum |
| `tb_bcd_adder_n` | end to end at 1, 4 and 32 digits (see below) |
| `tb_bcd_adder_n_full` | the default one-digit configuration: the four published waveform vectors (for example 8 + 9 → binary 17, digit 7, carry 1), then all 200 combinations |

`tb_bcd_adder_n` works as follows:

* The 1-digit adder is checked exhaustively.
* The 4-digit and 32-digit adders get directed vectors (zero, `99…9 + 0 + 1`,
  digit pairs summing to 9 so the carry ripples through every digit,
  `99…9 + 99…9 + 1`) and 2000 and 1000 random additions respectively, using
  the checker `tb/bcd_adder_n_check.sv`.
* Expected sums are computed independently: operands are converted to binary
  integers, added, and converted back to digits.
* The testbench counts each mechanism of the design and fails if any of them
  never happened: a corrected digit, an uncorrected digit, a binary digit sum
  above 15, a carry-in, a decimal carry-out, and a carry rippling through all
  digits.

All testbenches pass. Each testbench was also run against a deliberately
broken copy of its module, and every such copy was caught: a missing
majority term, a wrong carry source, a missing inversion, a cut carry chain.

## Simulating

With Verilator 5, list the package first:

```
verilator --binary --timing -Irtl -Itb rtl/bcd_pkg.sv rtl/*.sv tb/bcd_adder_n_check.sv \
          tb/tb_bcd_adder_n.sv --top-module tb_bcd_adder_n -o sim
./obj_dir/sim
```

Substitute any other testbench for `tb_bcd_adder_n`. The simulations take well
under a second.

## Changing it

* **Operand width:** set `DIGITS`.
* **Pipelining:** a QCA implementation pipelines through its clock zones.
  To model that, insert registers between digits or between the ADD1, CL
  and ADD2 stages. Each stage is a separate module, so a register can go at
  any boundary.
* **Gate-level experiments:** every module instantiates `maj3` explicitly.
  Changing a gate's inputs changes exactly one majority gate of the netlist.
