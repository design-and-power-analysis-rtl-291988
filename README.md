# Hybrid signed-digit adder/subtractor and arithmetic unit

Binary addition is slow because a carry can travel across the whole word. A
signed-digit (SD) number has digits in {-1, 0, 1}. That redundancy lets an
adder stop every carry after one digit position, so its delay does not
depend on the word length. The cost is area: every digit needs two bits and
a larger adder cell.

A *hybrid* signed-digit (HSD) number lies between the two. Most digits are
ordinary unsigned bits and only some are signed digits. Carries ripple
through the unsigned digits and stop at the next signed digit. One
parameter, the distance `D` between signed digits, then trades area for
speed. `D = 0` makes every digit signed (fastest, largest). `D = N` gives a
plain ripple-carry adder (smallest, slowest). In between, the longest carry
chain is `D + 1` cells.

This repository holds synthesizable SystemVerilog for:

* an N-digit HSD adder,
* an HSD adder/subtractor,
* an arithmetic unit (AU) that keeps a 32-word register file in HSD form,
* converters between binary and HSD,
* a six-stage add/subtract chain with conversion only at its two ends,
  which measures what conversion costs when it is amortised over several
  operations.

All of these are parameterised by `N` (digits, default 32) and `D` (default
0).

## Number format

An N-digit HSD number has value `sum(d_i * 2^i)`. Digit `i` is signed when
one of these holds:

* `D = 0`: every digit is signed;
* `0 < D < N`: `(i + 1) mod (D + 1) = 0`, or `i = N - 1` (the top digit is
  always signed, so that the format can hold negative values);
* `D = N`: no digit is signed.

So for `D = 2` the digits read `S U U S U U ... S U U S U`, counted from
the top down: groups of two unsigned digits, each topped by a signed digit.
The top digit is also signed.

A signed digit uses two bits `{s, a}` with value `a - 2s`: `00` = 0,
`01` = +1, `11` = -1. The code `10` is never produced.

The datapath carries a number as two N-bit vectors:

| vector | at an unsigned digit | at a signed digit |
|---|---|---|
| `lo[i]` | the bit | `a` |
| `hi[i]` | always 0 | `s` |

In the register file a number is packed into `N + (number of signed
digits)` bits (`hsd_pack` / `hsd_unpack`). Bits `[N-1:0]` hold `lo`. Above
them come the `s` bits of the signed digits, lowest digit first. A word is
64 bits for `D = 0` and 32 bits for `D = 32`.

Range: the largest value is always `2^N - 1`. The smallest is minus the sum
of the signed digits' weights, which is `-(2^N - 1)` when `D = 0`.

Carries between digit positions are in {-1, 0, 1}. They travel as a pair
`{v, w}` with value `v - w` (`hsd_pkg::hsd_carry_t`).

## Adding: why the carry stops at a signed digit

`hsd_adder` places one cell per digit.

**Unsigned cell** (`hsd_u_cell`). It computes `t = a + b + c_in`, which
lies in [-1, 3]. It writes `t = 2*c_out + e`, so `e` is a bit and `c_out`
is in {-1, 0, 1}. A carry of either sign passes straight through this cell.

**Signed cell** (`hsd_s_cell`). This cell must produce a digit
`z = x + y + c_in - 2*c_out` in {-1, 0, 1}. Its `c_out` must not depend
on `c_in`, or the chain would not stop. The cell therefore splits `x + y`
into `2*c_out + u` first, and the digit is then `z = u + c_in`.

That split only works if `u` and `c_in` can never both be nonzero with the
same sign. So the cell needs to know in advance which sign the incoming
carry can take. It gets this from a look-ahead bit `cin_nonneg`, computed
from the operand digits one position below:

* below is an unsigned digit with `a | b = 1`: the carry it sends up is at
  least 0. If `a = b = 0`, the carry is at most 0.
* below is a signed digit and neither operand digit is -1: the carry is at
  least 0. Otherwise it is at most 0.

With that bit the split is a five-row table:

| x + y | cin >= 0 known | cin <= 0 known |
|---|---|---|
| 2 | c=1, u=0 | c=1, u=0 |
| 1 | c=1, u=-1 | c=0, u=1 |
| 0 | c=0, u=0 | c=0, u=0 |
| -1 | c=0, u=-1 | c=-1, u=1 |
| -2 | c=-1, u=0 | c=-1, u=0 |

The look-ahead bit depends only on operand bits, never on carries. So a
carry that starts at one signed digit ripples through at most `D` unsigned
cells and ends in the digit of the next signed cell.

The adder's carry out of the top digit, `cout`, is in {-1, 0, 1}:
`x + y = z + 2^N * cout`. Because the format is redundant, `cout` can be
nonzero even when the exact sum would fit in N digits. The residue
`z mod 2^N` is always exact.

## Subtracting: complementing an HSD number

`hsd_addsub` computes `x - y` by adding the negation of `y`. A multiplexer
in front of the adder selects `y` or its negation according to `add_sub`.
The negation comes from `hsd_complement`.

* **All digits signed (`D = 0`).** Negation changes each digit on its own,
  +1 <-> -1: `b_a = a_a` and `b_s = a_a & ~a_s`.
* **Hybrid formats.** Read the number as groups: `k` unsigned digits `U`
  topped by one signed digit `S`. Then
  `-(S*2^k + U) = (W - S - 1)*2^k + (~U + 1 mod 2^k)`, where `W` is the
  carry out of the increment `~U + 1`. The unsigned bits are inverted and
  incremented, and the signed digit is recoded from `S` and `W`:

  | S | W | new digit | borrow to the digit above |
  |---|---|---|---|
  | -1 | 0 / 1 | 0 / +1 | no |
  | 0 | 0 / 1 | -1 / 0 | no |
  | +1 | 0 / 1 | 0 / +1 | yes (-1) |

  In gates: `b_s = ~W & ~a_a & ~a_s` and `b_a = b_s | (a_a & W)`.

A `+1` digit always sends a borrow of -1 upward. That borrow depends only on
the digit itself, not on the increment chain. The next group takes it by
starting its own increment at `~borrow` instead of 1, because
`~U + 1 - 1 = ~U`. The negated operand is therefore an ordinary HSD number
of the same format, and the adder needs no change.

Only the borrow of the top digit is left over. It lowers the adder's carry
out, so `hsd_addsub.cout` is a 2-bit two's complement value in [-2, 1]:
`x +/- y = z + 2^N * cout`.

`ARCH = 1` ripples the increment inside each group. `ARCH = 2` computes
each increment carry directly as an AND of the inverted bits below it (a
carry look-ahead increment). Both give identical results. The AU uses
`ARCH = 1`.

## The arithmetic unit (`hsd_au`)

* `hsd_regfile`: 32 words of packed HSD. One write port and two read ports,
  each with an enable.
* The two read ports feed the adder/subtractor (`add_sub`: 0 adds, 1
  subtracts).
* A write-data multiplexer selects the source: `ext_int = 0` writes the
  adder/subtractor result, `ext_int = 1` writes `ext_data`.
* Read port 1 is also the unit's data output.

Values never leave HSD form inside the unit.

Timing:

```
cycle t    : re1/re2 = 1, raddr1 = A, raddr2 = B
cycle t+1  : data_out = reg[A]; add_sub, ext_int = 0, we = 1, waddr = R
             result (and cout) valid on the write path
edge  t+2  : reg[R] <= A +/- B   (the value modulo 2^N; cout tells the carry)
```

Reads are registered: data appears one cycle after `re`, and is held while
`re` is low. A read and a write of the same address in the same cycle
returns the old word. A new operation can start every cycle. Reset
(`rst_n`, active low, asynchronous) clears only the two read registers, so
the storage must be written before it is read.

## Conversion and the top level

`hsd_in_conv` turns an unsigned N-bit word into HSD form with no carries.
Each signed digit is paired with the digit above it; with all digits
signed, the pairs are 0-1, 2-3, and so on. A pair whose bits read `01` is
written as `+1` above and `-1` below. Every other pair, and every digit
outside a pair, is copied. This puts negative digits into the unit from the
start.

`hsd_out_conv` returns to two's complement in one subtraction:
`lo - (hi << 1)`, giving an (N+1)-bit result.

`hsd_system` (the top) holds two independent parts:

1. **The AU with conversion at its boundary.**
   * `au_ext_bin` (binary) is converted and packed into the write path.
   * Read port 1 comes out twice: raw as `au_data_hsd`, and converted as
     `au_data_bin` (N+1 bits, signed).
   * `au_cout` is the AU's `cout`.
2. **`hsd_au_conv`, the conversion chain.**
   * Inputs: seven binary operands `chain_op[0..6]` and a per-stage
     add/subtract mask `chain_mode`.
   * Six cascaded adder/subtractors, with input conversion before the
     first and output conversion after the last.
   * The carries out of the first five stages are dropped, so
     `chain_value` is exact modulo 2^N. `chain_cout` is the last stage's
     carry.

Everything except the register file is combinational.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N` | 32 | all | digits per operand |
| `D` | 0 | all | distance between signed digits, 0..N |
| `DEPTH` | 32 | `hsd_au`, `hsd_system` | registers |
| `STAGES` | 6 | `hsd_au_conv`, `hsd_system` | chain length |
| `ARCH` | 1 | `hsd_addsub`, `hsd_complement` | 1 ripple, 2 look-ahead complement increment |

The values 32 digits, 32 registers, six stages, the 0..32 range of `D` and
the two complement architectures all come from the original design.
`D = 0` is the default because the original analysis recommends the most
redundant format when delay and area-delay product matter. `D` is meant to
be swept.

## What is this implementation's own

The following are choices made here, not taken from the original design:

* **Digit cells.** The insides of both cells and the look-ahead rule are
  this design's own construction, built on the classic modified binary
  signed-digit addition rules. The original gives only the function of
  each cell: the digit sets, and carries held as the difference of two
  bits.
* **Top borrow in subtraction.** The original corrects the subtraction by
  adjusting the carry out of each `+1` signed digit. Its adjustment table
  maps a carry of -1 to -1, which would lose a borrow. Here the borrow is
  absorbed by the next group's increment instead, so no correction of the
  adder's carries or sums is needed anywhere except at the top.
* **Signed-digit positions** for `0 < D < N` follow the original's
  examples, but the rule `(i + 1) mod (D + 1) = 0` plus a forced top digit
  is a reconstruction. For example, with `D = 16` there are two signed
  digits, 16 and 31.
* **Register file.** The timing (registered reads with enable,
  read-before-write) is this design's own, as are the packed word layout,
  the `cout` output of the AU, and the boundary conversion in the top.
* **Conversion chain.** How the chain feeds its operands is this design's
  own, as is the decision to drop its intermediate carries.
* **Omitted.** The third adder/subtractor architecture (posibit/negabit
  digits) is not included. Neither are the baseline carry look-ahead and
  ripple-carry designs used for comparison (`D = N` gives the
  ripple-carry case).

## Verification

Every module has a self-checking testbench in `tb/`. The expected values
come from `tb/tb_hsd_pkg.sv`, which evaluates numbers straight from their
digit definitions.

* **Cells.** Both cells are checked exhaustively. The signed-cell test also
  checks that its carry out is the same for every incoming carry the
  look-ahead bit allows.
* **Adder, complement, adder/subtractor, converters.** These run 20 000
  random and corner vectors at `D` = 0, 1, 2, 3, 8, 16, 30, 31, 32. The
  corners are all +1, all -1 and all zero digits, which make the longest
  carry chains. Both `ARCH` values are compared bit for bit. The
  three-digit `S U U` complement is checked exhaustively.
* **Register file.** Checked against an array model, including the
  one-cycle read latency and same-address collisions.
* **`tb_hsd_au` (D = 3).** Loads every register, runs 1 500 operations one
  at a time with read-back, then 64 back-to-back operations at one per
  cycle.
* **`tb_hsd_system` (all defaults) and `tb_hsd_system_d2` (D = 2).** Load
  through conversion, run 2 000 random operations and a 40-operation
  dependent sequence, and run 3 000 chain evaluations. They count external
  loads, additions, subtractions, nonzero carries out, negative results,
  words holding -1 digits, and chain additions and subtractions; each must
  occur at least once.

* **`tb_hsd_energy_vectors`.** Applies 32 768 random vectors at each of
  `D` = 0, 4, 9, 14, 20, 26 and 32. The adder and both adder/subtractor
  architectures are checked exactly; the AU runs 32 768 operations per
  distance and is checked modulo 2^32.

Not verified here:

* timing, area and energy;
* the carry-chain length bound, as a delay (it follows from the cell
  structure, but no test measures it);
* configurations with `N` other than 32, apart from the three-digit
  complement.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and finishes
within seconds. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/hsd_pkg.sv tb/tb_hsd_pkg.sv tb/tb_hsd_system.sv \
    --top-module tb_hsd_system -Mdir obj_sys
./obj_sys/Vtb_hsd_system
```

Replace `tb_hsd_system` with any other testbench name. The remaining files
are found through `-Irtl -Itb`, because each module lives in a file of its
own name.

To try another format, set `D` (and optionally `N`) on `hsd_system`. The
packed word width follows from `hsd_pkg::hsd_width(N, D)`.

## Files

* `rtl/hsd_pkg.sv`: carry type; helpers for digit positions, widths and
  pairing.
* `rtl/hsd_u_cell.sv`, `rtl/hsd_s_cell.sv`, `rtl/hsd_adder.sv`: the adder.
* `rtl/hsd_complement.sv`, `rtl/hsd_addsub.sv`: the subtraction.
* `rtl/hsd_regfile.sv`, `rtl/hsd_pack.sv`, `rtl/hsd_unpack.sv`,
  `rtl/hsd_au.sv`: the arithmetic unit.
* `rtl/hsd_in_conv.sv`, `rtl/hsd_out_conv.sv`, `rtl/hsd_au_conv.sv`,
  `rtl/hsd_system.sv`: conversion, the chain and the top.
* `tb/`: one testbench per module, the shared reference package and the
  two end-to-end tests.
