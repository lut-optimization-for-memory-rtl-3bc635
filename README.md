# APC-OMS lookup-table multiplier

A multiplier for a *fixed* coefficient `A` can be a lookup table: for every
possible operand `X`, store the product `A*X` and read it out. A 5-bit
operand needs 32 words. This design gets by with **nine** words of `W+4`
bits. It does this with two codings that together cut the table to about a
quarter of its size. A few gates around the table put the product back
together: an input mapping, a shifter and one adder/subtractor. Wider operands
are split into 5-bit pieces, and each piece is multiplied by its own copy of
the small table.

Operands and coefficient are unsigned. The coefficient width `W` is a
parameter (default 8). The operand width `XW` is a parameter of the top
(default 8).

## The two codings

### Antisymmetric product coding (APC): fold 32 inputs onto 16

For a 5-bit `X`, the products `X*A` and `(32-X)*A` always add up to `32A`.
Both can therefore be written as `16A` plus or minus one shared value, the
*APC word*:

    X*A = 16A + (X-16)*A     when x4 = 1  (X = 16..31)
    X*A = 16A - (16-X)*A     when x4 = 0  (X = 0..15)

The APC word is `X'*A`. Here `X'` is the low four bits of `X` when `x4 = 1`,
and the two's complement (mod 16) of those bits when `x4 = 0`. So `X'` is a
4-bit address, and `x4` only picks add or subtract:

| X      | x4 | X'   | APC word | product     |
|--------|----|------|----------|-------------|
| 00001  | 0  | 1111 | 15A      | 16A - 15A   |
| 11111  | 1  | 1111 | 15A      | 16A + 15A   |
| 00110  | 0  | 1010 | 10A      | 16A - 10A   |
| 10110  | 1  | 0110 | 6A       | 16A + 6A    |
| 00000  | 0  | 0000 | 16A      | 16A - 16A   |
| 10000  | 1  | 0000 | 0        | 16A + 0     |

The last two rows are the special cases. Both have `X' = 0000`, but one
needs an APC word of `16A` and the other needs `0`.

### Odd-multiple storage (OMS): keep only odd multiples

Any non-zero `X'` is an odd number `X''` times `2^s`, with `s` from 0 to 3.
The table therefore only needs the eight odd multiples `A, 3A, 5A, ..., 15A`.
A left shift by `s` supplies the rest (`12A = 3A << 2`, `8A = A << 3`). The
two special cases are handled as follows:

* `X = 00000` needs `16A`. A ninth word holds `2A`, and it is shifted left
  by 3.
* `X = 10000` needs `0`. A RESET signal forces the table output to zero.

The nine words are:

| address d3..d0 | word | used for X' (shift)                  |
|----------------|------|--------------------------------------|
| 0000           | A    | 0001 (0), 0010 (1), 0100 (2), 1000 (3) |
| 0001           | 3A   | 0011 (0), 0110 (1), 1100 (2)         |
| 0010           | 5A   | 0101 (0), 1010 (1)                   |
| 0011           | 7A   | 0111 (0), 1110 (1)                   |
| 0100..0111     | 9A, 11A, 13A, 15A | 1001, 1011, 1101, 1111 (0) |
| 1000           | 2A   | 0000 with x4 = 0 (3)                 |

## Datapath

For one 5-bit operand (`apc_oms_multiplier`), the path from operand to
product register is combinational:

```
x ─► apc_xin_gen ─► apc_addr_gen ──d──► line_decoder_4to9 ──w──► apc_oms_lut ─► barrel_shifter ─► apc_add_sub ─► y register
        │ x4            │ s, reset                                     ▲ reset          ▲ s              ▲ x4, 16A
        └───────────────┴──────────────────────────────────────────────┴────────────────┴────────────────┘
```

* **`apc_xin_gen`** maps `X` to `{x4, X'}`.
* **`apc_addr_gen`** derives the control from `X'`:
  * the shift count, from the gate equations
    `s0 = ~(x0' | ~(x1' | ~x2'))` and `s1 = ~(x0' | x1')`;
  * `reset = ~(x0|x1|x2|x3) & x4`;
  * the address. `d3` is set only for `X' = 0000`. Otherwise `d2..d0` is
    bits 3..1 of `X' >> s`, which equals `(X''-1)/2`.
* **`line_decoder_4to9`** turns the address into nine one-hot word selects.
* **`apc_oms_lut`** is the nine-word memory. The selected word is read
  combinationally, and `reset` forces it to zero.
* **`barrel_shifter`** is two stages of 2:1 multiplexers: shift by 2 under
  `s1`, then by 1 under `s0`. Its output is `W+5` bits wide because the
  largest APC word is `16A`.
* **`apc_add_sub`** is one adder that computes `16A ± APC word`. For
  subtraction, the APC word is inverted and a carry of 1 is fed in. `16A` is
  `A` wired four places up. A `clr` input forces the result to zero; the
  multiplier raises it while no coefficient has been loaded.

## Filling the table

The table computes its own contents. While a word is being written, the
one-hot select goes to **`lut_line_selector`**, which returns the *product
value number* (PVN) of that word: 1, 3, ..., 15 for words 0..7 and 2 for
word 8. PVN times A is then formed by shift-and-add:

* **`lut_mult_result`** makes the four partial-product rows.
* **`lut_resultant_mult`** adds them.

The result is written into the selected word.

`apc_oms_multiplier` runs the load sequence:

1. A one-cycle `coef_load` captures `coef`.
2. On the next nine clock edges, a counter drives the decoder through
   addresses 0..8 with the write enable on.
3. `coef_ready` rises after the ninth write.

While loading, `x_ready` is low and operands are refused. An operand
presented in the same cycle as `coef_load` is still accepted, and it is
multiplied by the old coefficient.

## Wider operands: `apc_oms_wide_multiplier` (top)

The top cuts an `XW`-bit operand into `K = ceil(XW/5)` pieces of five bits,
least significant first, with the top piece zero-padded. Each piece drives
its own `apc_oms_multiplier`, and every copy is loaded with the same `A` at
the same time. The product is

    A*X = Σ_k (A * X_k) << 5k

formed by an adder chain on the registered piece products. At the defaults
(`W = XW = 8`) there are two pieces. A 16-bit operand needs four pieces and a
32-bit operand needs seven. All pieces run in lock step, and an assertion
checks this.

## Interface and timing (top)

| port         | dir | width  | meaning                                    |
|--------------|-----|--------|--------------------------------------------|
| `clk`        | in  | 1      | clock, rising edge                         |
| `rst_n`      | in  | 1      | asynchronous active-low reset              |
| `coef_load`  | in  | 1      | one-cycle strobe: load `coef`              |
| `coef`       | in  | W      | coefficient A                              |
| `coef_ready` | out | 1      | tables complete                            |
| `x_valid`    | in  | 1      | operand present                            |
| `x`          | in  | XW     | operand X                                  |
| `x_ready`    | out | 1      | operand accepted when `x_valid` is also high |
| `y_valid`    | out | 1      | `y` holds a product                        |
| `y`          | out | W+XW   | A*X                                        |

* One operand is accepted per clock while `coef_ready` is high.
* An operand captured at a rising edge has its product on `y`, with
  `y_valid` high, in the next cycle. The latency is one clock.
* A coefficient load takes nine cycles.
* Reset clears the valid flags, the state and the coefficient register. It
  does not clear the table words. They are never read before a full load.

`apc_oms_multiplier` has the same ports, with `x` 5 bits and `y` `W+5`
bits wide.

## What is taken from the design and what was chosen here

These parts follow the design:

* the APC input mapping and the `16A ±` reconstruction;
* the nine-word table and its contents;
* the `2A`-shifted-by-3 and RESET special cases;
* the equations for `s1`, `s0` and `reset`;
* the 4-to-9 decoder;
* the two-stage barrel shifter;
* the line selector, partial-product and summing steps;
* unsigned operands.

These are choices made for this implementation:

* **Address equations.** The exact gates for `d2..d0` are this
  implementation's. They are derived from the odd-multiple table above.
* **Operand decomposition.** Splitting wide operands is only stated as a
  possibility. The piece order, one table per piece and the adder chain are
  this implementation's choices.
* **Clocking, handshake and load sequence.** There is a single product
  register, so the latency is one cycle. The table is filled by a nine-cycle
  sequence with one write per word, using the table's own PVN multiplier.
* **Reset and `clr`.** The asynchronous reset is this implementation's. So is
  driving `clr` while no coefficient is loaded. Because operands are refused
  in that state, `clr` never reaches `y`.
* **Unused decoder addresses.** Addresses 9..15 raise no word select.
* **Default widths.** `W = XW = 8` matches the smallest word size the design
  is evaluated at. The 16- and 32-bit word sizes need the parameters set to
  16 or 32. They are exercised in simulation (see below).

Not built:

* **The FIR filter** that motivates memory-based multipliers. No tap count,
  word sizes or structure are given for it.
* **Signed operands.**

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench compares
against values it computes itself, has a watchdog, and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench                      | what it covers |
|--------------------------------|----------------|
| `tb_apc_xin_gen`, `tb_apc_addr_gen`, `tb_line_decoder_4to9`, `tb_lut_line_selector` | exhaustive over all inputs |
| `tb_lut_mult_result`, `tb_lut_resultant_mult`, `tb_barrel_shifter`, `tb_apc_add_sub` | all control values; random and extreme data |
| `tb_apc_oms_lut`      | nine-word load and read-back for 12 coefficients; RESET zeroing |
| `tb_apc_oms_multiplier` | 5-bit multiplier end to end (see below) |
| `tb_apc_oms_wide_multiplier` | top at its defaults (see below) |
| `tb_word_sizes`       | 8×8, 16×16 and 32×32 instances, random coefficients and operands (driver `wide_mult_driver`) |

The two end-to-end testbenches (`tb_apc_oms_multiplier` and
`tb_apc_oms_wide_multiplier`) check:

* every product against `A*X`;
* the one-cycle latency;
* the nine-cycle load;
* that operands are refused before the first load and during a load;
* that an operand given together with `coef_load` is multiplied by the old
  coefficient.

They use every operand value with the coefficients 0, 1, all-ones and random
ones. They also count how often each mechanism occurred: the RESET word, the
`2A` word, each shift count 0..3, addition, subtraction, loads, refused
operands and an operand overlapping a load. A mechanism that never occurred
counts as a failure.

To simulate with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/apc_oms_pkg.sv \
    tb/tb_apc_oms_wide_multiplier.sv --top-module tb_apc_oms_wide_multiplier
./obj_dir/Vtb_apc_oms_wide_multiplier
```

Replace the testbench name to run any other testbench. Each one finishes in
well under a second. To lint a module on its own:

```
verilator --lint-only -Wall -Irtl rtl/apc_oms_pkg.sv rtl/apc_oms_wide_multiplier.sv
```

To change the word size, set `W` and `XW` on `apc_oms_wide_multiplier`. The
products in `tb_word_sizes` are checked with 64-bit arithmetic, so that
testbench supports `W + XW <= 64`.

## Files

* `rtl/apc_oms_pkg.sv`: shared constants (operand width 5, nine words, PVN
  of each word).
* `rtl/apc_oms_wide_multiplier.sv`: top, operand decomposition.
* `rtl/apc_oms_multiplier.sv`: 5-bit multiplier and its load sequence.
* `rtl/apc_xin_gen.sv`, `rtl/apc_addr_gen.sv`, `rtl/line_decoder_4to9.sv`,
  `rtl/apc_oms_lut.sv`, `rtl/lut_line_selector.sv`, `rtl/lut_mult_result.sv`,
  `rtl/lut_resultant_mult.sv`, `rtl/barrel_shifter.sv`,
  `rtl/apc_add_sub.sv`: the datapath blocks described above.
* `tb/`: one testbench per module, plus `tb_word_sizes` and its driver.

Lint notes: Verilator reports that `rst_n` is used both asynchronously (in
the registers) and synchronously (in the assertions' `disable iff`). This is
intended. It also reports unused package constants in modules that do not
need them.
