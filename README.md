# Adder-based single-precision floating point multiplier

An IEEE 754 binary32 multiplier whose speed is set almost entirely by its
adders. A floating point product has three separate parts. The sign is one
XOR gate. The exponent is two additions: E1 + E2, then minus the bias. The
significand is a 24 x 24 integer multiply, which turns into a large
multi-operand addition of partial products. That addition ends in one wide
carry-propagate addition. The design therefore keeps the *kind* of adder
used at each of these places as a parameter. It supplies five classic adders
to choose from: ripple carry, carry look-ahead, carry skip, carry select and
carry save.

The default configuration is:

| stage                       | adder                                    |
|-----------------------------|------------------------------------------|
| exponent (two adders)       | 10-bit carry select                      |
| partial product accumulation| Wallace tree of 3:2 carry-save compressors |
| final stage (48 bits)       | carry select                             |

The thesis this design follows compared three configurations on a
Spartan-3E FPGA:

| configuration                                   | slices | delay     |
|-------------------------------------------------|-------:|----------:|
| carry select everywhere                         | 1315   | 35.2 ns   |
| carry save everywhere                           | 977    | 27.3 ns   |
| carry select for exponent and final stage, carry save for partial products | 972 | 27.6 ns |

Carry select was the fastest adder on its own: 27.3 ns against 42.2 ns for
carry save at 32 bits. It was still the slowest choice for accumulating partial
products, because compressors avoid carry propagation entirely. The default
here is the mixed row. The other two rows are selectable by parameter (see
*Configurations*). These figures are the thesis's own measurements and have
not been reproduced here.

## Datapath

```
 m1[31] ──┐                                   ┌─ m1[30:23] ─┐  ┌─ m2[30:23]
 m2[31] ──┴─ XOR ─────────── sign ─┐          │  exponent_unit (ADDER1: E1+E2,
                                   │          │   ADDER2: + two's complement of 127)
 {1,m1[22:0]} ─┐                   │          └──────── e_sum (10-bit signed)
 {1,m2[22:0]} ─┴─ significand_mult │                        │
                  booth_ppgen → csa_tree → final adder      │
                             prod[47:0] ──► normalizer ◄────┘
                                            (shift, round, exceptions)
                                                 │
                                           output register ──► m3, flags
```

`singleprecimulti` is the multiplier. Its ports are `CLK`, `m1`, `m2` and `m3`.
`m3` is the product of the `m1`, `m2` present at the previous rising edge: a
latency of one clock and one result per clock. The datapath is combinational
and ends in a single output register. There is no reset, so `m3` is
undefined until the first clock edge. `flags` is registered with `m3` and
holds `{invalid, overflow, underflow, inexact}`.

`fpmul_top` is the FPGA-level wrapper. On the board the operands came from a
vendor virtual-I/O debug core as one 64-bit bus, and the product went back on
a 32-bit bus. That core and its JTAG controller are vendor IP and are not
included. Their buses are the top's ports:

- `async_out[63:32]` is `m1`.
- `async_out[31:0]` is `m2`. This split is a choice made here; the board
  vectors use equal operands, so they cannot tell.
- `sync_in` is `m3`.

## Exponent path

`exponent_unit` works in 10-bit two's complement:

1. ADDER1 adds the zero-extended exponents.
2. ADDER2 adds `-127` (`10'b11_1000_0001`).

Both use the adder named by `EXP_KIND`. The two extra bits are a choice made
here. They let the normalizer see results of 255 or more (overflow) and 0 or
less (underflow) directly. Example: 137 + 137 − 127 = 147.

## Significand path: radix-4 Booth, compressor tree, final adder

This is the largest part of the design and the least obvious one.

**Booth recoding (`booth_ppgen`).** The multiplier `x` (24 bits, hidden 1
included) is extended with one 0 below the LSB and two 0s above the MSB.
Overlapping 3-bit groups `(x[2i+1], x[2i], x[2i-1])`, for i = 0…12, are
recoded into digits:

| group | digit |
|-------|-------|
| 000   | 0     |
| 001   | +A    |
| 010   | +A    |
| 011   | +2A   |
| 100   | −2A   |
| 101   | −A    |
| 110   | −A    |
| 111   | 0     |

Twenty-four multiplier bits thus give 13 partial products instead of 24. The
two zeros on top make the last digit 0 or +A, never negative, so the
unsigned product comes out exact.

A negative digit is formed as the one's complement of A or 2A in its row.
The missing +1 goes into a separate correction row `neg`, as bit `2i`.
Every row is 48 bits wide, shifted left by `2i` and fully sign-extended. The
sum of the 13 rows plus `neg`, taken modulo 2^48, is exactly `a*x`. Separate
+1 bits and full sign extension are this design's choices. The source only
says that −A is the two's complement of A.

**Reduction (`csa_tree`).** The 14 rows go into a Wallace tree of
`csa_3_2` compressors. At each level, every complete group of three rows
becomes a sum row and a carry row; the carry row is shifted left by one. The
zero to two left-over rows pass down unchanged. Fourteen rows take six
levels: 14 → 10 → 7 → 5 → 4 → 3 → 2. No carry travels along a row, so the
tree delay is six full-adder delays whatever the width. Carries out of bit 47
are dropped. This is correct because the true product fits in 48 bits.

**Final stage (`adder_sel`, WIDTH 48).** This adder adds the remaining sum
and carry rows. It is the only wide carry-propagate addition in the
multiplier and the main reason for choosing a fast adder here.

With `RED_KIND = RED_ADDER_TREE`, `adder_tree` replaces the compressor tree.
It adds rows pairwise with two-operand adders of `FINAL_KIND` (14 → 7 → 4
→ 2). This models the "carry select at every stage" configuration. The
source does not say how that configuration accumulated its partial products,
so this arrangement is an assumption.

## Normalisation, rounding and exceptions (`normalizer`)

The product of two significands in [1, 2) lies in [1, 4), so the leading 1 is
at bit 46 or bit 47:

- At bit 46, bits 45:23 are the mantissa.
- At bit 47, the product is shifted right by one (mantissa = bits 46:24) and
  the exponent is incremented.

**Rounding.** The default is **truncation** (round toward zero). The source's
reference results agree with it bit for bit:

- 1050.25 × 1050.25 (`0x44834800` squared) = `0x4986A588`.
- The on-board vector `0x462D7080` squared = `0x4CEB027C`. Round-to-nearest
  would give `…27D`.

The `ROUND` / `ROUND_MODE` parameter also offers the other four IEEE rules:
nearest-even, nearest-away, toward +∞ and toward −∞. They are built from a
guard bit and a sticky bit. A carry out of the rounded mantissa increments
the exponent. These four modes are an extension. The source lists the IEEE
rules but shows only truncated results.

**Special cases.** The source says that exceptions raise flags and gives the
special encodings, but not the results. The results below are this design's
choice:

| operands / outcome                        | m3                         | flags               |
|-------------------------------------------|----------------------------|---------------------|
| either operand NaN                        | `0x7FC00000`               | none                |
| 0 × ∞                                     | `0x7FC00000`               | invalid             |
| ∞ × finite non-zero                       | ±∞                         | none                |
| either operand zero or denormal           | ±0 (denormals read as 0)   | none                |
| exponent ≥ 255 after rounding             | ±∞, or ±max finite when the rule rounds toward zero for that sign | overflow, inexact |
| exponent ≤ 0                              | ±0 (no denormal results)   | underflow, inexact  |
| otherwise                                 | the rounded product        | inexact if bits were dropped |

Divide-by-zero cannot happen in a multiplier and has no flag.

## The five adders

Every adder has ports `a, b, cin -> sum, cout`, a `WIDTH` parameter
(default 32) and the same function. `adder_sel` picks one by
`fpmul_pkg::adder_kind_e`. The block adders pad internally to a multiple of
their 4-bit block, so widths like 10 and 48 work.

| module               | how it works |
|----------------------|--------------|
| `ripple_carry_adder` | A chain of `full_adder`s. The delay is (n−1) carry delays plus one sum delay. |
| `cla_adder`          | Per bit P = a⊕b, G = ab. Inside a 4-bit group every carry is a sum of products of P, G and the group carry in, so nothing ripples inside a group. The groups chain their carries; that chaining is a choice made here. |
| `carry_skip_adder`   | 4-bit ripple groups. The group carry out is C(i+4) + P(i,i+3)·Ci, so an all-propagate group passes its carry in straight through. |
| `carry_select_adder` | The lowest 4-bit section ripples. Each higher section has two 4-bit ripple adders, with carry in 0 and 1. The real carry selects the sum, and the section carry is C0 + C1·Cprev. |
| `carry_save_adder`   | A carry-save layer (full adder at bit 0 with `cin` as the third operand, half adders above) saves its carries. One ripple carry adder then resolves the two rows. Using a carry-save layer for a *two*-operand adder is this design's reading. |

The thesis measured them on the FPGA at 8, 16 and 32 bits. At 32 bits the
delays were ripple 44.3 ns, look-ahead 26.7 ns, skip 29.0 ns, select 27.3 ns
and save 42.2 ns.

## Configurations

Parameters of `singleprecimulti` and `fpmul_top` (types in `fpmul_pkg`):

| parameter    | default        | values |
|--------------|----------------|--------|
| `EXP_KIND`   | `ADD_SELECT`   | `ADD_RIPPLE`, `ADD_CLA`, `ADD_SKIP`, `ADD_SELECT`, `ADD_SAVE` |
| `RED_KIND`   | `RED_CSA_TREE` | `RED_CSA_TREE`, `RED_ADDER_TREE` |
| `FINAL_KIND` | `ADD_SELECT`   | as `EXP_KIND` |
| `ROUND_MODE` | `RND_ZERO`     | `RND_NEAREST_EVEN`, `RND_NEAREST_AWAY`, `RND_ZERO`, `RND_POS_INF`, `RND_NEG_INF` |

- All carry select: `EXP_KIND = FINAL_KIND = ADD_SELECT`,
  `RED_KIND = RED_ADDER_TREE`.
- All carry save: `EXP_KIND = FINAL_KIND = ADD_SAVE`,
  `RED_KIND = RED_CSA_TREE`.

The format is fixed to binary32 in `fpmul_pkg`. `booth_ppgen`, `csa_tree` and
`adder_tree` are parameterised by width, but the exponent path and the
normalizer are not. Double or quadruple precision would need those widened.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. Expected values
come from plain integer arithmetic, never from the RTL's structure.
`tb/fpmul_ref_pkg.sv` holds the floating point reference model. It does a
24 × 24 integer multiply and rounds by comparing the exact remainder with
half an ulp. It also holds an operand generator that hits every special
class.

- Every adder is checked at widths 8, 10, 16, 32 and 48 against `a+b+cin`.
  The vectors include long propagate chains.
- Half and full adders are checked exhaustively. The exponent unit is checked
  exhaustively over all 65,536 pairs.
- `booth_ppgen` is checked row by row against the Booth digit value, and the
  row sum against `a*x`.
- The trees are checked against the sum of the rows, and
  `significand_mult` in all three configurations.
- `tb_normalizer` checks all five rounding rules on 20,000 random pairs. It
  also checks exact halfway products with an even and an odd integer part,
  in both signs (the ±6.5 / ±7.5 pattern of the IEEE rounding table). One of
  these rounds up into the exponent.
- `tb_singleprecimulti` checks the three adder configurations and a
  nearest-even instance clock by clock, including the one-clock latency.
- `tb_fpmul_top` is the end-to-end test at default parameters. It runs the
  two reference vectors and 20,000 random pairs. It counts every mechanism:
  with and without the normalising shift, negative Booth digits, truncated
  bits, overflow, underflow, invalid, NaN, ∞ and zero. It fails if one never
  occurred.

To run a test with Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --top-module tb_fpmul_top -y rtl -y tb \
    rtl/fpmul_pkg.sv tb/fpmul_ref_pkg.sv tb/tb_fpmul_top.sv -o sim
./obj_dir/sim
```

Replace `tb_fpmul_top` by any other testbench. The two package files are
needed only by testbenches that import them. Testbenches use the
simulator's default time unit; the clocked ones run a 20-unit clock period.

## What to trust and where it departs from the source

These follow the source:

- The field split, bias and datapath structure.
- The two-adder exponent path.
- Radix-4 Booth with the recoding table above.
- A Wallace tree of 3:2 compressors and a final stage adder.
- The five adder structures with 4-bit groups.
- The three adder configurations.
- The truncating result.
- The instance and port names of the FPGA top.

These are choices made here:

- Where the register sits (one output register, latency 1).
- The 10-bit exponent path.
- How negative Booth digits are completed.
- The tree grouping.
- How CLA groups are chained.
- The two-operand carry-save adder.
- The adder tree used for the all-carry-select configuration.
- All special-case results.
- Flushing denormals.
- The four extra rounding rules.
- The operand order on the 64-bit bus.

Not included:

- The vendor virtual-I/O and JTAG-controller debug cores, with their 36-bit
  control bus.
- Double and quadruple precision, which the source mentions only as future
  work.

## Files

- `rtl/fpmul_pkg.sv`: types (binary32 struct, operand classes, flags, adder,
  reduction and rounding enums) and constants.
- `rtl/fpmul_top.sv`, `rtl/singleprecimulti.sv`: the top and the multiplier.
- `rtl/exponent_unit.sv`, `rtl/significand_mult.sv`, `rtl/booth_ppgen.sv`,
  `rtl/csa_tree.sv`, `rtl/csa_3_2.sv`, `rtl/adder_tree.sv`,
  `rtl/normalizer.sv`, `rtl/fp_classify.sv`: the datapath blocks.
- `rtl/adder_sel.sv`, `rtl/ripple_carry_adder.sv`, `rtl/cla_adder.sv`,
  `rtl/carry_skip_adder.sv`, `rtl/carry_select_adder.sv`,
  `rtl/carry_save_adder.sv`, `rtl/full_adder.sv`, `rtl/half_adder.sv`: the
  adders.
- `tb/`: one testbench per module, plus `fpmul_ref_pkg.sv`.
