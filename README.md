# Radix-4 modified Booth multiplier (8 x 8 bit)

A parallel multiplier spends most of its area and power on summing partial
products. This design halves their number with radix-4 (modified) Booth
recoding: instead of one partial product per multiplier bit, it forms one per
*pair* of bits, each a multiple of the multiplicand in {-2, -1, 0, +1, +2}.
The four resulting rows of an 8 x 8 multiplication are compressed by a Wallace
tree of full adders into two rows, and a ripple carry adder, the smallest and
least switching carry-propagate adder, turns those into the 16-bit product.

```
 b ──► Booth encoders (4) ──sel──► Booth decoders (4 rows) ──┐
 a ──────────────────────────────►                           │ 4 rows + 1 row of +1 bits
                                                             ▼
                                      Wallace tree (3 levels of full adders)
                                                             │ sum row, carry row
                                                             ▼
                                      ripple carry adder ──► c = a * b
```

With `PIPELINED = 1` a register rank sits at the inputs and after each of the
three stages (encode/decode, tree, final add).

## Booth recoding

The multiplier `b` gets a 0 appended below its least significant bit. Groups
of three bits, overlapping by one and stepping by two, are each read as one
radix-4 digit

    digit_i = -2*b[2i+1] + b[2i] + b[2i-1]        (b[-1] = 0)

so that `b = sum(digit_i * 4^i)` for a two's complement `b`. Each group goes
through one `booth_encoder`, which describes the digit with three lines:

| b[2i+1] b[2i] b[2i-1] | digit | neg | two | zero |
|:---:|:---:|:---:|:---:|:---:|
| 000 | 0  | 0 | 0 | 0 |
| 001 | +1 | 0 | 0 | 1 |
| 010 | +1 | 0 | 0 | 1 |
| 011 | +2 | 0 | 1 | 0 |
| 100 | -2 | 1 | 1 | 0 |
| 101 | -1 | 1 | 0 | 1 |
| 110 | -1 | 1 | 0 | 1 |
| 111 | 0  | 0 | 0 | 0 |

Note the naming: the line called `zero` is **1 for the digits +1 and -1**, when
the multiplicand is taken unshifted. The equations are
`zero = b[2i] ^ b[2i-1]`, `two = (b[2i+1] ^ b[2i]) & ~zero`,
`neg = b[2i+1] & ~(b[2i] & b[2i-1])`. Many Booth encoders simply use
`neg = b[2i+1]`; that also works, because the row of a zero digit then becomes
all ones and its +1 makes it zero again. This design keeps `neg` low for the
digit 0, so such a row never toggles.

Worked example, `92 x 49`: `49 = 0011_0001` recodes (least significant digit
first) to +1, 0, -1, +1, and `92 - 16*92 + 64*92 = 4508`.

## Partial product rows and the negation bits

Each `booth_decoder` forms one row of 9 bits (one more than the multiplicand,
so that `2a` fits):

    pp[j] = ((a[j-1] & two) | (a[j] & zero)) ^ neg      a[-1] = 0, a[8] = a[7]

For a negative digit this gives the one's complement of the selected multiple.
The missing +1 of the two's complement is not added in the row. Instead the
`neg` bit of digit *i* is placed at bit position *2i* of one extra row, so the
adder tree receives five rows: four partial product rows and this row of
"+1 bits". The four partial product rows are sign-extended to the full 16 bits
and shifted left by *2i*. All arithmetic after this point is modulo 2^16, which
is exact because every 8 x 8 two's complement product fits in 16 bits.

Full sign extension is the simplest correct scheme. It costs some full adders
in the upper columns compared with the usual sign-extension-prevention trick
(a few constant 1 bits and an inverted sign per row). The trick is not used
here.

## Wallace tree

`wallace_tree` reduces any number of rows to a sum row and a carry row without
propagating a carry. At every level the rows are taken three at a time, and
each group passes through a `csa_row`: 16 full adders side by side, the "unit
adder" of the design. It returns the bitwise sum and the bitwise carries
shifted one place left. Rows left over (one or two) pass to the next level
unchanged. The row count therefore goes `n -> 2*floor(n/3) + n mod 3`. For the
five rows of the 8 x 8 multiplier that means three levels, 5 -> 4 -> 3 -> 2.
The depth of the tree is three full-adder delays, whatever the row values.

## Final adder

`ripple_carry_adder` is a chain of the same full adders. It adds the tree's
two rows with a carry in of 0. The alternative, `carry_select_adder`
(`FINAL_ADDER = FA_CARRY_SELECT`), cuts the operands into 4-bit blocks. Each
upper block is computed twice, for an incoming carry of 0 and of 1 (the carry
generator). The real carry then picks one of the two results (the sum
selector). It is faster but needs roughly 40 % more logic at 16 bits. The
ripple adder is the default because it is the low-power choice.

## Interface and timing

Module `booth_mult_r4`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, used only when `PIPELINED = 1` |
| `rst_n` | in | 1 | active-low asynchronous reset of the pipeline registers |
| `in_valid` | in | 1 | `a`/`b` carry an operand pair |
| `a` | in | N | multiplicand |
| `b` | in | N | multiplier |
| `out_valid` | out | 1 | `c` carries a product |
| `c` | out | 2N | product `a * b` |

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | operand width, even |
| `SIGNED_OPS` | 1 | 1: two's complement operands; 0: unsigned (both operands zero-extended by two bits, one more Booth digit, six tree rows) |
| `PIPELINED` | 0 | 1: four register ranks |
| `FINAL_ADDER` | `FA_RIPPLE` | or `FA_CARRY_SELECT` |
| `CSEL_BLOCK` | 4 | block size of the carry select adder |

* `PIPELINED = 0`: purely combinational. `c` follows `a` and `b`, and
  `out_valid` is `in_valid`.
* `PIPELINED = 1`: operands present before rising edge *k* enter the input
  register at edge *k*. Their product and `out_valid` appear after edge *k+3*,
  so the latency is four register stages. One new pair can enter every cycle.
  Reset clears every register, including the valid bits.

## How far it follows the described design, and where it departs

These parts follow the described design:

* 8-bit operands and a 16-bit product `c[15:0]`.
* The encoder's three lines, the decoder's bit equation, and the truth table
  above.
* A Wallace tree built of unit adders.
* A ripple carry final adder.
* Optional pipeline registers at the four stage boundaries.

These are choices of this design, where the description is silent or
inconsistent:

* **Operand roles.** `a` is the multiplicand and `b` the multiplier.
* **Signedness.** Operands are two's complement. Recoding works for unsigned
  operands too, which `SIGNED_OPS = 0` provides.
* **`neg` for the triplet 111.** `neg` is 0 for this triplet. Some logic
  diagrams of this encoder pass `b[2i+1]` straight through instead. The
  product is the same either way.
* **Product width.** The product is 16 bits, although a 17-bit output port
  also appears. Sixteen bits hold every signed 8 x 8 product.
* **Sign handling.** Rows are fully sign-extended, and the negation +1 bits go
  in a separate tree row.
* **Tree grouping.** The tree groups rows in their given order.
* **Pipelining off by default.** The reference results come from a purely
  combinational view: only `a`, `b` and `c`, with each operand pair held for
  500 ns.
* **Handshake and reset.** The `in_valid`/`out_valid` pair and the
  asynchronous reset are additions.
* **Carry select adder.** The carry select adder and its 4-bit block size are
  the alternative final adder, not the main configuration.

Not modelled: power figures. The reduction of dynamic power against a radix-2
Booth multiplier was measured on an FPGA. That radix-2 multiplier is a
comparison baseline, not part of this design.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_booth_encoder` | all 8 triplets against the digit formula |
| `tb_booth_decoder` | all 256 multiplicands x 5 digits: row + neg == digit * a |
| `tb_full_adder` | exhaustive |
| `tb_wallace_tree` | 5-row and 9-row trees, random rows, sum + carry == total mod 2^16 |
| `tb_ripple_carry_adder`, `tb_carry_select_adder` | corner cases and random operands |
| `tb_pipe_reg` | reset, one-cycle delay, asynchronous clear |
| `tb_booth_mult_r4` | all four builds side by side. It checks all 65536 pairs (signed, unsigned, carry-select). It streams 4000 random pairs with bubbles through the pipelined build and checks the exact latency and `out_valid`. It counts every Booth digit value, negated rows, pipeline results and bubbles, and fails if any never occurred. |
| `tb_booth_mult_r4_table2` | default parameters. It runs `92 x 49 = 4508`, `15 x 105 = 1575` and `85 x 124 = 10540`, each held 500 ns, then all 65536 signed pairs. |

All of them pass. Each one also fails when its module has a deliberate bug
(for example a carry term removed, or the +1 row dropped).

To run one with Verilator 5:

```
verilator --binary --timing --assert rtl/booth_pkg.sv rtl/*.sv \
          tb/tb_booth_mult_r4.sv --top-module tb_booth_mult_r4
./obj_dir/Vtb_booth_mult_r4
```

`booth_pkg.sv` must come first because the other files import it. Lint a
module with `verilator --lint-only -Wall rtl/booth_pkg.sv rtl/*.sv
--top-module booth_mult_r4`. The remaining warnings are expected:

* `clk` and `rst_n` are unused in the combinational build.
* The adders' carry-out pins are left open.
* The top carry of each carry-save row is dropped on purpose, because the
  arithmetic is modulo 2^16.

## Files

| file | content |
|---|---|
| `rtl/booth_pkg.sv` | `booth_sel_t` (neg/two/zero) and `final_adder_e` |
| `rtl/booth_encoder.sv` | one radix-4 digit recoder |
| `rtl/booth_decoder.sv` | one partial product row |
| `rtl/full_adder.sv` | unit adder |
| `rtl/csa_row.sv` | row of unit adders (3:2 compressor) |
| `rtl/wallace_tree.sv` | carry-save reduction tree |
| `rtl/ripple_carry_adder.sv` | final adder |
| `rtl/carry_select_adder.sv` | alternative final adder |
| `rtl/pipe_reg.sv` | pipeline register |
| `rtl/booth_mult_r4.sv` | the multiplier (top) |
