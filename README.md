# Compressor-based Urdhva-Tiryakbhyam multiplier

An unsigned `WIDTH x WIDTH` combinational multiplier (8 x 8 by default). It
forms its partial products the "vertically and crosswise" way
(Urdhva-Tiryakbhyam): column *k* of the product gathers every bit product
`a[i] & b[j]` with `i + j = k`. The columns are then summed with *compressors*
rather than rows of ripple adders. The basic cell is a 4:2 compressor built
only from XOR-XNOR cells and 2:1 multiplexers. Two of them, with a half adder
and two full adders, make a 7:2 compressor that swallows a whole column of
partial products in one step. After two compressor steps each column holds at
most two bits, and a single carry-propagate addition gives the product.

There is no clock, no reset and no handshake. The product is valid one
combinational delay after the operands change.

## Counting with compressors

Every cell in this design is a *counter*. It takes bits of one weight and
returns the same total as a few bits of higher weight. The identities are:

| cell            | identity                                                          |
|-----------------|-------------------------------------------------------------------|
| half adder      | `a + b = sum + 2*carry`                                           |
| full adder      | `a + b + c = sum + 2*carry`                                       |
| 4:2 compressor  | `x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)`                |
| 7:2 compressor  | `popcount(x[6:0]) + cin1 + cin2 = sum + 2*carry + 4*(cout1 + cout2)` |

Because each cell keeps its total exactly, the multiplier is correct by
construction: the bits left at the end add up to `a*b`. The testbenches check
these identities on every input pattern.

## The 4:2 compressor (`compressor_4_2`)

Two XOR-XNOR cells form `x1^x2` and `x3^x4`, each with its complement. All
the rest is 2:1 multiplexers:

```
p     = (x3^x4) ? ~(x1^x2) : (x1^x2)     // x1^x2^x3^x4, plus a twin mux for ~p
cout  = (x1^x2) ? x3  : x1
carry = p       ? cin : x4
sum   = cin     ? ~p  : p                // = p ^ cin
```

Two properties matter:

* `cout` depends only on `x1..x3`. A row of 4:2 compressors can therefore
  pass `cout` into the next column's `cin` without a ripple: the chain is one
  cell deep whatever the row length.
* Both polarities of every XOR come free from the XOR-XNOR cells. So the
  `sum` multiplexer needs no inverter, and its select (`cin`) arrives early,
  because `cin` is a neighbour's `cout`, which is only two cells deep.

The design sticks to the multiplexer-based XOR-XNOR form. The other two
classic forms are not included here: two chained full adders, and the form
that uses XOR gates for the parities.

## The 7:2 compressor (`compressor_7_2`)

This is the part that needs the most care. The structure is:

```
 x[3:0], cin1 ─► 4:2 A ─► S1, C1 (carry), C2 (cout)
 x[6:4], 0, cin2 ─► 4:2 B ─► S2, C21 (carry), C22 (cout)

 half adder (S1, S2)      ─► sum   = S1 ^ S2     (weight 1), S3 (weight 2)
 full adder 1 (S3, C1, C21) ─► T (weight 2),  cout1 = C3 (weight 4)
 full adder 2 (T, C2, C22)  ─► carry (weight 2), cout2 (weight 4)
```

Weights are what make this cell tricky. After the two 4:2 compressors there is
one weight-1 pair (S1, S2) and five weight-2 bits (S3, C1, C21, C2, C22). The
five weight-2 bits must be reduced to one weight-2 bit plus weight-4 bits.
That needs two full adders in series: the second one adds the *sum* of the
first to C2 and C22.

The commonly published form of this compressor feeds the first full adder's
*carry* C3 into the second full adder instead:

```
Cout1 = C3 ^ C2 ^ C22,   Cout2 = maj(C3, C2, C22)
```

C3 has weight 4 but C2 and C22 have weight 2, so that version does not keep
the count. With eight ones at its inputs, for example, its outputs are worth
6. This design uses the series connection above instead. It has the same
parts (two 4:2 compressors, one half adder, two full adders) and the same
`sum`, and the identity in the table holds for all 512 input patterns. What
changes is this:

* `carry` is the parity of all five weight-2 bits, not of S3, C1 and C21
  alone.
* There are two weight-4 outputs, `cout1` (= C3) and `cout2`. The published
  form has one weight-2 and one weight-4 output.

The fourth input of compressor B is tied to 0, because the cell takes seven
bits and two carries. In the multiplier, all nine inputs are used as plain
column bits.

## Column schedule of the multiplier (`urdhwa_multiplier`)

With `NCOL = 2*WIDTH` columns, for every column *k*:

1. **Crosswise products.** `pp[k][i] = a[i] & b[k-i]` (zero where `k-i` is
   out of range). A column holds at most `WIDTH` of them. They are padded to
   nine bits.
2. **7:2 step.** One `compressor_7_2` per column leaves `s7[k]` (weight
   2^k), `c7[k]` (2^(k+1)) and `d7a[k]`, `d7b[k]` (both 2^(k+2)).
3. **4:2 step.** Column *k* now has four bits: `s7[k]`, `c7[k-1]`,
   `d7a[k-2]` and `d7b[k-2]`. One `compressor_4_2` per column adds them,
   with `cin` taken from column *k-1*'s `cout`. It leaves `s4[k]` (2^k) and
   `c4[k]` (2^(k+1)).
4. **Final addition.** `p = s4 + (c4 << 1)`, a `2*WIDTH`-bit
   carry-propagate add, written as a word-level `+` so that synthesis can map
   it to the target's fast adder.

All bits are non-negative and add up to `a*b < 2^(2*WIDTH)`. So no bit ever
lands in column `2*WIDTH` or above, and cutting the sum to `2*WIDTH` bits is
exact. The compressor outputs of the top columns that cannot be set are left
unconnected on purpose.

The structure is uniform: `2*WIDTH` 7:2 and `2*WIDTH` 4:2 compressors,
whether a column is full or almost empty. Synthesis removes the cells whose
inputs are constant. A hand-placed schedule that puts 7:2 compressors only in the tall columns
would use far fewer cells. That saving is not pursued here.

### Parameter

| parameter | default | range | meaning |
|-----------|---------|-------|---------|
| `WIDTH`   | 8       | 2..9  | operand width; one 7:2 compressor takes nine bits, so a column may hold at most nine partial products |

A 4 x 4 version (`WIDTH = 4`) is the smallest size usually shown for this
multiplier style. It builds and is tested exhaustively. Widths above 9 would
need more than one 7:2 compressor per column, or a hierarchy of smaller
multipliers, and are rejected at elaboration.

## Where this design departs from the usual description

* **7:2 compressor wiring:** the second full adder is fed in series, as
  explained above, because the usual wiring loses count.
* **4:2 compressor `cout`:** `cout = (x1^x2) ? x3 : x1`. Some printed forms
  of this equation use `~(x1|x2)` and `x4` in the second term. That breaks
  the 4:2 identity (`x1 = x2 = 1` would give 0 instead of 2).
* **Output labels:** the parity-with-`cin` path is `sum` and the
  multiplexer on `x4`/`cin` is `carry`. This follows the equations, not the
  labels sometimes drawn under the gates.
* **Multiplier arrangement and final adder:** the two-step column schedule
  and the `+` at the end are this design's own choices.
* **Signedness:** operands are unsigned.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`:

| testbench                      | what it checks |
|--------------------------------|----------------|
| `tb_xor_xnor2`, `tb_mux2`, `tb_half_adder`, `tb_full_adder` | full truth tables |
| `tb_compressor_4_2`            | all 32 patterns: the identity, each output's equation, `cout` independent of `cin` |
| `tb_compressor_7_2`            | all 512 patterns: the identity, `sum` parity, each output against a reference model |
| `tb_urdhwa_multiplier`         | default 8 x 8, all 65,536 operand pairs against `a*b`; also counts, with a reference model of the column schedule, that an 8-high column, a set `cout2` of a 7:2, a 4:2 `cin` from a neighbour and a carry in the final add each occur |
| `tb_urdhwa_multiplier_widths`  | `WIDTH` 2 and 4 exhaustively, 9 with 20,000 random pairs and the maximum |

Each testbench has a watchdog that reports a failure if the run does not
finish.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    --top-module tb_urdhwa_multiplier tb/tb_urdhwa_multiplier.sv
./obj_dir/Vtb_urdhwa_multiplier
```

To lint a module: `verilator --lint-only -Wall -Irtl rtl/urdhwa_multiplier.sv`.

## Files

| file | module |
|------|--------|
| `rtl/urdhwa_multiplier.sv` | top: crosswise partial products, 7:2 step, 4:2 step, final add |
| `rtl/compressor_7_2.sv`    | 7:2 compressor |
| `rtl/compressor_4_2.sv`    | XOR-XNOR / multiplexer 4:2 compressor |
| `rtl/xor_xnor2.sv`         | XOR with complementary XNOR output |
| `rtl/mux2.sv`              | 2:1 multiplexer |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | adders used by the 7:2 compressor |
