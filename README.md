# Approximate Booth multiplier and squarer with classified error compensation

Multipliers and squarers spend most of their energy summing a large array of
partial-product bits. When only the upper half of the result is wanted, the
lower columns of that array still decide one thing: the carry they send into
the kept part. This design never forms most of those lower columns. A small
error compensation unit (ECU) classifies the operands with a few cheap
signatures and adds a pre-computed estimate of the missing carry instead.

The RTL holds two such units, each in two forms:

| unit | operands | fixed-width output | full-width output |
|---|---|---|---|
| `booth_mult_approx` | 16 x 16 bit, two's complement, radix-4 Booth | 16-bit rounded upper half of the product | 32-bit approximate product |
| `squarer_approx` | 16 bit, unsigned, AND-array squarer | 16-bit rounded upper half of the square | 32-bit approximate square |

The fixed-width form is the main one. The fixed-width squarer also comes in a
refined form, `squarer_approx #(.XSIG(n))`, whose ECU looks at up to seven
more operand bits (see below). `aaac_top` places five units side by side:
both multipliers, both squarers, and the refined squarer with seven extra bits.
Everything is combinational: there is no clock, no reset and no latency.

## The array split: AP, TP_H and TP_L

For N-bit operands, number the columns of the partial-product array 0 to 2N-1.
The fixed-width output is columns N..2N-1. The binary point of the output sits
between columns N-1 and N.

- **AP** (columns N..2N-1) is kept and summed exactly.
- **TP_H** (column N-1, the first column right of the binary point) is also
  formed and summed exactly. It decides the rounding.
- **TP_L** (columns 0..N-2) is not formed. Its value `S_TPL`, in units of the
  output LSB, ranges from 0 to a few units. Its carry into column N-1,
  `theta = floor(2 * S_TPL)`, is what the ECU estimates.

The outputs are:

```
fixed width : p = floor( (AP + TP_H + (theta_hat + 1) * 2^(N-1)) / 2^N )
full width  : p = AP + TP_H + round(S_hat * 2^N)           (all 2N bits)
```

The `+1` at column N-1 rounds to nearest, as an exact rounded multiplier
would. `theta_hat` and `S_hat` are constants chosen per operand class. Each is
the class average of `theta` or `S_TPL`, the choice that minimises the mean
square error within a class. In the full-width form the low N-1 output bits
are simply the fraction bits of `S_hat`.

## Booth multiplier

### Partial products

Each pair of multiplier bits, with the bit below it, is encoded
(`booth_encoder`) into five flags:

| b(2i+1) b(2i) b(2i-1) | z | c | n | d | s | row |
|---|---|---|---|---|---|---|
| 000 | 1 | 0 | 0 | 0 | 0 | 0 |
| 001, 010 | 0 | 0 | 0 | 0 | 1 | +A |
| 011 | 0 | 0 | 0 | 1 | 0 | +2A |
| 100 | 0 | 1 | 1 | 1 | 0 | -2A |
| 101, 110 | 0 | 1 | 1 | 0 | 1 | -A |
| 111 | 1 | 0 | 1 | 0 | 0 | 0 |

Each kept bit of a row comes from one `booth_selector` cell:
`pp = (a_j & s | a_(j-1) & d) ^ c`. A negative row is the one's complement of
the magnitude. Its +1 (`c_i`) belongs at column 2i, and every such column is
in TP_L. The polarity input is `c`, not the raw sign bit `b(2i+1)`. The two
differ only for the pattern 111, which must give a zero row with no
correction.

Sign extension uses the usual constant method. The top bit of each 17-bit
row enters inverted, and one constant row adds
`-2^N * (1 + 4 + ... + 4^(N/2-1))`. The rounding 1 sits in the same constant
row, at column N-1. For N = 16 there are 8 partial-product rows, one constant
row and one ECU row. All ten are 17 columns wide, covering columns 15..31.

### Signatures and classes

`mult_signature_gen` computes three signatures:

- **CA**, the number of zero partial products (the sum of the `z` flags), 0..8.
- **CB**, the number of negative digits (the sum of the `n` flags), 0..8.
- **FA**, which is 1 when at least half the bits of A are ones. It is bit N/2-1
  of A after a bit-sorting network (`sorting_network`, an odd-even merge sort
  built from AND/OR compare-exchange cells).

`mult_ecu` maps the signatures to five cases, and the cases to three groups:

| case | condition | group | theta_hat | S_hat |
|---|---|---|---|---|
| 1 | CA = 1, CB < 3, FA = 0 | G2 | 1 | 0.8608 |
| 2 | CA <= 1, otherwise | G1 | 2 | 1.1153 |
| 3 | CA = 2 and ((CB > 3, FA = 0) or (CB < 3, FA = 1)) | G1 | 2 | 1.1153 |
| 4 | 2 <= CA <= 5, otherwise | G2 | 1 | 0.8608 |
| 5 | CA >= 6 | G3 | 0 | 0.4001 |

The `S_hat` values are stored as `round(S * 2^16)` in `aaac_pkg`.

## Squarer

The squaring array needs no Booth encoding. It uses
`A^2 = sum a_k 4^k + sum_{i<j} a_i a_j 2^(i+j+1)`, and is folded once more
with `a_k + a_(k-1) a_k = a_k ~a_(k-1) + 2 a_(k-1) a_k`:

- column 2k holds `a_k & ~a_(k-1)`, and `a_i & a_j` for i + j + 1 = 2k, j >= i + 2;
- column 2k+1 holds `a_(k-1) & a_k`, and `a_i & a_j` for i + j = 2k.

No column then holds more than 8 bits. Column N-2 (column 14) holds exactly 7
bits. `squarer_approx` generates the kept columns. The ECU (`sq_ecu`) uses:

- **CA**, the number of ones among the 7 bits of column 14 (the heaviest
  dropped column). It is sorted into a thermometer code by a 7-input sorting
  network. Those 7 bits are the only TP_L bits the design forms.
- **CB**, operand bit `a[6]`.

| case | condition | theta_hat (group) | S_hat |
|---|---|---|---|
| 1 | CA = 0 | 0 (1) | 0.2197 |
| 2 | CA = 1, a6 = 0 | 0 (1) | 0.4539 |
| 3 | CA = 1, a6 = 1 | 1 (2) | 0.6210 |
| 4 | CA = 2, a6 = 0 | 1 (2) | 0.8133 |
| 5 | CA = 2, a6 = 1 | 2 (3) | 1.0134 |
| 6 | CA = 3 | 2 (3) | 1.2902 |
| 7..10 | CA = 4..7 | 3..6 (4..7) | 1.6966, 2.1278, 2.5838, 3.0645 |

### Refining the squarer with extra operand bits

The classes above are broad: all operands with CA = 3, for example, share one
compensation value, so the largest error sits at the edges of the wide
classes. Splitting each class by a few raw operand bits narrows the spread of
the dropped value inside each group, and lowers the worst-case error.

With `XSIG = NX` (1..7, fixed width only), `sq_xsig_ecu` replaces `sq_ecu`.
The group of an operand is `{CA, first NX bits of a6, a7, a13, a0, a4, a5,
a8}`. These bits were picked greedily, one at a time, as the bit that best
splits the remaining large groups. Each group has its own 3-bit theta, looked
up in a constant table indexed by the group number. For NX = 7 the table has
1024 entries, of which 576 can occur. Synthesis turns the lookup into gates.

Each table entry is the theta in 0..7 that minimises the largest error over
all operands of its group, with ties going to the smaller value. This
min-max choice is the right one when the worst-case error is the target. The
mean used for the basic tables targets the mean squared error instead. The
tables are `SQ_XSIG_THETA_NX1` .. `NX7` in `aaac_pkg`, packed 3 bits per
group, with group g in bits [3g+2:3g]. To regenerate them, sweep all 65536
operands once: for each operand compute its group and, for each theta, the
error
`|floor((K + (theta+1)*2^15) / 2^16) * 2^16 - A^2|`, where K is A^2 minus the
value of columns 0..14. Keep the largest error per (group, theta), then pick
the best theta per group. `tb/aaac_ref_pkg.sv` (`sq_xsig_table`) does exactly
this, and the testbenches check the tables against it.

A synthesis-driven variant could mark the groups that matter least as
don't-cares, and let logic minimisation pick their values to shrink the ECU.
That variant is not built here: which groups to release is a cost/accuracy
choice made against a particular synthesis run.

## Compressors, tree and final adder

- `comp22` is a half adder.
- `comp32` is a full adder.
- `comp42` is the 4:2 (5:3) compressor. It adds four bits of a column plus a
  lateral input `in5` from the neighbouring cell. Its `out3` depends only on
  `in1..in3`, so a row of these cells has no carry ripple.

`compression_tree` reduces the rows level by level. It takes four rows at a
time through a row of 4:2 cells, sends three leftover rows through a row of
3:2 cells, and passes one or two leftover rows on unchanged. Ten rows take
three levels (10, 6, 4, 2); nine rows also take three (9, 5, 3, 2).

The tree places 3:2 cells across the full row width. Where a column holds
only two live bits (the other input is a constant 0), synthesis reduces the
cell to a half adder, the job a 2:2 compressor does at the ragged edges of a
hand-placed array.

`final_adder` is a ripple carry-propagate adder: a half adder in bit 0 and a
full adder in every higher bit. All of these work modulo 2^W; the carry out
of the top column is dropped on purpose.

## Accuracy

Errors are measured against the exact result, in units of the fixed-width
output LSB (2^16). E_ave is the mean |error|, E_max the largest |error|, and
E_ms the mean squared error.

| unit | inputs | E_ave | E_max | E_ms |
|---|---|---|---|---|
| squarer, fixed width | all 65536 | 0.2736 | 0.9376 | 0.1076 |
| squarer, full width | all 65536 | 0.1337 | 0.6784 | 0.0275 |
| squarer, fixed, 7 extra bits | all 65536 | 0.2621 | 0.7549 | 0.0961 |
| multiplier, fixed width | 200k random pairs | 0.580 | 3.00 | 0.490 |
| multiplier, full width | 200k random pairs | 0.558 | 2.88 | 0.443 |
| multiplier, TP dropped, no compensation | random pairs, arithmetic model | 3.00 | - | 9.85 |

The squarer reaches its design targets to the second decimal: 0.27 / 0.94 /
0.11 for the fixed-width form and 0.13 / 0.68 / 0.03 for the full-width form.
With extra operand bits, the largest error falls as expected. For 1 to 7
extra bits it is 0.938, 0.917, 0.852, 0.852, 0.841, 0.802 and 0.755. The
design aimed for about 0.94, 0.92, 0.85, 0.84, 0.82, 0.80 and 0.79. Four and
five extra bits land 0.01 to 0.02 above their aim. The other sizes meet
theirs or do better.

**The multiplier does not reach its target** of about 0.32 / 1.56 / 0.15. Its
partial-product array checks out: with all of TP dropped and no compensation,
the error is E_ave 3.00 and E_ms 9.85, as expected. The case boundaries and
constants in the table above are used exactly as specified. However, the
tabulated class averages are not consistent with this array. All three
`S_hat` values lie below the overall mean of `S_TPL` (about 1.5), which no
partition of the inputs can produce. Re-deriving `theta_hat` per case from
the array (the class mean of `theta`) would give roughly 0.38 / 2.0 / 0.22.
The constants live in `aaac_pkg` (`MULT_THETA_G*`, `MULT_STPL_G*`) and can be
replaced there.

## What is not included

- **Other operand sizes.** The case boundaries and constants exist only for
  16-bit operands. The arrays, compressors and sorting network are generic in
  N, but the ECUs are not: `booth_mult_approx` and `squarer_approx` stop
  elaboration for N other than 16.
- **Don't-care groups in the refined squarer ECU.** Every group is
  implemented with its own compensation value. See the end of the squarer
  section.
- **Pipelining, registers and handshakes.** None are specified. The units are
  plain combinational blocks; register them as your timing needs.

## Module hierarchy

```
aaac_top
├── booth_mult_approx  (x2: FULL_WIDTH = 0, 1)
│   ├── booth_encoder        x8
│   ├── booth_selector       one per kept bit
│   ├── mult_signature_gen ── sorting_network (16)
│   ├── mult_ecu
│   ├── compression_tree ── comp42, comp32
│   └── final_adder ── comp22, comp32
└── squarer_approx     (x3: FULL_WIDTH = 0, 1; XSIG = 7)
    ├── sq_ecu ── sorting_network (7)        (XSIG = 0)
    ├── sq_xsig_ecu ── sorting_network (7)   (XSIG > 0)
    ├── compression_tree
    └── final_adder
aaac_pkg: group type, compensation constants, refined-squarer tables
```

`aaac_top` ports:

- multiplier side: `mul_a`, `mul_b` in; `mul_p_fixed[15:0]`, `mul_p_full[31:0]`
  out, plus the selected `mul_case` and `mul_group`;
- squarer side: `sq_a` in; `sq_p_fixed[15:0]`, `sq_p_full[31:0]` out, plus
  `sq_case` and `sq_group`;
- refined squarer, on the same `sq_a`: `sq_p_xsig[15:0]` out, plus
  `sq_xsig_group` (its theta + 1).

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference model `tb/aaac_ref_pkg.sv`
computes the expected outputs arithmetically: the exact product minus the
value of the dropped columns, summed from the array definition, plus the
class constant. The main testbenches are:

- `tb_aaac_top` runs the whole design at its default size, on random and
  targeted operands. It fails if any of the five multiplier cases, the ten
  squarer cases or the seven refined-squarer compensation values is never
  reached.
- `tb_squarer_approx` runs all 65536 squarer operands and checks the error
  metrics above.
- `tb_squarer_xsig` runs all operands through the refined squarer with each
  of 1 to 7 extra bits, and bounds the largest error.
- `tb_booth_mult_approx` checks the multiplier on 200k pairs and prints its
  error metrics.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Mdir obj \
  -y rtl -y tb rtl/aaac_pkg.sv tb/aaac_ref_pkg.sv tb/tb_aaac_top.sv \
  --top-module tb_aaac_top
./obj/Vtb_aaac_top
```

Swap in another `tb/tb_*.sv` and its `--top-module` to run a different
testbench. Each completes in seconds.
