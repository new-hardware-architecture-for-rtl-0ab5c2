# Bit counter built from half adders, full adders and OR gates

A population count ("popcount") gives the number of 1 bits in a word. This
design computes it in one combinational step, using a tree that needs fewer
gates than carry-save-adder counters of the same size. The 16-bit counter uses
77 gates (AND, OR and XOR). It is built from two 8-bit counters of
30 gates each, plus one 17-gate adder layer. Wider words are handled by
doubling: two counters of half the width, joined by one more adder layer.

There are no clock, registers or reset. `count` follows `in_word` after the
logic settles.

## The trick: counting four bits without a full adder

Everything rests on the 4-input group counter (`rtl/popcount4_mod.sv`).

1. Two half adders count the pairs `in[1:0]` and `in[3:2]`. Each pair count is
   0, 1 or 2, written as carry/sum `(c, s)`. The combination `c = s = 1` can
   never occur, because a half adder's carry and sum exclude each other.
2. Two more half adders add the pair counts column by column. One adds the two
   sums (`s_a + s_b`); the other adds the two carries (`c_a + c_b`).
3. The weight-2 column then holds two terms: the carry of the sum adder and the
   sum of the carry adder. A general adder would need a full adder here. An OR
   gate is enough, because the two terms are never 1 together. The sum adder
   carries only when both pairs hold exactly one 1, and then both pair carries
   are 0.

```
count[0] = s_a ^ s_b
count[1] = (s_a & s_b) | (c_a ^ c_b)
count[2] = c_a & c_b
```

That is 4 half adders and 1 OR gate (9 gates) per 4-bit group. The adder it
replaces needs one half adder and one full adder (7 gates) on top of the
4 first-layer gates, 11 in all.

## The 8-bit counter

`rtl/popcount8_mod.sv` counts `in_word[3:0]` and `in_word[7:4]` with two group
counters. It adds the two 3-bit counts (0..4 each) with one half adder and two
full adders (`count_merge_adder`, K = 3). The last carry is `count[3]`, which
is set only for the word `8'hFF`. The total is 9 half adders, 2 full adders and
2 OR gates, which is 30 gates.

## Doubling: 16 bits and beyond

`rtl/count_merge_adder.sv` is a ripple-carry adder of two K-bit counts. Its
lowest column is a half adder, since nothing carries into it. Full adders sit
above, and the final carry becomes the new top bit, so the result has K+1
bits. Two n-bit counters plus one such layer make a 2n-bit counter:

| word bits | count bits | merge layer at the top | gates after synthesis |
|-----------|------------|------------------------|-----------------------|
| 4         | 3          | (group counter only)   | 9                     |
| 8         | 4          | 1 HA + 2 FA            | 30                    |
| 16        | 5          | 1 HA + 3 FA            | 77                    |
| 32        | 6          | 1 HA + 4 FA            | 176                   |
| 64        | 7          | 1 HA + 5 FA            | 379                   |
| 128       | 8          | 1 HA + 6 FA            | 790                   |

The gate counts assume a half adder of 2 gates (XOR, AND) and a full adder of
5 gates (two XOR, two AND, one OR). With those costs, the count for n bits is
G(2n) = 2·G(n) + 2 + 5·(log2(n+1) rounded up − 1). The counts in the table are
the cells a generic synthesis of this RTL gives. They agree with the design's
own figures: 30 gates for 8 bits, 77 for 16 bits, and about 380 for 64 bits.

`rtl/popcount_tree.sv` is the top. It builds this doubling for any `WIDTH`
that is a power of two of at least 4; other values stop elaboration with an
error. The tree is written as a heap-numbered array of node counts, not as
recursion. Node 1 is the root, node i has children 2i and 2i+1, and leaf j is
an 8-bit counter on `in_word[8j+7:8j]`. A node at depth d covers `WIDTH >> d`
bits. Its merge adder therefore has K = `$clog2((WIDTH >> (d+1)) + 1)`.

## Interface

| module              | parameters (default) | inputs                    | outputs |
|---------------------|----------------------|---------------------------|---------|
| `popcount_tree`     | `WIDTH` (16)         | `in_word[WIDTH-1:0]`      | `count[$clog2(WIDTH+1)-1:0]` |
| `popcount8_mod`     | –                    | `in_word[7:0]`            | `count[3:0]` |
| `popcount4_mod`     | –                    | `in_bits[3:0]`            | `count[2:0]` |
| `count_merge_adder` | `K` (4)              | `a[K-1:0]`, `b[K-1:0]`    | `sum[K:0]` |
| `half_adder`        | –                    | `a`, `b`                  | `s`, `c` |
| `full_adder`        | –                    | `a`, `b`, `cin`           | `s`, `cout` |

`rtl/popcount_pkg.sv` holds `count_width(n)` (= `$clog2(n+1)`) and the
word-size check. Compile it before the other files.

## What is fixed by the design and what is chosen here

Taken from the design:

- the three-layer structure of the 8-bit counter;
- the half-adder-and-OR replacement in the middle layer;
- the gate makeup of the half adder;
- the ripple merge layer with a half adder in bit 0;
- the doubling to 16 bits and beyond;
- the 16-bit default.

Choices made here:

- **Full adder gates.** Only "five gates, three on the carry path" is given.
  The usual XOR/XOR, AND/AND/OR form is used.
- **Middle-layer pairing.** The pairing in the 4-bit group counter (sums with
  sums, carries with carries) is the one that gives a correct count. The
  original drawing places the C/S output labels of the middle half adders the
  other way round, and that reading cannot count correctly.
- **Width of the 32-bit result.** For 32 bits the result is 6 bits wide, as a
  count of 0..32 requires. The original description of that layer gives
  5 bits.
- **Word order.** The lower half of a word goes to the first sub-counter.
- **Allowed widths.** Only powers of two from 4 up are accepted.
- **No registers.** There is no pipelining and no output register. If the
  counter sits in a clocked datapath, register `in_word` and/or `count`
  outside.

Not reproduced:

- Delay and area figures. Published results for the 16-bit counter are
  23 unit gate delays, and 1346 µm² with a 1.04 ns critical path in 0.18 µm
  CMOS. Neither is checked here.
- The earlier, unmodified 8-bit counter (full adders in the middle layer,
  34 gates).
- The carry-save-adder counters this design is compared against.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module's outputs with a count computed bit by bit in the testbench, then
prints `TB_RESULT checks=N failures=M`.

- `tb_half_adder`, `tb_full_adder`, `tb_popcount4_mod` and `tb_popcount8_mod`
  are exhaustive.
- `tb_count_merge_adder` runs all operand pairs for K = 4 and K = 3.
- `tb_popcount_tree` runs all 65536 words at the default 16 bits. It also
  counts, from the stimulus, how often each mechanism was exercised, and fails
  if one never was. The mechanisms are: each of the two OR-gate inputs, a group
  count of 4, an 8-bit count of 8, a 16-bit count of 16, and every count value
  from 0 to 16.
- `tb_popcount_widths` drives 4, 8, 32, 64 and 128-bit instances with all
  zeros, all ones, walking ones and zeros, and 2000 random words.

Each testbench was also run against a deliberately broken copy of its module,
and every one of them reported failures.

Running one testbench with Verilator 5:

```
verilator --binary --timing -y rtl rtl/popcount_pkg.sv tb/tb_popcount_tree.sv \
          --top-module tb_popcount_tree -Mdir obj_tree -o sim
./obj_tree/sim
```

To change the word size, set `WIDTH` on `popcount_tree`, for example
`-GWIDTH=64` for a lint run
(`verilator --lint-only -Wall -y rtl rtl/popcount_pkg.sv rtl/popcount_tree.sv -GWIDTH=64`).
