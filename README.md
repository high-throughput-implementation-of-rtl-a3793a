# 64-bit Wallace-tree multiply-accumulate unit

A multiply-accumulate (MAC) unit computes a running sum of products,

    F = a_0*b_0 + a_1*b_1 + a_2*b_2 + ...

which is the inner loop of digital filters, convolutions, transforms and dot
products. This design does it for unsigned 64-bit operands. Each clock cycle
it forms the full 128-bit product of `a` and `b`, adds it to a 129-bit
accumulator and stores the result. It accepts one new operand pair every
cycle.

Most of the logic is in the multiplier. It is a tree of carry-save adders,
also called a Wallace tree, rather than a chain of carry-propagate adders.
The partial products are added many at a time with no carry rippling along
the word. Only one carry-propagate addition is made at the very end.

## Datapath

```
   a[63:0]   b[63:0]
      |         |
  +---v---------v---+
  |  wallace_mult64 |   four 32x32 Wallace multipliers + two adders
  +--------+--------+
           | prod[127:0]
  +--------v--------+
  |    mac_adder    |<----------+     prod + accumulator  (129-bit result)
  +--------+--------+           |
           | [128:0]            |
  +--------v--------+           |
  |   accumulator   |-----------+     129-bit register, synchronous clear
  +--------+--------+
           |
   p = acc[127:0], p_carry = acc[128]
```

The multiplier and both adders are combinational. The accumulator is the
only register in the design.

## The 64x64 multiplier: four 32x32 products

`wallace_mult64` splits each operand into a high and a low 32-bit half, so
that a = {aH, aL} and b = {bH, bL}. Then:

    a*b = (aH*bH << 64) + ((aH*bL + aL*bH) << 32) + aL*bL

Each of the four 32x32 products comes from its own `modified_wallace`
instance (`mw321` to `mw324`). The products are combined with two adders:

- `aH*bH` covers bits 127:64 and `aL*bL` covers bits 63:0. They do not
  overlap, so they are simply concatenated, with no adder.
- Adder 1 forms the cross sum `aH*bL + aL*bH`. This sum is 65 bits wide,
  because it can carry out of bit 63.
- Adder 2 adds the cross sum, shifted left 32 places, to the concatenation.

The carry out of the cross sum must be kept. If it is dropped, small
operands still multiply correctly, but operands with large high halves do
not.

## Inside a 32x32 Wallace multiplier

`modified_wallace` has three stages:

1. **Partial-product generation** (`pp_gen`). This is an AND array. Row `i`
   is `a` when `b[i]` is 1 and zero otherwise, shifted left `i` places into
   a 64-bit field. The 32 rows add up to `a*b`.
2. **Multi-operand addition** (`csa_tree`). The rows are grouped in threes.
   Each group goes into a 3:2 compressor (`csa_row`): one full adder per bit
   position. A compressor turns three rows into a sum row and a carry row
   that is shifted up one place. The one or two rows left over from the
   grouping pass straight through. A level of `n` rows therefore leaves
   `2*(n/3) + n%3` rows. For 32 operands the row counts go

       32 -> 22 -> 15 -> 10 -> 7 -> 5 -> 4 -> 3 -> 2

   That is eight full-adder levels. None of them propagates a carry sideways.
3. **Final addition.** One carry-propagate adder adds the last two rows.

`csa_tree` is generic: `M` operands of `W` bits. It computes the level
structure with constant functions, so it works for any operand count. Its
result is modulo 2^W, so the caller must size `W` to hold the full sum.
Inside a multiplier, 2N bits is always enough.

## Accumulator width, carry bit and wrap-around

A 64x64 product needs 128 bits. The accumulate adder and the register are
one bit wider, 129 bits, so the carry out of the first 128-bit sum is kept.
Output `p` is the low 128 bits and `p_carry` is bit 128.

Once the running sum reaches 2^129 it wraps around modulo 2^129. There is no
overflow flag and no saturation. Two all-ones products are enough to set bit
128, and four are enough to wrap.

## Interface and timing

| port      | dir | width | meaning                                         |
|-----------|-----|-------|-------------------------------------------------|
| `clk`     | in  | 1     | clock, rising edge                              |
| `rst`     | in  | 1     | synchronous, active high: clears the accumulator |
| `a`, `b`  | in  | 64    | unsigned operands                               |
| `p`       | out | 128   | accumulator bits 127:0                          |
| `p_carry` | out | 1     | accumulator bit 128                             |

- On every rising edge with `rst` low, the accumulator loads `acc + a*b`,
  using the `a` and `b` present before that edge. The new sum is on `p`
  right after the edge: one MAC per cycle, with a latency of one edge.
- There is no enable input. To hold the sum, drive `a` or `b` to zero.
- To start a new sum, assert `rst` for one edge. On that edge the operands
  are ignored.

The only parameter on the top is `W` (default 64). The multiplier splits it
into halves, so `W` must be even.

## How it relates to the original description

These parts follow the published description:

- the MAC structure: multiplier, then adder, then accumulator register, with
  the register fed back to the adder
- the port names and widths (`a`, `b`, `clk`, `rst`, `p[127:0]`)
- the 128-bit product and the 129-bit adder output and accumulator
- building the 64-bit multiplier from four 32x32 Wallace multipliers and
  combining adders
- the split of each multiplier into partial-product generation and
  multi-operand carry-save addition

One passage of the description gives 126 bits for the product and 127 bits
for the adder output. Its block diagram gives 128 and 129. A 64x64 product
needs 128 bits, so this RTL uses 128 and 129.

These are this design's own choices, because the description does not give
them:

- the gate-level inside of the 32x32 multiplier: an AND array, with no Booth
  recoding, and Wallace grouping of whole rows
- which combining adder adds which partial product
- the reset style and polarity
- treating the operands as unsigned
- the extra `p_carry` output
- having no pipeline registers

The published results are a 215 MHz clock and 155.5 mW, on an FPGA. They
are implementation results and this RTL does not reproduce them. The design
has a single register stage, so the clock period covers the whole multiplier
and the accumulate adder. Pipeline registers between the multiplier and the
adder would raise the clock rate at the cost of one cycle of latency.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against values worked out separately: the `*` operator on zero-extended
operands, plain loop sums, or a limb-wise reference adder. Each ends by
printing `TB_RESULT checks=N failures=M`.

| testbench             | what it covers                                                                      |
|-----------------------|-------------------------------------------------------------------------------------|
| `tb_csa_row`          | 3:2 row compressor: all 4-bit row triples, random 64-bit rows                       |
| `tb_csa_tree`         | 32x64 and 7x12 trees, random and corner operand sets                                |
| `tb_pp_gen`           | every row, and the row sum against `a*b`                                            |
| `tb_modified_wallace` | 32x32 products: corners, single bits, random                                        |
| `tb_wallace_mult64`   | 64x64 products, including operands that make the cross sum carry                    |
| `tb_mac_adder`        | 129-bit sums, carry into bit 128, wrap-around                                       |
| `tb_accumulator`      | load, hold between edges, synchronous clear                                         |
| `tb_mac64bit`         | whole MAC at full size, checked every cycle: carry into bit 128, wrap-around, reset during a run |

For example, to simulate the whole MAC with Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl +libext+.sv \
          --top-module tb_mac64bit tb/tb_mac64bit.sv
./obj_dir/Vtb_mac64bit
```

Swap in another testbench name to run the other tests. `tb_mac64bit` also
prints how often each event happened. It counts a failure for any event that
never happened.
