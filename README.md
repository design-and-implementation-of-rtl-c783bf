# Recursive adaptive Karatsuba multiplier, 16 x 16 bits

This is a combinational unsigned multiplier, `p = a * b`, with 16-bit operands and a
32-bit product. It is built on Karatsuba's identity: three half-width multiplications
replace the four that schoolbook multiplication needs. The identity is applied again
inside each of the three, so a 16-bit product breaks down into 8-bit, then 4-bit,
then 2-bit products. The 2-bit products come from a small AND/half-adder multiplier.
Every addition and subtraction in the tree is a carry look-ahead adder (CLA).

## The Karatsuba step

Split an N-bit operand into halves of H = N/2 bits: `a = XH*2^H + XL`,
`b = YH*2^H + YL`. Then

    a*b = XH*YH * 2^N  +  (XH*YL + XL*YH) * 2^H  +  XL*YL
    XH*YL + XL*YH = (XH+XL)(YH+YL) - XH*YH - XL*YL

so one stage (`karatsuba_stage`) forms three products:

| product | operands | made by |
|---|---|---|
| `hi = XH*YH` | H bits | an H-bit `karatsuba_stage` |
| `lo = XL*YL` | H bits | an H-bit `karatsuba_stage` |
| `sp = (XH+XL)(YH+YL)` | H+1 bits | the adaptive third-term path (next section) |

The cross term `mid = sp - hi - lo` comes from two subtractions on (N+2)-bit CLAs.
Each subtraction adds the inverted subtrahend with a carry in of 1. The middle term
is never negative and fits in N+1 bits.

Assembling the product needs only one more adder. Because `lo < 2^N`, the terms
`hi*2^N + lo` are simply the concatenation `{hi, lo}`. `mid*2^H` does not touch the
low H bits. So:

    p[H-1:0]   = lo[H-1:0]
    p[2N-1:H]  = {hi, lo[N-1:H]} + mid        (one 3H-bit CLA)

An immediate assertion in each stage checks three things: neither subtraction
borrows, `mid` fits in N+1 bits, and the final sum does not carry out. Any of these
would mean an arithmetic error.

The stage instantiates itself with `N/2` until N = 2, where `mult2x2` takes over. N
must be a power of two of at least 2. Any other value stops elaboration with an
error.

## The third product and its carry bits

This is the part that needs the most care. The half sums `XH+XL` and `YH+YL` are
H+1 bits wide, not H. Multiplying them with an (H+1)-bit Karatsuba stage would
break the power-of-two halving. The recursion would then no longer end cleanly at
2 bits. Instead the top (carry) bit of each half sum is split off:
`sx = a1*2^H + a0`, `sy = b1*2^H + b0`, with a1, b1 single bits. Then

    sx*sy = a0*b0 + ((a1 ? b0 : 0) + (b1 ? a0 : 0)) * 2^H + (a1 & b1) * 2^(2H)

- `a0*b0` is an ordinary H-bit product, made by a third H-bit `karatsuba_stage`
  (`u_ls`) inside the enclosing stage.
- `karatsuba_adaptive_mult` does the rest:
  - it gates `b0` with `a1` and `a0` with `b1` (AND gates, no multiplier);
  - it adds the two gated words on an H-bit CLA;
  - it adds that (H+1)-bit correction to the upper half of `a0*b0`, with `a1 & b1`
    as bit 2H, on an (H+1)-bit CLA.

The carry bits therefore cost two adders and a row of AND gates at each level. The
multiplier recursion never has to handle an odd width.

The third product is not made inside `karatsuba_adaptive_mult`. The enclosing stage
makes it and passes it in as port `q`. That keeps `karatsuba_stage` the only
recursive module, because Verilator supports a module that instantiates itself but
not two modules that instantiate each other.

## Adders

`cla_adder #(W)` cuts its word into groups of 4 bits. The last group is narrower
when W is not a multiple of 4. Each group (`cla_group`) works out every internal
carry and its carry out as a flat sum of products of the bit generate/propagate
signals and the group's carry in:

    c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]...p[0]cin

The group carries then ripple from group to group. This is the classic block CLA.
The group size is `karatsuba_pkg::CLA_GROUP`.

## Hierarchy of the 16-bit multiplier

```
karatsuba_top (N=16)
 └ karatsuba_stage N=16
    ├ cla_adder W=8  x2            half sums
    ├ karatsuba_stage N=8  x3      hi, lo, low bits of the half sums
    │   └ ... N=4 x3 ... N=2 = mult2x2     (27 mult2x2 in total)
    ├ karatsuba_adaptive_mult M=8  carry-bit terms of the third product
    ├ cla_adder W=18 x2            mid = sp - hi - lo
    └ cla_adder W=24               final sum
```

`karatsuba_pkg` holds the shared constants: the CLA group size, the 2-bit recursion
base and the width check.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | N (16) | unsigned multiplicand |
| `b` | in | N (16) | unsigned multiplier |
| `p` | out | 2N (32) | unsigned product |

There is no clock, reset or handshake. The product is valid one combinational delay
after the operands settle. If you need input or output registers, or a pipeline,
add them around `karatsuba_top`. The testbenches apply operands at one clock edge
and check the product at the next.

## What is taken from the method and what is chosen here

Taken from the method:
- unsigned operands;
- 16-bit width;
- halving recursion down to a 2-bit base multiplier;
- three products per stage, with the middle term from two subtractions;
- special treatment of the third product at every stage;
- carry look-ahead adders throughout;
- a base multiplier of AND partial products and half adders.

Choices made in this design:
- **No registers.** The multiplier is purely combinational.
- **Carry-bit gating.** The third product is read as the gating scheme described
  above. The method calls for an adaptive third term but does not spell out its
  circuit.
- **Product assembly.** The concatenation plus one 3H-bit adder is this design's
  own way of combining the three terms.
- **CLA organisation.** The adders use 4-bit groups with rippling group carries.
  No CLA structure is prescribed beyond "carry look-ahead".
- **No reversible gates.** Reversible logic is mentioned as an optimisation, but no
  gates or placement are given. The design therefore uses ordinary gates. The
  function is the same.

The method reports FPGA figures (about 195 LUTs and 3.45 mW with CLAs, against 208
LUTs and 3.68 mW with square-root carry-select adders). Those numbers cannot be
reproduced from this RTL without the original tool flow, so no area or power claim
is made for it.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the outputs
with integer arithmetic computed in the testbench and prints
`TB_RESULT checks=N failures=M`.

| testbench | coverage |
|---|---|
| `tb_cla_group` | all 512 inputs of a 4-bit group and all inputs of a 3-bit group |
| `tb_cla_adder` | full-length carry chains and 20,000 random sums, at 16 bits and at 10 bits (partial last group) |
| `tb_mult2x2` | all 16 operand pairs |
| `tb_karatsuba_adaptive_mult` | all 1,024 pairs at M = 4, random pairs at M = 8, each carry-bit combination |
| `tb_karatsuba_stage` | every pair at N = 4 and N = 8, corner cases and random pairs at N = 16 |
| `tb_karatsuba_top` | see below |

`tb_karatsuba_top` is the end-to-end test at the default 16 bits. It runs:
- the worked example 1010 x 101 = 110010;
- operand extremes (0, 1, 0xFFFF, 0x8000);
- 200,000 random pairs.

It also counts how often each of the four carry-bit combinations of the half sums
occurs, both at the 16-bit stage and at the 8-bit stage below it. It fails if any
combination is missing. It takes under a second.

To run one with plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/karatsuba_pkg.sv \
        tb/tb_karatsuba_top.sv --top-module tb_karatsuba_top
    ./obj_dir/Vtb_karatsuba_top

## Changing it

- **Width:** set `N` on `karatsuba_top` to any power of two of at least 2. Every
  internal width follows from N.
- **CLA group size:** change `CLA_GROUP` in `karatsuba_pkg`.

## Known lint message

If `karatsuba_stage` is linted as the top of its own hierarchy, Verilator reports
its nets `hi`, `lo` and `ls` as undriven. The linter does not follow the module's
self-instantiation in that case. Under any parent, such as `karatsuba_top` or a
testbench, the nets are driven, the message does not appear, and the exhaustive
tests pass.
