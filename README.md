# 16x16 Vedic multiplier with a modified carry select adder

This is a combinational 16x16-bit unsigned multiplier. It is built on the
*Urdhva-Tiryakbhyam* ("vertically and crosswise") rule of Vedic arithmetic.
Split each operand into a high half and a low half. Then the four products
of the halves, aL*bL, aH*bL, aL*bH and aH*bH, can all be formed at once. A
few adders combine them into the full product. The same split is applied
recursively: 16x16 is built from 8x8, 8x8 from 4x4, 4x4 from 2x2. At the
2x2 level the rule becomes a handful of AND gates and two half adders.

The 8x8 and 16x16 levels combine their partial products with a *modified
carry select adder* (CSLA). A conventional CSLA computes the sum twice, once
for each possible input carry, and then picks one. The modified CSLA never
forms a complete sum for either case. It computes only the two candidate
carry words, picks one of them with the real input carry, and then forms
the sum once with a row of XOR gates.

There is no clock, register or handshake anywhere. The product is valid one
combinational propagation delay after the operands settle. The source
reports a total delay of about 15 ns for the 16x16 multiplier after place
and route in a standard-cell flow. The RTL here carries no timing of its
own: that figure depends on the library and the flow, and it was not
reproduced.

## Hierarchy

```
vedic_mul16                      p[31:0] = a[15:0] * b[15:0]
├── 4 x vedic_mul8               8x8 -> 16
│   ├── 4 x vedic_mul4           4x4 -> 8
│   │   ├── 4 x vedic_mul2       2x2 -> 4  (4 AND gates, 2 x half_adder)
│   │   └── 3 x rca #(W=4)       ripple carry adder (full_adder chain)
│   └── 3 x mcsla #(N=8)
└── 3 x mcsla #(N=16)            modified CSLA:
        csla_hsg   half-sum / half-carry words
        csla_cg0   carry word assuming cin = 0
        csla_cg1   carry word assuming cin = 1
        csla_cs    carry selection (AND-OR per bit)
        csla_fsg   final sum (XOR per bit)
```

Every file in `rtl/` holds one module of the same name. `vedic_mul16` is the
top.

## The 2x2 cell

For a = a1a0 and b = b1b0:

```
p0      = a0 b0                 vertical, low bits
c1 p1   = a1 b0 + a0 b1         crosswise, half adder
p3 p2   = c1 + a1 b1            vertical, high bits, half adder
```

## Combining four sub-products (the part to read carefully)

Take one level of width W with halves of width H = W/2. The sub-products
are q0 = aL*bL, q1 = aH*bL, q2 = aL*bH and q3 = aH*bH, each W bits wide.
Three W-bit adders combine them. Every adder has its input carry tied to 0.

```
ADD1: sum1, ca1 = q1 + q2
ADD2: sum2, ca2 = sum1 + {H zeros, q0[W-1:H]}
ADD3: sum3, ca3 = q3 + {H-1 zeros, ca1|ca2, sum2[W-1:H]}

p = {sum3, sum2[H-1:0], q0[H-1:0]}
```

The low H bits of q0 pass straight through. ADD1 adds the two crosswise
products. ADD2 adds the high half of q0 to that sum. ADD2's low half is the
next slice of the product. Its high half, together with the overflow,
goes into ADD3, which adds it to q3.

**Carry fix (a departure from the source block diagrams).** The reference
block diagrams feed only ca1, the carry of ADD1, into ADD3, and leave ca2
unconnected. That is wrong whenever ADD2 overflows and ADD1 does not. The
product then comes out 2^W too small. For example, in the 8x8 multiplier
this happens for 524 of the 65536 operand pairs. This design feeds
`ca1 | ca2` into that bit instead.

The OR is exact, because both carries can never be 1 at once:
q1 + q2 + q0[W-1:H] < 2^(W+1). The final carry ca3 is always 0, because a
WxW product fits in 2W bits. Both facts are checked by immediate assertions
in `vedic_mul4`, `vedic_mul8` and `vedic_mul16`. The source gives the
16x16 output as a 33-bit value, a carry plus 32 sum bits. Here the port is
the 32-bit product, and the always-zero carry stays internal.

The 4x4 level uses three 4-bit ripple carry adders (`rca`). The 8x8 and
16x16 levels use the modified CSLA (`mcsla`) at N = 8 and N = 16.

## Modified carry select adder (`mcsla`)

`{cout, s} = a + b + cin` for N-bit operands, default N = 16.

| unit | equation | gates |
|------|----------|-------|
| HSG | s0(i) = a(i) ^ b(i), c0(i) = a(i) & b(i) | N XOR, N AND |
| CG0 | c1_0(0) = c0(0); c1_0(i) = c0(i) \| s0(i) & c1_0(i-1) | ripple AND-OR |
| CG1 | c1_1(0) = c0(0) \| s0(0); c1_1(i) = c0(i) \| s0(i) & c1_1(i-1) | ripple AND-OR |
| CS | c(i) = c1_0(i) \| cin & c1_1(i) | N AND-OR |
| FSG | s(0) = s0(0) ^ cin; s(i) = s0(i) ^ c(i-1) | N XOR |

`cout = c(N-1)`.

A carry that is generated when cin = 0 is also generated when cin = 1, so
c1_0(i) = 1 implies c1_1(i) = 1. That is why the 2:1 multiplexer of a
normal carry select reduces to one AND-OR gate per bit in the CS unit. An
assertion in `csla_cs` checks the implication.

Inside the multiplier every `cin` is 0. Synthesis will therefore fold CG1
and the CS unit away there. The adder is kept general so that it can also
be used and tested on its own, with either input carry.

CG0 does not need s0(0), so lint reports that bit as unused. This is
expected.

## Where this design departs from its source, or fills gaps

- **ca2 feeds ADD3 through an OR with ca1.** See above. With the wiring
  exactly as drawn, products are wrong.
- **Only the chained adder arrangement is built.** The source also sketches
  another 8x8 adder tree: {q3,0000} + {0000,q2} and q1 + {0000,q0[7:4]},
  followed by a final adder. That arrangement is not built. The chained
  arrangement is the one the text and the other diagrams describe.
- **Operands are unsigned.** The source does not discuss signed numbers.
- **Fixed widths.** The source describes its 2x2, 4x4, 8x8 and 16x16
  blocks separately, so they are separate modules, not one recursive
  parameterised module. Only the adders (`rca`, `mcsla` and its units) take
  a width parameter.
- **Internals are standard.** The insides of the half adder, full adder and
  ripple carry adder are the textbook ones. The source only names them.
- **Not included.** The BEC-based CSLA and the conventional CSLA appear in
  the source only as comparison baselines.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares against integer arithmetic done in the testbench. Helper reference
functions for the adder units are in `tb/tb_ref_pkg.sv`. Every testbench
prints `TB_RESULT checks=N failures=M` and has a time-out watchdog.

| testbench | coverage |
|-----------|----------|
| tb_half_adder, tb_vedic_mul2, tb_rca, tb_vedic_mul4 | exhaustive |
| tb_csla_* | 2000 random and corner vectors each, at N = 16 |
| tb_mcsla | 20000 vectors at N = 8, 16 and 32, with both input carries and the full-propagate corner |
| tb_vedic_mul8 | all 65536 operand pairs, plus 29 x 207 = 6003 and 35 x 10 = 350 |
| tb_vedic_mul16 | end-to-end test at default size: corners, 252 x 846 = 213192, 256 squares, 300000 random pairs |

The multiplier testbenches count each case of the carry combination, and
fail if a case never occurs:
- ca1 set;
- ca2 set;
- ca2 set without ca1, which is the case the carry fix exists for.

`tb_vedic_mul16` counts these cases at the 16-bit level and inside one 8x8
and one 4x4 sub-multiplier. `tb_mcsla` counts how often cin = 1 changed the
selected carry word, and how often a carry left the top bit.

Each testbench was also run against a copy of its module with one
deliberate bug. Examples are the wiring exactly as drawn in the source
diagrams, or the input carry ignored in CS or FSG. Every such copy made its
testbench fail.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    tb/tb_ref_pkg.sv tb/tb_vedic_mul16.sv --top-module tb_vedic_mul16 -Mdir obj
./obj/Vtb_vedic_mul16
```

Replace `vedic_mul16` with any other module name to run its testbench. The
full 16x16 run takes under a second of simulation. The testbenches read
internal carries of the multipliers (`dut.ca1`, `dut.ca2`) by hierarchical
name. If you rename those signals, update the testbenches too.

To use the multiplier, instantiate `vedic_mul16` and drive `a` and `b`.
`p` is their 32-bit product. For an 8x8 multiplier, use `vedic_mul8`. For a
stand-alone adder of any width N >= 2, use `mcsla #(.N(N))`.
