# Reversible 8x8 Urdhva Tiryakbhayam multiplier

This is an unsigned 8-bit x 8-bit combinational multiplier. It is organised by
the Vedic "Urdhva Tiryakbhayam" (vertical and crosswise) rule, and its
arithmetic is mapped onto reversible logic gates (Peres, Feynman and HNG).

Vertical and crosswise multiplication forms all partial products at the same
time: the vertical products of the digits in the same column and the crosswise
products of digits from different columns. It then adds them in one pass. In
binary the rule is applied recursively. A 2x2 multiplier is four ANDs and two
half adders. Four 2x2 multipliers and three adders make a 4x4. Four 4x4
multipliers and a few adders make the 8x8.

The reversible gates all compute bijective functions. Each gate has as many
outputs as inputs. The outputs a circuit does not use are called *garbage
outputs*, and inputs tied to a constant are *constant inputs*. Reversible
designs are compared by gate count, quantum cost, garbage outputs and constant
inputs. The RTL keeps the gate structure visible, but it is ordinary
synthesizable SystemVerilog. Synthesised for an FPGA or an ASIC, it becomes
normal irreversible logic.

## Interface and timing

```
module ut_mul8x8 #(parameter ut_pkg::adder_kind_e ADDER = ut_pkg::ADDER_RCA) (
  input  logic [7:0]  a,   // multiplicand A7..A0
  input  logic [7:0]  b,   // multiplier   B7..B0
  output logic [15:0] p);  // product      P15..P0 = a * b
```

The multiplier has no clock, reset, register or handshake. `p` is valid one
combinational propagation delay after `a` or `b` changes. If the multiplier
sits in a clocked design, register its inputs and outputs as the timing
requires. The operands are unsigned. For signed operands, use a
sign-magnitude wrapper or a different multiplier.

`ADDER` picks how every multi-bit adder inside the tree is built:

| value       | adder                                                        |
|-------------|--------------------------------------------------------------|
| `ADDER_RCA` | reversible ripple carry adder: a Peres half adder in bit 0, then HNG full adders (default) |
| `ADDER_CLA` | flat carry lookahead adder (generate/propagate, two-level carries) |

Both settings give the same products. Only structure and delay change.

## The reversible gates

| gate (module)  | inputs | outputs                                             | quantum cost | use here |
|----------------|--------|-----------------------------------------------------|--------------|----------|
| Feynman (`feynman_gate`) | a, b       | p = a, q = a ^ b                          | 1 | copy / XOR |
| Peres (`peres_gate`)     | a, b, c    | p = a, q = a ^ b, r = ab ^ c              | 4 | AND (c = 0), half adder (c = 0: q sum, r carry), AND-XOR |
| HNG (`hng_gate`)         | a, b, c, d | p = a, q = b, r = a ^ b ^ c, s = (a ^ b)c ^ ab ^ d | 6 | full adder (d = 0: r sum, s carry) |

Each testbench checks both the equations and that the mapping is a
permutation.

## 2x2 multiplier (`ut_mul2x2`)

The product bits of a 2x2 multiplication are:

```
p0 = a0 b0
p1 = a1 b0 ^ a0 b1
p2 = a1 b1 ^ (a1 b0 a0 b1)    // = a1 b1 & ~(a0 b0)
p3 = a1 b1 a0 b1 a1 b0        // = a1 b1 & a0 b0
```

Written with gates, these are four ANDs and two half adders. The target budget
for the reversible version is five Peres gates and one Feynman gate. That gives
a quantum cost of 5*4 + 1 = 21 with four constant inputs. This wiring meets the
budget:

```
PG1 (a0,   b0, 0)     r = a0 b0            = p0
PG2 (a1,   b1, 0)     r = a1 b1
PG3 (a1,   b0, 0)     r = a1 b0
PG4 (a0,   b1, a1b0)  r = a0 b1 ^ a1 b0    = p1
PG5 (a1b1, p0, 0)     p = a1 b1, r = a1 b1 a0 b0 = p3
FG  (p3, a1b1)        q = p3 ^ a1 b1       = p2
```

The wiring relies on the identity a1 b0 a0 b1 = a1 b1 a0 b0. It lets the high
column reuse p0 instead of the crosswise carry.

Fan-out of the primary inputs is plain wiring. No Feynman copies are spent on
it, which follows the usual convention for this circuit. The wiring leaves ten
garbage outputs. Published counts for this circuit give eleven, so the wiring
is not necessarily the published one.

## 4x4 multiplier (`ut_mul4x4`)

The operands are split into 2-bit halves. Four 2x2 multipliers form:

```
q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH
```

Three 4-bit adders, none with a carry in, then sum them:

```
add1: q1 + q2              -> s1, ca1
add2: s1 + {00, q0[3:2]}   -> s2, ca2
add3: q3 + {0, ca1^ca2, s2[3:2]}  -> p[7:4]
p[1:0] = q0[1:0]   p[3:2] = s2[1:0]
```

The subtle point is the carries. ca1 and ca2 both have weight 2^6, and either
one can be set. For example, 15 x 11 sets ca2 but not ca1, so both must enter
add3. They are never both 1: if ca1 = 1 then s1 <= 2, so add2 cannot overflow.
One Feynman gate (XOR) therefore merges them exactly. add3 never carries out,
because a 4x4 product fits in 8 bits.

## 8x8 multiplier (`ut_mul8x8`)

The operands are split into nibbles. Four 4x4 multipliers form m0 = aL*bL,
m1 = aH*bL, m2 = aL*bH and m3 = aH*bH. The rest of the tree is:

```
P3..P0    = m0[3:0]
add1      : m1 + m2                    -> s1, c1      (8-bit adder)
add2      : s1 + {m3[3:0], m0[7:4]}    -> P11..P4, c2 (8-bit adder)
carry_merge        : cnt = c1 + c2     (2-bit count, one Peres gate)
half_adder_assembly: P15..P12 = m3[7:4] + cnt
```

Here the two carries *can* both be 1. This happens for 248 of the 65536
operand pairs, for example 111 x 222. An OR of the two carries would then give
a product 4096 too small. `carry_merge` therefore counts them: `cnt[0] = c1 ^ c2`
and `cnt[1] = c1 & c2`. `cnt` is never 3.

`half_adder_assembly` is a chain of Peres half adders. Bit 0 adds `cnt[0]`.
Bit 1 has to add `cnt[1]` and the carry from bit 0. Those two signals are never
1 together, so a Feynman gate merges them and a half adder is still enough. The
carry out of P15 is always 0 and is dropped.

## Adders (`rev_rca`, `cla_adder`, `ut_adder`)

`rev_rca` is the reversible ripple carry adder. Every adder in the tree starts
from a carry of 0, so bit 0 needs only a half adder, which is a Peres gate. The
other bits are HNG full adders. A 4-bit adder therefore costs one Peres gate
and three HNG gates.

`cla_adder` computes every carry directly as
`c[i+1] = g[i] | t[i]g[i-1] | t[i]t[i-1]g[i-2] | ...`,
where `g = a & b` and `t = a ^ b`. `ut_adder` is a thin wrapper that selects one
of the two adders from `ADDER`.

## Where this design departs from the reference design

The design follows a published block diagram of the 2x2, 4x4 and 8x8 stages.
It differs from that diagram in the following ways:

- **8x8 carry join.** The published 8x8 diagram joins c1 and c2 with a 2-input
  OR gate. That is wrong whenever both carries are set, so this design counts
  the carries instead (see above).
- **4x4 second carry.** The published 4x4 diagram routes only ca1 into the last
  adder and leaves ca2 unconnected. That gives wrong products, for example
  15 x 11, so here ca2 is XORed in with ca1.
- **Adder style.** The published diagrams label their adders "carry look ahead",
  while the reversible design is described as HNG ripple carry adders. The
  default follows the reversible ripple carry version, and the lookahead one is
  available through `ADDER`.
- **4x4 adder arrangement.** An alternative written description of the 4x4
  stage uses two 4-bit adders and a 5-bit adder. Taken literally, it adds
  partial products of different weights in one adder. The three-adder
  arrangement above is used instead.
- **Gate-level wiring.** The wiring of the 2x2 stage, the carry merge and the
  half adder assembly is this design's own. The gate definitions are the
  standard ones from the reversible-logic literature.

The reference design also reports an FPGA result: 25.1 ns delay and 0.0017 W on
a Spartan-3E xc3s500e, against 42.2 ns and 0.0029 W for a Booth multiplier.
These figures were not reproduced here. The Booth multiplier was only a
comparison baseline and is not included.

## Files

| file | content |
|------|---------|
| `rtl/ut_pkg.sv` | `adder_kind_e` enum |
| `rtl/feynman_gate.sv`, `rtl/peres_gate.sv`, `rtl/hng_gate.sv` | reversible gates |
| `rtl/ut_mul2x2.sv` | 2x2 multiplier, 5 Peres + 1 Feynman |
| `rtl/rev_rca.sv`, `rtl/cla_adder.sv`, `rtl/ut_adder.sv` | adders and selector |
| `rtl/ut_mul4x4.sv` | 4x4 multiplier |
| `rtl/carry_merge.sv`, `rtl/half_adder_assembly.sv` | top-nibble logic of the 8x8 |
| `rtl/ut_mul8x8.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ut_mul8x8_cla` |

The gate modules' pass-through outputs are collected in local `garbage`
vectors. That makes lint report some signals as unused, which is expected in a
reversible netlist.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and calls `$finish`. It
also has a watchdog that fails the run if it hangs. To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/ut_pkg.sv tb/tb_ut_mul8x8.sv \
          --top-module tb_ut_mul8x8
./obj_dir/Vtb_ut_mul8x8
```

Replace the testbench name to run another one. The package has to come first on
the command line.

What the testbenches check:

- **`tb_ut_mul8x8`** runs the top at its default parameters on all 65536
  operand pairs. It counts how often each mechanism of the tree fires: c1, c2,
  both carries together, a 4x4 internal ca2, and the merge inside the half
  adder assembly. A mechanism that never fires counts as a failure.
- **`tb_ut_mul8x8_cla`** does the same with `ADDER_CLA`.
- **`tb_ut_mul4x4`** is exhaustive with both adder styles. It includes the
  textbook example 1101 x 1010 = 130.
- **`tb_rev_rca` and `tb_cla_adder`** are exhaustive at 4, 5 and 8 bits.
- **The gate testbenches** check every input pattern and that each gate is
  reversible.

## Changing the design

- **Wider multipliers.** A 16x16 multiplier follows the same pattern: four
  `ut_mul8x8`, two 16-bit adders, a `carry_merge` and a `half_adder_assembly`
  of `WIDTH` 8.
- **Pipelining.** Register boundaries fit naturally between the partial
  products and the adder tree. The design as given is purely combinational.
