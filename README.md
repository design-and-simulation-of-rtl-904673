# 16x16 Vedic multiplier (Urdhva Tiryakbhyam)

A combinational unsigned 16-bit x 16-bit -> 32-bit multiplier built by the
Urdhva Tiryakbhyam rule of Vedic arithmetic, "vertically and crosswise". The
rule is ordinary long multiplication with one change: it does not form one
shifted row per multiplier bit and add them one after another. It splits each
operand into a high and a low half and forms all four half-products at once:
the two *vertical* ones (low x low, high x high) and the two *crosswise* ones
(high x low, low x high). A narrow adder tree then sums them. Applied
recursively, 16x16 breaks into 8x8 blocks, those into 4x4 blocks, and those
into 2x2 blocks. All 64 2x2 products are formed in parallel, and only the
adders of the four levels follow one after another.

The RTL follows a published architecture for this multiplier: a 2x2 leaf of
four AND gates and two half adders, 4x4 and 8x8 stages that each use four
blocks of the size below plus three ripple-carry adders, and a 16x16 stage
of four 8x8 blocks whose rows are summed by a 16-bit carry look-ahead adder.
Where that description leaves a detail open, the choice made here is stated
below and in each file's opening comment.

## Hierarchy

```
vedic_16x16            a[15:0] x b[15:0] -> p[31:0]      (top)
 |- 4 x vedic_8x8      byte products
 |   |- 4 x vedic_4x4  nibble products
 |   |   |- 4 x vedic_2x2   4 ANDs + 2 x half_adder
 |   |   '- 3 x rc_adder #(4)
 |   '- 3 x rc_adder #(8)
 '- 3 x pp_adder #(16)  -> cla_adder (default) or rc_adder
```

| file | what it is |
|---|---|
| `rtl/vedic_pkg.sv` | `adder_kind_e`: `ADDER_RIPPLE`, `ADDER_CLA` |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit cells |
| `rtl/rc_adder.sv` | `WIDTH`-bit ripple-carry adder (default 8) |
| `rtl/cla_adder.sv` | `WIDTH`-bit two-level carry look-ahead adder (default 16) |
| `rtl/pp_adder.sv` | picks `cla_adder` or `rc_adder` from `ADDER` |
| `rtl/vedic_2x2.sv` ... `rtl/vedic_16x16.sv` | the four multiplier levels |

## The 2x2 leaf

With `a = a1 a0`, `b = b1 b0`:

```
s0     = a0 b0                  vertical
c1 s1  = a1 b0 + a0 b1          crosswise, half adder 1
c2 s2  = c1 + a1 b1             vertical,  half adder 2
p      = c2 s2 s1 s0
```

This is four AND gates and two half adders. It is the same circuit as a 2x2
array multiplier, so the method gains nothing at this size. Its value comes
from the recursion above it.

## How a stage combines its four sub-products

Every stage above the leaf works the same way. With N-bit operands split into
halves of n = N/2 bits, `a = AH:AL` and `b = BH:BL`, the four sub-multipliers
give N-bit products:

```
q0 = AL*BL   q1 = AH*BL   q2 = AL*BH   q3 = AH*BH
p  = q3 << N  +  (q1 + q2) << n  +  q0
```

The low n bits of `q0` are already final. The rest is summed by three N-bit
adders:

```
adder 1:  {c1, m1} = q1 + q2
adder 2:  {c2, m2} = m1 + (q0 >> n)
          p[n-1:0]    = q0[n-1:0]
          p[N-1:n]    = m2[n-1:0]
adder 3:  p[2N-1:N]   = q3 + {c1 | c2, m2[N-1:n]}
```

Both middle carries, `c1` and `c2`, belong to bit N of the product. They
cannot both be 1. The middle sum is at most

```
q1 + q2 + (q0 >> n) <= 2(2^n - 1)^2 + (2^n - 1) = (2^n - 1)(2^(n+1) - 1) < 2^(N+1)
```

so it fits in N+1 bits, and an OR gate can merge the two carries in place of
an adder. Adder 3 never carries out, because the product fits in 2N bits. That
carry-out is left unconnected (`top_carry_unused`). The operand of adder 3 is
zero above bit n, so in hardware its upper bits reduce to a half-adder chain.
The original architecture mentions this OR gate and these half adders. The
exact order of the three additions shown here is this design's choice.

The testbench of the top checks the first claim rather than trusting it. For
every operand pair it works out `c1` and `c2` independently, and it reports a
failure if both are ever set.

## Adders and the `ADDER` parameter

The original architecture is not consistent about the 16x16 stage. Its
description of the stage sums the partial-product rows with a 16-bit carry
look-ahead adder. Its account of the synthesized netlist lists three
ripple-carry adders instead. The top therefore has a parameter:

| `ADDER` | adders of the 16x16 stage |
|---|---|
| `vedic_pkg::ADDER_CLA` (default) | `cla_adder`: 4-bit groups, bit and group generate/propagate, carries at both levels as flat sums of products |
| `vedic_pkg::ADDER_RIPPLE` | `rc_adder`: chain of full adders |

The 4x4 and 8x8 stages always use ripple-carry adders, as specified. The
internal structure of the look-ahead adder (group size four, two levels) is
this design's choice, since the source names the adder but does not draw it.
Both settings give the same products. They differ only in the carry path.

## Interface and timing

```
module vedic_16x16 #(parameter vedic_pkg::adder_kind_e ADDER = ADDER_CLA)
  (input logic [15:0] a, input logic [15:0] b, output logic [31:0] p);
```

Operands and product are unsigned. The block has no clock, no reset and no
handshake: `p` follows `a` and `b` after the combinational delay. Register the
inputs and outputs outside if it is used in a pipeline. Every sub-block has
the same `a`, `b`, `p` interface at its own width.

The published implementation reports a Spartan-3 FPGA (vq100 package, speed
grade -4) with a 16 ns delay and 0.18 mW for the 16x16 multiplier. Its
summary also quotes 6.216 ns, 0.027 mW and 203 logic elements. Those numbers
belong to that tool flow and device, and no testbench here measures them.

## Verification

Each block has a self-checking testbench in `tb/` that compares against the
simulator's own `+` and `*`:

| testbench | coverage |
|---|---|
| `tb_half_adder` | all 4 input pairs |
| `tb_rc_adder` | 8-bit: all 2^17 operand/carry-in combinations; 4-bit: all 2^9 |
| `tb_cla_adder` | 16-bit: directed carry-chain patterns plus 100k random; 8-bit: exhaustive |
| `tb_vedic_2x2`, `tb_vedic_4x4`, `tb_vedic_8x8` | exhaustive |
| `tb_vedic_16x16` | look-ahead and ripple builds side by side on the worked example, 144 corner pairs, all 256 single-bit pairs and 200k random pairs. It counts pairs that set `c1`, set `c2`, set neither or set both; each of the first three must occur and the last must not |
| `tb_vedic_16x16_full` | top with no parameter override: the worked example, all 65,536 pairs of byte-repeated operands (k x 257) and 100k random pairs |

The worked example is 61680 x 3855 (`1111000011110000` x `0000111100001111`)
= 237776400. Each testbench prints `TB_RESULT checks=N failures=M`. A watchdog
ends the run with a failure if it hangs.

Each testbench runs in about a second or less. The design is
combinational, so there is no latency in cycles to check. Each check waits
1 ns after applying operands.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vedic_pkg.sv \
    tb/tb_vedic_16x16.sv --top-module tb_vedic_16x16 -Mdir obj
./obj/Vtb_vedic_16x16
```

Replace the testbench name to run any other test. `vedic_pkg.sv` must come
first on the command line, because the top and `pp_adder` import it. Lint a
module on its own with
`verilator --lint-only -Wall -Irtl rtl/vedic_pkg.sv rtl/<module>.sv`.

## Changing it

- **Adder type at the top**: set `ADDER`.
- **Adders of the lower stages**: the 4x4 and 8x8 stages instantiate
  `rc_adder` directly. To use look-ahead adders there, swap in `pp_adder`
  (`cla_adder` needs a width that is a multiple of 4).
- **Wider multipliers**: a 32x32 stage is `vedic_16x16` one level up. It needs
  four 16x16 blocks, three 32-bit adders and the same OR merge. The
  carry-exclusivity bound above holds for every N.
- **Signed operands** are not supported. Use the usual sign-magnitude or
  Baugh-Wooley wrapping outside the block.

## Where this design departs from or adds to the source

- Operands are unsigned. The source does not discuss sign, but its example is
  an unsigned product.
- The order of the three additions in each stage is this design's choice. So
  is the proof that lets one OR gate merge the middle carries.
- The 16x16 stage uses 16-bit adders. The source's netlist description gives
  an 8-bit (`rc_adder_8`, "7-bit") ripple-carry adder there, which is too
  narrow for 16-bit rows. The source's description of the stage calls for a
  16-bit look-ahead adder, which is what is built by default.
- The binary product string printed with the source's example does not match
  its decimal value. The decimal 237776400 (= 61680 x 3855) is used as the
  reference.
- Adders carry a `cin` port, tied to 0 inside the multipliers.
