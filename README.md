# 4x4 Vedic multiplier (Urdhva-Tiryakbhyam, vertical and crosswise)

A purely combinational 4-bit × 4-bit unsigned multiplier, built on the
"vertically and crosswise" rule of Vedic arithmetic. Each operand is split into
two 2-bit halves. The four half-by-half products are formed in parallel by 2x2
multipliers. Three 4-bit carry lookahead adders then add them into the 8-bit
product. All partial products exist at once and only a short adder tree follows
them, so the result settles in a small, fixed number of gate levels. There is no
clock, no register and no iteration.

The design was proposed as the multiplier of a multiplier-and-accumulator
(MAC). Only the multiplier is defined, so only the multiplier is given here. There
is no accumulator register.

## The vertical-and-crosswise rule

For one column of the product, multiply the digit pairs that line up vertically or
cross diagonally. Add the results together with the carry from the column to the
right. Keep the low digit and pass the rest on as a carry. In binary, for
A = a1a0 and B = b1b0:

    s0      = a0·b0                (vertical, right)
    {c1,s1} = a1·b0 + a0·b1        (crosswise)
    {c2,s2} = c1 + a1·b1           (vertical, left)
    A·B     = {c2, s2, s1, s0}

That is four AND gates and two half adders (`vedic2x2`).

The 4x4 case applies the same rule with 2-bit "digits". With A = {AH, AL} and
B = {BH, BL}:

    A·B = AL·BL  +  (AH·BL + AL·BH)·4  +  AH·BH·16
          q0         q1      q2             q3

## The adder tree (`vedic_mul4x4`)

```
 q3=AH·BH (v4)   q1=AH·BL (v2)   q2=AL·BH (v3)   q0=AL·BL (v1)
      |                \           /               |   |
      |              c1: m = q1 + q2  --ca1        | q0[3:2]  q0[1:0] -> s[1:0]
      |                      |                     |
      |              c2: n = m + {00, q0[3:2]} --ca2          n[1:0] -> s[3:2]
      |                      |
 c3: {w, s[7:4]} = q3 + {0, ca1|ca2, n[3:2]}
```

- `c1` adds the two crosswise products.
- `c2` adds that sum to the two upper bits of `q0`, which overlap it. Its low two
  bits are product bits 3..2.
- `c3` adds `q3` to the upper half of the middle sum. It produces product bits 7..4.

**The middle carry.** The middle sum `q1 + q2 + q0[3:2]` can reach 16 in two ways.
`c1` overflows when q1 + q2 ≥ 16, which happens only for 15×15. `c2` overflows
when, for example, m = 15 and q0[3:2] = 2, as in 15×11. Both carries have weight
2^6 in the product, which is bit 2 of the word added in `c3`. They are never both
1: if q1 + q2 ≥ 16 then m ≤ 2, and m + 3 < 16. So one OR gate merges them into a
single carry bit. The published block diagram sends only one carry onward, and its
prose places that carry at bit 3 of the word. Either reading gives wrong products. Forwarding only the
first adder's carry turns 15×11 into 101. Placing the carry at bit 3 turns 15×15
into 289, which overflows into `w`. This implementation uses `ca1 | ca2` at bit 2, and the
testbench confirms that the product is exact for all 256 operand pairs.

**`w`.** The carry out of `c3` is brought out as a ninth output, `w`. It is always
0, because 15×15 = 225 fits in 8 bits. It is kept for pin compatibility with the
reference implementation, which has 8 inputs and 9 outputs. An immediate assertion
in `vedic_mul4x4` checks that it stays 0. A second assertion checks that `ca1` and
`ca2` are never both set.

## Carry lookahead adder (`cla_adder`, `partial_full_adder`)

Each bit is a *partial full adder*. It produces the sum bit `s = a ^ b ^ ci`, a
generate `g = a & b` and a propagate `p`. It does not produce a carry out. The
carries come from a separate lookahead block, each in two-level sum-of-products
form:

    c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]…p[1]g[0] | p[i-1]…p[0]·cin

So no carry ripples through the bit cells. The propagate is the inclusive one,
`p = a | b`. With `g` present it gives the same carries as `p = a ^ b`. The width
is a parameter `W`, default 4, the only width the multiplier uses. All three
instances have `cin` tied to 0.

## Modules

| module | function | ports |
|---|---|---|
| `vedic_mul4x4` (top) | 4x4 product | `a[3:0]`, `b[3:0]` in; `s[7:0]`, `w` out |
| `vedic2x2` | 2x2 product | `a[1:0]`, `b[1:0]` in; `p[3:0]` out |
| `cla_adder #(W=4)` | `{cout,sum} = a + b + cin` | `a`, `b`, `cin`; `sum`, `cout` |
| `partial_full_adder` | bit cell of the CLA | `a`, `b`, `ci`; `s`, `p`, `g` |
| `half_adder` | `{carry,sum} = a + b` | `a`, `b`; `sum`, `carry` |

Timing: all outputs are combinational functions of the current inputs, so the
latency is zero clock cycles. The reference FPGA implementation reports a
combinational path of about 6.7 ns on an Artix-7 class device. It compares this
with about 16.3 ns for a Booth multiplier and 32.0 ns for an array multiplier.
Those figures depend on the technology and are not checked here.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a time-based watchdog.

- `tb_half_adder`, `tb_partial_full_adder`, `tb_vedic2x2`, `tb_cla_adder`: these
  try every input combination (4, 8, 16 and 512 cases). They compare against
  integer arithmetic. The partial-full-adder test also checks that `g | p&ci` is
  the full-adder carry.
- `tb_vedic_mul4x4`: first the directed vectors 10×15 = 150, 1×2 = 2, 11×3 = 33,
  2×11 = 22, 4×4 = 16, 15×11 = 165 and 15×15 = 225, with expected values written
  as constants. Then all 256 operand pairs against `a*b`, with `w` required to be 0.
  A reference model of the adder tree counts how often the operands drive each
  carry path (`ca1`, `ca2`, the merged carry into `c3`). A path never exercised
  counts as a failure. The top runs at its default configuration.

Running one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_vedic_mul4x4 tb/tb_vedic_mul4x4.sv
./obj_dir/Vtb_vedic_mul4x4
```

## Where this implementation makes its own choices

- The middle carries are merged by an OR and placed at bit 2 of the third adder's
  word. This is explained above; without it the products are wrong.
- The lookahead equations and the inclusive propagate are standard textbook
  forms. The source defines the CLA only by its width and its pins.
- Half adders are the standard XOR/AND cells.
- The instance names `v1`..`v4` and `c1`..`c3` match the reference schematic.
  Which 2x2 instance forms which product is this implementation's own choice.
- `w` is taken to be the third adder's carry out.
- No accumulator is provided. The "MAC" in the design's name is never given a
  register, width or control, and the reference implementation uses no flip-flops.
  An accumulating MAC would need an adder and register wrapped around
  `vedic_mul4x4`, with a width and clocking chosen by the user.
