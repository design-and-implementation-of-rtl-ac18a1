# Vedic multipliers: a 4×4 Urdhva Tiryakbhyam multiplier and a reversible 2×2

The "vertically and crosswise" rule (Urdhva Tiryakbhyam) of Vedic arithmetic
multiplies two numbers column by column. Each product digit is the sum of the
digit pairs that meet in that column: the units pair is taken vertically, the
middle pairs crosswise, the top pair vertically again. Carries move left. In
binary this gives a multiplier whose partial products are all formed at once,
in parallel. It has no clock and no iteration.

This RTL has two unsigned multipliers built that way:

* `vedic_mul4x4` is a 4‑bit × 4‑bit multiplier with an 8‑bit product. It is
  made of four 2×2 Vedic multipliers, three 4‑bit ripple carry adders and one
  half adder.
* `rev_vedic_mul2x2` is a 2‑bit × 2‑bit multiplier made of five reversible
  logic gates (BVF, two BME, Peres, CNOT). In this style every signal drives
  exactly one gate input, so no signal fans out.

`vedic_top` places the two side by side. They share no signals.

Everything is combinational. A product is valid once the operands have
propagated through the gates. No latency or throughput figure applies.

## The 2×2 rule

For `a = a1 a0` and `b = b1 b0`:

| column | terms | result |
|---|---|---|
| 0 (vertical) | a0·b0 | q0 |
| 1 (crosswise) | a1·b0 + a0·b1 | q1, carry c |
| 2–3 (vertical) | a1·b1 + c | q2, q3 |

`vedic_mul2x2` builds this from four AND gates and two half adders. Its gate
level is this design's own choice: the simplest circuit for the rule. The
reversible version below does the same arithmetic.

## The 4×4 multiplier: how the partial products are summed

Split the operands into 2‑bit halves, `A = {AH, AL}` and `B = {BH, BL}`. Then

```
A·B = 16·(BH·AH) + 4·(BL·AH + BH·AL) + BL·AL
         m3              m2     m1       m0
```

Each `m` is a 4‑bit product from a 2×2 Vedic multiplier. The adder tree is
the hard part to follow, because the diagram it comes from prints no bit
numbers:

```
RCA1 : m2 + m1                      -> s1[3:0], carry c1   (c1 has weight 64)
RCA2 : s1 + {0, 0, m0[3:2]}         -> s2[3:0], carry c2   (c2 has weight 64)
HA   : c1 + c2                      -> sum hs, carry hc
RCA3 : m3 + {hc, hs, s2[3:2]}       -> S7..S4, carry Co
S3 S2 = s2[1:0]
S1 S0 = m0[1:0]
```

The bits of `m0` and `s1` that need no addition leave directly as the low
product bits. The two weight‑64 carries are combined by the half adder before
they enter the last adder.

Two of these signals are always 0 for 4‑bit operands:

* **The half adder carry `hc`.** RCA1 adds at most 9 + 9 = 18. When it
  carries, its low four bits are at most 2, so RCA2 cannot carry in the same
  case. `c1` and `c2` are never both 1.
* **`Co`.** The largest product is 15 × 15 = 225, which fits in 8 bits.

`vedic_mul4x4` asserts that `c1` and `c2` are never both set. Both signals
are kept because the structure is shown with them. A synthesis
tool removes them. Bringing `Co` out also means the 9‑bit result
`{Co, S7..S0}` is always the exact product.

The ripple carry adders (`rca4`, built from the `full_adder` cell) have a
carry‑in port. The multiplier ties it to 0. `rca4` has a width parameter `W`
whose default is 4.

## The reversible 2×2 multiplier

The gates and their wiring:

```
BVF   (b0, 0, b1, 0)        -> b0, I0, b1, I1        two copies of each b bit
BME1  (a0, b0, 0, b1)       -> g, a0b0, a0b1, g
BME2  (a1, I0, 0, I1)       -> g, a1b0, a1b1, g
Peres (a0b1, a1b0, 0)       -> g, a0b1^a1b0, a0a1b0b1   (a half adder)
CNOT  (a0a1b0b1, a1b1)      -> q3 = a0a1b0b1, q2 = a1b1 ^ a0a1b0b1
q0 = a0b0,  q1 = a0b1 ^ a1b0
```

The Peres carry `a0·a1·b0·b1` is the crosswise carry of the 2×2 rule. The
CNOT adds it to `a1·b1`. The sum's own carry would be `a1b1 · a0a1b0b1`,
which is the same as `a0a1b0b1`. So the CNOT's pass‑through output is `q3`.

The gate equations used:

| gate | equations | source |
|---|---|---|
| BVF | p=a, q=a^b, r=c, s=c^d | usual definition; it gives the copies the wiring needs |
| Peres | p=a, q=a^b, r=ab^c | usual definition; with c=0 it is a half adder |
| CNOT | p=a, q=a^b | usual definition |
| BME | p=a, q=ab^c, r=ad^c, s=(~a)b^d | q and r are fixed by the wiring; p and s are this design's choice |

**About the BME gate.** Its two useful outputs must be `a·b` and `a·d` when
`c = 0`. No one‑to‑one mapping from four bits to four bits can do that. Five
input patterns give 0 on both outputs (`a = 0` with any `b`, `d`, plus
`a = 1, b = d = 0`), but only four patterns of the other two outputs exist to
tell them apart. So `bme_gate` is a logic model of the gate's role. It is not
a reversible gate. Its testbench checks reversibility for BVF, Peres and CNOT
but not for BME.

The five garbage outputs are brought out on port `g`, ordered
`{BME2.s, BME2.p, Peres.p, BME1.s, BME1.p}`. Three of them are copies of
inputs or of a partial product.

## Files

| module | role |
|---|---|
| `rtl/vedic_top.sv` | top: both multipliers, separate ports |
| `rtl/vedic_mul4x4.sv` | 4×4 multiplier |
| `rtl/vedic_mul2x2.sv` | 2×2 Vedic multiplier (AND gates and half adders) |
| `rtl/rca4.sv`, `rtl/full_adder.sv` | ripple carry adder and its cell |
| `rtl/half_adder.sv` | half adder |
| `rtl/rev_vedic_mul2x2.sv` | reversible 2×2 multiplier |
| `rtl/bvf_gate.sv`, `rtl/bme_gate.sv`, `rtl/peres_gate.sv`, `rtl/cnot_gate.sv` | the gates |

Top ports: `a4, b4` (4 bits each) → `s8` (8 bits), `co4`; `a2, b2` (2 bits
each) → `q4` (4 bits), `g2` (5 garbage bits).

## Verification

Every module has a self‑checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a hung run as a
failure. The tests are exhaustive:

* `tb_vedic_mul4x4` runs all 256 operand pairs against integer
  multiplication and checks that `Co` stays 0. Before that it runs six
  published vectors: 3×3=9, 5×7=35, 10×9=90, 12×14=168, 13×13=169 and
  15×15=225.
* `tb_rev_vedic_mul2x2` runs all 16 pairs. It also runs five published
  vectors (1×1, 2×2, 2×3, 3×2, 3×3) and checks some of the garbage outputs.
* `tb_vedic_top` drives both multipliers together through every case. It
  counts how often each carry path is used: the RCA1 carry, the RCA2 carry,
  the half adder sum and the reversible crosswise carry. It fails if any
  count is 0. It also checks that the half adder carry is never 1.
* The adders and gates are checked against their equations on every input.

To run a test with plain Verilator (version 5):

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_vedic_top.sv --top-module tb_vedic_top
./obj_dir/Vtb_vedic_top
```

All testbenches pass. Each was also run against a copy of its module with
one deliberate error, and each reported failures.

## Where this departs from, or adds to, the source description

* The gate level of the non‑reversible 2×2 multiplier, the full adder cell
  and the carry‑in port of the ripple adder are this design's own.
* The equations of the reversible gates come from their usual definitions,
  not from the source. The BME garbage outputs are invented, and the BME gate
  is not reversible (see above).
* The bit order inside the 4×4 adder tree was worked out from the arithmetic
  weights, because the source diagram gives connections but no bit numbers.
* The source reports area, delay and power for this multiplier next to Booth
  and Wallace multipliers on a Spartan‑3 FPGA. The Booth and Wallace
  multipliers were only used for comparison and are not included. The FPGA
  numbers are not reproduced.
* The source says the method extends to any operand width. Only the 4×4 and
  2×2 sizes are given in detail, so only those are built.
