# Nikhilam (Vedic) 16 x 16 multiplier with power-of-two radices

This is a combinational unsigned 16 x 16 multiplier built on the Nikhilam
rule of Vedic arithmetic ("all from 9 and the last from 10"). Normally the
rule writes each operand as a nearby base minus a small complement. The
product is then a cross subtraction scaled by the base, plus the product of
the two complements. Here the base is a power of two and is chosen separately
for each operand. So the "scale by the base" steps are shifts, and only the
complements pass through a real multiplier.

The design follows a published block diagram for a "modified" Nikhilam
multiplier: two Radix Selection Units, complement subtractors, exponent
determinants, one multiplier, two shifters and two adder-subtractors. The
published text leaves a number of details open. The choices made here are
listed in [Where this design makes its own choices](#where-this-design-makes-its-own-choices).

## The arithmetic

The decimal pencil method, for 89 x 92 with base 100:

    89 = 100 - 11        92 = 100 - 8
    left  : 89 - 8  = 81   (cross subtraction)
    right : 11 x 8  = 88   (product of the complements)
    result: 81 x 100 + 88 = 8188

In binary, each operand N gets its own radix R = 2^k: the largest power of two
not above N. Its complement is c = R - N. Because R <= N, c is zero or
negative. The one exception is N = 0, which gets R = 1 and c = +1. Order the
operands so that N1 >= N2, which gives k1 >= k2. Then

    N1 * N2 = (N1 - c2 * 2^(k1-k2)) * 2^k2  +  c1 * c2
              \______ left part ______/        \right/

Proof: substitute N2 = 2^k2 - c2 on the left side. Then
(N1 - c2*2^(k1-k2))*2^k2 = N1*N2 + N1*c2 - c2*2^k1 = N1*N2 - c1*c2.

Worked binary example, taken from the operand pairs used to test the design:

| quantity                   | value                                   |
|----------------------------|-----------------------------------------|
| N1, N2                     | 26971, 6978                             |
| radices 2^k1, 2^k2         | 16384 (k1 = 14), 4096 (k2 = 12)         |
| complements c1, c2         | -10587, -2882                           |
| k1 - k2                    | 2                                       |
| left part N1 - c2 * 4      | 38499                                   |
| left part << 12            | 157 691 904                             |
| c1 * c2                    | 30 511 734                              |
| product                    | 188 203 638                             |

The same datapath gives 89 x 92 = 8188 with both radices equal to 64:
117 * 64 + 700.

### Why everything fits in 33 bits

All values are handled as two's-complement numbers modulo 2^33. Additions,
subtractions and left shifts are exact modulo 2^33. The true product is below
2^32. So the 33-bit sum equals the product even if an intermediate value
wraps around. The complements fit in 17 bits signed, because
-(2^15 - 1) <= c <= 1. Their product therefore fits in the 34-bit output of a
signed 17 x 17 multiplier, and only its low 33 bits are used. The exponent
difference k1 - k2 is never negative because of the operand ordering. That is
why a left shifter is enough to align c2.

Zero operands need no special path. If N2 = 0, then c2 = +1 and k2 = 0.
The left part becomes N1 - 2^k1 = -c1, and adding c1 * 1 gives 0.

## Datapath

```
 n1 ─┐                     ┌─ greater ─ rsu ─ R1 ─┬─ subtractor (R1 - N1) ─ c1 ───────────────┐
     ├─ operand_order ─────┤                      └─ exponent_determinant ─ k1 ─┐             │
 n2 ─┘  (16-bit compare)   └─ lesser ── rsu ─ R2 ─┬─ subtractor (R2 - N2) ─ c2 ─┼──┐          │
                                                  └─ exponent_determinant ─ k2 ─┤  │          │
                                                                                │  │          │
                             subtractor (k1 - k2) ─ d ──────────────────────────┘  │          │
                             lshifter: c2 << d ────────────────────────────────────┘          │
                             adder_subtractor (sub): N1 - (c2 << d) = lhs                     │
                             lshifter: lhs << k2                                              │
                             residue_multiplier: c1 * c2 ─────────────────────────────────────┘
                             adder_subtractor (add): (lhs << k2) + c1*c2 ──> output1
```

| module                 | role                                                               | size at W = 16             |
|------------------------|--------------------------------------------------------------------|----------------------------|
| `operand_order`        | magnitude comparator and swap: larger operand on the N1 path       | 16-bit compare, 2 muxes    |
| `rsu`                  | Radix Selection Unit: exponent determinant, then 1 << n            | 16-bit in, 17-bit radix    |
| `exponent_determinant` | index of the most significant 1 (priority encoder)                 | 16 -> 4 bits, 17 -> 5 bits |
| `lshifter`             | logarithmic barrel shifter, logical left                           | 17 bits (RSU), 33 bits     |
| `subtractor`           | a - b, two's complement                                            | 17 bits (c1, c2), 5 bits   |
| `residue_multiplier`   | signed multiply of the complements                                 | 17 x 17 -> 34 bits         |
| `adder_subtractor`     | a + b or a - b under a mode input                                  | 33 bits                    |
| `nikhilam_mult`        | top level, wires the above                                         |                            |
| `vedic_pkg`            | operand width `OPERAND_W = 16` and the index-width function        |                            |

The unit counts match the published synthesis report for this architecture:
one multiplier, five adders and subtractors (three subtractors and two
adder-subtractors), four logical-left shifters and one 16-bit comparator.

Each operand passes through two exponent determinants: one inside its RSU and
one on the radix the RSU produces. This matches the block diagram the design
follows. A synthesis tool folds the second one away, since the exponent of
2^n is n.

## Interface and timing

| port      | dir    | width | meaning                    |
|-----------|--------|-------|----------------------------|
| `n1`      | input  | 16    | unsigned operand           |
| `n2`      | input  | 16    | unsigned operand           |
| `output1` | output | 33    | product `n1 * n2`          |

The multiplier is purely combinational: it has no clock, no reset and no
registers. `output1` is valid one propagation delay after the operands change.
The reference implementation reported about 16.2 ns on a Virtex-5
(XC5VLX30, speed grade -3), using 329 LUTs. Neither figure is reproduced
here. If the multiplier is used in a clocked design, register its inputs
and/or outputs, or add pipeline stages at the module boundaries in
`nikhilam_mult`.

The operand width is the parameter `W` of `nikhilam_mult`, with a default of
`vedic_pkg::OPERAND_W = 16`. All internal widths are derived from it
(W+1 for radices and complements, 2W+1 for the product). The tests were run
at W = 16 only.

## Where this design makes its own choices

The published design names most blocks without giving their insides. These
points are interpretations, not given facts:

- **Operand ordering.** The block diagram has no comparator. The published
  synthesis report does list one 16-bit comparator. Here it orders the
  operands so that k1 >= k2. Without that ordering the alignment shift
  would have to run in both directions.
- **Sign of the complement.** The complement is formed as radix minus operand,
  as in the decimal method. The modified RSU always picks the power of two at
  or below the operand, so the complement is never positive (except for a
  zero operand). It is therefore carried as a signed 17-bit value, and the
  multiplier is signed.
- **Adder-subtractor modes.** The first adder-subtractor subtracts (the cross
  subtraction) and the second one adds (left part plus right part). Both
  have their mode tied off in the top level.
- **Shifter widths.** The published report lists one 33-bit and one 34-bit
  datapath shifter. Both are 33 bits here, which is enough under modulo-2^33
  arithmetic.
- **Exponent subtractor width.** The exponent subtractor is 5 bits wide. The
  published report counts three 17-bit subtractors.
- **Zero operand.** The exponent determinant returns 0 for a zero input, so
  the radix is 1. The arithmetic above then gives the right answer.
- **Implementations of the leaf blocks.** The priority encoder, barrel
  shifter, single-adder adder-subtractor and the `*` operator for the
  complement multiplier are the simplest realisations. Their structure is not
  taken from the published design. Timing or area results may differ from
  the published numbers.

The earlier "unmodified" radix selection unit is not implemented. It picks
between 2^(n-1) and 2^n using a mean determinant and a comparator, and was
used only as a comparison point. The same goes for the Booth and array
multipliers it was compared with.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`, and each has a
watchdog that stops a hung run.

- `tb_nikhilam_mult` runs at the default size with no parameter overrides.
  It checks the published simulation pairs, including 12 x 32647 = 391764,
  26971 x 6978 = 188203638 and 3647 x 9565 = 34883555. It also checks
  89 x 92, all 144 pairs of 12 corner operands (0, 1, powers of two and
  their neighbours, 65535), and 300 000 random pairs. Half of the random
  pairs have random bit lengths. For each datapath case the testbench counts
  how often it occurred, and it fails if any case never occurs: operands
  swapped or not, equal or different radices, a zero operand, a power-of-two
  operand (complement 0), and the largest product.
- `tb_exponent_determinant` and `tb_rsu` cover all 65 536 16-bit inputs.
- The subtractor, shifter, multiplier, adder-subtractor and comparator
  testbenches check corner cases and random vectors against the language's
  own operators.

Every testbench was also run against a deliberately broken copy of its module
and reported failures. Examples of the breakage: a lowest-set-bit encoder,
an unsigned complement multiply, the left part scaled by 2^k1 instead of
2^k2, and a comparator that ignores the top bit.

## Simulating

Verilator 5 is enough. For example, for the whole multiplier:

```
verilator --binary --timing --assert rtl/vedic_pkg.sv -y rtl \
    tb/tb_nikhilam_mult.sv --top-module tb_nikhilam_mult
./obj_dir/Vtb_nikhilam_mult
```

Substitute any other `tb/tb_<module>.sv` for the others. Lint with
`verilator --lint-only -Wall rtl/vedic_pkg.sv -y rtl rtl/<module>.sv`.
Neither the RTL nor the testbenches set a timescale. The testbenches apply one
vector per time unit and stop themselves with a watchdog after 10^8 time
units.
