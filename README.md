# Two-stage magnitude comparator without a priority stage

A magnitude comparator tells whether unsigned A is greater than, smaller
than or equal to unsigned B. A common low-power structure, the
*priority-based comparator*, does this in three stages:

1. **significant bit detection**: keep only the 1s of each operand that face
   a 0 in the other operand (the only bits that can decide anything);
2. **priority detection**: clear everything except the most significant
   remaining 1 of each operand;
3. **compare logic**: see which operand's surviving 1 sits higher.

The design here drops stage 2. The compare logic works directly on the
first-stage flags, which needs less hardware than isolating the top flag
first. The 4-bit comparator built this way is the basic unit. The 16-bit
comparator is made from four of them.

## Why the middle stage can go

Stage 1 produces two flag vectors:

    a_sig[i] = A[i] & ~B[i]        b_sig[i] = B[i] & ~A[i]

They are never 1 in the same position. The most significant flag of either
vector sits at the first bit, from the top, where A and B differ, and the
vector that owns it belongs to the larger operand. All bits above it are
equal in A and B, so they carry no flag in either vector.

So A > B exactly when some flag of A has no flag of B above it:

    G = OR_i ( a_sig[i] & AND_{j>i} ~b_sig[j] )
    S = OR_i ( b_sig[i] & AND_{j>i} ~a_sig[j] )

Lower flags of the *winning* operand may make more terms of its OR true. That
is harmless. Lower flags of the *losing* operand are masked by the winner's
higher flag. Nothing needs to be cleared first. For four bits:

    G = a3 | ~b3&a2 | ~b3&~b2&a1 | ~b3&~b2&~b1&a0

Example: A = 1010, B = 0111.

- a_sig = 1000 and b_sig = 0101.
- The G term for bit 3 is `a3 = 1`, so G = 1.
- Every S term needs `~a3`, so S = 0.
- A priority stage would have reduced b_sig to 0100 first. That reduction
  does not change the result.

When A == B, no flag is raised and both G and S are 0.

## Building the 16-bit comparator

The operands are split into four 4-bit slices, and each slice has its own
4-bit comparator. Each slice returns a (G, S) pair: 10 for greater, 01 for
smaller, 00 for equal. These pairs follow the same rule as the first-stage
flags: they are never 1 together, and the most significant slice that is not
00 decides the result. So the slice results pass through one more copy of the
same compare logic, one bit wide per slice:

    G16 = G3 | ~S3&G2 | ~S3&~S2&G1 | ~S3&~S2&~S1&G0     (Gk, Sk from slice k)

`eq` is `~(G16 | S16)`.

## Modules

| module | what it is | parameters (default) |
|---|---|---|
| `significant_bit_detector` | stage 1: the `a_sig`/`b_sig` flags | `WIDTH` (4) |
| `simplified_compare_logic` | stage 2: G and S from two non-overlapping flag vectors | `WIDTH` (4) |
| `proposed_comparator` | 4-bit comparator: stage 1 feeding stage 2 | `WIDTH` (4) |
| `comparator16` (top) | 16-bit comparator: four `proposed_comparator` slices merged by a `simplified_compare_logic` | `WIDTH` (16), `SLICE` (4) |

Ports:

- `a` and `b` are unsigned inputs.
- `g` is high when a > b, and `s` is high when a < b.
- Only the top also has `eq`. At 4 bits, equality is the case where g and s
  are both 0.

All logic is combinational: there is no clock, no reset and no register. The
critical path of the top is the slice comparator plus one compare stage.

`simplified_compare_logic` has an immediate assertion. It fires if `a_sig`
and `b_sig` are ever 1 in the same position. Its function rests on that
precondition, and both of its users meet it.

`comparator16` accepts any `WIDTH` that is a multiple of `SLICE`. It then has
`WIDTH/SLICE` slices and a merge stage of that width. Other widths are
reported by an elaboration-time `$error`. The merge is a single level, so very wide
operands give a wide merge stage, not a tree.

## What comes from the published design and what does not

Taken from the published design:

- The two-stage structure: a significant bit detector, then a simplified
  compare logic, with no priority stage.
- The per-bit rule of the first stage.
- The statement that the compare logic decides from the first-stage flags
  alone, leaving lower 1s in place.
- The G/S outputs of the 4-bit unit.
- The use of 4-bit units to build the 16-bit comparator.

Choices made for this implementation:

- **Compare logic.** The design describes what this stage does but does not
  give its gates legibly. The sum-of-products form above is this
  implementation's own.
- **Merging slices.** The design does not say how the 4-bit results are
  combined. Using the same compare logic to merge them is this
  implementation's own choice.
- **`eq` output.** Comparators are usually described as having three outputs,
  but the 4-bit unit shows only G and S. `eq` exists only at the top, as the
  NOR of G and S.
- **Other choices.** The operands are unsigned. The widths are parameters,
  and the defaults match the published 4-bit and 16-bit sizes.

Not included:

- The reference comparators that this design is measured against: the
  two-level "traditional" equations, the priority-based, look-ahead and
  subtractor-based comparators.
- The published LUT, delay and power figures. They come from an FPGA flow and
  are not something RTL can reproduce.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. A watchdog ends the run with a failure if
the run hangs.

- `tb_significant_bit_detector`: tests all 256 operand pairs, bit by bit,
  against a per-position truth table.
- `tb_simplified_compare_logic`: tests all 81 legal flag-vector pairs. With
  disjoint vectors, the expected G is `a_sig > b_sig` as numbers. It also
  checks that vectors with flags on both sides were applied.
- `tb_proposed_comparator`: tests all 256 pairs against `>` and `<`.
- `tb_comparator16`: runs the top at its default 16-bit size. It applies
  corner values, single-bit differences at every position, and about 400,000
  random pairs. Half of the random pairs place their first difference
  uniformly over the 16 bit positions, so every slice gets to decide. The
  testbench counts the following, and fails if any count is zero:
  - greater, smaller and equal results;
  - the number of times each slice decided the result;
  - cases where the losing operand still has flags below the deciding bit;
  - cases where a lower slice's verdict was overruled.

To run one testbench with Verilator, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl --top-module tb_comparator16 tb/tb_comparator16.sv
    ./obj_dir/Vtb_comparator16

Replace the name to run another testbench. Each one completes in well under a
second.
