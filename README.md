# Tree magnitude comparator and majority-gate ripple-carry adder

This design holds two small combinational arithmetic units. They were
conceived for quantum-dot cellular automata (QCA), where the basic gate is the
three-input majority gate. Here they are written as ordinary synthesizable
SystemVerilog.

- **A 32-bit unsigned magnitude comparator** (`cmp32_tree`). It tells whether
  A > B without a subtractor. Each bit is compared in parallel, and the most
  significant differing bit is selected by a look-ahead mask. The partial
  results are merged in a three-level tree.
- **A 32-bit ripple-carry adder** (`rca`). It is built from two-bit slices
  whose carry logic uses only majority gates. The carry crosses two bit
  positions per gate on its way through the chain.

The two units share no signals. `cmp_adder_top` puts them side by side, each
with its own ports. Nothing is clocked: there are no registers, no reset and
no handshakes.

## How the parallel comparator decides

`cmp4` compares two W-bit numbers (W = 4 by default) in three steps. All bit
positions work at the same time.

1. **Bits that can make a difference.** At a position where both operands hold
   the same bit, that position cannot decide the result. So the comparator
   keeps only the one-sided bits:
   - `a_only = a & ~b` marks the positions where A has the 1.
   - `b_only = b & ~a` marks the positions where B has the 1.
2. **Only the most significant one counts.** `cmp_lookahead` produces an
   enable `cmp[i]`. It is 1 when every bit pair above position i is equal. The
   top bit is always enabled.
   - Masking gives `s = a_only & cmp` and `g = b_only & cmp`.
   - The mask lets through only the highest position where the operands
     differ.
   - So across all of `s` and `g`, at most one bit is set.
3. **Reduce.** `gt = |s` (A > B) and `lt = |g` (A < B). If both are 0, the
   operands are equal. Both can never be 1 together.

Worked example, W = 4, A = 1011, B = 1100:

| step | A side | B side |
|---|---|---|
| one-sided bits | `a_only = 0011` | `b_only = 0100` |
| look-ahead enable | `cmp = 1100`: bit 3 is equal, bit 2 is not | same `cmp` |
| masked | `s = 0000` | `g = 0100` |
| result | gt = 0 | lt = 1, so A < B |

The names follow the gate-level picture this design comes from:

- `S0..S3` are the masked terms that feed A > B.
- `G0..G3` are the masked terms that feed A < B.
- `CMP0..CMP3` are the look-ahead enables.

## The 32-bit tree

The trick that makes the tree work: a comparator result is itself a pair of
bits that can be compared again. A (gt, lt) pair is always one of three
values:

| pair | meaning |
|---|---|
| (1, 0) | A's part is bigger |
| (0, 1) | B's part is bigger |
| (0, 0) | the parts are equal |

Now take the gt bits of several groups as one number and the lt bits as
another. Comparing those two numbers gives exactly the comparison of the
groups put together. The most significant group that is not equal wins, just
as the most significant differing bit wins inside `cmp4`.

`cmp32_tree` uses this trick at three levels:

| level | units | inputs | outputs |
|---|---|---|---|
| 1 | 8 × `cmp4` | one nibble each, bits 4k+3..4k | `gt_w[k]`, `lt_w[k]`, k = 0..7 |
| 2 | 2 × `cmp4` | four nibble results: gt bits as A, lt bits as B | lower half 15..0 → bit 8, upper half 31..16 → bit 9 |
| 3 | `cmp2_mod` | the two half results | `gt` |

The level-3 output `gt` is 1 if A > B and 0 if A ≤ B. The tree gives no
separate "less" or "equal" output.

`cmp2_mod` is a two-bit comparator with a reduced equation. Its inputs come
from comparators, so no half can report gt and lt together. Many input
combinations therefore cannot occur. With A = {gt_hi, gt_lo} and
B = {lt_hi, lt_lo}, the A > B function becomes:

    gt = A1 | (~A1 & A0 & ~B1 & ~B0)

An immediate assertion in `cmp2_mod` flags any input that breaks this
premise.

The ten partial results are brought out as `gt_w` and `lt_w` so they can be
observed.

## The majority-gate adder slice

`rca2_module` handles bits i and i+1. `maj(x, y, z)` is the three-input
majority function (`maj_pkg`). With one input tied to 0 it acts as an AND;
tied to 1, as an OR.

    p      = maj(a0, b0, 1)                           // a0 | b0
    g      = maj(a0, b0, 0)                           // a0 & b0
    c_mid  = maj(p, g, cin)                           // carry into bit i+1
    c_out  = maj(maj(a1, b1, p), maj(a1, b1, g), cin) // carry into bit i+2

Why `c_out` is correct:
- `maj(a1, b1, g)` is 1 when the pair of bits would produce a carry even with
  no carry coming in.
- `maj(a1, b1, p)` is 1 when the pair would produce a carry if a carry came in.
- The first always implies the second. So the outer majority with `cin` picks
  between them, and gives the true carry out of bit i+1.

The incoming carry passes through one gate per two bits. This is what makes
the slice fast in a chain.

The sum bits use XOR: `sum[0] = a0 ^ b0 ^ cin` and `sum[1] = a1 ^ b1 ^ c_mid`.

`rca` chains N/2 slices: each `c_out` feeds the next `cin`. N defaults to 32
and must be even.

## Where this RTL departs from its source, and how far to trust it

- **Comparator look-ahead.** The source gives the look-ahead block's inputs and
  outputs, but not its gates. The equality chain used here is one way to build
  that function.
- **Priority step.** The source also describes a variant: keep the most
  significant 1 of each one-sided number separately, then compare the
  positions. That gives the same outputs. This RTL uses the shared mask.
- **Level-2 wiring.** How four (gt, lt) pairs feed a 4-bit comparator is not
  spelled out in the source. Feeding the gt bits as A and the lt bits as B is
  this design's reading. It is checked by exhaustive and random tests.
- **Reference waveform, bit 8.** The reference waveform shows eight operand
  pairs, from 100 vs 50 up to 2100 vs 3000. There, the lower-half result (bit
  8) appears in the "less" vector when A > B, and the other way round. This RTL
  names that bit by its meaning (`gt_w[8]` = lower half A > B). The
  testbench's expected vectors therefore have bit 8 exchanged relative to that
  waveform. Everything else matches it, including the final result.
- **Adder sum bits.** The adder slice's source shows only the carry network.
  The XOR sum bits are this design's choice.
- **Adder cascade.** The ripple cascade into a 32-bit adder, and the carry-in
  port, are also this design's choices.
- **Not built: the cascade-based (CB) cells.** The source names cells of a
  second, cascade-based architecture (T4 and C2), but gives no logic for them.
  They are not built.
- **Not reproduced: timing and area.** QCA-specific figures (cell counts, clock
  phases) and the FPGA LUT/delay/power numbers quoted for the comparator have
  no counterpart here.

Test coverage:

| unit | how it is tested |
|---|---|
| `cmp_lookahead` | exhaustive at 4 and 6 bits |
| `cmp4` | exhaustive at 4 and 8 bits |
| `cmp2_mod` | all 9 legal input cases |
| `rca2_module` | exhaustive |
| `rca` | exhaustive at 8 bits; corner cases and 5000 random additions at 32 bits |
| `cmp32_tree` | the eight reference pairs, plus 20 000 random pairs; half of the random pairs share their upper bits, so that every tree level gets to decide |

`cmp_adder_top_tb` drives both units together and checks that each of these
happened at least once:
- every outcome: greater, less and equal;
- a decision in each nibble and in each half;
- a carry that ripples from `cin` through all 16 slices.

## Files

| file | contents |
|---|---|
| `rtl/maj_pkg.sv` | the `maj` majority function |
| `rtl/cmp_lookahead.sv` | look-ahead enables `cmp[i]` |
| `rtl/cmp4.sv` | W-bit parallel comparator (gt, lt) |
| `rtl/cmp2_mod.sv` | reduced 2-bit final comparator (gt only) |
| `rtl/cmp32_tree.sv` | 32-bit three-level comparator tree |
| `rtl/rca2_module.sv` | two-bit majority-gate adder slice |
| `rtl/rca.sv` | N-bit ripple-carry adder (N = 32) |
| `rtl/cmp_adder_top.sv` | both units side by side |
| `tb/<module>_tb.sv` | self-checking testbench for each module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
one also has a watchdog that ends a hung run and counts it as a failure. For
example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/maj_pkg.sv tb/cmp_adder_top_tb.sv --top-module cmp_adder_top_tb
    ./obj_dir/Vcmp_adder_top_tb

Replace the testbench name to run another one. Each test finishes in well
under a second. `cmp_adder_top_tb` runs the whole design at its default
sizes.

The package file `rtl/maj_pkg.sv` must come first on the command line. The
other modules are found through `-Irtl`.

To change the adder width, set `rca`'s `N` to any even number. To change the
comparator's group width, set `cmp4`'s `W`. `cmp32_tree` itself is fixed at
32 bits: 8 nibbles, 2 halves, 1 final stage.
