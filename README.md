# Posit and IEEE 754 adders and multipliers

This design puts two number formats side by side in hardware: **posits**
(type-3 unums) and **IEEE 754 binary floating point**. For each format there
is a combinational adder and a combinational multiplier. A comparison top
(`arith_top`) holds five such designs behind one result multiplexer, so the
same operands can be sent to any of them:

| slot (`design_sel`) | design                     | format                         |
|---------------------|----------------------------|--------------------------------|
| 1                   | posit 8-bit                | N = 8, es = 0                  |
| 2                   | posit 16-bit               | N = 16, es = 1                 |
| 3                   | posit 32-bit               | N = 32, es = 2                 |
| 4                   | parametrizable posit       | `PX_NBITS`, `PX_ES` (16, 1)    |
| 5                   | IEEE 754                   | `FX_EXP_WIDTH`, `FX_SIG_WIDTH` (8, 24 = binary32) |

All units round to nearest, with ties going to the even result. Each unit is
purely combinational. Its operands and result pass through registers in the
top, so the top answers two clocks after an operand pair is accepted.

## Posit numbers in brief

An N-bit posit has four fields:

- **sign**;
- **regime**: a run of equal bits ended by the opposite bit or by the end of the word;
- **es exponent bits**;
- **fraction bits**: whatever is left.

A negative posit is stored as the two's complement of its positive value.
A regime of m ones means k = m-1, and a regime of m zeros means k = -m. The
value is

    (1.f) * 2^(k * 2^es + e)

The fraction has no fixed width. Near 1.0 the regime is short, so there are
many fraction bits. Near the extremes the regime takes almost the whole word.
There are two special patterns: 0 is all zeros, and NaR ("not a real", also
used as infinity) is a 1 followed by zeros. Posits have no overflow and no
underflow. A result above the largest posit (maxpos) stays at maxpos. A
non-zero result below the smallest (minpos) stays at minpos. There are no
status flags.

## Posit datapath

Both posit units share one structure: decode both operands, run a core on the
unpacked values, then encode.

**`posit_decoder`**

1. Takes the two's complement of a negative operand.
2. Counts the regime run with a leading-zero counter (`lzc`). The body is
   inverted first when the regime starts with a one.
3. Shifts the regime and its terminating bit out.
4. Reads the exponent and fraction from the top of what remains.

It outputs one signed scale `k*2^es + e` and a significand `1.f`. The
significand is left aligned, with N-3-es fraction bits, the most a posit of
that size can carry. Missing fraction bits are zero.

**`posit_add_core`**
- Compares the two magnitudes.
- Shifts the smaller significand right by the scale difference. The shift
  goes into a field 2·(N-2-es)+2 bits wide, and every bit that falls off is
  ORed into its lowest bit (sticky). At the three evaluated sizes the field
  is so wide that the sticky bit never changes a rounded result. It is kept
  so that the core stays exact for other parameters.
- Adds or subtracts, depending on the signs.
- Normalises with a leading-zero count.
- Gives the result a scale of the larger scale + 1 - leading zeros.
- Exact cancellation gives zero. A zero operand passes the other operand
  through.

**`posit_mul_core`**
- Multiplies the two significands. The full double-width product is kept, so
  nothing is lost.
- The product's top bit is the overflow bit. It shifts the fraction by one
  and is added to the scale sum.

**`posit_encoder`** is the hardest part to follow. Given a sign, a scale and a
fraction with a sticky bit, it works as follows:

1. Splits the scale into regime k = scale >> es and exponent e = the low es bits.
2. Builds the head `10 e fraction` for k >= 0, or `01 e fraction` for k < 0.
3. Shifts the head right arithmetically by k (or -k-1), with the sign bit
   set, so the regime run is formed by the sign extension itself.
4. Takes the top N-1 bits of the shifted field as the unrounded posit body.
   - The next bit is the guard G.
   - The bit after that is the round bit R.
   - Everything below, together with the incoming sticky, is S.
5. Rounds up when `G & (LSB | R | S)`. This is round to nearest even on the
   posit bit string itself, so rounding can carry into the exponent and
   regime without any special case.
6. Sets maxpos when k >= N-2, and minpos when k <= -(N-1).
7. Applies the two's complement for a negative result.

Because the rounding happens after the fraction has been squeezed to its
final, value-dependent width, the core must deliver enough fraction bits for
every regime length. The widths above do that, and the testbenches check it
against an exact model.

## IEEE 754 datapath

The IEEE formats are set by `EXP_WIDTH` and `SIG_WIDTH`. `SIG_WIDTH` is the
precision p and includes the hidden bit, so binary32 is (8, 24) and binary16
is (5, 11). Subnormal numbers, signed zeros, infinities and NaNs are all
handled.

### Dual-path adder (`fp_adder`)

The adder splits into the classic close and far paths.

- **`fp_add_swap`** unpacks the operands and orders them by exponent. A
  subnormal counts as exponent 1 with hidden bit 0. It also gives:
  - the exponent difference d;
  - whether the operation is an effective subtraction (the two signs differ);
  - the path. The **close path** is taken for an effective subtraction with
    d <= 1. Everything else goes to the **far path**.
- **`fp_add_close`** handles the massive-cancellation case.
  1. Shifts the smaller significand by at most one bit and subtracts in p+1 bits.
  2. Takes the absolute value and notes which operand was larger, which sets
     the result sign.
  3. Normalises with a leading-zero count, stopping at exponent 1 so that
     subnormal results come out directly.
  4. The result is exact, so no rounding information is needed.
- **`fp_add_far`** works on d > 1 for subtraction, or any d for addition.
  1. Shifts the smaller significand right into a field of 2p+2 bits, capped at p+2.
  2. Keeps a guard, a round and a sticky bit.
  3. Adds or subtracts.
  4. Prenormalises by at most one position either way, using the top two bits:
     - a carry out means exponent +1;
     - "01" means no shift;
     - "00" means exponent -1. This happens only after a subtraction, and
       never below exponent 1.
- **`fp_round`** is shared by the adder's two paths.
  1. Denormalises a result whose exponent is below 1.
  2. Rounds to nearest even: it adds the increment to the packed
     exponent-and-fraction word, so a carry walks naturally from the fraction
     into the exponent.
  3. Flags overflow (the result becomes infinity), underflow and inexact.
     Underflow means tiny before rounding *and* inexact.

The adder sends zero, infinity and NaN operands around the datapath:

- a NaN or inf - inf gives the quiet NaN `0 11..1 10..0`;
- invalid is raised for inf - inf and for signalling NaN inputs;
- an exact zero sum is +0, except that (-0) + (-0) = -0.

### Multiplier (`fp_multiplier`)

1. **Operand preparation.** The operands' significands are normalised first.
   A subnormal operand is shifted left by its leading-zero count, and its
   exponent is lowered to match.
2. **Exponent candidates.** Two biased exponents are computed in parallel:
   - `ex + ey - bias`, for a product in [1, 2);
   - `ex + ey - (bias - 1)`, for a product in [2, 4).
3. **Product.** A 2p-bit product is formed. Its top bit, z_-1, chooses:
   - which p-1 bits are the fraction;
   - which bits are the LSB, round bit and sticky.
4. **Rounding.** An incrementer adds the round-to-nearest-even increment. Its
   carry out is ORed with z_-1 to pick the exponent candidate. This matters
   when the product rounds up from just below 2 to exactly 2.
5. **Tiny products.** Products below the normal range are shifted right, with
   a sticky, before rounding. They come out as subnormals, or as zero with
   underflow.
6. **Specials and overflow.**
   - Overflow gives infinity.
   - inf × 0 and signalling NaNs raise invalid and give the quiet NaN.

## The comparison top (`arith_top`)

Inputs `x`, `y` (32 bits, right aligned for narrower formats), `design_sel`
(1..5), `op` (0 add, 1 multiply) and `in_valid` are registered on a rising
edge.

- All ten units compute from those registers.
- `op` chooses between each slot's adder and multiplier.
- A five-way multiplexer picks the slot.
- The result goes into an output register together with `out_valid` and the
  IEEE flags. The flags are zero for posit slots.
- The latency is two clocks and one operation can be issued every cycle.
- `rst_n` is a synchronous, active-low reset of the valid bits.
- Elaboration stops with an error if a slot would be wider than 32 bits.

## Where this design departs from the source material

- **Stand-in designs.** The study this design follows compared
  third-party designs (a generator-based parametrizable posit unit, another
  posit unit, and a vendor FPU). Here every slot holds units built from the
  published algorithm descriptions:
  - slot 4 is this design's own posit unit with parameters;
  - slot 5 is the dual-path adder and the multiplier described above.
- **No file-driven checking.** The original flow compared results against
  software posit and softfloat libraries through text files. Here each
  testbench computes an exact reference in SystemVerilog instead.
- **Rounding mode.** Only round to nearest, ties to even, is built. It is
  the mode the study chose for both formats. The other IEEE rounding modes,
  traps and exception handling modes are not.
- **Unspecified details.** The following are this design's own choices:
  - the NaN encoding returned;
  - tininess before rounding;
  - the significand width for the IEEE slot (the source gives total and
    exponent widths only);
  - the alignment field widths inside the posit adder;
  - the top-level valid handshake and reset.
- **One top for both operations.** Adders and multipliers sit in the same
  top, selected by `op`. The study synthesised them as separate designs.
  Area or timing taken from this top is therefore a sum of both.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

`tb/ref_pkg.sv` is the reference model:
- It turns both formats into exact wide fixed-point values, with 320 fraction
  bits.
- It forms the exact sum or product.
- It rounds to nearest even by binary search over the monotone bit patterns
  of the target format, and reports the IEEE flags.

What the testbenches cover:

- **Full units** (`tb_posit_adder`, `tb_posit_multiplier`, `tb_fp_adder`,
  `tb_fp_multiplier`):
  - 8-bit formats: all 65,536 operand pairs;
  - 16- and 32-bit formats: directed special values, plus 6,000 random pairs
    biased toward hard cases (cancellation, close exponents, subnormals,
    overflow).
- **Random workload** (`tb_workload_random`): 500,000 random operand pairs
  for each of the posit (16,1) and (32,2) units and the binary16 and
  binary32 units, adders and multipliers alike. About one operand in 32 is a
  special value. That makes 4,000,000 checked results, which take about 40
  seconds of simulation.
- **Pieces:**
  - `tb_lzc` and `tb_posit_decoder` are exhaustive or near-exhaustive;
  - the other piece testbenches use random stimulus checked against exact
    arithmetic.
- **`tb_arith_top`**:
  - Runs the top with its default parameters.
  - Streams a few thousand random and directed operations through all five
    slots, with random gaps in `in_valid`.
  - Checks every result, the flags and the two-clock latency.
  - Counts how often each mechanism happened and fails if one never did:
    - posit NaR, saturation at maxpos and minpos, and exact cancellation;
    - the IEEE close and far paths, the far-path carry and left shift;
    - overflow, underflow and invalid;
    - the multiplier's z_-1 and its incrementer carry out selecting the
      exponent, and the tiny-product path;
    - idle cycles.

Simulate with plain Verilator 5 from the project root, for example:

    verilator --binary --timing -y rtl -y tb +libext+.sv \
        rtl/arith_pkg.sv tb/ref_pkg.sv tb/tb_arith_top.sv \
        --top-module tb_arith_top -o sim
    ./obj_dir/sim

Swap the last source file and `--top-module` for any other testbench. The
reference package is large, so the top-level testbench takes about a minute
and a half to compile.

## Files

- `rtl/arith_pkg.sv`: flag struct, slot and operation enums, scale width helper.
- `rtl/lzc.sv`: leading-zero counter.
- `rtl/posit_decoder.sv`, `rtl/posit_add_core.sv`, `rtl/posit_mul_core.sv`,
  `rtl/posit_encoder.sv`: the posit pieces.
- `rtl/posit_adder.sv`, `rtl/posit_multiplier.sv`: complete posit units.
- `rtl/fp_add_swap.sv`, `rtl/fp_add_close.sv`, `rtl/fp_add_far.sv`,
  `rtl/fp_round.sv`, `rtl/fp_adder.sv`: the dual-path adder.
- `rtl/fp_multiplier.sv`: the IEEE multiplier.
- `rtl/arith_top.sv`: the comparison top.
- `tb/ref_pkg.sv`: exact reference arithmetic.
- `tb/tb_*.sv`: one testbench per block, plus `tb_workload_random.sv` for
  the random workload.
