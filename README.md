# DPdSP: one divider for a double or two singles

This is a floating-point divider whose single datapath does either one IEEE-754
double-precision (DP) division or two independent single-precision (SP) divisions per
clock. A mode bit, `dp_sp`, selects the mode for each operation. Division is usually the
largest and slowest of the basic floating-point units. Here one unit serves both
precisions, and the SP mode gives twice the SP throughput. The architecture follows
M. K. Jaiswal, R. C. C. Cheung, M. Balakrishnan and K. Paul, "Configurable Architecture for
Double/Two-Parallel Single Precision Floating Point Division", ISVLSI 2014. That paper
reports about 7 % more area than a DP-only divider of the same structure.

The quotient is not computed by digit recurrence. It comes from a truncated **series
expansion** of the divisor's reciprocal. That turns division into a short, fixed chain of
multiplications: no iteration and no data-dependent latency. Sub-normal operands and
results are supported. So are round to nearest even and the IEEE special cases: zero,
infinity, NaN and divide-by-zero.

## Operand words and modes

| `dp_sp` | `in1`, `in2`, `out` hold                                  |
|---------|-----------------------------------------------------------|
| 1       | one binary64 number in [63:0]                             |
| 0       | SP-2 (binary32) in [63:32] and SP-1 (binary32) in [31:0]  |

The DP exponent field [62:52] and the SP-2 exponent field [62:55] overlap. The extractor
uses this overlap to share its checks between the two views (see "Sharing between the
modes").

## The mantissa quotient by series expansion

Let x and y be the dividend and divisor mantissas, both normalised to [1, 2). The divisor
is split into a1, its leading one plus the next 8 bits, and a2, the rest, so a2 < 2^-8.
Then

    1/y = 1/(a1 + a2) = a1^-1 * (1 - t + t^2 - t^3 + ...),   t = a1^-1 * a2 < 2^-8

Each series term is 8 bits smaller than the one before. Seven terms give DP accuracy and
three give SP accuracy. The terms are grouped so that the SP formula is a prefix of the DP
one:

    DP:  q = x*a1^-1 - x*a1^-1 * [(t - t^2) * (1 + t^2 + t^4)]
    SP:  q = x*a1^-1 - x*a1^-1 *  (t - t^2)

`dpdsp_mant_div` evaluates this in eight steps. Most units in it are dual-mode: in SP
mode each 54-bit operand holds two 27-bit lanes, and the unit produces two independent
lane results.

| step | unit                              | computes                          | mode |
|------|-----------------------------------|-----------------------------------|------|
| 1    | `recip_lut` 256x53 and 256x24     | a1^-1 from 8 bits of y            | dual (two tables) |
| 2    | `mult_dual_54x54`                 | x * a1^-1                         | dual |
| 2    | `mult_dual_54x44`                 | t = a1^-1 * a2                    | dual |
| 3    | `square_dual_54`                  | t^2                               | dual |
| 4    | `dual_sub` (2x27)                 | Z = t - t^2                       | dual |
| 4    | `square_34`                       | t^4 (only the top 34 bits of t^2 matter) | DP |
| 5    | 54-bit adder                      | alpha = 1 + t^2 + t^4             | DP |
| 6    | `mult_54x54`                      | beta = alpha * Z                  | DP |
| 7    | `mult_dual_54x54`                 | W = x*a1^-1 * (DP ? beta : Z)     | dual |
| 8    | `dual_sub` (2x28)                 | q = x*a1^-1 - W                   | dual |

The dual multipliers use **Karatsuba** with 27-bit halves. The two half products
a_h*b_h and a_l*b_l are exactly the two SP lane products. The DP product adds the middle
term ((a_h + a_l)(b_h + b_l) - a_h*b_h - a_l*b_l) at bit 27. So the DP product costs
three narrow multipliers instead of four, and SP mode just leaves the middle term out. The
54x44 multiplier splits its operands at 27 and 22 bits. It aligns the two splits by using
{a_h, 5'b0} in the middle term. The squarers use the block form
{h^2, l^2} + {h*l, 2^(block+1)}.

The 256x53 table serves DP and SP-2. The 256x24 table serves SP-1, and its entries equal
bits [52:29] of the large table. Both tables are computed at elaboration:
entry(i) = round(2^61 / (256 + i)), with entry 0 saturated to 2^53 - 1.

Fixed-point scales between the steps (LSB weights chosen so that the known leading zeros
of t < 2^-8 are not carried in the 54-bit operands):

- DP: x·2^52, a1^-1·2^53, a2·2^52, t and Z ·2^62, t^4·2^100, alpha·2^53, beta·2^62,
  q·2^55 (56 bits).
- SP lane: x·2^23, a1^-1·2^27, a2·2^23, t and Z ·2^35, x·a1^-1·2^26 in step 7, q·2^27
  (28 bits).

The mantissa quotient word `div_m` holds the DP quotient in [63:8] or the two SP quotients
in [63:36] and [31:4]. So each SP lane starts at the top of a 32-bit half.

### Accuracy

The reciprocal table limits the precision. Its error passes one-for-one into the relative
error of q. For DP this is at most about 2^-53. For SP the 24-bit table and the missing
t^3 term add up to about 1.5·2^-24.

In 200 000 random operations (about 96 000 DP and 191 000 SP lane results with a finite
reference), the distance to the correctly rounded quotient was:

| ulp off | DP      | SP      |
|---------|---------|---------|
| 0       | 81.9 %  | 78.3 %  |
| 1       | 18.1 %  | 21.7 %  |
| 2       | 5 cases | 24 cases |

The 2-ulp cases are those where the table error and the truncation of the later terms
add up to more than one ulp before rounding.

Exact quotients such as 1/1 or 6/3 come out exact in both modes. Bit-exact IEEE rounding
would need a wider table or more series terms.

## Sub-normal operands and results

Sub-normal operands are normalised before the division:

1. The extractor gives a sub-normal operand the exponent 1 and a hidden bit of 0.
2. `dual_lod64` counts the mantissa's leading zeros. It is a tree of 2-bit detectors that
   yields the two 32-bit counts (SP) and their 6-bit combination (DP) at no extra cost.
3. `dual_lshift64` shifts the mantissa left by that count.
4. `dpdsp_exp` subtracts the shift from the exponent.

`dpdsp_exp` then computes the biased quotient exponent for each lane:

    E = (e1 - ls1) - (e2 - ls2) + BIAS

The quotient q of two normalised mantissas lies in (0.5, 2). A result is *tiny* when
E <= 1. Tiny results are shifted right by `1 - E` places (at most 63 for DP, 31 for SP) by
`dual_rshift64`. They are then rounded at the bit positions of a quotient >= 1 with a zero
exponent field. A tiny result that rounds up to the smallest normal number simply gets
exponent 1.

Both shifters are two 32-bit barrel shifters with a few extra parts:

- a first stage that moves by 32 (DP only);
- in each of the following stages, one multiplexer that passes bits across the middle of
  the word in DP mode.

The shift amounts of the mode not in use are forced to zero.

## Rounding and final processing

`dual_round` rounds each lane to nearest even. The position of the last mantissa bit
depends on whether the lane's quotient is >= 1 (path A) or < 1 (path B). The guard, round
and sticky bits sit just below that position. The three rounding increments (ULPs) are
added by two 32-bit adders. The carry from the lower half reaches the upper half only in
DP mode.

`lane_final`, one instance per lane, finishes the result:

- It picks the exponent: E, E-1 or 0, or E+1 on a mantissa overflow. A quotient >= 1
  cannot actually round up to 2, but the overflow path is kept.
- It turns exponents of all ones or more into infinity (overflow).
- It applies the special cases. A NaN operand, 0/0 or inf/inf gives a quiet NaN
  (0x7ff8... / 0x7fc00000). inf/x and x/0 give a signed infinity. 0/x and x/inf give a
  signed zero.

A 64-bit multiplexer then picks the DP result or the two SP results.

## Sharing between the modes

- The extractor builds the DP checks from the SP-2 checks. DP sub-normal is SP-2
  sub-normal plus bits [54:52] zero. DP zero is SP-1 zero, SP-2 zero and a clear bit 31.
  Only the SP-1 checks are extra.
- The leading-one detector needs no extra logic. The shifters and the rounding adder each
  add one multiplexer or carry gate per stage.
- In the mantissa divider the extra hardware is the 256x24 table and the mode
  multiplexers. The t^4 squarer, the alpha adder and the beta multiplier work only in DP
  mode.

## Interface and timing (`dpdsp_div`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst_n`     | in  | 1     | synchronous, active low; clears `out_valid` |
| `in_valid`  | in  | 1     | an operation is presented this cycle |
| `dp_sp`     | in  | 1     | 1 = one DP division, 0 = two SP divisions |
| `in1`,`in2` | in  | 64    | dividend(s), divisor(s) |
| `out_valid` | out | 1     | `out`/`status` hold the previous cycle's operation |
| `out`       | out | 64    | quotient(s) |
| `status`    | out | 8     | [7:4] DP or SP-2, [3:0] SP-1 (0 in DP mode); each `{invalid, div_zero, overflow, underflow}` |

The whole divider is one combinational path from the operand ports to an output register.
Latency is one cycle, and a new operation, in either mode, can start every cycle. The
underflow flag is set when a finite, non-zero quotient ends up sub-normal or zero; there
is no inexact test. The path is long: the original architecture reports about 39 ns in a
0.18 µm process. Pipelining it means cutting it between the steps of the mantissa
divider.

## Where this RTL departs from the published architecture

- **SP reciprocal in its lane.** The published datapath zero-pads the 24-bit SP reciprocal
  at the top of its 27-bit lane. Here it sits at the top of the lane, followed by the bits
  `100`, which adds half an LSB. The 24-bit entry is a truncation, so without this
  correction exact quotients such as 1/1 come out one ulp low.
- **Right-shift amount.** The published equation shifts tiny results by −E; this design
  shifts by 1 − E because of where it rounds tiny results (see above).
- **Rounding adder width.** The adder is built from two 32-bit halves instead of two
  28-bit ones, to match the shifter halves.
- **Choices of this design where the architecture gives no detail:**
  - which product bits feed each following step;
  - the table contents and rounding;
  - the NaN encoding;
  - the status flags;
  - the output register and valid handshake;
  - dropping the bits that the right shifter shifts out. They do not feed the sticky bit,
    so they can only matter for sub-normal results, and stay within the error bound above.

## Files

- `rtl/dpdsp_pkg.sv` holds the formats, the exception record and the status type.
- `rtl/dpdsp_div.sv` is the top.
- Datapath units: `dpdsp_extract`, `dual_lod64` (with `lod_tree`), `dual_lshift64`,
  `dpdsp_exp`, `dpdsp_mant_div`, `dual_rshift64`, `dual_round` and `lane_final`.
- Mantissa-divider parts: `recip_lut`, `mult_dual_54x54`, `mult_dual_54x44`,
  `square_dual_54`, `square_34`, `mult_54x54` and `dual_sub`.
- `tb/tb_<module>.sv` is a self-checking testbench for each module. Each prints
  `TB_RESULT checks=N failures=M`. `tb/fp_ref_pkg.sv` is the IEEE reference they use: the
  simulator's double division, plus a double-to-single rounding function.
- `tb/tb_dpdsp_div.sv` runs the whole divider. It streams 20 000 random operations in
  randomly mixed modes, with special-value and boundary operands. It checks every result
  against the reference, within 2 ulp, and the one-cycle latency. It also
  checks exact vectors with their status flags. It counts how often each mechanism was
  exercised: sub-normal inputs and outputs, rounding into the next binade, overflow,
  divide-by-zero, invalid and mode switches.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_dpdsp_div \
        rtl/dpdsp_pkg.sv tb/fp_ref_pkg.sv tb/tb_dpdsp_div.sv -Mdir obj -o sim
    ./obj/sim

The other testbenches build the same way with their own top module. Add
`rtl/dpdsp_pkg.sv` to the command line for those that use the package. Each run takes
well under a second.
