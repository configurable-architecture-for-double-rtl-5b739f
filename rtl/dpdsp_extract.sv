// Data extraction, sub-normal and exceptional-case handler for the DP / dual-SP divider.
//
// Splits the two 64-bit operands into sign, exponent and mantissa for the DP view and for
// both SP views at once (the consumer picks by mode). A sub-normal operand (exponent field 0)
// gets exponent 1 and a mantissa with a 0 hidden bit, so that the later leading-one
// detection and left shift normalise it. The DP and SP-2 exponent fields overlap in their
// upper 8 bits, so the DP checks reuse the SP-2 ones: DP sub-normal = SP-2 sub-normal and
// bits [54:52] zero; DP zero = both SP zero checks and a clear bit 31; the all-ones exponent
// check (infinity / NaN) is shared the same way. This follows the document; the NaN
// classification and the exc_t record are this design's. Purely combinational.
//   in1, in2           : dividend and divisor words
//   dp_*, sp2_*, sp1_* : sign (s1 dividend, s2 divisor), adjusted exponent, mantissa with
//                        hidden bit, and exception record of the DP, SP-2 and SP-1 view
module dpdsp_extract
  import dpdsp_pkg::*;
(
  input  logic [63:0] in1,
  input  logic [63:0] in2,
  output logic        dp_s1,  dp_s2,  sp2_s1, sp2_s2, sp1_s1, sp1_s2,
  output logic [10:0] dp_e1,  dp_e2,
  output logic [7:0]  sp2_e1, sp2_e2, sp1_e1, sp1_e2,
  output logic [52:0] dp_m1,  dp_m2,
  output logic [23:0] sp2_m1, sp2_m2, sp1_m1, sp1_m2,
  output exc_t        dp_exc, sp2_exc, sp1_exc
);
  // One operand's checks, with the DP ones built from the SP-2 ones.
  typedef struct packed {
    logic sp1_sn, sp2_sn, dp_sn;     // exponent field zero
    logic sp1_ones, sp2_ones, dp_ones; // exponent field all ones
    logic sp1_fz, sp2_fz, dp_fz;     // fraction field zero
    logic sp1_z, sp2_z, dp_z;        // whole magnitude zero
  } chk_t;

  function automatic chk_t check(input logic [63:0] w);
    chk_t c;
    c.sp1_sn   = ~|w[30:23];
    c.sp2_sn   = ~|w[62:55];
    c.dp_sn    = ~|w[54:52] & c.sp2_sn;
    c.sp1_ones = &w[30:23];
    c.sp2_ones = &w[62:55];
    c.dp_ones  = &w[54:52] & c.sp2_ones;
    c.sp1_fz   = ~|w[22:0];
    c.sp2_fz   = ~|w[54:32];
    c.dp_fz    = ~|w[51:32] & c.sp1_fz & ~|w[31:23];
    c.sp1_z    = c.sp1_sn & c.sp1_fz;
    c.sp2_z    = c.sp2_sn & c.sp2_fz;
    c.dp_z     = c.sp1_z & c.sp2_z & ~w[31];
    return c;
  endfunction

  chk_t c1, c2;

  always_comb begin
    c1 = check(in1);
    c2 = check(in2);

    sp1_s1 = in1[31];  sp1_s2 = in2[31];
    sp2_s1 = in1[63];  sp2_s2 = in2[63];
    dp_s1  = in1[63];  dp_s2  = in2[63];

    sp1_e1 = {in1[30:24], in1[23] | c1.sp1_sn};
    sp1_e2 = {in2[30:24], in2[23] | c2.sp1_sn};
    sp2_e1 = {in1[62:56], in1[55] | c1.sp2_sn};
    sp2_e2 = {in2[62:56], in2[55] | c2.sp2_sn};
    dp_e1  = {in1[62:53], in1[52] | c1.dp_sn};
    dp_e2  = {in2[62:53], in2[52] | c2.dp_sn};

    sp1_m1 = {~c1.sp1_sn, in1[22:0]};
    sp1_m2 = {~c2.sp1_sn, in2[22:0]};
    sp2_m1 = {~c1.sp2_sn, in1[54:32]};
    sp2_m2 = {~c2.sp2_sn, in2[54:32]};
    dp_m1  = {~c1.dp_sn, in1[51:0]};
    dp_m2  = {~c2.dp_sn, in2[51:0]};

    sp1_exc = '{nan_a: c1.sp1_ones & ~c1.sp1_fz, nan_b: c2.sp1_ones & ~c2.sp1_fz,
                inf_a: c1.sp1_ones &  c1.sp1_fz, inf_b: c2.sp1_ones &  c2.sp1_fz,
                zero_a: c1.sp1_z, zero_b: c2.sp1_z};
    sp2_exc = '{nan_a: c1.sp2_ones & ~c1.sp2_fz, nan_b: c2.sp2_ones & ~c2.sp2_fz,
                inf_a: c1.sp2_ones &  c1.sp2_fz, inf_b: c2.sp2_ones &  c2.sp2_fz,
                zero_a: c1.sp2_z, zero_b: c2.sp2_z};
    dp_exc  = '{nan_a: c1.dp_ones & ~c1.dp_fz, nan_b: c2.dp_ones & ~c2.dp_fz,
                inf_a: c1.dp_ones &  c1.dp_fz, inf_b: c2.dp_ones &  c2.dp_fz,
                zero_a: c1.dp_z, zero_b: c2.dp_z};
  end
endmodule
