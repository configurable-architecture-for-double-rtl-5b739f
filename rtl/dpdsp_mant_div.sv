// Dual-mode mantissa divider: one DP mantissa quotient or two SP mantissa quotients,
// computed by series expansion on one shared datapath (purely combinational).
//
// The divisor mantissa y in [1,2) is split into a1 (leading one and the next 8 bits) and
// a2 (the rest); with t = a1^-1 * a2 < 2^-8,
//   DP: q = x*a1^-1 - x*a1^-1 * [(t - t^2) * (1 + t^2 + t^4)]   (seven series terms)
//   SP: q = x*a1^-1 - x*a1^-1 * (t - t^2)                       (three series terms)
// Steps, as in the document:
//   1 a1^-1 from the 256x53 DP/SP-2 table and the 256x24 SP-1 table
//   2 x*a1^-1 (dual 54x54) and t = a1^-1*a2 (dual 54x44)
//   3 t^2 (dual 54-bit square)
//   4 t^4 (34-bit square, DP only) and Z = t - t^2 (dual 2x27-bit subtractor)
//   5 alpha = 1 + t^2 + t^4 (54-bit adder, DP only)
//   6 beta = alpha * Z (54x54 Karatsuba, DP only)
//   7 W = x*a1^-1 * (DP ? beta : Z) (dual 54x54)
//   8 q = x*a1^-1 - W (dual 2x28-bit subtractor)
// Which bits of each product feed the next step is this design's choice (the document
// gives only the operand widths); every choice keeps the leading zeros known from
// t < 2^-8 out of the 54-bit operands. Fixed-point scales used:
//   DP: x*2^52, a1^-1*2^53, a2*2^52, t*2^62, t^2*2^62 (Z), t^4*2^100, alpha*2^53,
//       beta*2^62, q*2^55
//   SP lane: x*2^23, a1^-1*2^27, a2*2^23, t*2^35, Z*2^35, x*a1^-1*2^26, q*2^27
// The 24-bit SP reciprocal is a truncated value, so in its 27-bit lane it is completed with
// the bits 100 below it (half an LSB), which centres its error; the document pads the lane
// with three zero bits above it instead. This is this design's change, made because the
// truncated reciprocal alone leaves exact quotients such as 1/1 one unit low.
// Accuracy is bounded by the tables: the 53-bit (DP) or 24-bit (SP) a1^-1 carries a relative
// error of up to about 2^-53 (DP) or 2^-24 (SP), which passes straight into q; for SP the
// three-term series adds up to 2^-24 more.
// Interface:
//   m1, m2 : normalised dividend and divisor mantissas (leading one at bit 63 for DP,
//            at bits 63 and 31 for the two SP lanes; DP uses [63:11], SP [63:40] / [31:8])
//   dp_sp  : 1 = DP, 0 = two SP
//   div_m  : DP: q*2^55 in [63:8]; SP: lane 2 q*2^27 in [63:36], lane 1 in [31:4]
module dpdsp_mant_div (
  input  logic [63:0] m1,
  input  logic [63:0] m2,
  input  logic        dp_sp,
  output logic [63:0] div_m
);
  logic [52:0] dp_m1, dp_m2;
  logic [23:0] sp2_m1, sp1_m1, sp2_m2, sp1_m2;

  logic [7:0]   idx_dp;
  logic [52:0]  lut_dp;        // DP / SP-2 table output
  logic [23:0]  lut_sp1;       // SP-1 table output
  logic [53:0]  x, r;
  logic [43:0]  a2;
  logic [107:0] xr_p;          // step 2: x * a1^-1
  logic [97:0]  t_p;           // step 2: a1^-1 * a2
  logic [53:0]  t_op;          // t as the 54-bit operand of steps 3 and 4
  logic [107:0] t2_p;          // step 3: t^2
  logic [53:0]  t2_op;         // t^2 aligned with t
  logic [53:0]  z;             // step 4: t - t^2
  logic [67:0]  t4_p;          // step 4: t^4 (DP)
  logic [53:0]  alpha;         // step 5 (DP)
  logic [107:0] beta_p;        // step 6 (DP)
  logic [53:0]  xr_op, m7_op;  // step 7 operands
  logic [107:0] w_p;           // step 7: W
  logic [55:0]  xr_fin, w_fin; // step 8 operands
  logic [55:0]  q;

  always_comb begin
    dp_m1  = m1[63:11];
    dp_m2  = m2[63:11];
    sp2_m1 = m1[63:40];
    sp1_m1 = m1[31:8];
    sp2_m2 = m2[63:40];
    sp1_m2 = m2[31:8];
    idx_dp = dp_sp ? dp_m2[51:44] : sp2_m2[22:15];
  end

  // Step 1: reciprocal tables
  recip_lut #(.OUT_W(53)) u_lut_dp  (.idx(idx_dp),        .r(lut_dp));
  recip_lut #(.OUT_W(24)) u_lut_sp1 (.idx(sp1_m2[22:15]), .r(lut_sp1));

  always_comb begin
    x  = dp_sp ? {1'b0, dp_m1} : {3'b0, sp2_m1, 3'b0, sp1_m1};
    r  = dp_sp ? {1'b0, lut_dp} : {lut_dp[52:29], 3'b100, lut_sp1, 3'b100};
    a2 = dp_sp ? dp_m2[43:0] : {7'b0, sp2_m2[14:0], 7'b0, sp1_m2[14:0]};
  end

  // Step 2
  mult_dual_54x54 u_xr (.a(x), .b(r),  .dp_sp(dp_sp), .p(xr_p));
  mult_dual_54x44 u_t  (.a(r), .b(a2), .dp_sp(dp_sp), .p(t_p));

  always_comb
    t_op = dp_sp ? t_p[96:43] : {t_p[90:64], t_p[41:15]};

  // Step 3
  square_dual_54 u_t2 (.i(t_op), .dp_sp(dp_sp), .p(t2_p));

  always_comb
    t2_op = dp_sp ? {8'b0, t2_p[107:62]} : {8'b0, t2_p[107:89], 8'b0, t2_p[53:35]};

  // Step 4
  dual_sub #(.H(27)) u_z (.a(t_op), .b(t2_op), .dp_sp(dp_sp), .d(z));
  square_34 u_t4 (.i(t2_p[107:74]), .p(t4_p));

  // Step 5: alpha = 1 + t^2 + t^4, scaled by 2^53
  always_comb
    alpha = {1'b1, 53'b0} + {17'b0, t2_p[107:71]} + {33'b0, t4_p[67:47]};

  // Step 6
  mult_54x54 u_beta (.a(alpha), .b(z), .p(beta_p));

  // Step 7
  always_comb begin
    xr_op = dp_sp ? xr_p[105:52] : {xr_p[104:78], xr_p[50:24]};
    m7_op = dp_sp ? beta_p[106:53] : z;
  end

  mult_dual_54x54 u_w (.a(xr_op), .b(m7_op), .dp_sp(dp_sp), .p(w_p));

  // Step 8
  always_comb begin
    xr_fin = dp_sp ? xr_p[105:50] : {xr_p[104:77], xr_p[50:23]};
    w_fin  = dp_sp ? {8'b0, w_p[107:60]} : {8'b0, w_p[107:88], 8'b0, w_p[53:34]};
  end

  dual_sub #(.H(28)) u_q (.a(xr_fin), .b(w_fin), .dp_sp(dp_sp), .d(q));

  always_comb
    div_m = dp_sp ? {q, 8'b0} : {q[55:28], 4'b0, q[27:0], 4'b0};
endmodule
