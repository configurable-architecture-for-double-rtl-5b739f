// DPdSP floating-point divider: each operation is either one IEEE-754 double-precision
// division or two independent single-precision divisions, on one shared datapath.
//
// dp_sp = 1 : in1 / in2 as doubles.
// dp_sp = 0 : in1[63:32] / in2[63:32] (SP-2) and in1[31:0] / in2[31:0] (SP-1) as singles.
// Data flow (all combinational between the operand inputs and the output register):
//   extraction and exception checks -> dual leading-one detection and dual left shift of
//   both mantissas (sub-normal normalisation) -> per-lane sign, exponent and right-shift
//   amount -> series-expansion mantissa division -> dual right shift (sub-normal results)
//   -> dual rounding (round to nearest even) -> per-lane normalisation, exponent update and
//   exceptional cases -> 64-bit output multiplexer.
// Sub-normal operands and results, zero, infinity, NaN and divide-by-zero are handled.
// The data flow is the document's single-cycle design. The result and status are
// registered here (one register stage, latency 1 cycle, one operation per cycle); the
// valid handshake, the reset and the status flags are this design's. Results are within
// two units in the last place (DP and SP) of the correctly rounded quotient; the
// bound comes from the precision of the reciprocal tables.
//   clk, rst_n : clock, synchronous active-low reset (clears out_valid only)
//   in_valid   : in1, in2, dp_sp carry an operation this cycle
//   out_valid  : out and status hold the result of the operation of the previous cycle
//   status     : DP: {dp flags, 4'b0}; SP: {SP-2 flags, SP-1 flags}, each flag group
//                {invalid, div_zero, overflow, underflow}
module dpdsp_div
  import dpdsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        dp_sp,
  input  logic [63:0] in1,
  input  logic [63:0] in2,
  output logic        out_valid,
  output logic [63:0] out,
  output logic [7:0]  status
);
  // Extraction
  logic        dp_s1, dp_s2, sp2_s1, sp2_s2, sp1_s1, sp1_s2;
  logic [10:0] dp_e1, dp_e2;
  logic [7:0]  sp2_e1, sp2_e2, sp1_e1, sp1_e2;
  logic [52:0] dp_m1, dp_m2;
  logic [23:0] sp2_m1, sp2_m2, sp1_m1, sp1_m2;
  exc_t        dp_exc, sp2_exc, sp1_exc;

  dpdsp_extract u_extract (
    .in1, .in2,
    .dp_s1, .dp_s2, .sp2_s1, .sp2_s2, .sp1_s1, .sp1_s2,
    .dp_e1, .dp_e2, .sp2_e1, .sp2_e2, .sp1_e1, .sp1_e2,
    .dp_m1, .dp_m2, .sp2_m1, .sp2_m2, .sp1_m1, .sp1_m2,
    .dp_exc, .sp2_exc, .sp1_exc
  );

  // Sub-normal processing: mantissa words, leading-one detection, left shift
  logic [63:0] m1_w, m2_w, m1_n, m2_n;
  logic [5:0]  dp_ls1, dp_ls2;
  logic [4:0]  sp2_ls1, sp2_ls2, sp1_ls1, sp1_ls2;

  always_comb begin
    m1_w = dp_sp ? {dp_m1, 11'b0} : {sp2_m1, 8'b0, sp1_m1, 8'b0};
    m2_w = dp_sp ? {dp_m2, 11'b0} : {sp2_m2, 8'b0, sp1_m2, 8'b0};
  end

  dual_lod64 u_lod1 (.in(m1_w), .dp_shift(dp_ls1), .sp2_shift(sp2_ls1), .sp1_shift(sp1_ls1));
  dual_lod64 u_lod2 (.in(m2_w), .dp_shift(dp_ls2), .sp2_shift(sp2_ls2), .sp1_shift(sp1_ls2));

  dual_lshift64 u_lsh1 (.in(m1_w), .dp_sp, .dp_shift(dp_ls1), .sp2_shift(sp2_ls1),
                        .sp1_shift(sp1_ls1), .out(m1_n));
  dual_lshift64 u_lsh2 (.in(m2_w), .dp_sp, .dp_shift(dp_ls2), .sp2_shift(sp2_ls2),
                        .sp1_shift(sp1_ls2), .out(m2_n));

  // Sign, exponent and right shift per lane
  logic               dp_s, sp2_s, sp1_s;
  logic signed [13:0] dp_e;
  logic signed [10:0] sp2_e, sp1_e;
  logic [5:0]         dp_rs;
  logic [4:0]         sp2_rs, sp1_rs;
  logic               dp_tiny, sp2_tiny, sp1_tiny;

  dpdsp_exp #(.EW(DP_EW), .BIAS(DP_BIAS), .LSW(6)) u_exp_dp (
    .s1(dp_s1), .s2(dp_s2), .e1(dp_e1), .e2(dp_e2), .ls1(dp_ls1), .ls2(dp_ls2),
    .s(dp_s), .e(dp_e), .rs(dp_rs), .tiny(dp_tiny));
  dpdsp_exp #(.EW(SP_EW), .BIAS(SP_BIAS), .LSW(5)) u_exp_sp2 (
    .s1(sp2_s1), .s2(sp2_s2), .e1(sp2_e1), .e2(sp2_e2), .ls1(sp2_ls1), .ls2(sp2_ls2),
    .s(sp2_s), .e(sp2_e), .rs(sp2_rs), .tiny(sp2_tiny));
  dpdsp_exp #(.EW(SP_EW), .BIAS(SP_BIAS), .LSW(5)) u_exp_sp1 (
    .s1(sp1_s1), .s2(sp1_s2), .e1(sp1_e1), .e2(sp1_e2), .ls1(sp1_ls1), .ls2(sp1_ls2),
    .s(sp1_s), .e(sp1_e), .rs(sp1_rs), .tiny(sp1_tiny));

  // Mantissa division and right shift
  logic [63:0] div_m, div_ms;

  dpdsp_mant_div u_mant (.m1(m1_n), .m2(m2_n), .dp_sp, .div_m);

  dual_rshift64 u_rsh (.in(div_m), .dp_sp, .dp_shift(dp_rs), .sp2_shift(sp2_rs),
                       .sp1_shift(sp1_rs), .out(div_ms));

  // Rounding
  logic        dp_pa, sp2_pa, sp1_pa;
  logic [63:0] rnd;
  logic        co_hi, co_lo;

  always_comb begin
    dp_pa  = div_m[63] | dp_tiny;
    sp2_pa = div_m[63] | sp2_tiny;
    sp1_pa = div_m[31] | sp1_tiny;
  end

  dual_round u_round (.m(div_ms), .dp_sp, .dp_pa, .sp2_pa, .sp1_pa,
                      .sum(rnd), .co_hi, .co_lo);

  // Final processing per lane and output multiplexer
  logic [63:0] dp_res;
  logic [31:0] sp2_res, sp1_res;
  status_t     dp_st, sp2_st, sp1_st;

  lane_final #(.EW(DP_EW), .MW(DP_MW)) u_fin_dp (
    .q_top(rnd[63:10]), .co(co_hi), .path_a(dp_pa), .tiny(dp_tiny), .e(dp_e), .s(dp_s),
    .exc(dp_exc), .res(dp_res), .status(dp_st));
  lane_final #(.EW(SP_EW), .MW(SP_MW)) u_fin_sp2 (
    .q_top(rnd[63:39]), .co(co_hi), .path_a(sp2_pa), .tiny(sp2_tiny), .e(sp2_e), .s(sp2_s),
    .exc(sp2_exc), .res(sp2_res), .status(sp2_st));
  lane_final #(.EW(SP_EW), .MW(SP_MW)) u_fin_sp1 (
    .q_top(rnd[31:7]), .co(co_lo), .path_a(sp1_pa), .tiny(sp1_tiny), .e(sp1_e), .s(sp1_s),
    .exc(sp1_exc), .res(sp1_res), .status(sp1_st));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
      status    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out    <= dp_sp ? dp_res : {sp2_res, sp1_res};
        status <= dp_sp ? {dp_st, 4'b0} : {sp2_st, sp1_st};
      end
    end
  end
endmodule
