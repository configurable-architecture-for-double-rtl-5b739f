// Dual-mode 64-bit leading-one detector (LOD64:6).
//
// Two 32-bit detectors look at in[63:32] and in[31:0]. Their leading-zero counts are the
// left-shift amounts of the two SP mantissas (SP-2 in the upper half, SP-1 in the lower);
// joined like any tree node they give the 6-bit DP count. No hardware is added for the dual
// mode: all three counts are produced at once and the consumer picks by mode. This is the
// document's structure. Purely combinational.
//   in        : mantissa word, DP mantissa left-aligned at bit 63, SP mantissas at 63 and 31
//   dp_shift  : leading zeros of in[63:0] (63 when in is zero)
//   sp2_shift : leading zeros of in[63:32] (31 when that half is zero)
//   sp1_shift : leading zeros of in[31:0]
module dual_lod64 (
  input  logic [63:0] in,
  output logic [5:0]  dp_shift,
  output logic [4:0]  sp2_shift,
  output logic [4:0]  sp1_shift
);
  logic v_hi, v_lo;

  lod_tree #(.W(32)) u_hi (.in(in[63:32]), .v(v_hi), .cnt(sp2_shift));
  lod_tree #(.W(32)) u_lo (.in(in[31:0]),  .v(v_lo), .cnt(sp1_shift));

  always_comb
    dp_shift = v_hi ? {1'b0, sp2_shift} : {1'b1, sp1_shift};
endmodule
