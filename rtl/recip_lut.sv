// Reciprocal look-up table: a1^-1 for the 8 fraction bits that follow the divisor's
// leading one (step 1 of the series-expansion mantissa division).
//
// The divisor mantissa y in [1,2) is split as y = a1 + a2, a1 = 1.idx (9 bits, idx = the
// next 8 bits). Each of the 256 entries holds 1/a1 scaled by 2^53, rounded to nearest
// (round(2^61 / (256 + idx))); entry 0 would be exactly 2^53 and saturates to 2^53 - 1. A
// table with OUT_W < 53 keeps the upper OUT_W bits of the same entry, so the 256x24 SP-1
// table matches bits [52:29] of the shared 256x53 DP / SP-2 table that serves SP-2. The
// document gives the table sizes and indexing; the contents (scaling, rounding,
// saturation) are this design's. The table is computed at elaboration time. Combinational.
//   idx : 8 fraction bits of a1
//   r   : a1^-1 * 2^OUT_W, in (2^(OUT_W-1), 2^OUT_W)
module recip_lut #(
  parameter int unsigned OUT_W = 53
) (
  input  logic [7:0]       idx,
  output logic [OUT_W-1:0] r
);
  typedef logic [255:0][52:0] table_t;

  function automatic table_t build_table();
    table_t           t;
    longint unsigned  num, den, q;
    num = 64'd1 << 61;
    for (int k = 0; k < 256; k++) begin
      den = 64'(256 + k);
      q   = (num + (den >> 1)) / den;
      if (q > ((64'd1 << 53) - 64'd1)) q = (64'd1 << 53) - 64'd1;
      t[k] = q[52:0];
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  logic [52:0] entry;

  always_comb begin
    entry = TABLE[idx];
    r     = entry[52 -: OUT_W];
  end
endmodule
