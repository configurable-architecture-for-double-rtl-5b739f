// Dual-mode subtractor: one 2H-bit subtraction (DP) or two independent H-bit ones (SP).
//
// Two H-bit subtractors are chained through the borrow of the lower half; the borrow is
// passed on only in DP mode, so in SP mode each half is its own lane. The document uses
// it with H = 27 (Z = a1^-1.a2 - a1^-2.a2^2) and H = 28 (final x.a1^-1 - W); how the
// halves are joined is this design's. Purely combinational, results modulo 2^H per half.
//   a, b  : operands, lane 2 in the upper half, lane 1 in the lower half
//   dp_sp : 1 = one 2H-bit difference, 0 = two H-bit differences
//   d     : a - b
module dual_sub #(
  parameter int unsigned H = 27
) (
  input  logic [2*H-1:0] a,
  input  logic [2*H-1:0] b,
  input  logic           dp_sp,
  output logic [2*H-1:0] d
);
  logic [H:0]   lo;
  logic [H-1:0] hi;
  logic         borrow;

  always_comb begin
    lo     = {1'b0, a[H-1:0]} - {1'b0, b[H-1:0]};
    borrow = lo[H] & dp_sp;
    hi     = a[2*H-1:H] - b[2*H-1:H] - {{(H-1){1'b0}}, borrow};
    d      = {hi, lo[H-1:0]};
  end
endmodule
