// Sign, exponent and right-shift computation of one lane (instantiated for DP, SP-2, SP-1).
//
//   s  = s1 ^ s2
//   E  = (e1 - ls1) - (e2 - ls2) + BIAS         (biased exponent for a quotient in [1,2))
//   rs = 1 - E when E <= 1, else 0; saturated to the shifter's range
//   tiny = (E <= 1)
// e1/e2 are the extractor's exponents (sub-normals already mapped to 1) and ls1/ls2 the
// left shifts that normalised the mantissas. The sign and exponent equations are the
// document's. The document's right-shift amount is (e2 - ls2) - BIAS - (e1 - ls1) = -E; this
// design shifts by one more place, 1 - E, because its rounding stage takes a tiny result at
// the bit position of a quotient >= 1 with a zero exponent field (see lane_final).
// Purely combinational.
//   EW   : exponent field width (11 DP, 8 SP); BIAS : exponent bias
//   LSW  : width of the shift amounts (6 DP, 5 SP)
//   e    : signed exponent, EW+3 bits (wide enough for every operand pair)
module dpdsp_exp #(
  parameter int unsigned EW   = 11,
  parameter int unsigned BIAS = 1023,
  parameter int unsigned LSW  = 6
) (
  input  logic                  s1,
  input  logic                  s2,
  input  logic [EW-1:0]         e1,
  input  logic [EW-1:0]         e2,
  input  logic [LSW-1:0]        ls1,
  input  logic [LSW-1:0]        ls2,
  output logic                  s,
  output logic signed [EW+2:0]  e,
  output logic [LSW-1:0]        rs,
  output logic                  tiny
);
  localparam int unsigned XW = EW + 3;
  logic signed [XW-1:0] e1n, e2n, rs_full;

  always_comb begin
    s       = s1 ^ s2;
    e1n     = $signed({3'b0, e1}) - $signed({{(XW-LSW){1'b0}}, ls1});
    e2n     = $signed({3'b0, e2}) - $signed({{(XW-LSW){1'b0}}, ls2});
    e       = e1n - e2n + $signed(XW'(BIAS));
    tiny    = (e <= $signed(XW'(1)));
    rs_full = $signed(XW'(1)) - e;
    if (!tiny)
      rs = '0;
    else if (rs_full > $signed(XW'((1 << LSW) - 1)))
      rs = '1;
    else
      rs = rs_full[LSW-1:0];
  end
endmodule
