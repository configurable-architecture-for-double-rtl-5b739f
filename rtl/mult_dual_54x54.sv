// Dual-mode 54x54 multiplier: one 54x54 product (DP) or two independent 27x27 products (SP).
//
// Karatsuba with 27-bit halves: the two half products hh = a[53:27]*b[53:27] and
// ll = a[26:0]*b[26:0] are exactly the two SP products, and the middle term is
// (a_h + a_l)*(b_h + b_l) - (hh + ll), so a DP product costs two 27x27 and one 28x28
// multiplier plus adders. In SP mode the output is the concatenation {hh, ll}; in DP mode
// the middle term is added at bit 27. Split, widths and the mode multiplexer follow the
// document; the operator-level description (each '*' left to synthesis) is this design's.
// Purely combinational.
//   a, b  : operands; in SP mode lane 2 sits in [53:27] and lane 1 in [26:0]
//   dp_sp : 1 = one 54x54 product, 0 = two 27x27 products
//   p     : 108-bit product, or {lane2 product[53:0], lane1 product[53:0]}
module mult_dual_54x54 (
  input  logic [53:0]  a,
  input  logic [53:0]  b,
  input  logic         dp_sp,
  output logic [107:0] p
);
  logic [53:0]  sp1_o, sp2_o;
  logic [27:0]  a_sum, b_sum;
  logic [55:0]  mid_full;
  logic [55:0]  tmp;
  logic [107:0] dp_o;

  always_comb begin
    sp1_o    = a[26:0]  * b[26:0];
    sp2_o    = a[53:27] * b[53:27];
    a_sum    = {1'b0, a[53:27]} + {1'b0, a[26:0]};
    b_sum    = {1'b0, b[53:27]} + {1'b0, b[26:0]};
    mid_full = a_sum * b_sum;
    tmp      = mid_full - ({2'b0, sp2_o} + {2'b0, sp1_o});
    dp_o     = {sp2_o, sp1_o} + {25'b0, tmp, 27'b0};
    p        = dp_sp ? dp_o : {sp2_o, sp1_o};
  end
endmodule
