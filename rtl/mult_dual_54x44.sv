// Dual-mode 54x44 multiplier: one 54x44 product (DP) or two 27x22 products (SP).
//
// Karatsuba with unequal splits: a = a_h*2^27 + a_l (27-bit halves), b = b_h*2^22 + b_l
// (22-bit halves). Writing a_h*2^27 as (a_h*2^5)*2^22 aligns both splits, so the middle
// term is ({a_h,5'b0} + a_l)*(b_h + b_l) - ({hh,5'b0} + ll) and the full product is
// {hh, ll} + middle*2^22, where hh = a_h*b_h and ll = a_l*b_l are the SP lane products.
// Equations and widths follow the document. Purely combinational.
//   a     : 54-bit operand, SP lane 2 in [53:27], lane 1 in [26:0]
//   b     : 44-bit operand, SP lane 2 in [43:22], lane 1 in [21:0]
//   dp_sp : 1 = one 54x44 product, 0 = two 27x22 products
//   p     : 98-bit product, or {lane2 product[48:0], lane1 product[48:0]}
module mult_dual_54x44 (
  input  logic [53:0] a,
  input  logic [43:0] b,
  input  logic        dp_sp,
  output logic [97:0] p
);
  logic [48:0] sp1_o, sp2_o;
  logic [32:0] a_sum;
  logic [22:0] b_sum;
  logic [55:0] mid_full;
  logic [55:0] tmp;
  logic [97:0] dp_o;

  always_comb begin
    sp1_o    = a[26:0]  * b[21:0];
    sp2_o    = a[53:27] * b[43:22];
    a_sum    = {1'b0, a[53:27], 5'b0} + {6'b0, a[26:0]};
    b_sum    = {1'b0, b[43:22]} + {1'b0, b[21:0]};
    mid_full = a_sum * b_sum;
    tmp      = mid_full - ({2'b0, sp2_o, 5'b0} + {7'b0, sp1_o});
    dp_o     = {sp2_o, sp1_o} + {20'b0, tmp, 22'b0};
    p        = dp_sp ? dp_o : {sp2_o, sp1_o};
  end
endmodule
