// Dual-mode 54-bit squarer: one 54-bit square (DP) or two 27-bit squares (SP).
//
// With 27-bit blocks i = h*2^27 + l, the square is h^2*2^54 + 2*h*l*2^27 + l^2, so three
// 27x27 multipliers (h*h, l*l, h*l) and one adder suffice: {h^2, l^2} + {h*l, 28'b0}. In SP
// mode the cross term is dropped and the two block squares are the lane results. This
// follows the document's equation. Purely combinational.
//   i     : operand, SP lane 2 in [53:27], lane 1 in [26:0]
//   dp_sp : 1 = one 54-bit square, 0 = two 27-bit squares
//   p     : 108-bit square, or {lane2 square[53:0], lane1 square[53:0]}
module square_dual_54 (
  input  logic [53:0]  i,
  input  logic         dp_sp,
  output logic [107:0] p
);
  logic [53:0]  sp1_o, sp2_o, tmp;
  logic [107:0] dp_o;

  always_comb begin
    sp1_o = i[26:0]  * i[26:0];
    sp2_o = i[53:27] * i[53:27];
    tmp   = i[53:27] * i[26:0];
    dp_o  = {sp2_o, sp1_o} + {26'b0, tmp, 28'b0};
    p     = dp_sp ? dp_o : {sp2_o, sp1_o};
  end
endmodule
