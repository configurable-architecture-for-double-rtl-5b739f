// 34-bit squarer built from 17-bit blocks (used on the DP path only).
//
// i = h*2^17 + l gives i^2 = {h^2, l^2} + {h*l, 18'b0}: three 17x17 multipliers and one
// adder, the same block scheme as the dual 54-bit squarer. The document names the block
// and its 17-bit block size. Purely combinational.
//   i : 34-bit operand
//   p : 68-bit square
module square_34 (
  input  logic [33:0] i,
  output logic [67:0] p
);
  logic [33:0] hh, ll, hl;

  always_comb begin
    hh = i[33:17] * i[33:17];
    ll = i[16:0]  * i[16:0];
    hl = i[33:17] * i[16:0];
    p  = {hh, ll} + {16'b0, hl, 18'b0};
  end
endmodule
