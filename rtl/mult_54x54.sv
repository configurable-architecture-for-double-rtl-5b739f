// 54x54 Karatsuba multiplier (single mode, used for the DP-only beta = alpha * Z step).
//
// Split into 27-bit halves: p = hh*2^54 + ((a_h+a_l)*(b_h+b_l) - hh - ll)*2^27 + ll, i.e.
// two 27x27 and one 28x28 multiplier. The document states the Karatsuba method for this
// step; the decomposition is the same as in the dual-mode multiplier, without the SP
// multiplexer. Purely combinational.
//   a, b : 54-bit operands
//   p    : 108-bit product
module mult_54x54 (
  input  logic [53:0]  a,
  input  logic [53:0]  b,
  output logic [107:0] p
);
  logic [53:0] hh, ll;
  logic [27:0] a_sum, b_sum;
  logic [55:0] mid;

  always_comb begin
    hh    = a[53:27] * b[53:27];
    ll    = a[26:0]  * b[26:0];
    a_sum = {1'b0, a[53:27]} + {1'b0, a[26:0]};
    b_sum = {1'b0, b[53:27]} + {1'b0, b[26:0]};
    mid   = a_sum * b_sum - ({2'b0, hh} + {2'b0, ll});
    p     = {hh, ll} + {25'b0, mid, 27'b0};
  end
endmodule
