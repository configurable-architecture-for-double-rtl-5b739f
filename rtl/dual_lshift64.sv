// Dual-mode dynamic left shifter: one 64-bit shift (DP) or two independent 32-bit shifts (SP).
//
// The shift amounts not used by the current mode are forced to zero (SP amounts when dp_sp
// is 1, the DP amount when it is 0). An initial stage shifts the whole word by 32 on the DP
// amount's bit 5. Stages 1..5 then shift by 16, 8, 4, 2, 1: each 32-bit half is shifted by
// the stage's bit of its own amount (dp | sp2 for the upper, dp | sp1 for the lower half),
// and for the upper half a further multiplexer, selected by dp_sp & dp bit, takes the
// combination with the bits that cross over from the lower half. Apart from that one
// multiplexer per stage, the unit is two 32-bit barrel shifters. Structure as in the
// document. Purely combinational; zeros are shifted in.
//   in       : word to shift
//   dp_sp    : 1 = one 64-bit shift by dp_shift, 0 = two 32-bit shifts by sp2/sp1_shift
//   dp_shift, sp2_shift, sp1_shift : shift amounts
//   out      : shifted word
module dual_lshift64 (
  input  logic [63:0] in,
  input  logic        dp_sp,
  input  logic [5:0]  dp_shift,
  input  logic [4:0]  sp2_shift,
  input  logic [4:0]  sp1_shift,
  output logic [63:0] out
);
  logic [5:0]  dp_a;
  logic [4:0]  sp2_a, sp1_a;
  logic [63:0] st [6];

  always_comb begin
    dp_a  = dp_sp ? dp_shift  : 6'd0;
    sp2_a = dp_sp ? 5'd0 : sp2_shift;
    sp1_a = dp_sp ? 5'd0 : sp1_shift;
  end

  assign st[0] = dp_a[5] ? {in[31:0], 32'b0} : in;

  for (genvar k = 1; k <= 5; k++) begin : g_stage
    localparam int unsigned X = 5 - k;        // shift bit handled by this stage
    localparam int unsigned Y = 1 << X;       // shift distance
    logic [31:0] hi_in, lo_in, hi_sh, lo_sh, x_dp;
    logic [63:0] so;
    always_comb begin
      hi_in = st[k-1][63:32];
      lo_in = st[k-1][31:0];
      hi_sh = (dp_a[X] | sp2_a[X]) ? (hi_in << Y) : hi_in;
      lo_sh = (dp_a[X] | sp1_a[X]) ? (lo_in << Y) : lo_in;
      x_dp  = {hi_in[31-Y:0], lo_in[31:32-Y]};
      so    = {(dp_sp & dp_a[X]) ? x_dp : hi_sh, lo_sh};
    end
    assign st[k] = so;
  end

  always_comb out = st[5];
endmodule
