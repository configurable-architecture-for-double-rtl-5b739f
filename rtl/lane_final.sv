// Post-rounding normalisation, exponent update and exceptional cases of one lane
// (instantiated for DP, SP-2 and SP-1).
//
// q_top holds the lane's rounded quotient from its top bit down, MW+2 bits: the bit for 1.0
// (path A hidden bit), then the fraction. co is the rounding carry out of the lane.
//   path A (quotient >= 1, or tiny): co -> exponent Eb+1, fraction 0 (mantissa overflow,
//       shifted right by one); top bit set -> exponent Eb; top bit clear (tiny only) ->
//       exponent field 0, a sub-normal. Eb = 1 for tiny results, else E.
//   path B (quotient < 1, not tiny): top bit set (rounded up to 1.0) -> exponent E;
//       else exponent E-1 and the fraction one place lower.
// An exponent of 2^EW-1 or more gives infinity (overflow). Then the exceptional cases
// override the result: NaN operand, 0/0 or inf/inf -> quiet NaN (invalid); inf/x or x/0 ->
// infinity (x/0 with finite non-zero x also flags divide-by-zero); 0/x or x/inf -> zero.
// The document lists these steps (exponent and mantissa update for underflow, overflow and
// exceptional cases, and a status signal); the encoding of the NaN (sign 0, fraction MSB
// set) and the status flags are this design's. Purely combinational.
//   res    : {sign, exponent, fraction} of the lane
//   status : {invalid, div_zero, overflow, underflow}
module lane_final
  import dpdsp_pkg::*;
#(
  parameter int unsigned EW = 11,
  parameter int unsigned MW = 52
) (
  input  logic [MW+1:0]        q_top,
  input  logic                 co,
  input  logic                 path_a,
  input  logic                 tiny,
  input  logic signed [EW+2:0] e,
  input  logic                 s,
  input  exc_t                 exc,
  output logic [EW+MW:0]       res,
  output status_t              status
);
  localparam int unsigned XW = EW + 3;
  logic signed [XW-1:0] eb, ef;
  logic [MW-1:0]        frac;
  logic                 ovf, nan, inf, zero;

  always_comb begin
    eb = tiny ? $signed(XW'(1)) : e;
    if (path_a) begin
      if (co) begin
        ef   = eb + $signed(XW'(1));
        frac = '0;
      end else if (q_top[MW+1]) begin
        ef   = eb;
        frac = q_top[MW:1];
      end else begin
        ef   = '0;
        frac = q_top[MW:1];
      end
    end else begin
      if (q_top[MW+1]) begin
        ef   = e;
        frac = q_top[MW:1];
      end else begin
        ef   = e - $signed(XW'(1));
        frac = q_top[MW-1:0];
      end
    end
    ovf  = (ef >= $signed(XW'((1 << EW) - 1)));

    nan  = exc.nan_a | exc.nan_b | (exc.zero_a & exc.zero_b) | (exc.inf_a & exc.inf_b);
    inf  = exc.inf_a | exc.zero_b;
    zero = exc.zero_a | exc.inf_b;

    status = '0;
    if (nan) begin
      res            = {1'b0, {EW{1'b1}}, 1'b1, {(MW-1){1'b0}}};
      status.invalid = 1'b1;
    end else if (inf) begin
      res             = {s, {EW{1'b1}}, {MW{1'b0}}};
      status.div_zero = exc.zero_b & ~exc.inf_a;
    end else if (zero) begin
      res = {s, {(EW+MW){1'b0}}};
    end else if (ovf) begin
      res             = {s, {EW{1'b1}}, {MW{1'b0}}};
      status.overflow = 1'b1;
    end else begin
      res              = {s, ef[EW-1:0], frac};
      status.underflow = (ef == '0);
    end
  end
endmodule
