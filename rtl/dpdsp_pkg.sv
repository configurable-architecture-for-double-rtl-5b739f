// Shared constants and types of the DP / dual-SP floating-point divider.
//
// The divider runs in one of two modes, chosen per operation by dp_sp:
//   dp_sp = 1 : the 64-bit operands hold one IEEE-754 double,
//   dp_sp = 0 : the 64-bit operands hold two singles, SP2 in [63:32] and SP1 in [31:0].
// The field widths and biases are those of IEEE-754 binary64 and binary32. The status
// flag set is this design's own choice; only its existence is part of the data flow.
package dpdsp_pkg;

  localparam int unsigned DP_EW   = 11;
  localparam int unsigned DP_MW   = 52;
  localparam int unsigned SP_EW   = 8;
  localparam int unsigned SP_MW   = 23;
  localparam int unsigned DP_BIAS = 1023;
  localparam int unsigned SP_BIAS = 127;

  // Per-lane exception summary of one operand pair, produced by the extractor.
  typedef struct packed {
    logic nan_a;    // dividend is NaN
    logic nan_b;    // divisor is NaN
    logic inf_a;    // dividend is infinite
    logic inf_b;    // divisor is infinite
    logic zero_a;   // dividend is zero
    logic zero_b;   // divisor is zero (divide-by-zero when the dividend is finite, non-zero)
  } exc_t;

  // Per-lane status flags of a result.
  typedef struct packed {
    logic invalid;    // NaN operand, 0/0 or inf/inf
    logic div_zero;   // finite non-zero dividend divided by zero
    logic overflow;   // result rounded to infinity from a finite quotient
    logic underflow;  // finite non-zero quotient that ends subnormal or zero
  } status_t;

endpackage
