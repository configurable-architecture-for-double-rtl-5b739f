// Dual-mode rounding: per-lane rounding increment (ULP) and the shared rounding adder.
//
// Each lane's quotient is >= 1 (path A: hidden bit at the lane's top bit) or < 1 (path B:
// hidden bit one place lower), which fixes where its last mantissa bit, guard, round and
// sticky bits sit. Tiny results are also taken at path A positions. Each lane computes
// round-to-nearest-even, ULP = G & (R | S | LSB), and the ULPs are added at the LSB positions
// by two 32-bit adders whose carry is passed from the lower to the upper half only in DP
// mode. Bit positions inside the 64-bit word:
//   DP  (q*2^55 in [63:8])  : A: LSB 11, G 10, R 9, S [8:0];   B: LSB 10, G 9, R 8, S [7:0]
//   SP-2 (q*2^27 in [63:36]): A: LSB 40, G 39, R 38, S [37:32]; B: LSB 39, G 38, R 37, S [36:32]
//   SP-1 (q*2^27 in [31:4]) : A: LSB 8,  G 7,  R 6,  S [5:0];   B: LSB 7,  G 6,  R 5,  S [4:0]
// The document gives the per-lane ULP from guard, round and sticky bits and the split adder
// (two 28-bit adders there; 32-bit halves here, matching the shifter halves).
// Purely combinational.
//   m       : shifted quotient word
//   dp_sp   : mode
//   dp_pa, sp2_pa, sp1_pa : lane takes path A positions
//   sum     : rounded word
//   co_hi   : carry out of bit 63 (DP or SP-2 mantissa overflow)
//   co_lo   : carry out of bit 31 in SP mode (SP-1 mantissa overflow), 0 in DP mode
module dual_round (
  input  logic [63:0] m,
  input  logic        dp_sp,
  input  logic        dp_pa,
  input  logic        sp2_pa,
  input  logic        sp1_pa,
  output logic [63:0] sum,
  output logic        co_hi,
  output logic        co_lo
);
  logic        dp_ulp, sp2_ulp, sp1_ulp;
  logic [63:0] ulp;
  logic [32:0] lo, hi;

  function automatic logic rne(input logic lsb, input logic g, input logic r, input logic s);
    return g & (r | s | lsb);
  endfunction

  always_comb begin
    dp_ulp  = dp_pa  ? rne(m[11], m[10], m[9],  |m[8:0])
                     : rne(m[10], m[9],  m[8],  |m[7:0]);
    sp2_ulp = sp2_pa ? rne(m[40], m[39], m[38], |m[37:32])
                     : rne(m[39], m[38], m[37], |m[36:32]);
    sp1_ulp = sp1_pa ? rne(m[8],  m[7],  m[6],  |m[5:0])
                     : rne(m[7],  m[6],  m[5],  |m[4:0]);
    ulp = '0;
    if (dp_sp) begin
      ulp[11] = dp_ulp & dp_pa;
      ulp[10] = dp_ulp & ~dp_pa;
    end else begin
      ulp[40] = sp2_ulp & sp2_pa;
      ulp[39] = sp2_ulp & ~sp2_pa;
      ulp[8]  = sp1_ulp & sp1_pa;
      ulp[7]  = sp1_ulp & ~sp1_pa;
    end
    lo    = {1'b0, m[31:0]}  + {1'b0, ulp[31:0]};
    hi    = {1'b0, m[63:32]} + {1'b0, ulp[63:32]} + {32'b0, lo[32] & dp_sp};
    sum   = {hi[31:0], lo[31:0]};
    co_hi = hi[32];
    co_lo = lo[32] & ~dp_sp;
  end
endmodule
