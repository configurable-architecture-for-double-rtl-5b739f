// Reference arithmetic for the divider testbenches, independent of the RTL.
//
// DP quotients come from the simulator's IEEE double division (round to nearest even).
// SP quotients divide the exactly converted operands in double precision and then round
// the double to single precision with round to nearest even; for division this double
// rounding cannot change the result, since 53 >= 2*24 + 2.
package fp_ref_pkg;

  function automatic bit is_nan64(input logic [63:0] x);
    return (x[62:52] == 11'h7ff) && (x[51:0] != 0);
  endfunction

  function automatic bit is_nan32(input logic [31:0] x);
    return (x[30:23] == 8'hff) && (x[22:0] != 0);
  endfunction

  function automatic logic [63:0] dp_div_ref(input logic [63:0] a, input logic [63:0] b);
    real q;
    q = $bitstoreal(a) / $bitstoreal(b);
    return $realtobits(q);
  endfunction

  // Exact conversion of a single to a double.
  function automatic real sp_to_real(input logic [31:0] x);
    logic [63:0] d;
    int          e, lz;
    logic [22:0] f;
    f = x[22:0];
    e = int'(x[30:23]);
    if (e == 255)
      d = {x[31], 11'h7ff, f != 0 ? {1'b1, 51'b0} : 52'b0};
    else if (e == 0 && f == 0)
      d = {x[31], 63'b0};
    else if (e == 0) begin
      lz = 0;
      while (f[22] == 1'b0) begin f = f << 1; lz++; end
      f = f << 1;                                   // drop the leading one
      d = {x[31], 11'(1023 - 126 - 1 - lz), f, 29'b0};
    end else
      d = {x[31], 11'(e - 127 + 1023), f, 29'b0};
    return $bitstoreal(d);
  endfunction

  // Round a double to single precision, round to nearest even.
  function automatic logic [31:0] real_to_sp(input real q);
    logic [63:0]     d;
    logic            s;
    int              e, es, sh;
    longint unsigned m, kept, rem, half;
    d = $realtobits(q);
    s = d[63];
    e = int'(d[62:52]);
    if (e == 2047) return d[51:0] != 0 ? 32'h7fc00000 : {s, 8'hff, 23'b0};
    if (e == 0)    return {s, 31'b0};              // no SP quotient is a DP sub-normal
    m  = {11'b0, 1'b1, d[51:0]};
    es = e - 1023 + 127;
    sh = (es >= 1) ? 29 : 29 + 1 - es;
    if (sh > 60) return {s, 31'b0};
    kept = m >> sh;
    rem  = m & ((64'd1 << sh) - 1);
    half = 64'd1 << (sh - 1);
    if (rem > half || (rem == half && kept[0])) kept++;
    if (es >= 1) begin
      if (kept == (64'd1 << 24)) begin kept = 64'd1 << 23; es++; end
      if (es >= 255) return {s, 8'hff, 23'b0};
      return {s, 8'(es), kept[22:0]};
    end
    return {s, 31'(kept)};
  endfunction

  function automatic logic [31:0] sp_div_ref(input logic [31:0] a, input logic [31:0] b);
    return real_to_sp(sp_to_real(a) / sp_to_real(b));
  endfunction

  // Distance in units in the last place between two results of the same sign; large when
  // the signs differ (zeros of either sign count as equal).
  function automatic longint ulp_dist64(input logic [63:0] x, input logic [63:0] y);
    if (x[62:0] == 0 && y[62:0] == 0) return 0;
    if (x[63] != y[63]) return 64'h7fffffff;
    return (x[62:0] > y[62:0]) ? longint'(x[62:0] - y[62:0]) : longint'(y[62:0] - x[62:0]);
  endfunction

  function automatic longint ulp_dist32(input logic [31:0] x, input logic [31:0] y);
    if (x[30:0] == 0 && y[30:0] == 0) return 0;
    if (x[31] != y[31]) return 64'h7fffffff;
    return (x[30:0] > y[30:0]) ? longint'(x[30:0] - y[30:0]) : longint'(y[30:0] - x[30:0]);
  endfunction

endpackage
