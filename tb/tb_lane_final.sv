// Self-checking testbench of lane_final, in its DP and SP configurations. Random rounded
// quotients, carries, paths, exponents, signs and exception records; the expected result
// is worked out as a value (hidden bit, exponent) and encoded in the testbench, and the
// exceptional cases are checked against the IEEE-754 rules for division.
module tb_lane_final;
  import dpdsp_pkg::*;
  localparam int N = 6000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [53:0]        dq;
  logic [24:0]        sq;
  logic               co, path_a, tiny, s;
  logic signed [13:0] de;
  logic signed [10:0] se;
  exc_t               exc;
  logic [63:0]        dres;
  logic [31:0]        sres;
  status_t            dst, sst;

  lane_final dut (.q_top(dq), .co, .path_a, .tiny, .e(de), .s, .exc, .res(dres), .status(dst));
  lane_final #(.EW(8), .MW(23)) dut_sp (.q_top(sq), .co, .path_a, .tiny, .e(se), .s, .exc,
                                        .res(sres), .status(sst));

  // Expected encoding for a lane of exponent width ew and fraction width mw.
  task automatic expect_lane(input logic [63:0] q, input int ew, input int mw, input int e,
                             output logic [63:0] res, output logic [3:0] st);
    int          ef;
    logic [63:0] frac, maxe;
    logic        nan, inf, zero;
    maxe = (64'd1 << ew) - 1;
    nan  = exc.nan_a | exc.nan_b | (exc.zero_a & exc.zero_b) | (exc.inf_a & exc.inf_b);
    inf  = exc.inf_a | exc.zero_b;
    zero = exc.zero_a | exc.inf_b;
    // value = q_top interpreted with the hidden bit at bit mw+1 (path A) or mw (path B)
    if (path_a) begin
      if (co)                  begin ef = (tiny ? 1 : e) + 1; frac = 0; end
      else if (q[mw+1])        begin ef = tiny ? 1 : e;       frac = (q >> 1) & ((64'd1 << mw) - 1); end
      else                     begin ef = 0;                  frac = (q >> 1) & ((64'd1 << mw) - 1); end
    end else begin
      if (q[mw+1])             begin ef = e;                  frac = 0; end
      else                     begin ef = e - 1;              frac = q & ((64'd1 << mw) - 1); end
    end
    st = 4'b0;
    if (nan) begin
      res = (maxe << mw) | (64'd1 << (mw - 1)); st[3] = 1'b1;
    end else if (inf) begin
      res = (64'(s) << (ew + mw)) | (maxe << mw); st[2] = exc.zero_b & ~exc.inf_a;
    end else if (zero) begin
      res = 64'(s) << (ew + mw);
    end else if (ef >= int'(maxe)) begin
      res = (64'(s) << (ew + mw)) | (maxe << mw); st[1] = 1'b1;
    end else begin
      res = (64'(s) << (ew + mw)) | (64'(ef) << mw) | frac; st[0] = (ef == 0);
    end
  endtask

  initial begin
    logic [63:0] er;
    logic [3:0]  est;
    int          e;
    for (int k = 0; k < N; k++) begin
      path_a = 1'($urandom);
      tiny   = path_a & ($urandom_range(0, 3) == 0);
      co     = path_a & ($urandom_range(0, 7) == 0);
      s      = 1'($urandom);
      exc    = ($urandom_range(0, 3) == 0) ? exc_t'(6'($urandom) & 6'($urandom)) : '0;
      dq     = {$urandom, $urandom};
      sq     = 25'($urandom);
      if (co) begin dq = '0; sq = '0; end
      if (!path_a) begin dq[53] = ($urandom_range(0, 7) == 0); sq[24] = dq[53];
        if (dq[53]) begin dq[52:0] = '0; sq[23:0] = '0; end end
      if (tiny) begin dq[53] = 1'($urandom); sq[24] = dq[53]; end
      e  = tiny ? $urandom_range(0, 20) - 19 : $urandom_range(2, 2100);
      de = 14'(e);
      se = 11'(tiny ? e : $urandom_range(2, 260));
      #1;
      expect_lane({10'b0, dq}, 11, 52, e, er, est);
      checks++;
      if (dres !== er || dst !== est) begin
        failures++;
        $display("DP q=%h co=%b pa=%b tiny=%b e=%0d exc=%b: got %h %b expected %h %b", dq, co,
                 path_a, tiny, e, exc, dres, dst, er, est);
      end
      expect_lane({39'b0, sq}, 8, 23, int'(se), er, est);
      checks++;
      if (sres !== er[31:0] || sst !== est) begin
        failures++;
        $display("SP q=%h co=%b pa=%b tiny=%b e=%0d exc=%b: got %h %b expected %h %b", sq, co,
                 path_a, tiny, se, exc, sres, sst, er[31:0], est);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
