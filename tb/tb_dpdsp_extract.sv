// Self-checking testbench of dpdsp_extract: random words, with exponent fields forced to
// zero or all ones and fractions forced to zero often enough to hit every class; the
// fields and classes of all three views are decoded independently in the testbench.
module tb_dpdsp_extract;
  import dpdsp_pkg::*;
  localparam int N = 4000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] in1, in2;
  logic        dp_s1, dp_s2, sp2_s1, sp2_s2, sp1_s1, sp1_s2;
  logic [10:0] dp_e1, dp_e2;
  logic [7:0]  sp2_e1, sp2_e2, sp1_e1, sp1_e2;
  logic [52:0] dp_m1, dp_m2;
  logic [23:0] sp2_m1, sp2_m2, sp1_m1, sp1_m2;
  exc_t        dp_exc, sp2_exc, sp1_exc;
  dpdsp_extract dut (.*);

  function automatic logic [63:0] rand_word();
    logic [63:0] w = {$urandom, $urandom};
    case ($urandom_range(0, 9))
      0: w[62:52] = '0;
      1: w[62:52] = '1;
      2: w[62:0]  = '0;
      3: w[30:23] = '0;
      4: w[30:23] = '1;
      5: w[30:0]  = '0;
      6: begin w[62:52] = '1; w[51:0] = '0; end
      7: begin w[30:23] = '1; w[22:0] = '0; end
      8: begin w[62:0] = '0; w[30:0] = 31'($urandom_range(0, 1)); end
      default: ;
    endcase
    return w;
  endfunction

  // Expected fields of one view: exponent (sub-normal -> 1), mantissa and class.
  task automatic expect_view(input logic [63:0] w, input int ew, input int mw, input int lsb,
                             output int e, output logic [63:0] m, output logic nan,
                             output logic inf, output logic zero);
    logic [63:0] ef, ff;
    ef   = (w >> (lsb + mw)) & ((64'd1 << ew) - 1);
    ff   = (w >> lsb) & ((64'd1 << mw) - 1);
    e    = (ef == 0) ? 1 : int'(ef);
    m    = ((ef == 0) ? 64'd0 : (64'd1 << mw)) | ff;
    nan  = (ef == (64'd1 << ew) - 1) && ff != 0;
    inf  = (ef == (64'd1 << ew) - 1) && ff == 0;
    zero = (ef == 0) && ff == 0;
  endtask

  task automatic cmp(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h (in1=%h in2=%h)", what, got, exp, in1, in2);
    end
  endtask

  initial begin
    int          e;
    logic [63:0] m;
    logic        nan, inf, zero;
    for (int k = 0; k < N; k++) begin
      in1 = rand_word();
      in2 = rand_word();
      #1;
      cmp("signs", {dp_s1, dp_s2, sp2_s1, sp2_s2, sp1_s1, sp1_s2},
          {in1[63], in2[63], in1[63], in2[63], in1[31], in2[31]});
      expect_view(in1, 11, 52, 0, e, m, nan, inf, zero);
      cmp("dp_e1", dp_e1, e); cmp("dp_m1", dp_m1, m);
      cmp("dp a", {dp_exc.nan_a, dp_exc.inf_a, dp_exc.zero_a}, {nan, inf, zero});
      expect_view(in2, 11, 52, 0, e, m, nan, inf, zero);
      cmp("dp_e2", dp_e2, e); cmp("dp_m2", dp_m2, m);
      cmp("dp b", {dp_exc.nan_b, dp_exc.inf_b, dp_exc.zero_b}, {nan, inf, zero});
      expect_view(in1, 8, 23, 32, e, m, nan, inf, zero);
      cmp("sp2_e1", sp2_e1, e); cmp("sp2_m1", sp2_m1, m);
      cmp("sp2 a", {sp2_exc.nan_a, sp2_exc.inf_a, sp2_exc.zero_a}, {nan, inf, zero});
      expect_view(in2, 8, 23, 32, e, m, nan, inf, zero);
      cmp("sp2_e2", sp2_e2, e); cmp("sp2_m2", sp2_m2, m);
      cmp("sp2 b", {sp2_exc.nan_b, sp2_exc.inf_b, sp2_exc.zero_b}, {nan, inf, zero});
      expect_view(in1, 8, 23, 0, e, m, nan, inf, zero);
      cmp("sp1_e1", sp1_e1, e); cmp("sp1_m1", sp1_m1, m);
      cmp("sp1 a", {sp1_exc.nan_a, sp1_exc.inf_a, sp1_exc.zero_a}, {nan, inf, zero});
      expect_view(in2, 8, 23, 0, e, m, nan, inf, zero);
      cmp("sp1_e2", sp1_e2, e); cmp("sp1_m2", sp1_m2, m);
      cmp("sp1 b", {sp1_exc.nan_b, sp1_exc.inf_b, sp1_exc.zero_b}, {nan, inf, zero});
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
