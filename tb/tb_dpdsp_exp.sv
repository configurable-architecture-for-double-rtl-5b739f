// Self-checking testbench of dpdsp_exp, in its DP and SP configurations: random exponents
// and left shifts; sign, exponent, tiny flag and saturated right shift are compared with
// integer arithmetic in the testbench.
module tb_dpdsp_exp;
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

  logic               s1, s2;
  logic [10:0]        de1, de2;
  logic [5:0]         dls1, dls2, drs;
  logic               ds, dtiny;
  logic signed [13:0] de;
  logic [7:0]         se1, se2;
  logic [4:0]         sls1, sls2, srs;
  logic               ss, stiny;
  logic signed [10:0] se;

  dpdsp_exp dut (.s1, .s2, .e1(de1), .e2(de2), .ls1(dls1), .ls2(dls2),
                 .s(ds), .e(de), .rs(drs), .tiny(dtiny));
  dpdsp_exp #(.EW(8), .BIAS(127), .LSW(5)) dut_sp (.s1, .s2, .e1(se1), .e2(se2),
                 .ls1(sls1), .ls2(sls2), .s(ss), .e(se), .rs(srs), .tiny(stiny));

  task automatic chk(input string lane, input int e_exp, input int e_got, input int rs_got,
                     input int rs_max, input logic tiny_got, input logic s_got);
    int rs_exp;
    rs_exp = (e_exp <= 1) ? ((1 - e_exp > rs_max) ? rs_max : 1 - e_exp) : 0;
    checks++;
    if (e_got != e_exp || rs_got != rs_exp || tiny_got != (e_exp <= 1) || s_got != (s1 ^ s2)) begin
      failures++;
      $display("%s: e %0d/%0d rs %0d/%0d tiny %b", lane, e_got, e_exp, rs_got, rs_exp, tiny_got);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      s1 = 1'($urandom); s2 = 1'($urandom);
      de1 = 11'($urandom_range(1, 2046)); de2 = 11'($urandom_range(1, 2046));
      se1 = 8'($urandom_range(1, 254));   se2 = 8'($urandom_range(1, 254));
      dls1 = 6'($urandom); dls2 = 6'($urandom);
      sls1 = 5'($urandom); sls2 = 5'($urandom);
      if (k % 3 == 0) begin de1 = de2; se1 = se2; end
      #1;
      chk("dp", (int'(de1) - int'(dls1)) - (int'(de2) - int'(dls2)) + 1023, int'(de),
          int'(drs), 63, dtiny, ds);
      chk("sp", (int'(se1) - int'(sls1)) - (int'(se2) - int'(sls2)) + 127, int'(se),
          int'(srs), 31, stiny, ss);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
