// Self-checking testbench of dpdsp_mant_div: random normalised mantissas in both modes;
// each quotient is compared with the exact integer quotient floor(m1 * 2^F / m2)
// (F = 55 for DP, 27 for SP). The allowed distance follows from the 53-bit / 24-bit
// reciprocal tables and, for SP, from the three-term series: 8 units of 2^-55 (DP) and
// 24 units of 2^-27 (SP). The largest
// distances seen are printed.
module tb_dpdsp_mant_div;
  localparam int N = 4000;
  localparam int DP_TOL = 8;
  localparam int SP_TOL = 24;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] m1, m2, div_m;
  logic        dp_sp;
  dpdsp_mant_div dut (.*);

  function automatic longint qdist(input logic [127:0] a, input logic [127:0] b);
    return (a > b) ? longint'(a - b) : longint'(b - a);
  endfunction

  initial begin
    logic [52:0]  x, y;
    logic [23:0]  x2, y2, x1, y1;
    logic [127:0] q;
    longint       d, dmax_dp = 0, dmax_sp = 0;
    for (int k = 0; k < N; k++) begin
      dp_sp = k[0];
      x  = {1'b1, 52'({$urandom, $urandom})};  y  = {1'b1, 52'({$urandom, $urandom})};
      x2 = {1'b1, 23'($urandom)};       y2 = {1'b1, 23'($urandom)};
      x1 = {1'b1, 23'($urandom)};       y1 = {1'b1, 23'($urandom)};
      if (k % 8 == 2) begin y[43:0] = '0; y2[14:0] = '0; y1[14:0] = '0; end   // a2 = 0
      if (k % 8 == 4) begin y[43:0] = '1; y2[14:0] = '1; y1[14:0] = '1; end   // largest a2
      if (k % 8 == 6) begin x = y; x2 = y2; x1 = y1; end                      // q = 1
      m1 = dp_sp ? {x, 11'b0} : {x2, 8'b0, x1, 8'b0};
      m2 = dp_sp ? {y, 11'b0} : {y2, 8'b0, y1, 8'b0};
      #1;
      if (dp_sp) begin
        q = (128'(x) << 55) / 128'(y);
        d = qdist(128'(div_m[63:8]), q);
        if (d > dmax_dp) dmax_dp = d;
        checks++;
        if (d > DP_TOL || div_m[7:0] != 0) begin
          failures++; $display("DP %h / %h: got %h expected %h", x, y, div_m[63:8], q);
        end
      end else begin
        q = (128'(x2) << 27) / 128'(y2);
        d = qdist(128'(div_m[63:36]), q);
        if (d > dmax_sp) dmax_sp = d;
        checks++;
        if (d > SP_TOL) begin
          failures++; $display("SP2 %h / %h: got %h expected %h", x2, y2, div_m[63:36], q);
        end
        q = (128'(x1) << 27) / 128'(y1);
        d = qdist(128'(div_m[31:4]), q);
        if (d > dmax_sp) dmax_sp = d;
        checks++;
        if (d > SP_TOL || div_m[35:32] != 0 || div_m[3:0] != 0) begin
          failures++; $display("SP1 %h / %h: got %h expected %h", x1, y1, div_m[31:4], q);
        end
      end
      @(posedge clk);
    end
    $display("largest distance: DP %0d, SP %0d", dmax_dp, dmax_sp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
