// Self-checking testbench of dual_lod64: words with a random leading-one position (and
// random bits below it) in each half; the three counts are checked against a bit-serial
// leading-zero count.
module tb_dual_lod64;
  localparam int N = 3000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] in;
  logic [5:0]  dp_shift;
  logic [4:0]  sp2_shift, sp1_shift;
  dual_lod64 dut (.*);

  function automatic int lzc(input logic [63:0] x, input int w);
    int n = 0;
    for (int b = w - 1; b >= 0; b--) begin
      if (x[b]) return n;
      n++;
    end
    return n;
  endfunction

  initial begin
    logic [31:0] hi, lo;
    for (int k = 0; k < N; k++) begin
      hi = $urandom >> $urandom_range(0, 31);
      lo = $urandom >> $urandom_range(0, 31);
      if (k % 5 == 0) hi = '0;
      in = {hi, lo};
      #1;
      checks += 3;
      if (in != 0 && dp_shift != 6'(lzc(in, 64))) begin
        failures++; $display("%h: dp %0d", in, dp_shift);
      end
      if (hi != 0 && sp2_shift != 5'(lzc({32'b0, hi}, 32))) begin
        failures++; $display("%h: sp2 %0d", in, sp2_shift);
      end
      if (lo != 0 && sp1_shift != 5'(lzc({32'b0, lo}, 32))) begin
        failures++; $display("%h: sp1 %0d", in, sp1_shift);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
