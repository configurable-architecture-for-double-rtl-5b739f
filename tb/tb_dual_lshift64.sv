// Self-checking testbench of dual_lshift64: random words and shift amounts in both modes; the
// DP result is compared with a 64-bit shift, the SP result with two 32-bit shifts. The
// amounts of the unused mode are random too, to check that they are ignored.
module tb_dual_lshift64;
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

  logic [63:0] in, out, e;
  logic        dp_sp;
  logic [5:0]  dp_shift;
  logic [4:0]  sp2_shift, sp1_shift;
  dual_lshift64 dut (.*);

  initial begin
    for (int k = 0; k < N; k++) begin
      in        = {$urandom, $urandom};
      dp_sp     = k[0];
      dp_shift  = 6'($urandom);
      sp2_shift = 5'($urandom);
      sp1_shift = 5'($urandom);
      #1;
      e = dp_sp ? in << dp_shift : {in[63:32] << sp2_shift, in[31:0] << sp1_shift};
      checks++;
      if (out !== e) begin
        failures++;
        $display("dp_sp=%b in=%h dp=%0d sp2=%0d sp1=%0d: got %h expected %h", dp_sp, in,
                 dp_shift, sp2_shift, sp1_shift, out, e);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
