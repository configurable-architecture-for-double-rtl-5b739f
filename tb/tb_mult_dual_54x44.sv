// Self-checking testbench of mult_dual_54x44: random operands in both modes, products compared with
// the simulator's own wide multiplication.
module tb_mult_dual_54x44;
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

  logic [53:0] a;
  logic [43:0] b;
  logic dp_sp;
  logic [97:0] p, e;
  mult_dual_54x44 dut (.a, .b, .dp_sp, .p);

  initial begin
    for (int k = 0; k < N; k++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (k < 8) begin a = {54{1'b1}}; b = {44{1'b1}} >> (k & 1); end
      dp_sp = k[0];
      #1;
      e = dp_sp ? 98'(a) * 98'(b)
                : {49'(a[53:27]) * 49'(b[43:22]), 49'(a[26:0]) * 49'(b[21:0])};
      checks++;
      if (p !== e) begin
        failures++;
        $display("dp_sp=%b a=%h b=%h: got %h expected %h", dp_sp, a, b, p, e);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
