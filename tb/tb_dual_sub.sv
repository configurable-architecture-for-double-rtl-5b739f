// Self-checking testbench of dual_sub: random operands in both modes, products compared with
// the simulator's own wide multiplication.
module tb_dual_sub;
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

  logic [53:0] a27, b27, d27, e27;
  logic [55:0] a28, b28, d28, e28;
  logic dp_sp;
  dual_sub              dut   (.a(a27), .b(b27), .dp_sp, .d(d27));
  dual_sub #(.H(28))    dut28 (.a(a28), .b(b28), .dp_sp, .d(d28));

  initial begin
    for (int k = 0; k < N; k++) begin
      a27 = {$urandom, $urandom}; b27 = {$urandom, $urandom};
      a28 = {$urandom, $urandom}; b28 = {$urandom, $urandom};
      if (k % 4 == 2) begin b27[26:0] = a27[26:0] + 1; b28[27:0] = a28[27:0] + 1; end
      dp_sp = k[0];
      #1;
      e27 = dp_sp ? a27 - b27 : {27'(a27[53:27] - b27[53:27]), 27'(a27[26:0] - b27[26:0])};
      e28 = dp_sp ? a28 - b28 : {28'(a28[55:28] - b28[55:28]), 28'(a28[27:0] - b28[27:0])};
      checks += 2;
      if (d27 !== e27) begin
        failures++;
        $display("H=27 dp_sp=%b %h - %h: got %h expected %h", dp_sp, a27, b27, d27, e27);
      end
      if (d28 !== e28) begin
        failures++;
        $display("H=28 dp_sp=%b %h - %h: got %h expected %h", dp_sp, a28, b28, d28, e28);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
