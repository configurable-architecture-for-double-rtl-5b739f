// Self-checking testbench of square_34: random operands in both modes, products compared with
// the simulator's own wide multiplication.
module tb_square_34;
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

  logic [33:0] i;
  logic [67:0] p, e;
  square_34 dut (.i, .p);

  initial begin
    for (int k = 0; k < N; k++) begin
      i = {$urandom, $urandom};
      if (k < 2) i = {34{1'b1}};
      #1;
      e = 68'(i) * 68'(i);
      checks++;
      if (p !== e) begin
        failures++;
        $display("i=%h: got %h expected %h", i, p, e);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
