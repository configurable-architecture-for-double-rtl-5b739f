// Self-checking testbench of mult_54x54: random operands in both modes, products compared with
// the simulator's own wide multiplication.
module tb_mult_54x54;
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

  logic [53:0] a, b;
  logic [107:0] p, e;
  mult_54x54 dut (.a, .b, .p);

  initial begin
    for (int k = 0; k < N; k++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (k < 2) begin a = {54{1'b1}}; b = {54{1'b1}}; end
      #1;
      e = 108'(a) * 108'(b);
      checks++;
      if (p !== e) begin
        failures++;
        $display("a=%h b=%h: got %h expected %h", a, b, p, e);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
