// Self-checking testbench of square_dual_54: random operands in both modes, products compared with
// the simulator's own wide multiplication.
module tb_square_dual_54;
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

  logic [53:0] i;
  logic dp_sp;
  logic [107:0] p, e;
  square_dual_54 dut (.i, .dp_sp, .p);

  initial begin
    for (int k = 0; k < N; k++) begin
      i = {$urandom, $urandom};
      if (k < 4) i = {54{1'b1}};
      dp_sp = k[0];
      #1;
      e = dp_sp ? 108'(i) * 108'(i)
                : {54'(i[53:27]) * 54'(i[53:27]), 54'(i[26:0]) * 54'(i[26:0])};
      checks++;
      if (p !== e) begin
        failures++;
        $display("dp_sp=%b i=%h: got %h expected %h", dp_sp, i, p, e);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
