// Self-checking testbench of recip_lut: every entry of the 53-bit table must be the
// reciprocal 2^61/(256+idx) to within half a unit (entry 0 saturated to 2^53-1), and the
// 24-bit table must hold the upper 24 bits of the same entry.
module tb_recip_lut;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  idx;
  logic [52:0] r53;
  logic [23:0] r24;
  recip_lut               dut    (.idx, .r(r53));
  recip_lut #(.OUT_W(24)) dut_sp (.idx, .r(r24));

  initial begin
    logic [127:0] prod, target;
    longint       err;
    target = 128'd1 << 61;
    for (int k = 0; k < 256; k++) begin
      idx = 8'(k);
      #1;
      prod = 128'(r53) * 128'(256 + k);
      err  = (prod > target) ? longint'(prod - target) : longint'(target - prod);
      checks++;
      if (k == 0) begin
        if (r53 != {53{1'b1}}) begin failures++; $display("entry 0 = %h", r53); end
      end else if (err > (256 + k) / 2) begin
        failures++;
        $display("entry %0d = %h, error %0d", k, r53, err);
      end
      checks++;
      if (r24 != r53[52:29]) begin
        failures++;
        $display("SP entry %0d = %h, expected %h", k, r24, r53[52:29]);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
