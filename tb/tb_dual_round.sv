// Self-checking testbench of dual_round: random quotient words, modes and path selections.
// The reference rounds each lane to nearest even by comparing the discarded bits with
// half a unit, then adds the increment within the lane (the whole word for DP).
// Words with all-ones mantissas are included so that the lane carries out.
module tb_dual_round;
  localparam int N = 4000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_up = 0, n_co = 0;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] m, sum;
  logic        dp_sp, dp_pa, sp2_pa, sp1_pa, co_hi, co_lo;
  dual_round dut (.*);

  // Round the field w (width wbits) at bit lsb; returns w + increment, wbits+1 wide.
  function automatic logic [64:0] rnd(input logic [63:0] w, input int lsb, input int wbits);
    logic [63:0] rem, half, mask;
    logic        up;
    mask = (wbits == 64) ? '1 : ((64'd1 << wbits) - 1);
    w    = w & mask;
    rem  = w & ((64'd1 << lsb) - 1);
    half = 64'd1 << (lsb - 1);
    up   = (rem > half) || (rem == half && w[lsb]);
    return 65'(w) + (up ? (65'd1 << lsb) : 65'd0);
  endfunction

  initial begin
    logic [64:0] r, rh, rl;
    logic [63:0] esum;
    logic        eco_hi, eco_lo;
    for (int k = 0; k < N; k++) begin
      m      = {$urandom, $urandom};
      if (k % 5 == 1) m = m | 64'hffff_fff0_ffff_fff0;
      dp_sp  = k[0];
      dp_pa  = 1'($urandom); sp2_pa = 1'($urandom); sp1_pa = 1'($urandom);
      #1;
      if (dp_sp) begin
        r      = rnd(m, dp_pa ? 11 : 10, 64);
        esum   = r[63:0];
        eco_hi = r[64];
        eco_lo = 1'b0;
      end else begin
        rh     = rnd({32'b0, m[63:32]}, sp2_pa ? 8 : 7, 32);
        rl     = rnd({32'b0, m[31:0]},  sp1_pa ? 8 : 7, 32);
        esum   = {rh[31:0], rl[31:0]};
        eco_hi = rh[32];
        eco_lo = rl[32];
      end
      if (esum != m) n_up++;
      if (eco_hi | eco_lo) n_co++;
      checks++;
      if (sum !== esum || co_hi !== eco_hi || co_lo !== eco_lo) begin
        failures++;
        $display("dp_sp=%b pa=%b%b%b m=%h: got %h %b%b expected %h %b%b", dp_sp, dp_pa,
                 sp2_pa, sp1_pa, m, sum, co_hi, co_lo, esum, eco_hi, eco_lo);
      end
      @(posedge clk);
    end
    checks++;
    if (n_up == 0 || n_co == 0) begin
      failures++;
      $display("rounding up (%0d) or carry out (%0d) never happened", n_up, n_co);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
