// End-to-end testbench of the DP / dual-SP divider, at its default (and only) size.
//
// Streams random operations into the divider, mixing DP and dual-SP mode cycle by cycle,
// with idle cycles in between, and checks each result one cycle later against an IEEE
// reference: NaN where the reference is NaN, otherwise within 2 ulp (DP and SP) of
// the correctly rounded quotient, plus exact checks of the special cases and status flags.
// Counts how often each mechanism of the design was exercised (sub-normal operands via the
// left shift, sub-normal results via the right shift, rounding that moves the leading one up a place, overflow, divide by
// zero, invalid, mode switch) and fails if any never happened.
module tb_dpdsp_div;
  import fp_ref_pkg::*;

  localparam int N_OPS = 20000;
  localparam int DP_TOL = 2;   // ulp
  localparam int SP_TOL = 2;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, dp_sp = 1'b0;
  logic [63:0] in1 = '0, in2 = '0;
  logic        out_valid;
  logic [63:0] out;
  logic [7:0]  status;

  dpdsp_div dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0, exact = 0;
  int n_dp = 0, n_sp = 0, n_sub_in = 0, n_sub_out = 0, n_carry = 0, n_ovf = 0;
  int n_dbz = 0, n_inv = 0, n_switch = 0;

  // expected results, queued by issue order
  logic [63:0] q_a[$], q_b[$];
  logic        q_mode[$];

  initial begin : watchdog
    repeat (N_OPS * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_sp(input int kind);
    logic [31:0] x;
    x = $urandom;
    case (kind)
      0: x[30:23] = 8'(100 + $urandom_range(0, 54));          // ordinary range
      1: x[30:23] = 8'd0;                                     // sub-normal / zero
      2: x[30:0]  = 31'd0;                                    // zero
      3: x[30:0]  = {8'hff, 23'd0};                           // infinity
      4: x[30:23] = 8'hff;                                    // NaN (or inf)
      5: x[30:23] = 8'($urandom_range(0, 40));                // tiny
      6: x[30:23] = 8'($urandom_range(215, 254));             // huge
      7: x[22:0]  = 23'(x[22:0] & ($urandom_range(0, 1) ? 23'h7f8000 : 23'h7fffff)); // short
      default: ;
    endcase
    return x;
  endfunction

  function automatic logic [63:0] rand_dp(input int kind);
    logic [63:0] x;
    x = {$urandom, $urandom};
    case (kind)
      0: x[62:52] = 11'(900 + $urandom_range(0, 246));
      1: x[62:52] = 11'd0;
      2: x[62:0]  = 63'd0;
      3: x[62:0]  = {11'h7ff, 52'd0};
      4: x[62:52] = 11'h7ff;
      5: x[62:52] = 11'($urandom_range(0, 100));
      6: x[62:52] = 11'($urandom_range(1950, 2046));
      7: x[51:0]  = $urandom_range(0, 1) ? {x[51:44], 44'd0} : x[51:0];
      default: ;
    endcase
    return x;
  endfunction

  function automatic int pick_kind();
    int r = $urandom_range(0, 99);
    if (r < 55) return 0;
    if (r < 63) return 1;
    if (r < 66) return 2;
    if (r < 68) return 3;
    if (r < 70) return 4;
    if (r < 80) return 5;
    if (r < 90) return 6;
    return 7;
  endfunction

  task automatic check_dp(input logic [63:0] a, input logic [63:0] b, input logic [63:0] y,
                          input logic [3:0] st);
    logic [63:0] r;
    longint      d;
    r = dp_div_ref(a, b);
    checks++;
    if (is_nan64(r)) begin
      if (!is_nan64(y) || !st[3]) begin
        failures++;
        $display("DP %h / %h: got %h, expected NaN", a, b, y);
      end
    end else begin
      d = ulp_dist64(y, r);
      if (d == 0) exact++;
      if (d > DP_TOL) begin
        failures++;
        $display("DP %h / %h: got %h, expected %h", a, b, y, r);
      end
    end
  endtask

  task automatic check_sp(input logic [31:0] a, input logic [31:0] b, input logic [31:0] y,
                          input logic [3:0] st);
    logic [31:0] r;
    longint      d;
    r = sp_div_ref(a, b);
    checks++;
    if (is_nan32(r)) begin
      if (!is_nan32(y) || !st[3]) begin
        failures++;
        $display("SP %h / %h: got %h, expected NaN", a, b, y);
      end
    end else begin
      d = ulp_dist32(y, r);
      if (d == 0) exact++;
      if (d > SP_TOL) begin
        failures++;
        $display("SP %h / %h: got %h, expected %h", a, b, y, r);
      end
    end
  endtask

  // Fixed special cases with exactly known results: {mode, a, b, expected, status}
  typedef struct {
    logic        mode;
    logic [63:0] a, b, y;
    logic [7:0]  st;
  } vec_t;

  vec_t vecs[$];

  initial begin
    vecs.push_back('{1'b1, 64'h4018000000000000, 64'h4008000000000000, 64'h4000000000000000, 8'h00}); // 6/3 = 2
    vecs.push_back('{1'b1, 64'h3ff0000000000000, 64'h0000000000000000, 64'h7ff0000000000000, 8'h40}); // 1/0
    vecs.push_back('{1'b1, 64'h0000000000000000, 64'h0000000000000000, 64'h7ff8000000000000, 8'h80}); // 0/0
    vecs.push_back('{1'b1, 64'h7fefffffffffffff, 64'h3fe0000000000000, 64'h7ff0000000000000, 8'h20}); // max/0.5
    vecs.push_back('{1'b1, 64'h0010000000000000, 64'h4000000000000000, 64'h0008000000000000, 8'h10}); // min normal/2
    vecs.push_back('{1'b1, 64'h0000000000000001, 64'h3fe0000000000000, 64'h0000000000000002, 8'h10}); // min sub/0.5
    vecs.push_back('{1'b0, {32'h40c00000, 32'hbf800000}, {32'h40400000, 32'h3f800000},
                     {32'h40000000, 32'hbf800000}, 8'h00});                               // 6/3, -1/1
    vecs.push_back('{1'b0, {32'h00000001, 32'h7f800000}, {32'h3f000000, 32'h7f800000},
                     {32'h00000002, 32'h7fc00000}, 8'h18});                               // sub/0.5, inf/inf
    vecs.push_back('{1'b0, {32'hc0000000, 32'h00000000}, {32'h00000000, 32'h7f800000},
                     {32'hff800000, 32'h00000000}, 8'h40});                               // -2/0, 0/inf
  end

  logic [63:0] ia, ib;
  logic        im, last_mode;
  int          issued, received, vi;

  initial begin
    issued = 0; received = 0; vi = 0; last_mode = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (issued < N_OPS) begin
      if (vi < vecs.size()) begin
        im = vecs[vi].mode; ia = vecs[vi].a; ib = vecs[vi].b; vi++;
      end else begin
        im = 1'($urandom_range(0, 1));
        if (im) begin
          ia = rand_dp(pick_kind());
          ib = rand_dp(pick_kind());
        end else begin
          ia = {rand_sp(pick_kind()), rand_sp(pick_kind())};
          ib = {rand_sp(pick_kind()), rand_sp(pick_kind())};
        end
      end
      if ($urandom_range(0, 9) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      dp_sp    <= im;
      in1      <= ia;
      in2      <= ib;
      q_a.push_back(ia); q_b.push_back(ib); q_mode.push_back(im);
      if (issued > 0 && im != last_mode) n_switch++;
      last_mode = im;
      issued++;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    if (received != issued) begin
      failures++;
      $display("issued %0d operations, received %0d results", issued, received);
    end
    checks++;
    if (n_dp == 0 || n_sp == 0 || n_sub_in == 0 || n_sub_out == 0 || n_carry == 0 ||
        n_ovf == 0 || n_dbz == 0 || n_inv == 0 || n_switch == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("ops: dp=%0d sp=%0d exact=%0d of %0d lane results", n_dp, n_sp, exact, checks);
    $display("mechanisms: subnormal_in=%0d subnormal_out=%0d round_carry=%0d overflow=%0d div_zero=%0d invalid=%0d mode_switch=%0d",
             n_sub_in, n_sub_out, n_carry, n_ovf, n_dbz, n_inv, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled on the combinational path while an operation is presented.
  always @(posedge clk) begin
    cycles++;
    if (rst_n && in_valid) begin
      if (dp_sp) begin
        if (dut.dp_ls1 != 0 || dut.dp_ls2 != 0) n_sub_in++;
        if (dut.dp_rs != 0) n_sub_out++;
        if ((!dut.dp_pa || dut.dp_tiny) && !dut.div_ms[63] && dut.rnd[63]) n_carry++;
      end else begin
        if (dut.sp2_ls1 != 0 || dut.sp2_ls2 != 0 || dut.sp1_ls1 != 0 || dut.sp1_ls2 != 0) n_sub_in++;
        if (dut.sp2_rs != 0 || dut.sp1_rs != 0) n_sub_out++;
        if (((!dut.sp2_pa || dut.sp2_tiny) && !dut.div_ms[63] && dut.rnd[63]) ||
            ((!dut.sp1_pa || dut.sp1_tiny) && !dut.div_ms[31] && dut.rnd[31])) n_carry++;
      end
    end
  end

  // Result checker: a result is due exactly one cycle after its operation was presented.
  logic        exp_valid = 1'b0;
  always @(posedge clk) begin
    exp_valid <= rst_n && in_valid;
    if (rst_n) begin
      if (out_valid !== exp_valid) begin
        checks++; failures++;
        $display("out_valid %b, expected %b (latency 1)", out_valid, exp_valid);
      end
      if (out_valid) begin
        logic [63:0] a, b;
        logic        m;
        a = q_a.pop_front(); b = q_b.pop_front(); m = q_mode.pop_front();
        received++;
        if (m) n_dp++; else n_sp++;
        if (status[5] | status[1]) n_ovf++;
        if (status[6] | status[2]) n_dbz++;
        if (status[7] | status[3]) n_inv++;
        if (vi > 0 && received <= vecs.size()) begin
          checks++;
          if (out !== vecs[received-1].y || status !== vecs[received-1].st) begin
            failures++;
            $display("vector %0d: got %h status %h, expected %h status %h", received - 1,
                     out, status, vecs[received-1].y, vecs[received-1].st);
          end
        end
        if (m) check_dp(a, b, out, status[7:4]);
        else begin
          check_sp(a[63:32], b[63:32], out[63:32], status[7:4]);
          check_sp(a[31:0],  b[31:0],  out[31:0],  status[3:0]);
        end
      end
    end
  end
endmodule
