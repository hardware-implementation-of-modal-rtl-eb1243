// tb_fp_addsub: self-checking testbench of the binary64 adder/subtractor.
//
// Directed operands (the infinity tables of IEEE-754 addition and
// subtraction, exact cancellation and its signed zero, overflow in every
// rounding mode, subnormal sums) are followed by random operands from the
// number classes of tb_fp_ref_pkg, with random op and rounding mode, one
// operation per cycle with occasional bubbles. Every result is compared with
// the exact-integer reference, and its latency with LATENCY. For
// round-to-nearest the reference itself is cross-checked against the
// simulator's native double arithmetic.
module tb_fp_addsub;
  import mi_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int unsigned LATENCY = 7;
  localparam int N_RANDOM = 20000;

  logic   clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, sub = 1'b0;
  fp64_t  a = '0, b = '0, z;
  rmode_e rm = RM_NEAREST;
  logic   out_valid;
  int     checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct { fp64_t a, b, exp; logic sub; rmode_e rm; longint t; } item_t;
  item_t q[$];

  fp_addsub #(.LATENCY(LATENCY)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic issue(fp64_t x, fp64_t y, logic s, rmode_e m);
    item_t it;
    @(negedge clk);
    a = x; b = y; sub = s; rm = m; in_valid = 1'b1;
    it = '{a: x, b: y, exp: ref_add(x, y, s, m), sub: s, rm: m, t: cyc};
    q.push_back(it);
    checks++;  // reference cross-check below
    if (m == RM_NEAREST && !is_nan(x) && !is_nan(y) && !is_inf(x) && !is_inf(y)) begin
      real rr;
      fp64_t nat;
      rr  = s ? ($bitstoreal(x) - $bitstoreal(y)) : ($bitstoreal(x) + $bitstoreal(y));
      nat = $realtobits(rr);
      if (!(nat == it.exp || (is_nan(nat) && is_nan(it.exp)))) begin
        failures++;
        $display("REF MISMATCH %h %s %h: ref %h native %h", x, s ? "-" : "+", y, it.exp, nat);
      end
    end
  endtask

  task automatic bubble();
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result %h", z);
      end else begin
        it = q.pop_front();
        if (z !== it.exp) begin
          failures++;
          if (failures < 20)
            $display("FAIL: %h %s %h rm=%0d: got %h expected %h", it.a, it.sub ? "-" : "+",
                     it.b, it.rm, z, it.exp);
        end
        checks++;
        if (cyc - it.t != LATENCY) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cyc - it.t, LATENCY);
        end
      end
    end
  end

  localparam fp64_t PINF = 64'h7FF0_0000_0000_0000, NINF = 64'hFFF0_0000_0000_0000;
  localparam fp64_t ONE = 64'h3FF0_0000_0000_0000, MAXF = 64'h7FEF_FFFF_FFFF_FFFF;

  initial begin
    fp64_t vals[5] = '{NINF, 64'hC008_0000_0000_0000, ONE, PINF, 64'h0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Infinity tables (addition and subtraction), all rounding modes.
    foreach (vals[i]) foreach (vals[j])
      for (int s = 0; s < 2; s++)
        for (int m = 0; m < 4; m++) issue(vals[i], vals[j], 1'(s), rmode_e'(m));
    // Exact cancellation: +0, or -0 when rounding down.
    for (int m = 0; m < 4; m++) issue(64'h4009_21FB_5444_2D18, 64'h4009_21FB_5444_2D18, 1'b1, rmode_e'(m));
    for (int m = 0; m < 4; m++) issue(64'h8000_0000_0000_0000, 64'h0000_0000_0000_0000, 1'b0, rmode_e'(m));
    for (int m = 0; m < 4; m++) issue(64'h8000_0000_0000_0000, 64'h0000_0000_0000_0000, 1'b1, rmode_e'(m));
    // Overflow, all modes and signs.
    for (int m = 0; m < 4; m++) begin
      issue(MAXF, MAXF, 1'b0, rmode_e'(m));
      issue({1'b1, MAXF[62:0]}, MAXF, 1'b1, rmode_e'(m));
      issue(MAXF, 64'h3CA0_0000_0000_0000, 1'b0, rmode_e'(m));
    end
    // Subnormals: sum of two, and a normal minus a subnormal.
    issue(64'h000F_FFFF_FFFF_FFFF, 64'h0000_0000_0000_0001, 1'b0, RM_NEAREST);
    issue(64'h0010_0000_0000_0000, 64'h0000_0000_0000_0001, 1'b1, RM_DOWN);
    issue(64'h0010_0000_0000_0000, 64'h0000_0000_0000_0001, 1'b1, RM_UP);
    // 1 + tiny in all modes.
    for (int m = 0; m < 4; m++) begin
      issue(ONE, 64'h3C90_0000_0000_0000, 1'b0, rmode_e'(m));
      issue(ONE, 64'h3C90_0000_0000_0000, 1'b1, rmode_e'(m));
      issue(ONE, 64'h0000_0000_0000_0001, 1'b1, rmode_e'(m));
    end
    bubble();
    // Random operands.
    for (int n = 0; n < N_RANDOM; n++) begin
      fp64_t x, y;
      x = gen_fp(pick_kind());
      case ($urandom_range(0, 3))
        0: y = {1'($urandom), x[62:52], x[51:0] ^ 52'($urandom_range(0, 255))};
        1: y = {1'($urandom), 11'(x[62:52] - $urandom_range(0, 3)), 52'({$urandom, $urandom})};
        default: y = gen_fp(pick_kind());
      endcase
      issue(x, y, 1'($urandom), rmode_e'($urandom_range(0, 3)));
      if ($urandom_range(0, 15) == 0) bubble();
    end
    bubble();
    repeat (LATENCY + 3) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
