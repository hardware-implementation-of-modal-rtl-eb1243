// tb_fp_mul: self-checking testbench of the binary64 multiplier.
//
// Directed operands (the IEEE-754 multiplication table with +-inf, +-0 and
// finite values, under ieee_flag = 1 and 0; overflow and underflow in every
// rounding mode; subnormal operands) are followed by random operands from
// the number classes of tb_fp_ref_pkg with random rounding mode and
// ieee_flag. Results are compared with the exact-integer reference, and the
// latency with LATENCY. For round-to-nearest the reference is cross-checked
// against the simulator's native double multiplication.
module tb_fp_mul;
  import mi_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int unsigned LATENCY = 7;
  localparam int N_RANDOM = 20000;

  logic   clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, ieee_flag = 1'b1;
  fp64_t  a = '0, b = '0, z;
  rmode_e rm = RM_NEAREST;
  logic   out_valid;
  int     checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct { fp64_t a, b, exp; logic ieee; rmode_e rm; longint t; } item_t;
  item_t q[$];

  fp_mul #(.LATENCY(LATENCY)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic issue(fp64_t x, fp64_t y, logic f, rmode_e m);
    item_t it;
    @(negedge clk);
    a = x; b = y; ieee_flag = f; rm = m; in_valid = 1'b1;
    it = '{a: x, b: y, exp: ref_mul(x, y, m, f), ieee: f, rm: m, t: cyc};
    q.push_back(it);
    if (m == RM_NEAREST && f) begin
      fp64_t nat;
      checks++;
      nat = $realtobits($bitstoreal(x) * $bitstoreal(y));
      if (!(nat == it.exp || (is_nan(nat) && is_nan(it.exp)))) begin
        failures++;
        $display("REF MISMATCH %h * %h: ref %h native %h", x, y, it.exp, nat);
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
            $display("FAIL: %h * %h rm=%0d ieee=%0d: got %h expected %h", it.a, it.b,
                     it.rm, it.ieee, z, it.exp);
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

  initial begin
    fp64_t vals[7] = '{NINF, 64'hC008_0000_0000_0000, 64'h8000_0000_0000_0000, 64'h0,
                       64'h3FF8_0000_0000_0000, PINF, 64'h0000_0000_0000_0003};
    int n_ieee0_zero_inf = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Multiplication table with infinities and zeros, both ieee_flag values.
    foreach (vals[i]) foreach (vals[j])
      for (int f = 0; f < 2; f++)
        for (int m = 0; m < 4; m++) issue(vals[i], vals[j], 1'(f), rmode_e'(m));
    // Overflow and underflow in all modes.
    for (int m = 0; m < 4; m++) begin
      issue(64'h7FE0_0000_0000_0001, 64'h4000_0000_0000_0000, 1'b1, rmode_e'(m));
      issue(64'hFFE0_0000_0000_0001, 64'h4000_0000_0000_0000, 1'b1, rmode_e'(m));
      issue(64'h0010_0000_0000_0001, 64'h3FE0_0000_0000_0000, 1'b1, rmode_e'(m));
      issue(64'h0000_0000_0000_0001, 64'h3FE0_0000_0000_0000, 1'b1, rmode_e'(m));
      issue(64'h0000_0000_0000_0001, 64'hBFE8_0000_0000_0000, 1'b1, rmode_e'(m));
      issue(64'h0000_0000_0000_0003, 64'h4330_0000_0000_0001, 1'b1, rmode_e'(m));
      issue(64'h2000_0000_0000_0000, 64'h2000_0000_0000_0000, 1'b1, rmode_e'(m));
    end
    bubble();
    for (int n = 0; n < N_RANDOM; n++) begin
      fp64_t x, y;
      x = gen_fp(pick_kind());
      y = gen_fp(pick_kind());
      if ($urandom_range(0, 3) == 0) y = {y[63], 11'(2046 - x[62:52] + $urandom_range(0, 4) - 2), y[51:0]};
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
