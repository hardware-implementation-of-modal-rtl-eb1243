// tb_im_parallel: self-checking testbench of the parallel modal interval
// multiplier.
//
// First the four sample vectors of the document's test-vector table, then
// random interval pairs (bounds from every number class, random signs so
// that all 16 sign cases occur, and extra pairs forced into cases 6 and 11
// with equal-magnitude bounds) are offered back to back through
// in_valid/in_ready with occasional idle cycles. Each result is compared
// with the reference interval product (sign-case table applied to exact
// reference products); each latency with LAT_N / LAT_S (ordinary / special
// case) and each gap between back-to-back acceptances with GAP_N / GAP_S.
// Every sign case, the
// zero cases with and without infinite bounds, 0 * inf and input stalls must
// all have occurred.
module tb_im_parallel;
  import mi_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int LAT_N = 9, LAT_S = 10;
  localparam int GAP_N = 1,  GAP_S = 2;
  localparam int N_OPS = 6000;

  logic      clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  interval_t a = '0, b = '0, r;
  logic      in_ready, result_ready;
  int        checks = 0, failures = 0;
  longint    cyc = 0;
  int        n_case[16];
  int        n_cmp[2][4];
  int        n_nan = 0, n_zero_inf = 0, n_stall = 0;

  typedef struct { interval_t a, b, exp; bit special; longint t; } item_t;
  item_t q[$];

  im_parallel dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && result_ready) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result");
      end else begin
        it = q.pop_front();
        if (!bound_eq(r.fb, it.exp.fb) || !bound_eq(r.sb, it.exp.sb)) begin
          failures++;
          if (failures < 20)
            $display("FAIL: [%h,%h] * [%h,%h] = [%h,%h], expected [%h,%h]", it.a.fb, it.a.sb,
                     it.b.fb, it.b.sb, r.fb, r.sb, it.exp.fb, it.exp.sb);
        end
        checks++;
        if (cyc - it.t != (it.special ? LAT_S : LAT_N)) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cyc - it.t, it.special ? LAT_S : LAT_N);
        end
      end
    end
  end

  function automatic bit has_zero_inf(fp64_t x, fp64_t y);
    return (is_zero(x) && is_inf(y)) || (is_inf(x) && is_zero(y));
  endfunction

  // Sample vectors of the document's test table: a1 a2 b1 b2 -> r1 r2.
  localparam fp64_t SAMPLE[4][6] = '{
    '{64'hbfe6131b8bae450b, 64'h3fe4204108536374, 64'h3fc77be29c123d32, 64'h3fba23cfe3a68848,
      64'hbfb2083ab042facd, 64'h3fb070baddb7143a},
    '{64'h3fdd1f52644242b3, 64'hbfe673f888229135, 64'hc031ef4319daa37f, 64'hbfe28b85a4442477,
      64'h3fda0642a2cbcec8, 64'hbfd0e09805f5c00a},
    '{64'hc00002b6ed6c1725, 64'h404341004edd305f, 64'hc000058dc268b02b, 64'hbfe83d8aece84cb8,
      64'hc05347af35baaab9, 64'h40100845a10c0122},
    '{64'hc0256b52b52b52b6, 64'hbff0a3fab294aa63, 64'hbfeec9e60acb0f26, 64'hbfe75723e7989ba1,
      64'h3fe846595b734f0d, 64'h40249bc1a3f680a3}};

  initial begin
    longint last_t = -1;
    bit     contiguous = 0, last_special = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N_OPS + 4; n++) begin
      item_t it;
      logic [3:0] xc;
      if (n < 4) begin
        it.a = '{SAMPLE[n][0], SAMPLE[n][1]};
        it.b = '{SAMPLE[n][2], SAMPLE[n][3]};
      end else begin
        it.a = gen_interval();
        it.b = gen_interval();
        if ($urandom_range(0, 4) == 0) begin
          // force case 6 or 11, sometimes with equal magnitudes
          bit m6 = 1'($urandom);
          it.a.fb[63] = !m6; it.a.sb[63] = m6; it.b.fb[63] = !m6; it.b.sb[63] = m6;
          if ($urandom_range(0, 3) == 0) it.a.sb[62:0] = it.a.fb[62:0];
          if ($urandom_range(0, 3) == 0) it.b.sb[62:0] = it.b.fb[62:0];
        end
      end
      it.exp = ref_imul(it.a, it.b);
      if (n < 4) begin
        checks++;
        if (it.exp != '{SAMPLE[n][4], SAMPLE[n][5]}) begin
          failures++;
          $display("FAIL: reference disagrees with sample vector %0d", n);
        end
      end
      xc = sign_case(it.a, it.b);
      it.special = (xc == 4'b0101) || (xc == 4'b1010);
      @(negedge clk);
      a = it.a; b = it.b; in_valid = 1'b1;
      while (!in_ready) begin
        n_stall++;
        @(negedge clk);
      end
      it.t = cyc;
      q.push_back(it);
      if (contiguous) begin
        checks++;
        if (it.t - last_t != (last_special ? GAP_S : GAP_N)) begin
          failures++;
          $display("FAIL: acceptance gap %0d, expected %0d", it.t - last_t, last_special ? GAP_S : GAP_N);
        end
      end
      last_t = it.t;
      last_special = it.special;
      contiguous = 1;
      n_case[xc]++;
      if (it.special)
        n_cmp[xc == 4'b1010][{it.b.fb[62:0] <= it.b.sb[62:0], it.a.fb[62:0] <= it.a.sb[62:0]}]++;
      if (is_nan(it.exp.fb)) n_nan++;
      if (has_zero_inf(it.a.fb, it.b.fb) || has_zero_inf(it.a.fb, it.b.sb) ||
          has_zero_inf(it.a.sb, it.b.fb) || has_zero_inf(it.a.sb, it.b.sb)) n_zero_inf++;
      if ($urandom_range(0, 19) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        contiguous = 0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT_S + 4) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $write("mechanisms: cases");
    foreach (n_case[i]) $write(" %0d", n_case[i]);
    $display("; case6 c1c0 %0d %0d %0d %0d; case11 c1c0 %0d %0d %0d %0d; nan=%0d zero*inf=%0d stall=%0d",
             n_cmp[0][0], n_cmp[0][1], n_cmp[0][2], n_cmp[0][3],
             n_cmp[1][0], n_cmp[1][1], n_cmp[1][2], n_cmp[1][3], n_nan, n_zero_inf, n_stall);
    foreach (n_case[i]) begin
      checks++;
      if (n_case[i] == 0) failures++;
    end
    foreach (n_cmp[i, j]) begin
      checks++;
      if (n_cmp[i][j] == 0) failures++;
    end
    checks += 3;
    if (n_nan == 0) failures++;
    if (n_zero_inf == 0) failures++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
