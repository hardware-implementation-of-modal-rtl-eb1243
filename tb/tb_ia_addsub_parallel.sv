// tb_ia_addsub_parallel: self-checking testbench of the parallel modal interval
// adder/subtractor.
//
// Offers random interval additions and subtractions back to back (proper and
// improper intervals, bounds from every number class including +-inf), with
// occasional idle cycles, through the in_valid/in_ready handshake. Each
// result is compared with [v(a1+b1), ^(a2+b2)] or [v(a1-b2), ^(a2-b1)]
// computed by the reference model; each latency with LATENCY_EXP and each
// gap between back-to-back acceptances with GAP_EXP. Counts of the
// mechanisms exercised (add, sub, improper operands, infinite bounds, NaN
// bounds, stalls) must all be non-zero.
module tb_ia_addsub_parallel;
  import mi_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int LATENCY_EXP = 8;
  localparam int GAP_EXP     = 1;
  localparam int N_OPS       = 4000;

  logic      clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, sub = 1'b0;
  interval_t a = '0, b = '0, r;
  logic      in_ready, result_ready;
  int        checks = 0, failures = 0;
  longint    cyc = 0;
  int n_add = 0, n_sub = 0, n_improper = 0, n_inf = 0, n_nan = 0, n_stall = 0;

  typedef struct { interval_t a, b, exp; logic sub; longint t; } item_t;
  item_t q[$];

  ia_addsub_parallel dut (.*);

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
            $display("FAIL: [%h,%h] %s [%h,%h] = [%h,%h], expected [%h,%h]", it.a.fb, it.a.sb,
                     it.sub ? "-" : "+", it.b.fb, it.b.sb, r.fb, r.sb, it.exp.fb, it.exp.sb);
        end
        checks++;
        if (cyc - it.t != LATENCY_EXP) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cyc - it.t, LATENCY_EXP);
        end
      end
    end
  end

  initial begin
    longint last_t = -1;
    bit      contiguous = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N_OPS; n++) begin
      item_t it;
      it.a   = gen_interval();
      it.b   = gen_interval();
      it.sub = 1'($urandom);
      it.exp = ref_iaddsub(it.a, it.b, it.sub);
      @(negedge clk);
      a = it.a; b = it.b; sub = it.sub; in_valid = 1'b1;
      while (!in_ready) begin
        n_stall++;
        @(negedge clk);
      end
      it.t = cyc;
      q.push_back(it);
      if (contiguous) begin
        checks++;
        if (it.t - last_t != GAP_EXP) begin
          failures++;
          $display("FAIL: acceptance gap %0d, expected %0d", it.t - last_t, GAP_EXP);
        end
      end
      last_t = it.t;
      contiguous = 1;
      if (it.sub) n_sub++; else n_add++;
      if ($bitstoreal(it.a.fb) > $bitstoreal(it.a.sb) || $bitstoreal(it.b.fb) > $bitstoreal(it.b.sb)) n_improper++;
      if (is_inf(it.a.fb) || is_inf(it.a.sb) || is_inf(it.b.fb) || is_inf(it.b.sb)) n_inf++;
      if (is_nan(it.exp.fb) || is_nan(it.exp.sb)) n_nan++;
      if ($urandom_range(0, 19) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        contiguous = 0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY_EXP + 4) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("mechanisms: add=%0d sub=%0d improper=%0d inf=%0d nan=%0d stall=%0d",
             n_add, n_sub, n_improper, n_inf, n_nan, n_stall);
    checks += 6;
    if (n_add == 0 || n_sub == 0 || n_improper == 0 || n_inf == 0 || n_nan == 0) failures++;
    if (GAP_EXP > 1 && n_stall == 0) failures++;
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
