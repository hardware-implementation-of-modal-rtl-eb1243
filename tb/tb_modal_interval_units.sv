// tb_modal_interval_units: end-to-end testbench of modal_interval_units at
// its default parameters.
//
// Four concurrent streams of random interval operations drive the serial and
// parallel adder/subtractors and the parallel and serial multipliers through
// their handshakes; every result is compared with the reference model and
// its latency with the unit's pipeline depth. The testbench counts the
// mechanisms of the design and fails if one never happened: add and
// subtract, improper (modal) operands, infinite bounds, NaN bounds, the
// handshake stalls of the serial units and of the multipliers' special
// cases, cases 6 and 11, the zero cases 7 and 10, and 0 * inf = 0.
module tb_modal_interval_units;
  import mi_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int N_OPS = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  longint cyc = 0;
  int checks = 0, failures = 0;

  // port groups
  logic      sas_in_valid = 0, pas_in_valid = 0, pm_in_valid = 0, sm_in_valid = 0;
  logic      sas_sub = 0, pas_sub = 0;
  interval_t sas_a = '0, sas_b = '0, pas_a = '0, pas_b = '0, pm_a = '0, pm_b = '0, sm_a = '0, sm_b = '0;
  logic      sas_in_ready, pas_in_ready, pm_in_ready, sm_in_ready;
  logic      sas_result_ready, pas_result_ready, pm_result_ready, sm_result_ready;
  interval_t sas_r, pas_r, pm_r, sm_r;

  modal_interval_units dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { interval_t a, b, exp; longint t; int lat; } item_t;
  item_t q[4][$];
  int n_done[4];

  // mechanism counters
  int n_add, n_sub, n_improper, n_inf, n_nan, n_stall[4], n_sc6, n_sc11, n_zero, n_zero_inf;

  function automatic bit zi(fp64_t x, fp64_t y);
    return (is_zero(x) && is_inf(y)) || (is_inf(x) && is_zero(y));
  endfunction

  task automatic check(int u, logic rdy, interval_t r);
    item_t it;
    if (!rdy) return;
    checks++;
    if (q[u].size() == 0) begin
      failures++;
      $display("FAIL: unit %0d unexpected result", u);
      return;
    end
    it = q[u].pop_front();
    n_done[u]++;
    if (!bound_eq(r.fb, it.exp.fb) || !bound_eq(r.sb, it.exp.sb)) begin
      failures++;
      if (failures < 20)
        $display("FAIL: unit %0d [%h,%h] op [%h,%h] = [%h,%h], expected [%h,%h]", u,
                 it.a.fb, it.a.sb, it.b.fb, it.b.sb, r.fb, r.sb, it.exp.fb, it.exp.sb);
    end
    checks++;
    if (cyc - it.t != longint'(it.lat)) begin
      failures++;
      $display("FAIL: unit %0d latency %0d, expected %0d", u, cyc - it.t, it.lat);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      check(0, sas_result_ready, sas_r);
      check(1, pas_result_ready, pas_r);
      check(2, pm_result_ready, pm_r);
      check(3, sm_result_ready, sm_r);
    end
  end

  function automatic void note_operands(interval_t a, interval_t b);
    if ($bitstoreal(a.fb) > $bitstoreal(a.sb) || $bitstoreal(b.fb) > $bitstoreal(b.sb)) n_improper++;
    if (is_inf(a.fb) || is_inf(a.sb) || is_inf(b.fb) || is_inf(b.sb)) n_inf++;
  endfunction

  // Unit u: 0 serial add/sub, 1 parallel add/sub, 2 parallel mul, 3 serial mul.
  task automatic drive(int u);
    for (int n = 0; n < N_OPS; n++) begin
      item_t it;
      logic  s;
      logic [3:0] xc;
      bit    special;
      it.a = gen_interval();
      it.b = gen_interval();
      s = 1'($urandom);
      if (u < 2) begin
        it.exp = ref_iaddsub(it.a, it.b, s);
        it.lat = (u == 0) ? 10 : 8;
        if (s) n_sub++; else n_add++;
      end else begin
        it.exp = ref_imul(it.a, it.b);
        xc = sign_case(it.a, it.b);
        special = (xc == 4'b0101) || (xc == 4'b1010);
        it.lat = (u == 2) ? (special ? 10 : 9) : (special ? 11 : 10);
        if (xc == 4'b0101) n_sc6++;
        if (xc == 4'b1010) n_sc11++;
        if (xc == 4'b0110 || xc == 4'b1001) n_zero++;
        if (zi(it.a.fb, it.b.fb) || zi(it.a.fb, it.b.sb) || zi(it.a.sb, it.b.fb) || zi(it.a.sb, it.b.sb))
          n_zero_inf++;
      end
      note_operands(it.a, it.b);
      if (is_nan(it.exp.fb) || is_nan(it.exp.sb)) n_nan++;
      @(negedge clk);
      case (u)
        0: begin sas_a = it.a; sas_b = it.b; sas_sub = s; sas_in_valid = 1; end
        1: begin pas_a = it.a; pas_b = it.b; pas_sub = s; pas_in_valid = 1; end
        2: begin pm_a = it.a; pm_b = it.b; pm_in_valid = 1; end
        default: begin sm_a = it.a; sm_b = it.b; sm_in_valid = 1; end
      endcase
      forever begin
        logic rdy;
        case (u)
          0: rdy = sas_in_ready;
          1: rdy = pas_in_ready;
          2: rdy = pm_in_ready;
          default: rdy = sm_in_ready;
        endcase
        if (rdy) break;
        n_stall[u]++;
        @(negedge clk);
      end
      it.t = cyc;
      q[u].push_back(it);
    end
    @(negedge clk);
    case (u)
      0: sas_in_valid = 0;
      1: pas_in_valid = 0;
      2: pm_in_valid = 0;
      default: sm_in_valid = 0;
    endcase
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      drive(0);
      drive(1);
      drive(2);
      drive(3);
    join
    repeat (20) @(negedge clk);
    for (int u = 0; u < 4; u++) begin
      checks++;
      if (q[u].size() != 0 || n_done[u] != N_OPS) begin
        failures++;
        $display("FAIL: unit %0d completed %0d of %0d", u, n_done[u], N_OPS);
      end
    end
    $display("mechanisms: add=%0d sub=%0d improper=%0d inf=%0d nan=%0d stall(sas,pas,pm,sm)=%0d,%0d,%0d,%0d case6=%0d case11=%0d zero=%0d zero*inf=%0d",
             n_add, n_sub, n_improper, n_inf, n_nan, n_stall[0], n_stall[1], n_stall[2], n_stall[3],
             n_sc6, n_sc11, n_zero, n_zero_inf);
    checks += 12;
    if (n_add == 0) failures++;
    if (n_sub == 0) failures++;
    if (n_improper == 0) failures++;
    if (n_inf == 0) failures++;
    if (n_nan == 0) failures++;
    if (n_stall[0] == 0) failures++;
    if (n_stall[1] != 0) failures++;  // the parallel adder never stalls
    if (n_stall[2] == 0) failures++;
    if (n_stall[3] == 0) failures++;
    if (n_sc6 == 0 || n_sc11 == 0) failures++;
    if (n_zero == 0) failures++;
    if (n_zero_inf == 0) failures++;
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
