// tb_range_coverage: range-combination test of modal_interval_units at its
// default parameters.
//
// The floating-point domain is split into classes: ordinary normal numbers
// (exponent within 2^+-30), big normal numbers close to overflow, subnormal
// numbers, signed zeros and signed infinities. Thirteen combinations of these
// classes for the four operand bounds (a1, a2, b1, b2) are applied to all four
// units; the last two combinations take the second operand as the additive or
// the multiplicative inverse of the first, bound by bound. These thirteen
// rows (ROWS below) are the range plan the units were originally verified
// with. Each row sends N_PER_ROW operations to every unit back to back
// through the handshakes, every result is compared with the reference model
// (exact arithmetic with directed rounding, tb_fp_ref_pkg) and every latency
// with the unit's pipeline depth. A row that produced no checked result on a
// unit counts as a failure.
module tb_range_coverage;
  import mi_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int N_PER_ROW = 50;
  localparam int N_ROWS    = 13;

  // class codes for gen_fp: 0 normal, 1 big, 2 subnormal, 3 zero, 4 infinity;
  // 7 additive inverse, 8 multiplicative inverse of the first operand
  typedef int row_t[4];
  localparam row_t ROWS[N_ROWS] = '{
    '{0, 0, 0, 0}, '{1, 1, 0, 0}, '{1, 1, 1, 1}, '{0, 0, 1, 1}, '{2, 2, 2, 2},
    '{2, 2, 0, 0}, '{1, 1, 2, 2}, '{0, 0, 4, 4}, '{4, 4, 1, 1}, '{4, 4, 4, 4},
    '{4, 4, 3, 3}, '{1, 1, 7, 7}, '{1, 1, 8, 8}
  };

  logic clk = 1'b0, rst_n = 1'b0;
  longint cyc = 0;
  int checks = 0, failures = 0;

  logic      sas_in_valid = 0, pas_in_valid = 0, pm_in_valid = 0, sm_in_valid = 0;
  logic      sas_sub = 0, pas_sub = 0;
  interval_t sas_a = '0, sas_b = '0, pas_a = '0, pas_b = '0, pm_a = '0, pm_b = '0, sm_a = '0, sm_b = '0;
  logic      sas_in_ready, pas_in_ready, pm_in_ready, sm_in_ready;
  logic      sas_result_ready, pas_result_ready, pm_result_ready, sm_result_ready;
  interval_t sas_r, pas_r, pm_r, sm_r;

  modal_interval_units dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { interval_t a, b, exp; longint t; int lat; int row; } item_t;
  item_t q[4][$];
  int row_done[4][N_ROWS];

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
    if (!bound_eq(r.fb, it.exp.fb) || !bound_eq(r.sb, it.exp.sb)) begin
      failures++;
      if (failures < 20)
        $display("FAIL: unit %0d row %0d [%h,%h] op [%h,%h] = [%h,%h], expected [%h,%h]", u,
                 it.row + 1, it.a.fb, it.a.sb, it.b.fb, it.b.sb, r.fb, r.sb, it.exp.fb, it.exp.sb);
    end else begin
      row_done[u][it.row]++;
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

  function automatic fp64_t second_operand(int cls, fp64_t first);
    case (cls)
      7:       return {~first[63], first[62:0]};
      8:       return $realtobits(1.0 / $bitstoreal(first));
      default: return gen_fp(cls);
    endcase
  endfunction

  task automatic drive(int u);
    for (int row = 0; row < N_ROWS; row++) begin
      for (int n = 0; n < N_PER_ROW; n++) begin
        item_t it;
        logic  s;
        logic [3:0] xc;
        bit special;
        it.row  = row;
        it.a.fb = gen_fp(ROWS[row][0]);
        it.a.sb = gen_fp(ROWS[row][1]);
        it.b.fb = second_operand(ROWS[row][2], it.a.fb);
        it.b.sb = second_operand(ROWS[row][3], it.a.sb);
        s = 1'($urandom);
        if (u < 2) begin
          it.exp = ref_iaddsub(it.a, it.b, s);
          it.lat = (u == 0) ? 10 : 8;
        end else begin
          it.exp  = ref_imul(it.a, it.b);
          xc      = sign_case(it.a, it.b);
          special = (xc == 4'b0101) || (xc == 4'b1010);
          it.lat  = (u == 2) ? (special ? 10 : 9) : (special ? 11 : 10);
        end
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
          @(negedge clk);
        end
        it.t = cyc;
        q[u].push_back(it);
      end
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
      if (q[u].size() != 0) begin
        failures++;
        $display("FAIL: unit %0d has %0d results outstanding", u, q[u].size());
      end
      for (int row = 0; row < N_ROWS; row++) begin
        checks++;
        if (row_done[u][row] == 0) begin
          failures++;
          $display("FAIL: unit %0d row %0d never produced a correct result", u, row + 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
