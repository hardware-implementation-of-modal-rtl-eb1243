// im_parallel_pre: interval pre-processing unit of the parallel modal
// interval multiplier.
//
// From the sign flags x3..x0 of a1, a2, b1, b2 (im_case_decode) it chooses
// the operands of two floating-point multipliers, multiplier 1 rounding
// towards -inf (first bound) and multiplier 2 towards +inf (second bound):
//
//   x    mult 1   mult 2      x    mult 1   mult 2
//   0000 a1*b1    a2*b2       1000 a1*b2    a2*b2
//   0001 a1*b1    a1*b2       1001 zero case
//   0010 a2*b1    a2*b2       1010 two pairs (case 11)
//   0011 a2*b1    a1*b2       1011 a2*b1    a1*b1
//   0100 a1*b1    a2*b1       1100 a1*b2    a2*b1
//   0101 two pairs (case 6)   1101 a2*b2    a2*b1
//   0110 zero case            1110 a1*b2    a1*b1
//   0111 a2*b2    a1*b2       1111 a2*b2    a1*b1
//
// Cases 6 and 11 need four products. They are issued in two cycles so that
// each cycle's pair belongs to one result bound: case 6 issues
// (a1*b1, a2*b2) rounded down, then (a1*b2, a2*b1) rounded up; case 11
// issues (a1*b2, a2*b1) rounded down, then (a1*b1, a2*b2) rounded up. The
// post-processing unit compares each pair with one comparator.
// The zero cases (7 and 10) feed 0 * 0, giving [+0, +0]; if a bound is
// infinite they feed inf * 0 with ieee_flag = 1 so the result is [NaN, NaN].
// Otherwise ieee_flag = 0, so the multipliers give 0 * inf = 0.
//
// Interface: in_valid/in_ready; in_ready drops for one cycle after a
// special case is accepted. tag_type (multiplication type) and tag_last
// (last issue of the interval) travel down the pipeline with the products.
// All m_* and tag_* outputs are registers (one cycle, "Pre-Process C-1").
module im_parallel_pre
  import mi_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  interval_t a,
  input  interval_t b,
  output logic      m_valid,
  output fp64_t     m1_a,
  output fp64_t     m1_b,
  output rmode_e    m1_rm,
  output fp64_t     m2_a,
  output fp64_t     m2_b,
  output rmode_e    m2_rm,
  output logic      ieee_flag,
  output multype_e  tag_type,
  output logic      tag_last
);
  logic [3:0] x;
  logic inf_flag, zero_case, nan_result, sc_classical, sc_modal, sc_enable;
  logic cmp_a, cmp_b;

  im_case_decode u_dec (
    .a, .b, .x, .inf_flag, .zero_case, .nan_result, .sc_classical, .sc_modal,
    .sc_enable, .cmp_a, .cmp_b
  );

  // Operands of the first issue cycle.
  fp64_t    y1, y2, y3, y4;
  rmode_e   rm2;
  logic     ieee;
  multype_e mtype;

  always_comb begin
    y1 = a.fb; y2 = b.fb; y3 = a.sb; y4 = b.sb;
    rm2   = RM_UP;
    ieee  = 1'b0;
    mtype = MT_NORMAL;
    unique case (x)
      4'b0000: begin y1 = a.fb; y2 = b.fb; y3 = a.sb; y4 = b.sb; end
      4'b0001: begin y1 = a.fb; y2 = b.fb; y3 = a.fb; y4 = b.sb; end
      4'b0010: begin y1 = a.sb; y2 = b.fb; y3 = a.sb; y4 = b.sb; end
      4'b0011: begin y1 = a.sb; y2 = b.fb; y3 = a.fb; y4 = b.sb; end
      4'b0100: begin y1 = a.fb; y2 = b.fb; y3 = a.sb; y4 = b.fb; end
      4'b0101: begin y1 = a.fb; y2 = b.fb; y3 = a.sb; y4 = b.sb;
                     rm2 = RM_DOWN; mtype = MT_SC_MODAL; end
      4'b0111: begin y1 = a.sb; y2 = b.sb; y3 = a.fb; y4 = b.sb; end
      4'b1000: begin y1 = a.fb; y2 = b.sb; y3 = a.sb; y4 = b.sb; end
      4'b1010: begin y1 = a.fb; y2 = b.sb; y3 = a.sb; y4 = b.fb;
                     rm2 = RM_DOWN; mtype = MT_SC_CLASSICAL; end
      4'b1011: begin y1 = a.sb; y2 = b.fb; y3 = a.fb; y4 = b.fb; end
      4'b1100: begin y1 = a.fb; y2 = b.sb; y3 = a.sb; y4 = b.fb; end
      4'b1101: begin y1 = a.sb; y2 = b.sb; y3 = a.sb; y4 = b.fb; end
      4'b1110: begin y1 = a.fb; y2 = b.sb; y3 = a.fb; y4 = b.fb; end
      4'b1111: begin y1 = a.sb; y2 = b.sb; y3 = a.fb; y4 = b.fb; end
      default: begin  // 0110, 1001: zero cases
        y1 = nan_result ? POS_INF : '0; y2 = '0;
        y3 = nan_result ? POS_INF : '0; y4 = '0;
        ieee = nan_result;
      end
    endcase
  end

  // Second issue cycle of a special case.
  logic     pend_q;
  fp64_t    p1_a_q, p1_b_q, p2_a_q, p2_b_q;
  multype_e pend_type_q;

  assign in_ready = !pend_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_q    <= 1'b0;
      m_valid   <= 1'b0;
      m1_a      <= '0;
      m1_b      <= '0;
      m2_a      <= '0;
      m2_b      <= '0;
      m1_rm     <= RM_DOWN;
      m2_rm     <= RM_UP;
      ieee_flag <= 1'b0;
      tag_type  <= MT_NORMAL;
      tag_last  <= 1'b0;
    end else if (in_valid && in_ready) begin
      m_valid   <= 1'b1;
      m1_a      <= y1;
      m1_b      <= y2;
      m1_rm     <= RM_DOWN;
      m2_a      <= y3;
      m2_b      <= y4;
      m2_rm     <= rm2;
      ieee_flag <= ieee;
      tag_type  <= mtype;
      tag_last  <= !sc_enable;
      pend_q    <= sc_enable;
      pend_type_q <= mtype;
      if (sc_modal) begin          // case 6: a1*b2, a2*b1 rounded up
        p1_a_q <= a.fb; p1_b_q <= b.sb; p2_a_q <= a.sb; p2_b_q <= b.fb;
      end else begin               // case 11: a1*b1, a2*b2 rounded up
        p1_a_q <= a.fb; p1_b_q <= b.fb; p2_a_q <= a.sb; p2_b_q <= b.sb;
      end
    end else if (pend_q) begin
      m_valid   <= 1'b1;
      m1_a      <= p1_a_q;
      m1_b      <= p1_b_q;
      m1_rm     <= RM_UP;
      m2_a      <= p2_a_q;
      m2_b      <= p2_b_q;
      m2_rm     <= RM_UP;
      ieee_flag <= 1'b0;
      tag_type  <= pend_type_q;
      tag_last  <= 1'b1;
      pend_q    <= 1'b0;
    end else begin
      m_valid   <= 1'b0;
    end
  end

  // A special case occupies exactly two issue cycles.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m_valid && !tag_last) |=> (m_valid && tag_last));
endmodule
