// im_serial_pre: interval pre-processing unit of the serial modal interval
// multiplier.
//
// With a single floating-point multiplier, an interval product is issued as
// a sequence of single products, one per cycle. For the fourteen ordinary
// sign cases (x = signs of a1, a2, b1, b2, see im_parallel_pre for the table)
// it issues the first-bound product rounded towards -inf, then the
// second-bound product rounded towards +inf. Cases 6 (x = 0101) and 11
// (x = 1010) need three products instead of four: the magnitude comparisons
// c0 = |a1| <= |a2| and c1 = |b1| <= |b2| decide one bound directly, and the
// other bound is the min or max of two products. The two compared products
// are issued first (the first one goes to the temporary register T), the
// directly decided one last:
//
//   case 6,  c1c0 = 00: v a1b1 direct,  ^ min(a1b2, a2b1)
//            c1c0 = 11: v a2b2 direct,  ^ min(a1b2, a2b1)
//            c1c0 = 01: v max(a1b1, a2b2), ^ a2b1 direct
//            c1c0 = 10: v max(a1b1, a2b2), ^ a1b2 direct
//   case 11, c1c0 = 00: ^ a1b1 direct,  v min(a1b2, a2b1)
//            c1c0 = 11: ^ a2b2 direct,  v min(a1b2, a2b1)
//            c1c0 = 01: v a2b1 direct,  ^ max(a1b1, a2b2)
//            c1c0 = 10: v a1b2 direct,  ^ max(a1b1, a2b2)
//
// For case 6 with c1c0 = 01 and 10 the direct second bound is the product of
// the larger magnitudes (a2b1 and a1b2 respectively), which is the one the
// minimum of the two negative products always equals.
// Zero cases 7 and 10 issue 0 * 0 twice (inf * 0 with ieee_flag = 1 if a
// bound is infinite, giving [NaN, NaN]); otherwise ieee_flag = 0.
//
// Interface: in_valid/in_ready; in_ready is low while products of the
// accepted interval remain to be issued (one cycle normally, two for cases
// 6 and 11). m_* and tag_* are registers; tag_dest says what the
// post-processing unit does with each product, tag_last marks the last one.
module im_serial_pre
  import mi_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  interval_t a,
  input  interval_t b,
  output logic      m_valid,
  output fp64_t     m_a,
  output fp64_t     m_b,
  output rmode_e    m_rm,
  output logic      ieee_flag,
  output mul_dest_e tag_dest,
  output logic      tag_last
);
  // One issued product: which bound of A and of B, rounding, destination.
  typedef struct packed {
    logic      a2;     // 0: a1, 1: a2
    logic      b2;     // 0: b1, 1: b2
    logic      up;     // 0: round down, 1: round up
    mul_dest_e dest;
    logic      last;
  } step_t;

  localparam logic A1 = 1'b0, A2 = 1'b1, B1 = 1'b0, B2 = 1'b1;
  localparam logic DN = 1'b0, UPR = 1'b1;

  // Product number `step` (0, 1, 2) of the sequence for sign case x and
  // comparison flags c = {c1, c0}.
  function automatic step_t plan(logic [1:0] step, logic [3:0] x, logic [1:0] c);
    step_t s;
    s = '{a2: A1, b2: B1, up: DN, dest: D_R1, last: 1'b0};
    if (x == 4'b0101) begin : case6
      logic direct_r1;
      direct_r1 = (c == 2'b00) || (c == 2'b11);
      unique case (step)
        2'd0: s = direct_r1 ? '{A1, B2, UPR, D_T, 1'b0} : '{A1, B1, DN, D_T, 1'b0};
        2'd1: s = direct_r1 ? '{A2, B1, UPR, D_R2_MIN, 1'b0} : '{A2, B2, DN, D_R1_MAX, 1'b0};
        default:
          unique case (c)
            2'b00:   s = '{A1, B1, DN, D_R1, 1'b1};
            2'b11:   s = '{A2, B2, DN, D_R1, 1'b1};
            2'b01:   s = '{A2, B1, UPR, D_R2, 1'b1};
            default: s = '{A1, B2, UPR, D_R2, 1'b1};
          endcase
      endcase
    end else if (x == 4'b1010) begin : case11
      logic direct_r2;
      direct_r2 = (c == 2'b00) || (c == 2'b11);
      unique case (step)
        2'd0: s = direct_r2 ? '{A1, B2, DN, D_T, 1'b0} : '{A1, B1, UPR, D_T, 1'b0};
        2'd1: s = direct_r2 ? '{A2, B1, DN, D_R1_MIN, 1'b0} : '{A2, B2, UPR, D_R2_MAX, 1'b0};
        default:
          unique case (c)
            2'b00:   s = '{A1, B1, UPR, D_R2, 1'b1};
            2'b11:   s = '{A2, B2, UPR, D_R2, 1'b1};
            2'b01:   s = '{A2, B1, DN, D_R1, 1'b1};
            default: s = '{A1, B2, DN, D_R1, 1'b1};
          endcase
      endcase
    end else begin : ordinary
      logic [1:0] lo, hi;  // {a2, b2} of the first and second bound product
      unique case (x)
        4'b0000: begin lo = {A1, B1}; hi = {A2, B2}; end
        4'b0001: begin lo = {A1, B1}; hi = {A1, B2}; end
        4'b0010: begin lo = {A2, B1}; hi = {A2, B2}; end
        4'b0011: begin lo = {A2, B1}; hi = {A1, B2}; end
        4'b0100: begin lo = {A1, B1}; hi = {A2, B1}; end
        4'b0111: begin lo = {A2, B2}; hi = {A1, B2}; end
        4'b1000: begin lo = {A1, B2}; hi = {A2, B2}; end
        4'b1011: begin lo = {A2, B1}; hi = {A1, B1}; end
        4'b1100: begin lo = {A1, B2}; hi = {A2, B1}; end
        4'b1101: begin lo = {A2, B2}; hi = {A2, B1}; end
        4'b1110: begin lo = {A1, B2}; hi = {A1, B1}; end
        4'b1111: begin lo = {A2, B2}; hi = {A1, B1}; end
        default: begin lo = {A1, B1}; hi = {A1, B1}; end  // zero cases
      endcase
      if (step == 2'd0) s = '{lo[1], lo[0], DN,  D_R1, 1'b0};
      else              s = '{hi[1], hi[0], UPR, D_R2, 1'b1};
    end
    return s;
  endfunction

  logic [3:0] x;
  logic inf_flag, zero_case, nan_result, sc_classical, sc_modal, sc_enable;
  logic cmp_a, cmp_b;

  im_case_decode u_dec (
    .a, .b, .x, .inf_flag, .zero_case, .nan_result, .sc_classical, .sc_modal,
    .sc_enable, .cmp_a, .cmp_b
  );

  // Held operation while its later products are issued.
  interval_t  a_q, b_q;
  logic [3:0] x_q;
  logic [1:0] c_q;
  logic       zero_q, nan_q;
  logic [1:0] step_q;     // cycle number of the next product to issue
  logic       busy_q;

  assign in_ready = !busy_q;

  // Selection for the cycle: either a newly accepted interval (step 0) or
  // the next step of the held one.
  logic       issue, use_new;
  interval_t  sa, sb;
  logic [3:0] sx;
  logic [1:0] sc_c, sstep;
  logic       szero, snan;
  step_t      st;
  fp64_t      opa, opb;

  always_comb begin
    use_new = in_valid && in_ready;
    issue   = use_new || busy_q;
    sa    = use_new ? a : a_q;
    sb    = use_new ? b : b_q;
    sx    = use_new ? x : x_q;
    sc_c  = use_new ? {cmp_b, cmp_a} : c_q;
    szero = use_new ? zero_case : zero_q;
    snan  = use_new ? nan_result : nan_q;
    sstep = use_new ? 2'd0 : step_q;
    st    = plan(sstep, sx, sc_c);
    opa   = st.a2 ? sa.sb : sa.fb;
    opb   = st.b2 ? sb.sb : sb.fb;
    if (szero) begin
      opa = snan ? POS_INF : '0;
      opb = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      step_q    <= '0;
      m_valid   <= 1'b0;
      m_a       <= '0;
      m_b       <= '0;
      m_rm      <= RM_DOWN;
      ieee_flag <= 1'b0;
      tag_dest  <= D_R1;
      tag_last  <= 1'b0;
    end else begin
      m_valid <= issue;
      if (issue) begin
        m_a       <= opa;
        m_b       <= opb;
        m_rm      <= st.up ? RM_UP : RM_DOWN;
        ieee_flag <= szero && snan;
        tag_dest  <= st.dest;
        tag_last  <= st.last;
        busy_q    <= !st.last;
        step_q    <= sstep + 2'd1;
      end
      if (use_new) begin
        a_q    <= a;
        b_q    <= b;
        x_q    <= x;
        c_q    <= {cmp_b, cmp_a};
        zero_q <= zero_case;
        nan_q  <= nan_result;
      end
    end
  end

  // Cases 6 and 11 take three products, all others two.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m_valid && tag_dest == D_T) |=> (m_valid && !tag_last) ##1 (m_valid && tag_last));
endmodule
