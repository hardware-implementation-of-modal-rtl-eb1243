// im_parallel: parallel modal interval double-precision multiplier.
//
// Computes A * B for modal intervals of IEEE-754 doubles with outward
// rounding, by case distinction on the signs of the four bounds (16 cases,
// see im_parallel_pre). Two fp_mul units work side by side, multiplier 1
// producing first-bound products rounded towards -inf. Fourteen cases need
// one product per bound and take one issue cycle; cases 6 and 11 need four
// products and two comparisons and take two issue cycles. 0 * inf counts
// as 0 (the multipliers run with ieee_flag = 0); cases 7 and 10 give [0, 0],
// or [NaN, NaN] if a bound is infinite.
//
// Timing (as in the document): result_ready with r 9 cycles after
// acceptance (1 pre-processing + LATENCY = 7 + 1 post-processing), 10 for
// cases 6 and 11. One interval per cycle, or one per two cycles for cases 6
// and 11 (in_ready low for one cycle).
module im_parallel
  import mi_pkg::*;
#(
  parameter int unsigned LATENCY = FP_LATENCY
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  interval_t a,
  input  interval_t b,
  output logic      result_ready,
  output interval_t r
);
  logic     m_valid, ieee_flag, tag_last, z_valid, z2_valid, last_d;
  fp64_t    m1_a, m1_b, m2_a, m2_b, z1, z2;
  rmode_e   m1_rm, m2_rm;
  multype_e tag_type, type_d;

  im_parallel_pre u_pre (
    .clk, .rst_n, .in_valid, .in_ready, .a, .b, .m_valid, .m1_a, .m1_b,
    .m1_rm, .m2_a, .m2_b, .m2_rm, .ieee_flag, .tag_type, .tag_last
  );

  fp_mul #(.LATENCY(LATENCY)) u_mul1 (
    .clk, .rst_n, .in_valid(m_valid), .a(m1_a), .b(m1_b), .rm(m1_rm),
    .ieee_flag, .out_valid(z_valid), .z(z1)
  );

  fp_mul #(.LATENCY(LATENCY)) u_mul2 (
    .clk, .rst_n, .in_valid(m_valid), .a(m2_a), .b(m2_b), .rm(m2_rm),
    .ieee_flag, .out_valid(z2_valid), .z(z2)
  );

  mi_delay #(.W(3), .DEPTH(LATENCY)) u_tag (
    .clk, .rst_n, .d({tag_type, tag_last}), .q({type_d, last_d})
  );

  im_parallel_post u_post (
    .clk, .rst_n, .z_valid, .z1, .z2, .tag_type(type_d), .tag_last(last_d),
    .result_ready, .r
  );

  assert property (@(posedge clk) disable iff (!rst_n) z_valid == z2_valid);
endmodule
