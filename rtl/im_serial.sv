// im_serial: serial modal interval double-precision multiplier.
//
// Same arithmetic as im_parallel (outward-rounded modal interval product by
// case distinction on the bound signs, 0 * inf = 0, zero cases 7 and 10) but
// with one fp_mul. Each interval takes two products, and cases 6 and 11 take
// three thanks to the bound-magnitude comparisons (see im_serial_pre).
//
// Timing (as in the document): result_ready with r 10 cycles after
// acceptance (11 for cases 6 and 11); a new interval is accepted every two
// cycles (three for cases 6 and 11) through in_valid/in_ready.
module im_serial
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
  logic      m_valid, ieee_flag, tag_last, z_valid, last_d;
  fp64_t     m_a, m_b, z;
  rmode_e    m_rm;
  mul_dest_e tag_dest, dest_d;

  im_serial_pre u_pre (
    .clk, .rst_n, .in_valid, .in_ready, .a, .b, .m_valid, .m_a, .m_b, .m_rm,
    .ieee_flag, .tag_dest, .tag_last
  );

  fp_mul #(.LATENCY(LATENCY)) u_mul (
    .clk, .rst_n, .in_valid(m_valid), .a(m_a), .b(m_b), .rm(m_rm),
    .ieee_flag, .out_valid(z_valid), .z
  );

  mi_delay #(.W(4), .DEPTH(LATENCY)) u_tag (
    .clk, .rst_n, .d({tag_dest, tag_last}), .q({dest_d, last_d})
  );

  im_serial_post u_post (
    .clk, .rst_n, .z_valid, .z, .tag_dest(dest_d), .tag_last(last_d),
    .result_ready, .r
  );
endmodule
