// ia_addsub_parallel: parallel modal interval double-precision
// adder/subtractor.
//
// Same arithmetic as ia_addsub_serial (A + B = [v(a1+b1), ^(a2+b2)],
// A - B = [v(a1-b2), ^(a2-b1)], outward rounding, IEEE-754 infinities), but
// with two fp_addsub units, one per bound, so an interval operation is
// accepted every cycle (in_ready is always high). The adders' output
// registers are the result registers: result_ready and r follow acceptance
// by 8 cycles (1 pre-processing + LATENCY = 7), as in the document.
module ia_addsub_parallel
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
  input  logic      sub,
  output logic      result_ready,
  output interval_t r
);
  logic   fp_valid, fp_sub, v2;
  fp64_t  fp1_a, fp1_b, fp2_a, fp2_b;
  rmode_e fp1_rm, fp2_rm;

  ia_addsub_parallel_pre u_pre (
    .clk, .rst_n, .in_valid, .in_ready, .a, .b, .sub,
    .fp_valid, .fp_sub, .fp1_a, .fp1_b, .fp1_rm, .fp2_a, .fp2_b, .fp2_rm
  );

  fp_addsub #(.LATENCY(LATENCY)) u_fp1 (
    .clk, .rst_n, .in_valid(fp_valid), .a(fp1_a), .b(fp1_b), .sub(fp_sub),
    .rm(fp1_rm), .out_valid(result_ready), .z(r.fb)
  );

  fp_addsub #(.LATENCY(LATENCY)) u_fp2 (
    .clk, .rst_n, .in_valid(fp_valid), .a(fp2_a), .b(fp2_b), .sub(fp_sub),
    .rm(fp2_rm), .out_valid(v2), .z(r.sb)
  );

  // Both adders run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) result_ready == v2);
endmodule
