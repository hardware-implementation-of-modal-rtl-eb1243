// ia_addsub_serial: serial modal interval double-precision adder/subtractor.
//
// Computes A + B = [v(a1+b1), ^(a2+b2)] or A - B = [v(a1-b2), ^(a2-b1)] for
// modal intervals A = [a1, a2], B = [b1, b2] of IEEE-754 doubles, with
// outward rounding (first bound towards -inf, second towards +inf). Improper
// intervals (a1 > a2) need no special treatment; infinite bounds follow
// IEEE-754 addition (inf - inf gives NaN). Dual and inner rounding are left
// to software: Inn(A o B) = Dual(Out(Dual(A) o Dual(B))).
//
// Structure: pre-processing unit -> one fp_addsub -> post-processing unit.
// The one adder is used twice per interval, so the unit accepts an
// operation every second cycle (in_valid/in_ready) and returns result_ready
// with r exactly 10 cycles after acceptance (1 pre-processing, LATENCY = 7
// adder, 2 post-processing), as in the document.
module ia_addsub_serial
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
  logic   fp_valid, fp_sub, fp_bound, z_valid, z_bound;
  fp64_t  fp_a, fp_b, z;
  rmode_e fp_rm;

  ia_addsub_serial_pre u_pre (
    .clk, .rst_n, .in_valid, .in_ready, .a, .b, .sub,
    .fp_valid, .fp_a, .fp_b, .fp_sub, .fp_rm, .fp_bound
  );

  fp_addsub #(.LATENCY(LATENCY)) u_fp (
    .clk, .rst_n, .in_valid(fp_valid), .a(fp_a), .b(fp_b), .sub(fp_sub),
    .rm(fp_rm), .out_valid(z_valid), .z
  );

  mi_delay #(.W(1), .DEPTH(LATENCY)) u_tag (
    .clk, .rst_n, .d(fp_bound), .q(z_bound)
  );

  ia_addsub_serial_post u_post (
    .clk, .rst_n, .z_valid, .z, .z_bound, .result_ready, .r
  );
endmodule
