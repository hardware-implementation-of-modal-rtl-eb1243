// modal_interval_units: the four modal interval arithmetic units for
// IEEE-754 double-precision bounds, side by side.
//
//   sas_*  serial adder/subtractor    one fp_addsub, 1 op / 2 cycles, depth 10
//   pas_*  parallel adder/subtractor  two fp_addsub, 1 op / cycle,    depth 8
//   pm_*   parallel multiplier        two fp_mul, 1 op / cycle (1 / 2 cycles
//                                     for cases 6 and 11), depth 9 (10)
//   sm_*   serial multiplier          one fp_mul, 1 op / 2 cycles (1 / 3),
//                                     depth 10 (11)
//
// The serial and parallel forms trade area for throughput; a system would
// normally pick one of each. Every unit has its own in_valid/in_ready
// handshake, operands a and b (interval_t: first bound, second bound) and a
// result r with a one-cycle result_ready pulse. Results return in order.
// All units share one clock and a synchronous active-low reset.
module modal_interval_units
  import mi_pkg::*;
#(
  parameter int unsigned LATENCY = FP_LATENCY
) (
  input  logic      clk,
  input  logic      rst_n,
  // serial adder/subtractor
  input  logic      sas_in_valid,
  output logic      sas_in_ready,
  input  interval_t sas_a,
  input  interval_t sas_b,
  input  logic      sas_sub,
  output logic      sas_result_ready,
  output interval_t sas_r,
  // parallel adder/subtractor
  input  logic      pas_in_valid,
  output logic      pas_in_ready,
  input  interval_t pas_a,
  input  interval_t pas_b,
  input  logic      pas_sub,
  output logic      pas_result_ready,
  output interval_t pas_r,
  // parallel multiplier
  input  logic      pm_in_valid,
  output logic      pm_in_ready,
  input  interval_t pm_a,
  input  interval_t pm_b,
  output logic      pm_result_ready,
  output interval_t pm_r,
  // serial multiplier
  input  logic      sm_in_valid,
  output logic      sm_in_ready,
  input  interval_t sm_a,
  input  interval_t sm_b,
  output logic      sm_result_ready,
  output interval_t sm_r
);
  ia_addsub_serial #(.LATENCY(LATENCY)) u_sas (
    .clk, .rst_n, .in_valid(sas_in_valid), .in_ready(sas_in_ready),
    .a(sas_a), .b(sas_b), .sub(sas_sub),
    .result_ready(sas_result_ready), .r(sas_r)
  );

  ia_addsub_parallel #(.LATENCY(LATENCY)) u_pas (
    .clk, .rst_n, .in_valid(pas_in_valid), .in_ready(pas_in_ready),
    .a(pas_a), .b(pas_b), .sub(pas_sub),
    .result_ready(pas_result_ready), .r(pas_r)
  );

  im_parallel #(.LATENCY(LATENCY)) u_pm (
    .clk, .rst_n, .in_valid(pm_in_valid), .in_ready(pm_in_ready),
    .a(pm_a), .b(pm_b), .result_ready(pm_result_ready), .r(pm_r)
  );

  im_serial #(.LATENCY(LATENCY)) u_sm (
    .clk, .rst_n, .in_valid(sm_in_valid), .in_ready(sm_in_ready),
    .a(sm_a), .b(sm_b), .result_ready(sm_result_ready), .r(sm_r)
  );
endmodule
