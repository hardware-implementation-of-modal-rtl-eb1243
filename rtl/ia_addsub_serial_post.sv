// ia_addsub_serial_post: interval post-processing unit of the serial modal
// interval adder/subtractor.
//
// The single floating-point adder delivers the two bounds of an interval
// result on consecutive cycles. The first one is held in the result's first
// bound register; when the second one arrives it is stored too and
// result_ready is raised for one cycle, with both bounds valid on r.
//
// Interface: z_valid/z/z_bound come from the adder pipeline (z_bound: 0 for
// the first bound, 1 for the second). r and result_ready are registers, so
// the post-processing adds one cycle ("Post-Process C-1/C-2" in the
// document's chart).
module ia_addsub_serial_post
  import mi_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      z_valid,
  input  fp64_t     z,
  input  logic      z_bound,
  output logic      result_ready,
  output interval_t r
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r            <= '0;
      result_ready <= 1'b0;
    end else begin
      result_ready <= z_valid && z_bound;
      if (z_valid && !z_bound) r.fb <= z;
      if (z_valid &&  z_bound) r.sb <= z;
    end
  end
endmodule
