// im_parallel_post: interval post-processing unit of the parallel modal
// interval multiplier.
//
// Normal multiplication type: the two products are the two result bounds.
// Special cases (tag_type MT_SC_MODAL for case 6, MT_SC_CLASSICAL for case
// 11): two pairs of products arrive on consecutive cycles. One comparator
// (mi_pkg::fp_lt, which also treats +0 and -0 as equal) picks from each pair:
//   case 6:  first pair -> r1 = max, second pair -> r2 = min
//   case 11: first pair -> r1 = min, second pair -> r2 = max
// result_ready is raised for one cycle when an interval is complete
// (tag_last), with both bounds on r. The registers add one cycle
// ("Post-Process C-1/C-2"). On a tie the comparator keeps z1 for max and z2
// for min.
module im_parallel_post
  import mi_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      z_valid,
  input  fp64_t     z1,
  input  fp64_t     z2,
  input  multype_e  tag_type,
  input  logic      tag_last,
  output logic      result_ready,
  output interval_t r
);
  logic  lt;
  fp64_t zmin, zmax;

  always_comb begin
    lt   = fp_lt(z1, z2);
    zmin = lt ? z1 : z2;
    zmax = lt ? z2 : z1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r            <= '0;
      result_ready <= 1'b0;
    end else begin
      result_ready <= z_valid && tag_last;
      if (z_valid) begin
        unique case (tag_type)
          MT_SC_MODAL: begin
            if (!tag_last) r.fb <= zmax;
            else           r.sb <= zmin;
          end
          MT_SC_CLASSICAL: begin
            if (!tag_last) r.fb <= zmin;
            else           r.sb <= zmax;
          end
          default: begin
            r.fb <= z1;
            r.sb <= z2;
          end
        endcase
      end
    end
  end
endmodule
