// im_serial_post: interval post-processing unit of the serial modal interval
// multiplier.
//
// Products arrive one per cycle from the single multiplier, each tagged with
// its destination: D_R1/D_R2 store it as the first/second result bound, D_T
// holds it in the temporary register T, and D_R1_MAX, D_R1_MIN, D_R2_MIN,
// D_R2_MAX store max(T, z) or min(T, z) through the one comparator
// (mi_pkg::fp_lt; +0 and -0 compare equal, and on a tie T is kept).
// result_ready is raised for one cycle after the product tagged last has
// been stored, with both bounds on r ("Post-Process C-2/C-3").
module im_serial_post
  import mi_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      z_valid,
  input  fp64_t     z,
  input  mul_dest_e tag_dest,
  input  logic      tag_last,
  output logic      result_ready,
  output interval_t r
);
  fp64_t t_q;
  logic  lt;
  fp64_t zmin, zmax;

  always_comb begin
    lt   = fp_lt(z, t_q);
    zmin = lt ? z : t_q;
    zmax = fp_lt(t_q, z) ? z : t_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r            <= '0;
      t_q          <= '0;
      result_ready <= 1'b0;
    end else begin
      result_ready <= z_valid && tag_last;
      if (z_valid) begin
        unique case (tag_dest)
          D_R1:     r.fb <= z;
          D_R2:     r.sb <= z;
          D_T:      t_q  <= z;
          D_R1_MAX: r.fb <= zmax;
          D_R1_MIN: r.fb <= zmin;
          D_R2_MIN: r.sb <= zmin;
          default:  r.sb <= zmax;
        endcase
      end
    end
  end
endmodule
