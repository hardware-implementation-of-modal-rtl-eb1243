// ia_addsub_parallel_pre: interval pre-processing unit of the parallel modal
// interval adder/subtractor.
//
// Splits an interval addition or subtraction into two floating-point
// operations for two adders working side by side: adder 1 computes the
// first bound, a1 + b1 (add) or a1 - b2 (subtract), rounded towards -inf;
// adder 2 computes the second bound, a2 + b2 or a2 - b1, rounded towards
// +inf. The operand selection, the op and the rounding modes are
// registered, which is the document's one "Pre-Process C-1" cycle.
//
// Interface: in_ready is always high (one interval operation per cycle);
// fp1_*/fp2_* drive the two adders, fp_valid marks a valid pair. The
// rounding-mode outputs are constant (down for adder 1, up for adder 2);
// they stay ports so that the adders remain general-purpose cores.
module ia_addsub_parallel_pre
  import mi_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  interval_t a,
  input  interval_t b,
  input  logic      sub,
  output logic      fp_valid,
  output logic      fp_sub,
  output fp64_t     fp1_a,
  output fp64_t     fp1_b,
  output rmode_e    fp1_rm,
  output fp64_t     fp2_a,
  output fp64_t     fp2_b,
  output rmode_e    fp2_rm
);
  assign in_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fp_valid <= 1'b0;
      fp_sub   <= 1'b0;
      fp1_a    <= '0;
      fp1_b    <= '0;
      fp1_rm   <= RM_DOWN;
      fp2_a    <= '0;
      fp2_b    <= '0;
      fp2_rm   <= RM_UP;
    end else begin
      fp_valid <= in_valid;
      fp_sub   <= sub;
      fp1_a    <= a.fb;
      fp1_b    <= sub ? b.sb : b.fb;
      fp1_rm   <= RM_DOWN;
      fp2_a    <= a.sb;
      fp2_b    <= sub ? b.fb : b.sb;
      fp2_rm   <= RM_UP;
    end
  end
endmodule
