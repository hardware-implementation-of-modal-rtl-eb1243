// ia_addsub_serial_pre: interval pre-processing unit of the serial modal
// interval adder/subtractor.
//
// An interval operation A + B = [v(a1+b1), ^(a2+b2)] or
// A - B = [v(a1-b2), ^(a2-b1)] (v: rounded towards -inf, ^: towards +inf)
// is split into two floating-point operations issued to the single adder on
// two consecutive cycles: the first bound rounded down, then the second
// bound rounded up. No mode test is needed: the same formulas serve proper
// and improper (modal) intervals.
//
// Interface: in_valid/in_ready handshake; an operation is accepted when both
// are high. in_ready is low for one cycle after each acceptance, so the unit
// takes one interval operation every two cycles. The fp_* outputs are
// registers that drive the adder; fp_bound tells which result bound each
// issued operation produces (0 first, 1 second).
// Timing follows the document's pipeline chart: "Pre-Process C-1" issues
// the first bound in the cycle after acceptance, "C-2" the second one in the
// next cycle. The handshake itself is this design's own choice.
module ia_addsub_serial_pre
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
  output fp64_t     fp_a,
  output fp64_t     fp_b,
  output logic      fp_sub,
  output rmode_e    fp_rm,
  output logic      fp_bound
);
  logic  pend_q;       // second bound still to be issued
  fp64_t pend_a_q, pend_b_q;
  logic  pend_sub_q;

  assign in_ready = !pend_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_q   <= 1'b0;
      fp_valid <= 1'b0;
      fp_a     <= '0;
      fp_b     <= '0;
      fp_sub   <= 1'b0;
      fp_rm    <= RM_DOWN;
      fp_bound <= 1'b0;
    end else if (in_valid && in_ready) begin
      // first bound: a1 + b1 or a1 - b2, rounded down
      fp_valid   <= 1'b1;
      fp_a       <= a.fb;
      fp_b       <= sub ? b.sb : b.fb;
      fp_sub     <= sub;
      fp_rm      <= RM_DOWN;
      fp_bound   <= 1'b0;
      pend_q     <= 1'b1;
      pend_a_q   <= a.sb;
      pend_b_q   <= sub ? b.fb : b.sb;
      pend_sub_q <= sub;
    end else if (pend_q) begin
      // second bound: a2 + b2 or a2 - b1, rounded up
      fp_valid <= 1'b1;
      fp_a     <= pend_a_q;
      fp_b     <= pend_b_q;
      fp_sub   <= pend_sub_q;
      fp_rm    <= RM_UP;
      fp_bound <= 1'b1;
      pend_q   <= 1'b0;
    end else begin
      fp_valid <= 1'b0;
    end
  end

  // The first bound is always followed by the second one.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (fp_valid && !fp_bound) |=> (fp_valid && fp_bound));
endmodule
