// mi_delay: a DEPTH-stage shift register that carries the control tag of each
// floating-point operation alongside the 7-cycle arithmetic pipeline, so the
// post-processing unit knows what every result is for when it arrives.
// Interface: d enters each cycle, q is d delayed by DEPTH clock cycles.
// Registers are cleared by the synchronous active-low reset.
module mi_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] sr [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) sr[i] <= '0;
    end else begin
      sr[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) sr[i] <= sr[i-1];
    end
  end

  assign q = sr[DEPTH-1];
endmodule
