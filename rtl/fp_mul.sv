// fp_mul: IEEE-754 binary64 multiplier with a rounding mode per operation and
// an ieee_flag (BFP multiplier of the interval multipliers).
//
// Each cycle it accepts one product z = a * b, rounded as rm says, with
// subnormal operands and results, signed zeros and infinities handled as in
// IEEE-754. The one departure is the ieee_flag input: with ieee_flag = 1,
// 0 * inf is the canonical quiet NaN as the standard requires; with
// ieee_flag = 0 (interval mode) 0 * inf is a zero whose sign is the XOR of
// the operand signs, the rule interval multiplication needs.
//
// Datapath (one combinational step, then a register pipeline): 53 x 53 bit
// significand product, normalisation by the leading-zero count (so subnormal
// operands work), a right shift with sticky bit when the result is
// subnormal, then rounding and packing with mi_pkg::round_pack.
//
// Timing: result on z with out_valid LATENCY cycles after in_valid; one
// product per cycle. The document takes this unit from an existing core and
// gives only its function, its ieee_flag and its 7-cycle depth; the internal
// structure here is this design's own.
module fp_mul
  import mi_pkg::*;
#(
  parameter int unsigned LATENCY = FP_LATENCY
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  fp64_t  a,
  input  fp64_t  b,
  input  rmode_e rm,
  input  logic   ieee_flag,
  output logic   out_valid,
  output fp64_t  z
);

  function automatic logic [6:0] lzc106(logic [105:0] v);
    logic [6:0] n;
    n = 7'd106;
    for (int i = 0; i < 106; i++)
      if (v[i]) n = 7'(105 - i);
    return n;
  endfunction

  fp64_t res;

  always_comb begin
    logic               s;
    logic [10:0]        ea, eb;
    logic [52:0]        ma, mb;
    logic [105:0]       p, pn;
    logic [6:0]         lz;
    logic signed [13:0] e, rsh;
    logic               stk;

    s  = a[63] ^ b[63];
    ea = (a[62:52] == 11'h0) ? 11'd1 : a[62:52];
    eb = (b[62:52] == 11'h0) ? 11'd1 : b[62:52];
    ma = {a[62:52] != 11'h0, a[51:0]};
    mb = {b[62:52] != 11'h0, b[51:0]};
    p  = 106'(ma) * 106'(mb);
    lz = lzc106(p);
    pn = p << lz;
    e  = 14'(ea) + 14'(eb) - 14'(lz) - 14'sd1022;
    stk = 1'b0;
    rsh = 14'sd1 - e;
    if (e < 14'sd1) begin
      if (rsh >= 14'sd107) begin
        stk = |pn;
        pn  = '0;
      end else begin
        stk = |(pn & ~({106{1'b1}} << rsh));
        pn  = pn >> rsh;
      end
      e = 14'sd1;
    end

    if (fp_is_nan(a) || fp_is_nan(b)) begin
      res = QNAN;
    end else if ((fp_is_inf(a) && fp_is_zero(b)) || (fp_is_zero(a) && fp_is_inf(b))) begin
      res = ieee_flag ? QNAN : {s, 63'h0};
    end else if (fp_is_inf(a) || fp_is_inf(b)) begin
      res = {s, POS_INF[62:0]};
    end else if (fp_is_zero(a) || fp_is_zero(b)) begin
      res = {s, 63'h0};
    end else begin
      res = round_pack(s, e, pn[105:53], pn[52], (|pn[51:0]) | stk, rm);
    end
  end

  logic  vld_q [LATENCY];
  fp64_t z_q   [LATENCY];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LATENCY); i++) vld_q[i] <= 1'b0;
    end else begin
      vld_q[0] <= in_valid;
      for (int i = 1; i < int'(LATENCY); i++) vld_q[i] <= vld_q[i-1];
    end
    z_q[0] <= res;
    for (int i = 1; i < int'(LATENCY); i++) z_q[i] <= z_q[i-1];
  end

  assign out_valid = vld_q[LATENCY-1];
  assign z         = z_q[LATENCY-1];

endmodule
