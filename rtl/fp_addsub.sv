// fp_addsub: IEEE-754 binary64 adder/subtractor with a rounding mode per
// operation (BFP adder/subtractor of the interval units).
//
// Each cycle it accepts one operation z = a + b (sub = 0) or z = a - b
// (sub = 1), rounded as rm says. Subnormal operands and results, signed
// zeros and infinities follow IEEE-754: inf - inf and any NaN operand give
// the canonical quiet NaN; an exact zero sum of opposite-signed operands is
// +0, or -0 when rounding towards -inf.
//
// Datapath (one combinational step, then a register pipeline): compare
// magnitudes and swap so the larger operand is first, align the smaller one
// with guard/round/sticky bits, add or subtract the significands, normalise
// (right by one on a carry, left by the leading-zero count but never below
// the subnormal exponent), then round and pack with mi_pkg::round_pack.
//
// Timing: the result of an operation offered with in_valid in cycle n
// appears on z with out_valid LATENCY cycles later; one operation per cycle.
// The document takes this unit from an existing core and gives only its
// function and its 7-cycle depth; the single combinational step followed by
// LATENCY register stages is this design's own choice (retiming is left to
// synthesis).
module fp_addsub
  import mi_pkg::*;
#(
  parameter int unsigned LATENCY = FP_LATENCY
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  fp64_t  a,
  input  fp64_t  b,
  input  logic   sub,
  input  rmode_e rm,
  output logic   out_valid,
  output fp64_t  z
);

  function automatic logic [5:0] lzc56(logic [55:0] v);
    logic [5:0] n;
    n = 6'd56;
    for (int i = 0; i < 56; i++)
      if (v[i]) n = 6'(55 - i);
    return n;
  endfunction

  fp64_t res;

  always_comb begin
    logic        sb_eff, sx, sy, eff_sub, swap, sgn;
    logic [10:0] ea, eb, ex, ey;
    logic [52:0] ma, mb, mx, my;
    logic [11:0] d;
    logic [55:0] y_ext, y_sh, y_al, m56;
    logic        stk;
    logic [56:0] sum;
    logic [5:0]  lz, sh;
    logic signed [13:0] e;

    sgn    = 1'b0;
    sb_eff = b[63] ^ sub;
    ea = (a[62:52] == 11'h0) ? 11'd1 : a[62:52];
    eb = (b[62:52] == 11'h0) ? 11'd1 : b[62:52];
    ma = {a[62:52] != 11'h0, a[51:0]};
    mb = {b[62:52] != 11'h0, b[51:0]};
    swap = b[62:0] > a[62:0];
    sx = swap ? sb_eff : a[63];
    sy = swap ? a[63]  : sb_eff;
    ex = swap ? eb : ea;
    ey = swap ? ea : eb;
    mx = swap ? mb : ma;
    my = swap ? ma : mb;
    d  = {1'b0, ex} - {1'b0, ey};
    eff_sub = sx ^ sy;

    y_ext = {my, 3'b000};
    if (d >= 12'd56) begin
      y_sh = '0;
      stk  = |my;
    end else begin
      y_sh = y_ext >> d;
      stk  = |(y_ext & ~({56{1'b1}} << d));
    end
    y_al = {y_sh[55:1], y_sh[0] | stk};

    sum = eff_sub ? ({1'b0, mx, 3'b000} - {1'b0, y_al})
                  : ({1'b0, mx, 3'b000} + {1'b0, y_al});

    e   = 14'(ex);
    m56 = '0;
    lz  = '0;
    sh  = '0;
    if (sum[56]) begin
      m56 = {sum[56:2], sum[1] | sum[0]};
      e   = e + 14'sd1;
    end else begin
      lz  = lzc56(sum[55:0]);
      sh  = (14'(lz) > e - 14'sd1) ? 6'(e - 14'sd1) : lz;
      m56 = sum[55:0] << sh;
      e   = e - 14'(sh);
    end

    if (fp_is_nan(a) || fp_is_nan(b)) begin
      res = QNAN;
    end else if (fp_is_inf(a) && fp_is_inf(b)) begin
      res = (a[63] == sb_eff) ? {a[63], POS_INF[62:0]} : QNAN;
    end else if (fp_is_inf(a)) begin
      res = a;
    end else if (fp_is_inf(b)) begin
      res = {sb_eff, POS_INF[62:0]};
    end else if (sum == '0) begin
      sgn = (a[63] == sb_eff) ? a[63] : (rm == RM_DOWN);
      res = {sgn, 63'h0};
    end else begin
      res = round_pack(sx, e, m56[55:3], m56[2], |m56[1:0], rm);
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
