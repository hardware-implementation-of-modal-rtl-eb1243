// mi_pkg: types, constants and IEEE-754 helper functions shared by the
// modal interval units.
//
// A modal interval [a1, a2] is a pair of IEEE-754 binary64 numbers with no
// ordering constraint: a1 <= a2 is an existential (proper) interval,
// a1 >= a2 a universal (improper) one. The pair is carried as the packed
// struct interval_t {fb, sb} (first bound, second bound).
//
// round_pack() is the single rounding and packing step used by both the
// floating-point adder/subtractor and the multiplier. fp_lt() is the numeric
// comparison used by the one comparator in the multiplier post-processing
// units. The rounding-mode encoding and the canonical NaN are this design's
// own choices; the document does not give them.
package mi_pkg;

  // Pipeline depth of the floating-point adder/subtractor and multiplier
  // (7 cycles in the document's synthesis tables).
  localparam int unsigned FP_LATENCY = 7;

  typedef logic [63:0] fp64_t;

  typedef struct packed {
    fp64_t fb;  // first bound  (Inf)
    fp64_t sb;  // second bound (Sup)
  } interval_t;

  // Rounding mode of one floating-point operation. The interval units only
  // use RM_DOWN (towards -inf) and RM_UP (towards +inf).
  typedef enum logic [1:0] {
    RM_NEAREST = 2'b00,
    RM_ZERO    = 2'b01,
    RM_UP      = 2'b10,
    RM_DOWN    = 2'b11
  } rmode_e;

  // Interval multiplication type reported by the pre-processing units.
  // SC_CLASSICAL is case 11 (both intervals proper and straddling zero),
  // SC_MODAL is case 6 (both improper and straddling zero).
  typedef enum logic [1:0] {
    MT_NORMAL       = 2'b00,
    MT_SC_CLASSICAL = 2'b01,
    MT_SC_MODAL     = 2'b10
  } multype_e;

  // What the serial multiplier's post-processing unit does with a product:
  // store it as a result bound, hold it in the temporary register T, or
  // store the max/min of it and T as a result bound.
  typedef enum logic [2:0] {
    D_R1     = 3'd0,
    D_R2     = 3'd1,
    D_T      = 3'd2,
    D_R1_MAX = 3'd3,
    D_R1_MIN = 3'd4,
    D_R2_MIN = 3'd5,
    D_R2_MAX = 3'd6
  } mul_dest_e;

  localparam fp64_t QNAN    = 64'h7FF8_0000_0000_0000;
  localparam fp64_t POS_INF = 64'h7FF0_0000_0000_0000;

  function automatic logic fp_is_nan(fp64_t x);
    return (x[62:52] == 11'h7FF) && (x[51:0] != '0);
  endfunction

  function automatic logic fp_is_inf(fp64_t x);
    return (x[62:52] == 11'h7FF) && (x[51:0] == '0);
  endfunction

  function automatic logic fp_is_zero(fp64_t x);
    return x[62:0] == '0;
  endfunction

  // Numeric x < y for non-NaN operands; +0 and -0 compare equal.
  function automatic logic fp_lt(fp64_t x, fp64_t y);
    logic lt;
    if (fp_is_zero(x) && fp_is_zero(y))
      lt = 1'b0;
    else if (x[63] != y[63])
      lt = x[63];                          // negative < positive
    else if (!x[63])
      lt = x[62:0] < y[62:0];              // both positive
    else
      lt = x[62:0] > y[62:0];              // both negative
    return lt;
  endfunction

  // Round a normalised significand and pack it.
  //   exp    biased exponent, >= 1; mant[52] = 0 only when exp == 1
  //          (a subnormal result)
  //   mant   53-bit significand with the hidden bit at [52]
  //   guard  first bit below the significand, sticky the OR of the rest
  function automatic fp64_t round_pack(logic sign, logic signed [13:0] exp,
                                       logic [52:0] mant, logic guard,
                                       logic sticky, rmode_e rm);
    logic        inc, to_inf;
    logic [53:0] m54;
    logic [52:0] m;
    logic signed [13:0] e;
    fp64_t       r;
    unique case (rm)
      RM_NEAREST: inc = guard & (sticky | mant[0]);
      RM_ZERO:    inc = 1'b0;
      RM_UP:      inc = ~sign & (guard | sticky);
      default:    inc = sign & (guard | sticky);
    endcase
    m54 = {1'b0, mant} + 54'(inc);
    e   = exp;
    if (m54[53]) begin
      m = m54[53:1];
      e = e + 14'sd1;
    end else begin
      m = m54[52:0];
    end
    if (e >= 14'sd2047) begin
      to_inf = (rm == RM_NEAREST) || (rm == RM_UP && !sign) || (rm == RM_DOWN && sign);
      r = to_inf ? {sign, 11'h7FF, 52'h0} : {sign, 11'h7FE, {52{1'b1}}};
    end else begin
      r = {sign, (m[52] ? e[10:0] : 11'h000), m[51:0]};
    end
    return r;
  endfunction

endpackage
