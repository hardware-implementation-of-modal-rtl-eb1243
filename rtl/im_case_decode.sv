// im_case_decode: case-distinction logic of the modal interval multipliers.
//
// Purely combinational. For A = [a1, a2], B = [b1, b2] it produces
//   x = {x3, x2, x1, x0}: 1 where a1, a2, b1, b2 is negative. A bound counts
//       as negative only if its sign bit is set and it is not zero, so -0 is
//       treated like +0 (x = sign & OR of bits 62..0).
//   inf_flag:    some bound is +-inf.
//   zero_case:   x = 0110 or 1001 (cases 7 and 10), whose result is [0, 0].
//   nan_result:  a zero case with an infinite bound; the result is then
//                [NaN, NaN], as the IvalDb library gives.
//   sc_classical (x = 1010, case 11), sc_modal (x = 0101, case 6) and
//   sc_enable = sc_classical | sc_modal: the two cases needing four products.
//   cmp_a = |a1| <= |a2| and cmp_b = |b1| <= |b2| (63-bit magnitude
//   comparisons, c0 and c1 of the serial multiplier).
// Infinity is detected as "exponent all ones and fraction zero", and
// nan_result and sc_enable combine their terms as stated above; these are the
// readings of the document's equations this design follows.
module im_case_decode
  import mi_pkg::*;
(
  input  interval_t a,
  input  interval_t b,
  output logic [3:0] x,
  output logic       inf_flag,
  output logic       zero_case,
  output logic       nan_result,
  output logic       sc_classical,
  output logic       sc_modal,
  output logic       sc_enable,
  output logic       cmp_a,
  output logic       cmp_b
);
  always_comb begin
    x[3] = a.fb[63] & (|a.fb[62:0]);
    x[2] = a.sb[63] & (|a.sb[62:0]);
    x[1] = b.fb[63] & (|b.fb[62:0]);
    x[0] = b.sb[63] & (|b.sb[62:0]);
    inf_flag = fp_is_inf(a.fb) | fp_is_inf(a.sb) | fp_is_inf(b.fb) | fp_is_inf(b.sb);
    zero_case    = (x == 4'b0110) || (x == 4'b1001);
    nan_result   = inf_flag & zero_case;
    sc_classical = (x == 4'b1010);
    sc_modal     = (x == 4'b0101);
    sc_enable    = sc_classical | sc_modal;
    cmp_a = a.fb[62:0] <= a.sb[62:0];
    cmp_b = b.fb[62:0] <= b.sb[62:0];
  end
endmodule
