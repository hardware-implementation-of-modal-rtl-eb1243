// tb_im_case_decode: self-checking testbench of the multiplier case logic.
//
// Applies directed bounds (+0, -0, +-inf, subnormals, equal magnitudes) and
// random bounds, and compares every output with values computed here from
// real-number comparisons: x is the set of bounds that are < 0 (so -0 is not
// negative), cmp_a/cmp_b compare |a1| with |a2| and |b1| with |b2|, and the
// case flags follow from x and the infinity test.
module tb_im_case_decode;
  import mi_pkg::*;
  import tb_fp_ref_pkg::*;

  interval_t  a, b;
  logic [3:0] x;
  logic inf_flag, zero_case, nan_result, sc_classical, sc_modal, sc_enable, cmp_a, cmp_b;
  int checks = 0, failures = 0;

  im_case_decode dut (.*);

  function automatic bit lt0(fp64_t v);
    return !is_nan(v) && $bitstoreal(v) < 0.0;
  endfunction

  function automatic real mag(fp64_t v);
    return $bitstoreal({1'b0, v[62:0]});
  endfunction

  task automatic check_one();
    logic [3:0] xe;
    bit infe;
    #1;
    xe   = {lt0(a.fb), lt0(a.sb), lt0(b.fb), lt0(b.sb)};
    infe = is_inf(a.fb) || is_inf(a.sb) || is_inf(b.fb) || is_inf(b.sb);
    checks += 9;
    if (x !== xe) failures++;
    if (inf_flag !== infe) failures++;
    if (zero_case !== (xe == 4'b0110 || xe == 4'b1001)) failures++;
    if (nan_result !== (infe && (xe == 4'b0110 || xe == 4'b1001))) failures++;
    if (sc_classical !== (xe == 4'b1010)) failures++;
    if (sc_modal !== (xe == 4'b0101)) failures++;
    if (sc_enable !== (xe == 4'b1010 || xe == 4'b0101)) failures++;
    if (cmp_a !== (mag(a.fb) <= mag(a.sb))) failures++;
    if (cmp_b !== (mag(b.fb) <= mag(b.sb))) failures++;
    if (failures > 0 && failures < 10)
      $display("after [%h,%h] [%h,%h]: x=%b (exp %b) failures=%0d", a.fb, a.sb, b.fb, b.sb, x, xe, failures);
  endtask

  initial begin
    fp64_t vals[8] = '{64'h0, 64'h8000_0000_0000_0000, 64'h7FF0_0000_0000_0000,
                       64'hFFF0_0000_0000_0000, 64'h8000_0000_0000_0001,
                       64'h3FF0_0000_0000_0000, 64'hBFF0_0000_0000_0000, 64'h0010_0000_0000_0000};
    foreach (vals[i]) foreach (vals[j]) foreach (vals[k]) begin
      a = '{vals[i], vals[j]};
      b = '{vals[k], vals[(i + j + k) % 8]};
      check_one();
    end
    for (int n = 0; n < 20000; n++) begin
      a = gen_interval();
      b = gen_interval();
      if ($urandom_range(0, 3) == 0) a.sb[62:0] = a.fb[62:0];
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
