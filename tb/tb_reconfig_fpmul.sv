// tb_reconfig_fpmul: checks the reconfigurable floating-point multiplier at
// its defaults (k=3 & k=7, window 3, threshold 4) and a k=2 & k=5 instance
// without rounding. Random operand pairs in (0,100) with random predicted
// levels and random override: the mode must follow the threshold rule, product
// 1 must equal the reference at k_high or k_low, product 2 (low mode, second
// pair offered) the reference at k_low. Counts both modes, the override and
// an untaken second pair.
module tb_reconfig_fpmul;
  import fpmul_pkg::*;
  import fpmul_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_high = 0, n_low = 0, n_two = 0, n_force = 0, n_untaken = 0;
  fp32_t a1, b1, a2, b2, p1, p2, q1, q2;
  acc_level_t k1, k2;
  logic v2, fe, fh, p2v, high, q2v, qhigh;

  reconfig_fpmul dut (.a1_i(a1), .b1_i(b1), .a2_i(a2), .b2_i(b2), .k1_pred_i(k1), .k2_pred_i(k2),
                      .pair2_valid_i(v2), .force_i(fe), .force_high_i(fh),
                      .p1_o(p1), .p2_o(p2), .p2_valid_o(p2v), .high_o(high));
  reconfig_fpmul #(.K_LO(2), .WINDOW(0), .THRESHOLD(3)) dut25 (
                      .a1_i(a1), .b1_i(b1), .a2_i(a2), .b2_i(b2), .k1_pred_i(k1), .k2_pred_i(k2),
                      .pair2_valid_i(v2), .force_i(fe), .force_high_i(fh),
                      .p1_o(q1), .p2_o(q2), .p2_valid_o(q2v), .high_o(qhigh));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a1=%h b1=%h a2=%h b2=%h k1=%0d k2=%0d v2=%0b f=%0b%0b", what, a1, b1, a2, b2, k1, k2, v2, fe, fh);
    end
  endtask

  task automatic apply();
    bit eh, eq;
    a1 = rand_sp(100.0); b1 = rand_sp(100.0); a2 = rand_sp(100.0); b2 = rand_sp(100.0);
    k1 = 5'(1 + $urandom % 7); k2 = 5'(1 + $urandom % 7);
    v2 = ($urandom % 4) != 0; fe = ($urandom % 8) == 0; fh = 1'($urandom);
    #1;
    eh = fe ? fh : !(k1 < 4 && (!v2 || k2 < 4));
    eq = fe ? fh : !(k1 < 3 && (!v2 || k2 < 3));
    chk(high == eh, "mode");
    chk(p1 == ref_fpmul(a1, b1, eh ? 7 : 3, 3), "p1");
    chk(p2v == (!eh && v2), "p2 valid");
    chk(p2 == ((!eh && v2) ? ref_fpmul(a2, b2, 3, 3) : 32'd0), "p2");
    chk(qhigh == eq, "mode 2&5");
    chk(q1 == ref_fpmul(a1, b1, eq ? 5 : 2, 0), "p1 2&5");
    chk(q2 == ((!eq && v2) ? ref_fpmul(a2, b2, 2, 0) : 32'd0), "p2 2&5");
    if (high) n_high++; else n_low++;
    if (p2v) n_two++;
    if (fe) n_force++;
    if (v2 && !p2v) n_untaken++;
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) apply();
    $display("high=%0d low=%0d two=%0d forced=%0d untaken=%0d", n_high, n_low, n_two, n_force, n_untaken);
    chk(n_high > 0 && n_low > 0 && n_two > 0 && n_force > 0 && n_untaken > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
