// tb_window_round: checks window_round for the three window sizes (none, 3,
// 5) against the integer reference model, on directed patterns (rounding up,
// rounding blocked by a full window, k=1 at the hidden bit, k=23) and on
// random mantissas with random k. Combinational; a watchdog ends the run.
module tb_window_round;
  import fpmul_pkg::*;
  import fpmul_ref_pkg::*;

  int checks = 0, failures = 0;
  mant_t      m;
  acc_level_t k;
  mant_t      o0, o3, o5;
  int         ups3 = 0, blocked3 = 0;

  window_round #(.WINDOW(0)) u0 (.mant_i(m), .k_i(k), .mant_o(o0));
  window_round #(.WINDOW(3)) u3 (.mant_i(m), .k_i(k), .mant_o(o3));
  window_round #(.WINDOW(5)) u5 (.mant_i(m), .k_i(k), .mant_o(o5));

  task automatic chk(mant_t got, mant_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s m=%h k=%0d got=%h exp=%h", what, m, k, got, exp);
    end
  endtask

  task automatic apply(mant_t mm, int kk);
    m = mm; k = acc_level_t'(kk); #1;
    chk(o0, ref_round(m, kk, 0), "w0");
    chk(o3, ref_round(m, kk, 3), "w3");
    chk(o5, ref_round(m, kk, 5), "w5");
    if (o3 > ref_round(m, kk, 0)) ups3++;
    if (m[22-kk] && o3 == ref_round(m, kk, 0) && kk < 23) blocked3++;
  endtask

  initial begin
    // k=2: 1.01|1 -> 1.10 for both windows
    apply(24'b1010_0000_0000_0000_0000_0000 | 24'h100000, 2);
    chk(o3, 24'hC00000, "dir up w3");
    chk(o0, 24'hA00000, "dir trunc");
    // k=2: 1.11|1 : window-3 upper bits (f1,f2)=11 full -> no rounding,
    // window-5 upper bits (hidden,f1,f2)=111 full too
    apply(24'hF00000, 2);
    chk(o3, 24'hE00000, "dir blocked w3");
    chk(o5, 24'hE00000, "dir blocked w5");
    // k=3: 1.011|1 : window 3 (f2,f3)=11 blocked, window 5 (f1..f3)=011 rounds
    apply(24'hB00000 | 24'h080000, 3);
    chk(o3, 24'hB00000, "dir w3 blocked k3");
    chk(o5, 24'hC00000, "dir w5 up k3");
    // k=1 with f1=1: the carry would pass the hidden bit, never rounded
    apply(24'hE00000, 1);
    chk(o3, 24'hC00000, "dir k1");
    chk(o5, 24'hC00000, "dir k1 w5");
    // dropped bits 01 (window 5): no rounding
    apply(24'h880000, 2);
    chk(o5, 24'h800000, "dir 01");
    apply(24'hFFFFFF, 23);
    chk(o3, 24'hFFFFFF, "dir k23");
    for (int i = 0; i < 20000; i++)
      apply({1'b1, 23'($urandom)}, 1 + ($urandom % 23));
    // out-of-range k is clamped
    apply(24'hABCDEF, 0);  chk(o3, ref_round(24'hABCDEF, 1, 3), "k0 clamp");
    apply(24'hABCDEF, 31); chk(o3, 24'hABCDEF, "k31 clamp");
    checks++;
    if (ups3 == 0 || blocked3 == 0) begin
      failures++; $display("FAIL coverage ups=%0d blocked=%0d", ups3, blocked3);
    end
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
