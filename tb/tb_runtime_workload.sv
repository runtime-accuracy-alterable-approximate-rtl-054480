// tb_runtime_workload: runtime-accuracy workload for the reconfigurable and
// accumulator-based multipliers at a 5% error tolerance.
//
// 2000 operand pairs are drawn uniformly from (0,100). An oracle stands in
// for the error estimator: the level predicted for a pair is the smallest k
// (1..23) whose approximate product on that pair, with the rounding of the
// design under test, is within 5% of the exact product. The pairs stream
// through six reconfigurable multipliers (k=1&3, 2&5, 3&7, each without
// rounding and with window-3 rounding, threshold k_low+1), one or two pairs
// per operation as the mode selection decides, and through the
// accumulator-based multiplier (window 3), one pair per operation at its
// predicted k. Every product is checked against the reference model. For
// designs without rounding (error then falls monotonically with k) every
// pair whose prediction the design can reach must stay within 5%; for all
// designs the mean error must stay below 5%. Mean error, operations per pair
// and the accumulator's mean cycles per product are printed.
module tb_runtime_workload;
  import fpmul_pkg::*;
  import fpmul_ref_pkg::*;

  localparam int NPAIRS = 2000;
  localparam real TOL = 0.05;
  localparam int KLO[3] = '{1, 2, 3};
  localparam int WIN[2] = '{0, 3};

  int checks = 0, failures = 0;

  logic [31:0] va [NPAIRS];
  logic [31:0] vb [NPAIRS];
  int          kp [2][NPAIRS];    // oracle level per window index

  fp32_t a1, b1, a2, b2;
  acc_level_t k1 [2], k2 [2];
  logic v2;
  fp32_t p1 [3][2], p2 [3][2];
  logic  p2v [3][2], hi [3][2];

  for (genvar gi = 0; gi < 3; gi++) begin : g_k
    for (genvar gw = 0; gw < 2; gw++) begin : g_w
      reconfig_fpmul #(.K_LO(KLO[gi]), .WINDOW(WIN[gw]), .THRESHOLD(KLO[gi] + 1)) u (
        .a1_i(a1), .b1_i(b1), .a2_i(a2), .b2_i(b2), .k1_pred_i(k1[gw]), .k2_pred_i(k2[gw]),
        .pair2_valid_i(v2), .force_i(1'b0), .force_high_i(1'b0),
        .p1_o(p1[gi][gw]), .p2_o(p2[gi][gw]), .p2_valid_o(p2v[gi][gw]), .high_o(hi[gi][gw]));
    end
  end

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fp32_t aa, ab, ap;
  acc_level_t ak;
  accum_fpmul u_acc (.clk(clk), .rst_n(rst_n), .start_i(start), .a_i(aa), .b_i(ab), .k_i(ak),
                     .busy_o(busy), .done_o(done), .p_o(ap));
  always #5 clk = ~clk;

  function automatic real rel_err(logic [31:0] a, logic [31:0] b, logic [31:0] p);
    real e, x;
    e = sp2real(a) * sp2real(b);
    x = sp2real(p);
    return (e > x ? e - x : x - e) / e;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < NPAIRS; n++) begin
      va[n] = rand_sp(100.0); vb[n] = rand_sp(100.0);
      for (int w = 0; w < 2; w++) begin
        kp[w][n] = 23;
        for (int k = 23; k >= 1; k--)
          if (rel_err(va[n], vb[n], ref_fpmul(va[n], vb[n], k, WIN[w])) < TOL) kp[w][n] = k;
      end
    end

    // reconfigurable designs
    for (int gi = 0; gi < 3; gi++)
      for (int w = 0; w < 2; w++) begin
        int i, ops, low_ops, khi, klo;
        real esum;
        bit h, two;
        klo = KLO[gi]; khi = 2 * klo + 1;
        i = 0; ops = 0; low_ops = 0; esum = 0.0;
        while (i < NPAIRS) begin
          a1 = va[i]; b1 = vb[i]; v2 = (i + 1 < NPAIRS);
          a2 = v2 ? va[i+1] : '0; b2 = v2 ? vb[i+1] : '0;
          for (int x = 0; x < 2; x++) begin
            k1[x] = acc_level_t'(kp[x][i]);
            k2[x] = v2 ? acc_level_t'(kp[x][i+1]) : '0;
          end
          #1;
          h = hi[gi][w]; two = p2v[gi][w];
          chk(p1[gi][w] == ref_fpmul(va[i], vb[i], h ? khi : klo, WIN[w]), "product 1");
          esum += rel_err(va[i], vb[i], p1[gi][w]);
          if (WIN[w] == 0 && kp[w][i] <= khi)
            chk(rel_err(va[i], vb[i], p1[gi][w]) < TOL, "pair 1 within tolerance");
          if (two) begin
            chk(p2[gi][w] == ref_fpmul(va[i+1], vb[i+1], klo, WIN[w]), "product 2");
            esum += rel_err(va[i+1], vb[i+1], p2[gi][w]);
            if (WIN[w] == 0) chk(rel_err(va[i+1], vb[i+1], p2[gi][w]) < TOL, "pair 2 within tolerance");
            low_ops++;
          end
          ops++;
          i += two ? 2 : 1;
        end
        $display("reconfigurable k=%0d & k=%0d window %0d: mean error %5.2f %%, %0d operations for %0d pairs (%0d with two products)",
                 klo, khi, WIN[w], 100.0 * esum / NPAIRS, ops, NPAIRS, low_ops);
        chk(esum / NPAIRS < TOL, "mean error below tolerance");
        chk(ops < NPAIRS, "dual operations happened");
      end

    // accumulator-based design, window 3, each pair at its own level
    begin
      longint cyc;
      int c;
      real esum;
      esum = 0.0; cyc = 0;
      aa = '0; ab = '0; ak = '0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int n = 0; n < NPAIRS; n++) begin
        @(negedge clk); aa = va[n]; ab = vb[n]; ak = acc_level_t'(kp[1][n]); start = 1;
        @(negedge clk); start = 0;
        c = 1;
        while (!done && c < 40) begin @(negedge clk); c++; end
        chk(c == kp[1][n], "accumulator latency");
        chk(ap == ref_fpmul(va[n], vb[n], kp[1][n], 3), "accumulator product");
        chk(rel_err(va[n], vb[n], ap) < TOL, "accumulator within tolerance");
        esum += rel_err(va[n], vb[n], ap);
        cyc += c;
      end
      $display("accumulator window 3: mean error %5.2f %%, mean %0.2f cycles per product",
               100.0 * esum / NPAIRS, real'(cyc) / NPAIRS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
