// tb_error_rate: error-rate workload for the design-time-k multipliers.
//
// 2000 operand pairs drawn uniformly from (0,100) are multiplied by
// simple_adder_fpmul for k = 1..6 with no rounding, window 3 and window 5
// (18 instances). The mean relative error of each configuration is compared
// with the published error rates of the same configurations; a measured rate
// must lie within 25% (relative) or 0.3 percentage points of the published
// one. Each result is also checked against the reference model.
module tb_error_rate;
  import fpmul_pkg::*;
  import fpmul_ref_pkg::*;

  localparam int NPAIRS = 2000;
  localparam int W_OF[3] = '{0, 3, 5};
  // published mean error rates in units of 0.01 %, [k-1][window index]
  localparam int PUB[6][3] = '{'{1630, 1110, 1110}, '{840, 495, 490}, '{450, 282, 280},
                               '{230, 136, 130},   '{110, 71, 70},    '{50, 35, 30}};

  int checks = 0, failures = 0;
  fp32_t a, b;
  fp32_t p [6][3];
  real   err_sum [6][3];

  for (genvar gk = 0; gk < 6; gk++) begin : g_k
    for (genvar gw = 0; gw < 3; gw++) begin : g_w
      simple_adder_fpmul #(.K(gk + 1), .WINDOW(W_OF[gw])) u (.a_i(a), .b_i(b), .p_o(p[gk][gw]));
    end
  end

  initial begin
    real ra, rb, rp, meas, pub;
    for (int k = 0; k < 6; k++) for (int w = 0; w < 3; w++) err_sum[k][w] = 0.0;
    for (int n = 0; n < NPAIRS; n++) begin
      a = rand_sp(100.0); b = rand_sp(100.0);
      #1;
      ra = sp2real(a); rb = sp2real(b);
      for (int k = 0; k < 6; k++)
        for (int w = 0; w < 3; w++) begin
          checks++;
          if (p[k][w] !== ref_fpmul(a, b, k + 1, W_OF[w])) begin
            failures++;
            if (failures < 10) $display("FAIL product k=%0d w=%0d", k + 1, W_OF[w]);
          end
          rp = sp2real(p[k][w]);
          err_sum[k][w] += ((ra * rb > rp) ? (ra * rb - rp) : (rp - ra * rb)) / (ra * rb);
        end
    end
    $display("mean relative error (%%), measured / published");
    for (int k = 0; k < 6; k++) begin
      $write("k=%0d", k + 1);
      for (int w = 0; w < 3; w++) begin
        meas = 100.0 * err_sum[k][w] / NPAIRS;
        pub  = real'(PUB[k][w]) / 100.0;
        $write("   w%0d: %6.2f / %6.2f", W_OF[w], meas, pub);
        checks++;
        if (meas > pub * 1.25 + 0.3 || meas < pub * 0.75 - 0.3) begin
          failures++;
          $write(" FAIL");
        end
      end
      $display("");
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
