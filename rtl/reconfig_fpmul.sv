// reconfig_fpmul: reconfigurable adder-based approximate floating-point
// multiplier with two levels of accuracy selected at run time.
//
// accuracy_mode_sel compares the estimator's predicted levels k1/k2 with
// THRESHOLD (or applies the user override). In high accuracy mode pair 1 is
// multiplied with K_HI = 2*K_LO+1 fraction bits of b1; in low accuracy mode
// pair 1 and pair 2 are multiplied at the same time, each with K_LO fraction
// bits of b. With WINDOW > 0 the kept bits of b1 (at K_HI or K_LO) and of b2
// (at K_LO) are window-rounded first (window_round). The mantissa datapath is
// reconfig_mant; two fp_assemble stages give the two results.
// Interface: pairs (a1_i,b1_i) and (a2_i,b2_i), predictions, pair2_valid_i,
// force_i/force_high_i -> p1_o, p2_o (zero unless p2_valid_o), p2_valid_o,
// high_o. Timing: combinational.
// Defaults: the k=3 & k=7 pair with rounding, the best-performing option for a
// 3% error tolerance; window 3 and threshold 4 are this implementation's
// choices among the evaluated options.
module reconfig_fpmul
  import fpmul_pkg::*;
#(
  parameter int unsigned K_LO      = 3,   // 1, 2 or 3 in the evaluated designs
  parameter int unsigned WINDOW    = 3,   // 0, 3 or 5
  parameter int unsigned THRESHOLD = 4
) (
  input  fp32_t      a1_i,
  input  fp32_t      b1_i,
  input  fp32_t      a2_i,
  input  fp32_t      b2_i,
  input  acc_level_t k1_pred_i,
  input  acc_level_t k2_pred_i,
  input  logic       pair2_valid_i,
  input  logic       force_i,
  input  logic       force_high_i,
  output fp32_t      p1_o,
  output fp32_t      p2_o,
  output logic       p2_valid_o,
  output logic       high_o
);

  localparam int unsigned M    = K_LO + 1;
  localparam int unsigned K_HI = 2 * K_LO + 1;

  logic                  taken2;
  mant_t                 b1_r, b2_r;
  logic [MANT_W+2*M-1:0] prod1;
  logic [MANT_W+M-1:0]   prod2;
  fp32_t                 lane2;

  accuracy_mode_sel #(.THRESHOLD(THRESHOLD)) u_sel (
    .k1_pred_i     (k1_pred_i),
    .k2_pred_i     (k2_pred_i),
    .pair2_valid_i (pair2_valid_i),
    .force_i       (force_i),
    .force_high_i  (force_high_i),
    .high_o        (high_o),
    .pair2_taken_o (taken2)
  );

  window_round #(.WINDOW(WINDOW)) u_round1 (
    .mant_i (mant_of(b1_i.exp, b1_i.frac)),
    .k_i    (high_o ? acc_level_t'(K_HI) : acc_level_t'(K_LO)),
    .mant_o (b1_r)
  );

  window_round #(.WINDOW(WINDOW)) u_round2 (
    .mant_i (mant_of(b2_i.exp, b2_i.frac)),
    .k_i    (acc_level_t'(K_LO)),
    .mant_o (b2_r)
  );

  reconfig_mant #(.M(M)) u_mant (
    .high_i  (high_o),
    .a1_i    (mant_of(a1_i.exp, a1_i.frac)),
    .b1_i    (b1_r),
    .a2_i    (mant_of(a2_i.exp, a2_i.frac)),
    .b2_i    (b2_r),
    .prod1_o (prod1),
    .prod2_o (prod2)
  );

  fp_assemble #(.PW(MANT_W+2*M)) u_fp1 (.a_i(a1_i), .b_i(b1_i), .prod_i(prod1), .p_o(p1_o));
  fp_assemble #(.PW(MANT_W+M))   u_fp2 (.a_i(a2_i), .b_i(b2_i), .prod_i(prod2), .p_o(lane2));

  assign p2_valid_o = taken2;
  assign p2_o       = taken2 ? lane2 : '0;

endmodule
