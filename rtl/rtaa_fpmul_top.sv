// rtaa_fpmul_top: the three approximate floating-point multipliers side by
// side, each with its own ports.
//
//  * s_*   simple adder-based multiplier: level of accuracy fixed at design
//          time (K=2, window-3 rounding of b). Combinational.
//  * acc_* accumulator-based multiplier: level of accuracy acc_k_i chosen per
//          operation, one partial product per clock, k cycles per result.
//  * rc_*  reconfigurable adder-based multiplier (k=3 & k=7 with rounding):
//          the estimator's predictions select per operation between one
//          product at k=7 and two products at k=3. Combinational.
// The level-of-accuracy predictions come from an external error estimator
// (a classifier trained offline), which enters here only as the acc_k_i and
// rc_k*_pred_i ports. The three units are the alternatives the reference
// design evaluates; placing them in one top is for integration and test.
module rtaa_fpmul_top
  import fpmul_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // simple adder-based
  input  fp32_t      s_a_i,
  input  fp32_t      s_b_i,
  output fp32_t      s_p_o,
  // accumulator-based
  input  logic       acc_start_i,
  input  fp32_t      acc_a_i,
  input  fp32_t      acc_b_i,
  input  acc_level_t acc_k_i,
  output logic       acc_busy_o,
  output logic       acc_done_o,
  output fp32_t      acc_p_o,
  // reconfigurable adder-based
  input  fp32_t      rc_a1_i,
  input  fp32_t      rc_b1_i,
  input  fp32_t      rc_a2_i,
  input  fp32_t      rc_b2_i,
  input  acc_level_t rc_k1_pred_i,
  input  acc_level_t rc_k2_pred_i,
  input  logic       rc_pair2_valid_i,
  input  logic       rc_force_i,
  input  logic       rc_force_high_i,
  output fp32_t      rc_p1_o,
  output fp32_t      rc_p2_o,
  output logic       rc_p2_valid_o,
  output logic       rc_high_o
);

  simple_adder_fpmul #(.K(2), .WINDOW(3)) u_simple (
    .a_i (s_a_i),
    .b_i (s_b_i),
    .p_o (s_p_o)
  );

  accum_fpmul #(.WINDOW(3)) u_accum (
    .clk     (clk),
    .rst_n   (rst_n),
    .start_i (acc_start_i),
    .a_i     (acc_a_i),
    .b_i     (acc_b_i),
    .k_i     (acc_k_i),
    .busy_o  (acc_busy_o),
    .done_o  (acc_done_o),
    .p_o     (acc_p_o)
  );

  reconfig_fpmul #(.K_LO(3), .WINDOW(3), .THRESHOLD(4)) u_reconfig (
    .a1_i          (rc_a1_i),
    .b1_i          (rc_b1_i),
    .a2_i          (rc_a2_i),
    .b2_i          (rc_b2_i),
    .k1_pred_i     (rc_k1_pred_i),
    .k2_pred_i     (rc_k2_pred_i),
    .pair2_valid_i (rc_pair2_valid_i),
    .force_i       (rc_force_i),
    .force_high_i  (rc_force_high_i),
    .p1_o          (rc_p1_o),
    .p2_o          (rc_p2_o),
    .p2_valid_o    (rc_p2_valid_o),
    .high_o        (rc_high_o)
  );

endmodule
