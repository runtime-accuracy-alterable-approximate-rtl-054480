// reconfig_mant: mantissa datapath of the reconfigurable adder-based
// multiplier, built from two 24 x M sub-multipliers.
//
// Sub-multiplier 1 always forms a1 * (upper M bits of b1). Sub-multiplier 2
// forms, in high accuracy mode, a1 * (the next M bits of b1), and, in low
// accuracy mode, a2 * (upper M bits of b2). The reconfigurable adder then
// either joins the two halves into one product with 2M bits of b1 (level of
// accuracy 2M-1) or passes two products with M bits of b (level M-1).
// With M=4 the two levels are k=3 (low) and k=7 (high); M=2 and M=3 give the
// pairs 1 & 3 and 2 & 5.
// Interface: high_i, mantissas a1_i, b1_i, a2_i, b2_i (hidden bit at [23]);
// prod1_o has 2M+22 fraction bits in both modes, prod2_o has M+22 and is
// meaningful in low mode only. Timing: combinational.
// The operand multiplexers and the use of upper/lower slices follow the
// reference structure.
module reconfig_mant
  import fpmul_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic                  high_i,
  input  mant_t                 a1_i,
  input  mant_t                 b1_i,
  input  mant_t                 a2_i,
  input  mant_t                 b2_i,
  output logic [MANT_W+2*M-1:0] prod1_o,
  output logic [MANT_W+M-1:0]   prod2_o
);

  logic [M-1:0]        b1_upper, b1_lower, b2_upper, sm2_b;
  mant_t               sm2_a;
  logic [MANT_W+M-1:0] p_up, p_lo;

  assign b1_upper = b1_i[MANT_W-1 -: M];
  assign b1_lower = b1_i[MANT_W-1-M -: M];
  assign b2_upper = b2_i[MANT_W-1 -: M];
  assign sm2_a    = high_i ? a1_i     : a2_i;
  assign sm2_b    = high_i ? b1_lower : b2_upper;

  sub_multiplier #(.M(M)) u_sm1 (.a_i(a1_i),  .b_i(b1_upper), .p_o(p_up));
  sub_multiplier #(.M(M)) u_sm2 (.a_i(sm2_a), .b_i(sm2_b),    .p_o(p_lo));

  reconfig_adder #(.M(M)) u_add (
    .high_i (high_i),
    .p_up_i (p_up),
    .p_lo_i (p_lo),
    .sum_o  (prod1_o),
    .p2_o   (prod2_o)
  );

endmodule
