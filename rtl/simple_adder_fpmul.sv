// simple_adder_fpmul: approximate floating-point multiplier whose level of
// accuracy K is fixed at design time.
//
// Operand b is cut to its hidden bit and K fraction bits, optionally rounded
// with a window of WINDOW bits (window_round), and multiplied with the full
// mantissa of a by the simple adder multiplier (simple_adder_mant). Sign,
// exponent and normalisation follow in fp_assemble. Operand a is never
// approximated. WINDOW=0 gives the plain "simple" multiplier, WINDOW=3 and 5
// the two rounding variants. The defaults K=2 with window-3 rounding are the
// configuration recommended for a 5% error tolerance; the choice of window 3
// over 5 for it is this implementation's.
// Interface: a_i, b_i (IEEE single) -> p_o. Timing: combinational.
module simple_adder_fpmul
  import fpmul_pkg::*;
#(
  parameter int unsigned K      = 2,   // 1..23
  parameter int unsigned WINDOW = 3    // 0, 3 or 5
) (
  input  fp32_t a_i,
  input  fp32_t b_i,
  output fp32_t p_o
);

  mant_t               mant_a, mant_b, mant_b_r;
  logic [MANT_W+K:0]   prod;

  assign mant_a = mant_of(a_i.exp, a_i.frac);
  assign mant_b = mant_of(b_i.exp, b_i.frac);

  window_round #(.WINDOW(WINDOW)) u_round (
    .mant_i (mant_b),
    .k_i    (acc_level_t'(K)),
    .mant_o (mant_b_r)
  );

  simple_adder_mant #(.K(K)) u_mant (
    .mant_a_i (mant_a),
    .mant_b_i (mant_b_r),
    .prod_o   (prod)
  );

  fp_assemble #(.PW(MANT_W+K+1)) u_fp (
    .a_i    (a_i),
    .b_i    (b_i),
    .prod_i (prod),
    .p_o    (p_o)
  );

endmodule
