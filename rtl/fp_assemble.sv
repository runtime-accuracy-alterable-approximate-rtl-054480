// fp_assemble: sign, exponent and normalisation stage of the floating-point
// multipliers.
//
// The mantissa multipliers deliver prod_i, the product of the two mantissas
// as an unsigned fixed-point number with PW-2 fraction bits, in [1,4) for
// normal operands. This stage xors the signs, adds the biased exponents and
// subtracts the bias, shifts the product right by one place when it is 2 or
// more (incrementing the exponent), and truncates it to 23 fraction bits.
// Special operands: a zero or subnormal operand gives a signed zero, an
// infinite operand an infinity, NaN or infinity times zero the quiet NaN
// 7FC00000. Exponent overflow gives a signed infinity, underflow a signed zero
// (no subnormal results).
// The reference design describes only the mantissa datapath; this whole stage,
// its truncation and its special-value rules are this implementation's
// choices for IEEE-754 single precision.
// Timing: combinational. Requires PW >= 25.
module fp_assemble
  import fpmul_pkg::*;
#(
  parameter int unsigned PW = 26
) (
  input  fp32_t         a_i,
  input  fp32_t         b_i,
  input  logic [PW-1:0] prod_i,
  output fp32_t         p_o
);

  logic              sign;
  logic              a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic              norm;
  logic signed [10:0] exp_sum;
  logic [FRAC_W-1:0] frac;

  always_comb begin
    sign   = a_i.sign ^ b_i.sign;
    a_zero = (a_i.exp == '0);
    b_zero = (b_i.exp == '0);
    a_inf  = (a_i.exp == '1) && (a_i.frac == '0);
    b_inf  = (b_i.exp == '1) && (b_i.frac == '0);
    a_nan  = (a_i.exp == '1) && (a_i.frac != '0);
    b_nan  = (b_i.exp == '1) && (b_i.frac != '0);
    norm   = prod_i[PW-1];
    frac   = norm ? prod_i[PW-2 -: FRAC_W] : prod_i[PW-3 -: FRAC_W];
    exp_sum = 11'(signed'({3'b000, a_i.exp})) + 11'(signed'({3'b000, b_i.exp}))
            - 11'(BIAS) + 11'(norm);

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      p_o = QNAN;
    else if (a_inf || b_inf || exp_sum >= 11'sd255)
      p_o = '{sign: sign, exp: '1, frac: '0};
    else if (a_zero || b_zero || exp_sum <= 11'sd0)
      p_o = '{sign: sign, exp: '0, frac: '0};
    else
      p_o = '{sign: sign, exp: exp_sum[EXP_W-1:0], frac: frac};
  end

endmodule
