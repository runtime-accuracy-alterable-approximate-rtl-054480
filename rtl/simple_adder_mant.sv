// simple_adder_mant: approximate mantissa multiplier with a level of
// accuracy fixed at design time (the "simple adder-based" multiplier).
//
// Only the hidden bit and the top K fraction bits of mantissa b are used. Each
// of these K+1 bits gates a copy of the full 24-bit mantissa a, the copy for
// mant_b[23-i] is shifted left by K-i places, and the K+1 partial products are
// added. The result is mant_a * mant_b[23:23-K], a (25+K)-bit value with 23+K
// fraction bits, in [1,4) for normal operands. For K=4 this is the
// five-term sum into a 29-bit result of the reference structure.
// Interface: mant_a_i, mant_b_i (hidden bit at [23]) -> prod_o.
// Timing: combinational. The partial-product structure follows the design; the
// order of the additions is left to synthesis.
module simple_adder_mant
  import fpmul_pkg::*;
#(
  parameter int unsigned K = 2        // kept fraction bits of b, 1..23
) (
  input  mant_t              mant_a_i,
  input  mant_t              mant_b_i,
  output logic [MANT_W+K:0]  prod_o
);

  always_comb begin
    prod_o = '0;
    for (int unsigned i = 0; i <= K; i++) begin
      // partial product of bit 23-i of b, weight 2^(K-i)
      if (mant_b_i[FRAC_W-i])
        prod_o = prod_o + ((MANT_W+K+1)'(mant_a_i) << (K - i));
    end
  end

endmodule
