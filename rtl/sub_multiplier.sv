// sub_multiplier: 24 x M bit unsigned multiplier, one of the two halves of
// the reconfigurable multiplier.
//
// Each of the M bits of b_i gates a copy of the 24-bit mantissa a_i, shifted
// by that bit's weight, and the M partial products are added, the same
// AND-shift-add structure the simple multiplier uses. The insides are this
// implementation's choice; the reference structure only names the block.
// Interface: a_i (24 bits), b_i (M bits) -> p_o = a_i * b_i (24+M bits).
// Timing: combinational.
module sub_multiplier
  import fpmul_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  mant_t               a_i,
  input  logic [M-1:0]        b_i,
  output logic [MANT_W+M-1:0] p_o
);

  always_comb begin
    p_o = '0;
    for (int unsigned i = 0; i < M; i++)
      if (b_i[i]) p_o = p_o + ((MANT_W+M)'(a_i) << i);
  end

endmodule
