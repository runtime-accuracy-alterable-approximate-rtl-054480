// reconfig_adder: shifter and full adder of the reconfigurable multiplier.
//
// The upper sub-product p_up_i is always shifted left by M places. In high
// accuracy mode (high_i=1) the lower sub-product p_lo_i, which comes from the
// next M bits of the same operand b, is added to it, so sum_o is the product
// with 2M bits of b. In low accuracy mode the adder's second input is gated
// to zero: sum_o is the first product alone, at the same scaling as in high
// mode, and the second, independent product leaves unchanged on p2_o.
// The shift-and-add follows the reference structure; how the two low-mode
// products leave the adder (gating and the separate p2_o port) is this
// implementation's choice.
// Timing: combinational.
module reconfig_adder
  import fpmul_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic                  high_i,
  input  logic [MANT_W+M-1:0]   p_up_i,
  input  logic [MANT_W+M-1:0]   p_lo_i,
  output logic [MANT_W+2*M-1:0] sum_o,
  output logic [MANT_W+M-1:0]   p2_o
);

  logic [MANT_W+2*M-1:0] shifted, addend;

  always_comb begin
    shifted = (MANT_W+2*M)'(p_up_i) << M;
    addend  = high_i ? (MANT_W+2*M)'(p_lo_i) : '0;
    sum_o   = shifted + addend;
    p2_o    = p_lo_i;
  end

endmodule
