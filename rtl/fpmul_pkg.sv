// fpmul_pkg: constants and types shared by the approximate floating-point
// multipliers.
//
// The multipliers take IEEE-754 single-precision operands. The mantissa of an
// operand is handled as a 24-bit unsigned number with the hidden bit at
// position 23 (mant[23:0]), as the partial-product labels of the design use it.
// The "level of accuracy" k is the number of fraction bits of operand b that a
// multiplier keeps: the hidden bit plus k fraction bits enter the product. k is
// carried as a 5-bit value (1..23; 23 keeps every bit, which is exact).
// Choosing IEEE single precision is this design's own reading of the 24-bit
// mantissa width; the field layout itself is the standard one.
package fpmul_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned MANT_W = FRAC_W + 1;   // with hidden bit
  localparam int unsigned BIAS   = 127;
  localparam int unsigned K_W    = 5;            // width of a level of accuracy
  localparam int unsigned K_MAX  = FRAC_W;       // k = 23 keeps all bits

  typedef logic [K_W-1:0]    acc_level_t;        // level of accuracy k
  typedef logic [MANT_W-1:0] mant_t;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // Mantissa with the hidden bit; subnormals count as zero and give 0 here.
  function automatic mant_t mant_of(logic [EXP_W-1:0] e, logic [FRAC_W-1:0] f);
    return (e == '0) ? '0 : {1'b1, f};
  endfunction

endpackage
