// window_round: truncation of a mantissa to k fraction bits with the
// window rounding used by the approximate multipliers.
//
// The mantissa mant_i carries the hidden bit at [23]; fraction bit j (j=1..23)
// sits at mant_i[23-j]. The unit keeps the hidden bit and the k fraction bits
// above the cut and clears the rest. With WINDOW > 0 it then rounds up: a window
// of WINDOW fraction positions is centred on the last kept bit k, the dropped
// positions inside it decide, and the kept positions inside it receive the
// increment.
//   * Decision: round up when fraction bit k+1 is one. For WINDOW=5 the two
//     dropped window bits k+1,k+2 are looked at; 10 and 11 round up, 01 and
//     00 do not, which is the same test.
//   * The increment of one unit at position k may only ripple through the kept
//     bits inside the window (positions k-(WINDOW-1)/2 .. k, never above the
//     hidden bit). When all of those are ones the carry would leave the window,
//     and no rounding takes place. This bounded carry is what separates
//     WINDOW=3 from WINDOW=5, and it keeps the result below 2.0.
// WINDOW=0 gives plain truncation. The window centred on k and the decision
// bits follow the rounding scheme of the design; the bounded carry and its
// suppression are this implementation's reading of "the window size is the
// maximum number of bits used for rounding".
// k_i is clamped to 1..23. Purely combinational.
module window_round
  import fpmul_pkg::*;
#(
  parameter int unsigned WINDOW = 3   // 0 (none), 3 or 5
) (
  input  mant_t      mant_i,
  input  acc_level_t k_i,
  output mant_t      mant_o
);

  localparam int unsigned HALF = (WINDOW == 0) ? 0 : (WINDOW - 1) / 2;

  int unsigned kk;           // clamped k
  int unsigned cut;          // mant index of the last kept bit = 23 - kk
  mant_t       kept;
  mant_t       unit;
  logic        dec;          // rounding decision
  logic        full;         // kept window bits all ones

  always_comb begin
    kk   = (k_i == '0) ? 1 : ((int'(k_i) > K_MAX) ? K_MAX : int'(k_i));
    cut  = FRAC_W - kk;
    kept = '0;
    unit = '0;
    full = 1'b1;
    for (int unsigned i = 0; i < MANT_W; i++) begin
      if (i >= cut) kept[i] = mant_i[i];
      if (i == cut) unit[i] = 1'b1;
      // kept bits inside the window: cut .. cut+HALF, capped at the hidden bit
      if (i >= cut && i <= cut + HALF && !mant_i[i]) full = 1'b0;
    end
    dec = (cut > 0) ? mant_i[cut-1] : 1'b0;
    if (WINDOW != 0 && dec && !full) mant_o = kept + unit;
    else                             mant_o = kept;
  end

endmodule
