// accuracy_mode_sel: chooses the mode of the reconfigurable multiplier.
//
// An error estimator predicts for every input pair its best level of
// accuracy. A prediction below THRESHOLD asks for the low accuracy mode, in
// which the multiplier runs two multiplications at once; otherwise the high
// accuracy mode runs one. The unit is offered pair 1 and, when
// pair2_valid_i is set, pair 2. It selects low mode when pair 1 and the
// offered pair 2 are both predicted below the threshold, and then takes pair
// 2 along; otherwise pair 1 runs alone in high mode and pair 2 is not taken
// (its source offers it again). The user override force_i fixes the mode to
// force_high_i whatever the predictions say.
// The threshold rule and the override follow the reference design; the
// pairing rule for two offered pairs is this implementation's choice.
// THRESHOLD=4 (with k=3 & k=7) gives every pair at least its predicted level.
// Timing: combinational.
module accuracy_mode_sel
  import fpmul_pkg::*;
#(
  parameter int unsigned THRESHOLD = 4
) (
  input  acc_level_t k1_pred_i,
  input  acc_level_t k2_pred_i,
  input  logic       pair2_valid_i,
  input  logic       force_i,
  input  logic       force_high_i,
  output logic       high_o,
  output logic       pair2_taken_o
);

  logic low1, low2;

  always_comb begin
    low1 = int'(k1_pred_i) < THRESHOLD;
    low2 = int'(k2_pred_i) < THRESHOLD;
    if (force_i) high_o = force_high_i;
    else         high_o = !(low1 && (!pair2_valid_i || low2));
    pair2_taken_o = !high_o && pair2_valid_i;
  end

endmodule
