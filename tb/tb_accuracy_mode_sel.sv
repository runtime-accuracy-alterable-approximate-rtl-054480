// tb_accuracy_mode_sel: exhaustive check of the mode selection for the
// default threshold 4 and for threshold 2: every pair of predicted levels
// 0..31, with and without a second pair, with and without the override.
module tb_accuracy_mode_sel;
  import fpmul_pkg::*;

  int checks = 0, failures = 0;
  acc_level_t k1, k2;
  logic v2, force_en, force_high;
  logic high4, taken4, high2, taken2;

  accuracy_mode_sel dut4 (.k1_pred_i(k1), .k2_pred_i(k2), .pair2_valid_i(v2), .force_i(force_en),
                          .force_high_i(force_high), .high_o(high4), .pair2_taken_o(taken4));
  accuracy_mode_sel #(.THRESHOLD(2)) dut2 (.k1_pred_i(k1), .k2_pred_i(k2), .pair2_valid_i(v2),
                          .force_i(force_en), .force_high_i(force_high), .high_o(high2), .pair2_taken_o(taken2));

  function automatic bit exp_high(int a, int b, bit v, bit f, bit fh, int th);
    if (f) return fh;
    if (a >= th) return 1;
    if (v && b >= th) return 1;
    return 0;
  endfunction

  initial begin
    bit eh4, eh2;
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int c = 0; c < 8; c++) begin
          k1 = 5'(i); k2 = 5'(j); v2 = c[0]; force_en = c[1]; force_high = c[2];
          #1;
          eh4 = exp_high(i, j, c[0], c[1], c[2], 4);
          eh2 = exp_high(i, j, c[0], c[1], c[2], 2);
          checks += 4;
          if (high4 !== eh4) begin failures++; $display("FAIL h4 %0d %0d %0d", i, j, c); end
          if (high2 !== eh2) begin failures++; $display("FAIL h2 %0d %0d %0d", i, j, c); end
          if (taken4 !== (!eh4 && c[0])) begin failures++; $display("FAIL t4 %0d %0d %0d", i, j, c); end
          if (taken2 !== (!eh2 && c[0])) begin failures++; $display("FAIL t2 %0d %0d %0d", i, j, c); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
