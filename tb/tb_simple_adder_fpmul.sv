// tb_simple_adder_fpmul: checks the design-time-k floating-point multiplier
// in three configurations (K=2 window 3 = the default, K=4 without rounding,
// K=3 window 5) against the reference model, on random operands in (0,100),
// random full-range bit patterns and special values. It also measures the
// mean relative error of the default configuration on the (0,100) set and
// checks it lies between the round-to-nearest and the truncation bounds.
module tb_simple_adder_fpmul;
  import fpmul_pkg::*;
  import fpmul_ref_pkg::*;

  int checks = 0, failures = 0;
  fp32_t a, b, p_def, p_k4, p_k3w5;

  simple_adder_fpmul dut_def (.a_i(a), .b_i(b), .p_o(p_def));
  simple_adder_fpmul #(.K(4), .WINDOW(0)) dut_k4 (.a_i(a), .b_i(b), .p_o(p_k4));
  simple_adder_fpmul #(.K(3), .WINDOW(5)) dut_k3 (.a_i(a), .b_i(b), .p_o(p_k3w5));

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  task automatic apply(logic [31:0] aa, logic [31:0] bb);
    a = aa; b = bb; #1;
    chk(p_def,  ref_fpmul(aa, bb, 2, 3), "K2W3");
    chk(p_k4,   ref_fpmul(aa, bb, 4, 0), "K4W0");
    chk(p_k3w5, ref_fpmul(aa, bb, 3, 5), "K3W5");
  endtask

  initial begin
    real sum_err, ra, rb, mean;
    apply(32'h40400000, 32'h40700000);    // 3 * 3.75 (b = 1.111 x 2): K=2 W3 blocked -> 3*3.5
    chk(p_def, 32'h41280000, "dir 3*3.5");
    apply(32'h3F800000, 32'h3FB00000);    // 1 * 1.375 -> K=2 W3 rounds up to 1.5
    chk(p_def, 32'h3FC00000, "dir 1*1.5");
    apply(32'h00000000, 32'h42000000);
    chk(p_def, 32'h00000000, "zero");
    for (int i = 0; i < 10000; i++) apply($urandom, $urandom);
    sum_err = 0.0;
    for (int i = 0; i < 2000; i++) begin
      apply(rand_sp(100.0), rand_sp(100.0));
      ra = sp2real(a); rb = sp2real(b);
      sum_err += (ra * rb - sp2real(p_def)) / (ra * rb) * ((ra * rb > sp2real(p_def)) ? 1.0 : -1.0);
    end
    mean = sum_err / 2000.0;
    $display("mean relative error K=2 window 3: %f %%", mean * 100.0);
    checks++;
    if (mean < 0.02 || mean > 0.09) begin failures++; $display("FAIL mean error"); end
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
