// tb_fp_assemble: checks the sign/exponent/normalisation stage with exact
// 48-bit mantissa products (PW=48) against the reference model: random
// normal operands, products above and below 2.0, overflow to infinity,
// underflow to zero, zero, infinity and NaN operands. Also compares normal
// results with real arithmetic to within one unit in the last place.
module tb_fp_assemble;
  import fpmul_pkg::*;
  import fpmul_ref_pkg::*;

  int checks = 0, failures = 0, n_norm = 0;
  fp32_t a, b, p;
  logic [47:0] prod;

  fp_assemble #(.PW(48)) dut (.a_i(a), .b_i(b), .prod_i(prod), .p_o(p));

  task automatic apply(logic [31:0] aa, logic [31:0] bb);
    logic [31:0] e;
    a = aa; b = bb;
    prod = 48'(mant(aa)) * 48'(mant(bb));
    #1;
    e = ref_assemble(aa, bb, prod);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h got=%h exp=%h", aa, bb, p, e);
    end
    if (prod[47]) n_norm++;
  endtask

  initial begin
    real ra, rb, rp, err;
    apply(32'h3FC00000, 32'h3FC00000);             // 1.5*1.5 = 2.25
    checks++; if (p !== 32'h40100000) failures++;
    apply(32'hC0000000, 32'h40400000);             // -2*3 = -6
    checks++; if (p !== 32'hC0C00000) failures++;
    apply(32'h7F000000, 32'h7F000000);             // overflow
    checks++; if (p !== 32'h7F800000) failures++;
    apply(32'h00800000, 32'h00800000);             // underflow
    checks++; if (p !== 32'h00000000) failures++;
    apply(32'h80000000, 32'h40000000);             // -0 * 2
    checks++; if (p !== 32'h80000000) failures++;
    apply(32'h7F800000, 32'h00000000);             // inf * 0
    checks++; if (p !== 32'h7FC00000) failures++;
    apply(32'h7F800000, 32'hC0000000);             // inf * -2
    checks++; if (p !== 32'hFF800000) failures++;
    apply(32'h7FC00001, 32'h3F800000);             // NaN
    checks++; if (p !== 32'h7FC00000) failures++;
    for (int i = 0; i < 20000; i++) begin
      apply($urandom, $urandom);
    end
    for (int i = 0; i < 2000; i++) begin
      apply(rand_sp(100.0), rand_sp(100.0));
      ra = sp2real(a); rb = sp2real(b); rp = sp2real(p);
      err = (ra * rb - rp) / (ra * rb);
      checks++;
      if (err < 0.0 || err > 2.0 ** -22) begin
        failures++; $display("FAIL real a=%f b=%f p=%f", ra, rb, rp);
      end
    end
    checks++;
    if (n_norm == 0) begin failures++; $display("FAIL no product >= 2"); end
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
