// tb_simple_adder_mant: checks the simple adder mantissa multiplier at K=4
// (five partial products into a 29-bit sum) and K=2 against
// mant_a * (top K+1 bits of mant_b). Combinational; watchdog included.
module tb_simple_adder_mant;
  import fpmul_pkg::*;

  int checks = 0, failures = 0;
  mant_t a, b;
  logic [28:0] p4;
  logic [26:0] p2;

  simple_adder_mant #(.K(4)) u4 (.mant_a_i(a), .mant_b_i(b), .prod_o(p4));
  simple_adder_mant #(.K(2)) u2 (.mant_a_i(a), .mant_b_i(b), .prod_o(p2));

  task automatic apply(mant_t aa, mant_t bb);
    logic [47:0] e4, e2;
    a = aa; b = bb; #1;
    e4 = 48'(a) * 48'(b[23:19]);
    e2 = 48'(a) * 48'(b[23:21]);
    checks += 2;
    if (48'(p4) !== e4) begin failures++; $display("FAIL K4 a=%h b=%h got=%h exp=%h", a, b, p4, e4); end
    if (48'(p2) !== e2) begin failures++; $display("FAIL K2 a=%h b=%h got=%h exp=%h", a, b, p2, e2); end
  endtask

  initial begin
    apply(24'hFFFFFF, 24'hFFFFFF);
    checks++; if (p4 !== 29'(48'hFFFFFF * 48'd31)) failures++;
    apply(24'h800000, 24'h800000);
    checks++; if (p4 !== 29'h8000000) failures++;   // 1.0 * 1.0 = 1.0 (27 fraction bits)
    for (int i = 0; i < 20000; i++) apply({1'b1, 23'($urandom)}, {1'b1, 23'($urandom)});
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
