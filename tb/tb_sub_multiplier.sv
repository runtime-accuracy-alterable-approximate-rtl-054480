// tb_sub_multiplier: checks the 24 x M sub-multiplier for M=4 (default),
// M=2 and M=3 against the * operator on random and extreme operands.
module tb_sub_multiplier;
  import fpmul_pkg::*;

  int checks = 0, failures = 0;
  mant_t a;
  logic [3:0] b;
  logic [27:0] p4;
  logic [25:0] p2;
  logic [26:0] p3;

  sub_multiplier dut4 (.a_i(a), .b_i(b), .p_o(p4));
  sub_multiplier #(.M(2)) dut2 (.a_i(a), .b_i(b[3:2]), .p_o(p2));
  sub_multiplier #(.M(3)) dut3 (.a_i(a), .b_i(b[3:1]), .p_o(p3));

  task automatic apply(mant_t aa, logic [3:0] bb);
    a = aa; b = bb; #1;
    checks += 3;
    if (p4 !== 28'(aa) * 28'(bb))      begin failures++; $display("FAIL M4 %h %h %h", aa, bb, p4); end
    if (p2 !== 26'(aa) * 26'(bb[3:2])) begin failures++; $display("FAIL M2 %h %h %h", aa, bb, p2); end
    if (p3 !== 27'(aa) * 27'(bb[3:1])) begin failures++; $display("FAIL M3 %h %h %h", aa, bb, p3); end
  endtask

  initial begin
    apply(24'hFFFFFF, 4'hF);
    apply(24'h000000, 4'hF);
    for (int i = 0; i < 5000; i++) apply(24'($urandom), 4'($urandom));
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
