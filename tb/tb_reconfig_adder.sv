// tb_reconfig_adder: checks the shifter and reconfigurable full adder (M=4):
// high mode gives (p_up << 4) + p_lo, low mode gives p_up << 4 alone and
// passes p_lo out as the second product.
module tb_reconfig_adder;
  import fpmul_pkg::*;

  int checks = 0, failures = 0;
  logic high;
  logic [27:0] up, lo, p2;
  logic [31:0] sum;

  reconfig_adder dut (.high_i(high), .p_up_i(up), .p_lo_i(lo), .sum_o(sum), .p2_o(p2));

  task automatic apply(bit h, logic [27:0] u, logic [27:0] l);
    logic [31:0] e;
    high = h; up = u; lo = l; #1;
    e = h ? (32'(u) << 4) + 32'(l) : (32'(u) << 4);
    checks += 2;
    if (sum !== e) begin failures++; $display("FAIL sum h=%0b %h %h got=%h exp=%h", h, u, l, sum, e); end
    if (!h && p2 !== l) begin failures++; $display("FAIL p2"); end
    else if (h) checks--;
  endtask

  initial begin
    apply(1, 28'hFFFFFFF, 28'hFFFFFFF);
    apply(0, 28'hFFFFFFF, 28'hFFFFFFF);
    for (int i = 0; i < 5000; i++) apply(1'($urandom), 28'($urandom), 28'($urandom));
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
