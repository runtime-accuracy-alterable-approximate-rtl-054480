// tb_reconfig_mant: checks the two-sub-multiplier mantissa datapath for the
// three evaluated pairs (M=4: k=3 & 7, M=3: k=2 & 5, M=2: k=1 & 3). In high
// mode product 1 must equal a1 times the top 2M bits of b1 (aligned to 2M-1
// fraction bits); in low mode product 1 is a1 times the top M bits of b1 at
// the same alignment and product 2 is a2 times the top M bits of b2.
module tb_reconfig_mant;
  import fpmul_pkg::*;

  int checks = 0, failures = 0;
  logic high;
  mant_t a1, b1, a2, b2;
  logic [31:0] p1_4; logic [27:0] p2_4;
  logic [29:0] p1_3; logic [26:0] p2_3;
  logic [27:0] p1_2; logic [25:0] p2_2;

  reconfig_mant           d4 (.high_i(high), .a1_i(a1), .b1_i(b1), .a2_i(a2), .b2_i(b2), .prod1_o(p1_4), .prod2_o(p2_4));
  reconfig_mant #(.M(3))  d3 (.high_i(high), .a1_i(a1), .b1_i(b1), .a2_i(a2), .b2_i(b2), .prod1_o(p1_3), .prod2_o(p2_3));
  reconfig_mant #(.M(2))  d2 (.high_i(high), .a1_i(a1), .b1_i(b1), .a2_i(a2), .b2_i(b2), .prod1_o(p1_2), .prod2_o(p2_2));

  function automatic logic [47:0] e1(mant_t a, mant_t b, int m, bit h);
    int nb;
    nb = h ? 2 * m : m;
    // a * (top nb bits of b), scaled to 2m bits of b
    return (48'(a) * 48'(b >> (24 - nb))) << (2 * m - nb);
  endfunction

  task automatic apply(bit h);
    high = h;
    a1 = {1'b1, 23'($urandom)}; b1 = {1'b1, 23'($urandom)};
    a2 = {1'b1, 23'($urandom)}; b2 = {1'b1, 23'($urandom)};
    #1;
    checks += 3;
    if (48'(p1_4) !== e1(a1, b1, 4, h)) begin failures++; $display("FAIL M4 h=%0b", h); end
    if (48'(p1_3) !== e1(a1, b1, 3, h)) begin failures++; $display("FAIL M3 h=%0b", h); end
    if (48'(p1_2) !== e1(a1, b1, 2, h)) begin failures++; $display("FAIL M2 h=%0b", h); end
    if (!h) begin
      checks += 3;
      if (48'(p2_4) !== 48'(a2) * 48'(b2[23:20])) begin failures++; $display("FAIL p2 M4"); end
      if (48'(p2_3) !== 48'(a2) * 48'(b2[23:21])) begin failures++; $display("FAIL p2 M3"); end
      if (48'(p2_2) !== 48'(a2) * 48'(b2[23:22])) begin failures++; $display("FAIL p2 M2"); end
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) apply(1'($urandom));
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
