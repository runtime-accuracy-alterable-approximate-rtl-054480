// tb_rtaa_fpmul_top: end-to-end test of the three multipliers at their
// default parameters (no parameter override on the top).
//
// A stream of random operand pairs in (0,100), each with a predicted level of
// accuracy 1..7, is pushed through all three units:
//   * simple unit: every pair, checked against the reference (k=2, window 3);
//   * accumulator unit: every pair at its own predicted k, checked for result
//     and for a latency of k cycles;
//   * reconfigurable unit: the stream is consumed one or two pairs per
//     operation, as the mode selection decides; both products are checked.
// Each mechanism is counted and must occur: rounding up, rounding blocked by
// the window, product normalisation, k=1 and k>=7 accumulator runs, high and
// low mode, two products in one operation, an untaken second pair, the user
// override, and special operands (zero, infinity).
module tb_rtaa_fpmul_top;
  import fpmul_pkg::*;
  import fpmul_ref_pkg::*;

  localparam int N = 600;

  int checks = 0, failures = 0;
  int n_up = 0, n_blocked = 0, n_norm = 0, n_k1 = 0, n_kbig = 0;
  int n_high = 0, n_low = 0, n_two = 0, n_untaken = 0, n_force = 0, n_special = 0;
  int rc_ops = 0;

  logic clk = 0, rst_n = 0;
  fp32_t s_a, s_b, s_p;
  logic acc_start = 0, acc_busy, acc_done;
  fp32_t acc_a, acc_b, acc_p;
  acc_level_t acc_k;
  fp32_t rc_a1, rc_b1, rc_a2, rc_b2, rc_p1, rc_p2;
  acc_level_t rc_k1, rc_k2;
  logic rc_v2, rc_force, rc_force_high, rc_p2v, rc_high;

  logic [31:0] va [N];
  logic [31:0] vb [N];
  int          vk [N];

  rtaa_fpmul_top dut (
    .clk(clk), .rst_n(rst_n),
    .s_a_i(s_a), .s_b_i(s_b), .s_p_o(s_p),
    .acc_start_i(acc_start), .acc_a_i(acc_a), .acc_b_i(acc_b), .acc_k_i(acc_k),
    .acc_busy_o(acc_busy), .acc_done_o(acc_done), .acc_p_o(acc_p),
    .rc_a1_i(rc_a1), .rc_b1_i(rc_b1), .rc_a2_i(rc_a2), .rc_b2_i(rc_b2),
    .rc_k1_pred_i(rc_k1), .rc_k2_pred_i(rc_k2), .rc_pair2_valid_i(rc_v2),
    .rc_force_i(rc_force), .rc_force_high_i(rc_force_high),
    .rc_p1_o(rc_p1), .rc_p2_o(rc_p2), .rc_p2_valid_o(rc_p2v), .rc_high_o(rc_high));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  // simple unit, combinational
  task automatic simple_op(logic [31:0] a, logic [31:0] b);
    logic [23:0] tr, rd;
    s_a = a; s_b = b; #1;
    chk(s_p == ref_fpmul(a, b, 2, 3), "simple product");
    tr = ref_round(mant(b), 2, 0);
    rd = ref_round(mant(b), 2, 3);
    if (rd != tr) n_up++;
    else if (b[30:23] != 0 && b[20]) n_blocked++;
    if ((48'(mant(a)) * 48'(rd)) >> 47 != 0) n_norm++;
    if (a[30:23] == 0 || a[30:23] == 255 || b[30:23] == 0 || b[30:23] == 255) n_special++;
  endtask

  // accumulator unit, clocked
  task automatic acc_op(logic [31:0] a, logic [31:0] b, int k);
    int cycles;
    @(negedge clk); acc_a = a; acc_b = b; acc_k = acc_level_t'(k); acc_start = 1;
    @(negedge clk); acc_start = 0;
    cycles = 1;
    while (!acc_done && cycles < 40) begin @(negedge clk); cycles++; end
    chk(cycles == k, "accumulator latency");
    chk(acc_p == ref_fpmul(a, b, k, 3), "accumulator product");
    if (k == 1) n_k1++;
    if (k >= 7) n_kbig++;
  endtask

  initial begin
    int i;
    s_a = '0; s_b = '0; acc_a = '0; acc_b = '0; acc_k = '0;
    rc_a1 = '0; rc_b1 = '0; rc_a2 = '0; rc_b2 = '0; rc_k1 = '0; rc_k2 = '0;
    rc_v2 = 0; rc_force = 0; rc_force_high = 0;
    for (int j = 0; j < N; j++) begin
      va[j] = rand_sp(100.0); vb[j] = rand_sp(100.0); vk[j] = 1 + $urandom % 7;
    end
    va[5] = 32'h0; vb[6] = 32'h7F800000;            // special operands
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int j = 0; j < N; j++) simple_op(va[j], vb[j]);
    for (int j = 0; j < N; j += 3) acc_op(va[j], vb[j], vk[j]);
    acc_op(va[1], vb[1], 23);

    // reconfigurable unit consumes the stream one or two pairs at a time
    i = 0;
    while (i < N) begin
      bit eh, two;
      rc_a1 = va[i]; rc_b1 = vb[i]; rc_k1 = acc_level_t'(vk[i]);
      rc_v2 = (i + 1 < N);
      rc_a2 = rc_v2 ? va[i+1] : '0; rc_b2 = rc_v2 ? vb[i+1] : '0;
      rc_k2 = rc_v2 ? acc_level_t'(vk[i+1]) : '0;
      rc_force = (rc_ops % 50) == 7; rc_force_high = (rc_ops % 100) == 7;
      #1;
      eh  = rc_force ? rc_force_high : !(vk[i] < 4 && (!rc_v2 || vk[i+1] < 4));
      two = !eh && rc_v2;
      chk(rc_high == eh, "reconfigurable mode");
      chk(rc_p1 == ref_fpmul(va[i], vb[i], eh ? 7 : 3, 3), "reconfigurable product 1");
      chk(rc_p2v == two, "reconfigurable pair 2 taken");
      if (two) chk(rc_p2 == ref_fpmul(va[i+1], vb[i+1], 3, 3), "reconfigurable product 2");
      if (eh) n_high++; else n_low++;
      if (two) n_two++;
      if (rc_v2 && !two) n_untaken++;
      if (rc_force) n_force++;
      rc_ops++;
      i += two ? 2 : 1;
      @(negedge clk);
    end
    $display("pairs=%0d reconfigurable operations=%0d", N, rc_ops);
    $display("round-up=%0d blocked=%0d normalised=%0d special=%0d k1=%0d kbig=%0d high=%0d low=%0d two=%0d untaken=%0d forced=%0d",
             n_up, n_blocked, n_norm, n_special, n_k1, n_kbig, n_high, n_low, n_two, n_untaken, n_force);
    need(n_up, "rounding up");
    need(n_blocked, "rounding blocked by the window");
    need(n_norm, "normalisation");
    need(n_special, "special operand");
    need(n_k1, "accumulator k=1");
    need(n_kbig, "accumulator k>=7");
    need(n_high, "high accuracy mode");
    need(n_low, "low accuracy mode");
    need(n_two, "two products in one operation");
    need(n_untaken, "second pair not taken");
    need(n_force, "user override");
    chk(rc_ops < N, "fewer operations than pairs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
