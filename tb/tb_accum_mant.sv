// tb_accum_mant: checks the iterative accumulator. For random mantissas and
// every k from 1 to 23 (plus clamped 0 and 31) it checks that done comes
// exactly k cycles after the start edge, that the accumulator then holds
// mant_a times the hidden bit and top k fraction bits of mant_b, that the
// iteration counter reaches k, and that a start while busy is ignored.
module tb_accum_mant;
  import fpmul_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  mant_t a, b;
  acc_level_t k, iter;
  logic busy, done;
  logic [47:0] acc;

  accum_mant dut (.clk(clk), .rst_n(rst_n), .start_i(start), .mant_a_i(a), .mant_b_i(b),
                  .k_i(k), .busy_o(busy), .done_o(done), .iter_o(iter), .acc_o(acc));

  always #5 clk = ~clk;

  task automatic run(mant_t aa, mant_t bb, int kk, bit poke);
    int cycles, keff;
    logic [47:0] exp;
    keff = (kk < 1) ? 1 : (kk > 23 ? 23 : kk);
    @(negedge clk); a = aa; b = bb; k = acc_level_t'(kk); start = 1;
    @(negedge clk); start = poke;  // a start while busy must be ignored
    a = ~aa; b = ~bb; k = 5'd23;
    cycles = 1;
    while (!done && cycles < 40) begin @(negedge clk); cycles++; start = 0; end
    start = 0;
    exp = 48'(aa) * 48'((bb >> (23 - keff)) << (23 - keff));
    checks += 3;
    if (cycles != keff) begin failures++; $display("FAIL latency k=%0d cycles=%0d", keff, cycles); end
    if (acc !== exp) begin failures++; $display("FAIL acc k=%0d a=%h b=%h got=%h exp=%h", keff, aa, bb, acc, exp); end
    if (int'(iter) != keff) begin failures++; $display("FAIL iter k=%0d got=%0d", keff, iter); end
  endtask

  initial begin
    a = '0; b = '0; k = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int kk = 0; kk <= 31; kk++) run({1'b1, 23'($urandom)}, {1'b1, 23'($urandom)}, kk, 1'b1);
    for (int i = 0; i < 300; i++)
      run({1'b1, 23'($urandom)}, {1'b1, 23'($urandom)}, 1 + $urandom % 23, 1'($urandom));
    run(24'hFFFFFF, 24'hFFFFFF, 23, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
