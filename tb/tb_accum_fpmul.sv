// tb_accum_fpmul: checks the accumulator-based floating-point multiplier
// (default window-3 rounding and a WINDOW=0 instance) with a new random k for
// each operation: result against the reference model and latency of k cycles
// from start to done. Also checks that a smaller k never takes longer and
// that the error of k=23 without rounding is that of a truncated product.
module tb_accum_fpmul;
  import fpmul_pkg::*;
  import fpmul_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  fp32_t a, b, p3, p0;
  acc_level_t k;
  logic busy3, done3, busy0, done0;

  accum_fpmul dut3 (.clk(clk), .rst_n(rst_n), .start_i(start), .a_i(a), .b_i(b), .k_i(k),
                    .busy_o(busy3), .done_o(done3), .p_o(p3));
  accum_fpmul #(.WINDOW(0)) dut0 (.clk(clk), .rst_n(rst_n), .start_i(start), .a_i(a), .b_i(b),
                    .k_i(k), .busy_o(busy0), .done_o(done0), .p_o(p0));

  always #5 clk = ~clk;

  task automatic run(logic [31:0] aa, logic [31:0] bb, int kk);
    int cycles;
    @(negedge clk); a = aa; b = bb; k = acc_level_t'(kk); start = 1;
    @(negedge clk); start = 0; a = $urandom; b = $urandom; k = acc_level_t'($urandom);
    cycles = 1;
    while (!done3 && cycles < 40) begin @(negedge clk); cycles++; end
    checks += 4;
    if (cycles != kk) begin failures++; $display("FAIL latency k=%0d cycles=%0d", kk, cycles); end
    if (done0 !== done3) begin failures++; $display("FAIL done mismatch"); end
    if (p3 !== ref_fpmul(aa, bb, kk, 3)) begin
      failures++; $display("FAIL W3 a=%h b=%h k=%0d got=%h exp=%h", aa, bb, kk, p3, ref_fpmul(aa, bb, kk, 3));
    end
    if (p0 !== ref_fpmul(aa, bb, kk, 0)) begin
      failures++; $display("FAIL W0 a=%h b=%h k=%0d got=%h exp=%h", aa, bb, kk, p0, ref_fpmul(aa, bb, kk, 0));
    end
  endtask

  initial begin
    a = '0; b = '0; k = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int kk = 1; kk <= 23; kk++) run(rand_sp(100.0), rand_sp(100.0), kk);
    for (int i = 0; i < 400; i++) run(rand_sp(100.0), rand_sp(100.0), 1 + $urandom % 23);
    for (int i = 0; i < 100; i++) run($urandom, $urandom, 1 + $urandom % 10);
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
