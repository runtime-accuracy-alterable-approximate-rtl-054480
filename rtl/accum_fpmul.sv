// accum_fpmul: accumulator-based approximate floating-point multiplier,
// level of accuracy k chosen with each operation.
//
// On start_i the operands and k_i are sampled. Mantissa b is truncated to k
// fraction bits and, with WINDOW > 0, window-rounded at k (window_round) before
// it enters the iterative accumulator (accum_mant), so the rounding window
// moves with k. The registered operands feed the sign/exponent stage
// (fp_assemble) together with the 48-bit accumulator.
// Interface: start_i/a_i/b_i/k_i in; busy_o, done_o (one-cycle pulse) and p_o
// out; p_o is valid from done_o until the next start.
// Timing: k cycles from the start edge to done_o (k clamped to 1..23).
// WINDOW=3 by default (the rounding variant); WINDOW=0 is the plain
// accumulator-based multiplier. The window size of the rounding variant is
// this implementation's choice.
module accum_fpmul
  import fpmul_pkg::*;
#(
  parameter int unsigned WINDOW = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  input  fp32_t      a_i,
  input  fp32_t      b_i,
  input  acc_level_t k_i,
  output logic       busy_o,
  output logic       done_o,
  output fp32_t      p_o
);

  fp32_t                a_q, b_q;
  mant_t                mant_b_r;
  logic [2*MANT_W-1:0]  acc;

  window_round #(.WINDOW(WINDOW)) u_round (
    .mant_i (mant_of(b_i.exp, b_i.frac)),
    .k_i    (k_i),
    .mant_o (mant_b_r)
  );

  accum_mant u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .start_i  (start_i),
    .mant_a_i (mant_of(a_i.exp, a_i.frac)),
    .mant_b_i (mant_b_r),
    .k_i      (k_i),
    .busy_o   (busy_o),
    .done_o   (done_o),
    .iter_o   (),
    .acc_o    (acc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (start_i && !busy_o) begin
      a_q <= a_i;
      b_q <= b_i;
    end
  end

  fp_assemble #(.PW(2*MANT_W)) u_fp (
    .a_i    (a_q),
    .b_i    (b_q),
    .prod_i (acc),
    .p_o    (p_o)
  );

endmodule
