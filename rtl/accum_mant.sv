// accum_mant: accumulator-based mantissa multiplier with a level of accuracy
// chosen per operation.
//
// A 48-bit accumulator collects one partial product per clock cycle. In
// iteration i (i = 1..k) the term mant_a AND mant_b[23-i], shifted left by
// 23-i places, is added; iteration 1 also adds the hidden-bit term mant_a << 23.
// After iteration k the accumulator holds mant_a times the hidden bit and the
// top k fraction bits of mant_b, a product with 46 fraction bits. Further
// iterations would only refine the result, so k trades latency for accuracy at
// run time, operation by operation.
// Interface: start_i (accepted when not busy) samples mant_a_i, mant_b_i and
// k_i (clamped to 1..23) and performs iteration 1 in the same edge; busy_o is
// high while more iterations follow; done_o pulses for one cycle when acc_o
// holds the result, which stays until the next start.
// Timing: k clock cycles from the start edge to the edge that raises done_o.
// The accumulator and the per-iteration partial products follow the design;
// the folding of the hidden-bit term into iteration 1, the handshake and the
// asynchronous active-low reset are this implementation's choices.
module accum_mant
  import fpmul_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start_i,
  input  mant_t               mant_a_i,
  input  mant_t               mant_b_i,
  input  acc_level_t          k_i,
  output logic                busy_o,
  output logic                done_o,
  output acc_level_t          iter_o,
  output logic [2*MANT_W-1:0] acc_o
);

  localparam int unsigned ACC_W = 2 * MANT_W;

  mant_t               a_q, b_q;
  acc_level_t          k_q;
  acc_level_t          k_in, nxt;
  logic [ACC_W-1:0]    first_sum, step_term;

  always_comb begin
    if (k_i == '0)                 k_in = acc_level_t'(1);
    else if (int'(k_i) > K_MAX)    k_in = acc_level_t'(K_MAX);
    else                           k_in = k_i;
    // iteration 1: hidden-bit term plus the term of fraction bit 1
    first_sum = (mant_b_i[FRAC_W]   ? ACC_W'(mant_a_i) << FRAC_W       : '0)
              + (mant_b_i[FRAC_W-1] ? ACC_W'(mant_a_i) << (FRAC_W - 1) : '0);
    // iteration nxt: term of fraction bit nxt, weight 2^(23-nxt)
    nxt       = iter_o + acc_level_t'(1);
    step_term = b_q[FRAC_W - int'(nxt)] ? ACC_W'(a_q) << (FRAC_W - int'(nxt)) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      b_q    <= '0;
      k_q    <= '0;
      iter_o <= '0;
      acc_o  <= '0;
      busy_o <= 1'b0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (busy_o) begin
        acc_o  <= acc_o + step_term;
        iter_o <= nxt;
        if (nxt == k_q) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
        end
      end else if (start_i) begin
        a_q    <= mant_a_i;
        b_q    <= mant_b_i;
        k_q    <= k_in;
        acc_o  <= first_sum;
        iter_o <= acc_level_t'(1);
        busy_o <= (k_in != acc_level_t'(1));
        done_o <= (k_in == acc_level_t'(1));
      end
    end
  end

  // an iteration never runs past the requested level
  a_iter_bound : assert property (@(posedge clk) disable iff (!rst_n)
                                  busy_o |-> (iter_o < k_q));

endmodule
