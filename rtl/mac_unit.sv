// mac_unit: floating point multiply-accumulate unit with bias preset.
//
// A two-input multiplier feeds an accumulator (adder plus register with the
// register fed back). Rather than clearing the register to zero at the
// start of a dot product, the first product is added to a bias value, so
// the bias addition of a layer costs no extra cycle.
//
// Timing: an operand pair (x, w) with in_valid is multiplied into a product
// register in the next cycle, and the product enters the accumulator one
// cycle later. in_first marks the first pair of a dot product (bias is
// sampled with it); in_last marks the last. out_valid is high for one cycle,
// two cycles after the in_last pair, with the finished sum in acc. Pairs may
// be presented back to back, including a new in_first right after an
// in_last. The product register is this design's pipeline choice.
module mac_unit
  import llp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  fp32_t x,
  input  fp32_t w,
  input  fp32_t bias,
  output logic  out_valid,
  output fp32_t acc
);

  fp32_t prod_d, prod_q, bias_q, sum_d;
  logic  v_q, first_q, last_q;

  fp_mul u_mul (.a(x), .b(w), .p(prod_d));
  fp_add u_add (.a(first_q ? bias_q : acc), .b(prod_q), .s(sum_d));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      first_q   <= 1'b0;
      last_q    <= 1'b0;
      prod_q    <= FP32_ZERO;
      bias_q    <= FP32_ZERO;
      acc       <= FP32_ZERO;
      out_valid <= 1'b0;
    end else begin
      v_q     <= in_valid;
      first_q <= in_first;
      last_q  <= in_last;
      if (in_valid) begin
        prod_q <= prod_d;
        bias_q <= bias;
      end
      if (v_q) acc <= sum_d;
      out_valid <= v_q & last_q;
    end
  end

endmodule
