// fp_mul: combinational IEEE-754 single precision multiplier, the "x" of a
// multiply-accumulate unit.
//
// The 24-bit significands (hidden one restored) are multiplied into a
// 48-bit product, which is normalised by at most one place and rounded to
// nearest, ties to even. Subnormal inputs are read as zero and results that
// would be subnormal are flushed to a signed zero; exponent overflow gives a
// signed infinity. Infinity and NaN inputs are not treated specially: the
// network only carries finite numbers. The rounding mode and the handling
// of subnormals are choices of this design.
//
// Interface: a, b in; p = a * b out, same cycle.
module fp_mul
  import llp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);

  logic        sign;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_s;

  always_comb begin
    sign = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    prod = ma * mb;
    exp_s = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_s  = exp_s + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + 25'(round_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 11'sd1;
    end
    if (ea == 8'd0 || eb == 8'd0 || exp_s <= 11'sd0) begin
      p = {sign, 31'd0};
    end else if (exp_s >= 11'sd255) begin
      p = {sign, 8'hFF, 23'd0};
    end else begin
      p = {sign, exp_s[7:0], mant_r[22:0]};
    end
  end

endmodule
