// fp_add: combinational IEEE-754 single precision adder, the "+" in the
// feedback loop of an accumulator.
//
// The operand of larger magnitude is kept as is; the other significand is
// shifted right by the exponent difference into a 27-bit field holding a
// guard, a round and a sticky bit. The two are added or subtracted, the
// result is normalised (right by one on carry-out, left by the leading-zero
// count after cancellation) and rounded to nearest, ties to even. Exact
// cancellation gives +0; the sum of two equal-signed zeros keeps their sign.
// Subnormal inputs are read as zero and subnormal results flushed to zero;
// overflow gives a signed infinity. These are choices of this design.
//
// Interface: a, b in; s = a + b out, same cycle.
module fp_add
  import llp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t s
);

  fp32_t       x, y;            // |x| >= |y|
  logic [23:0] mx, my;
  logic [7:0]  d;
  logic [26:0] fx, fy;          // significand, guard, round, sticky
  logic [26:0] shifted_out;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic signed [9:0] exp_s;
  logic        round_up;
  logic [24:0] mant_r;
  logic        eff_sub;
  logic        found;

  always_comb begin
    shifted_out = '0;
    sum = '0;
    exp_s = '0;
    lz = '0;
    found = 1'b0;
    // Order by magnitude (exponent and fraction together).
    if (a[30:0] >= b[30:0]) begin
      x = a;
      y = b;
    end else begin
      x = b;
      y = a;
    end
    mx = (x[30:23] == 8'd0) ? 24'd0 : {1'b1, x[22:0]};
    my = (y[30:23] == 8'd0) ? 24'd0 : {1'b1, y[22:0]};
    d  = x[30:23] - y[30:23];
    eff_sub = x[31] ^ y[31];

    fx = {mx, 3'b000};
    if (d >= 8'd27) begin
      fy = {26'd0, |my};
    end else begin
      shifted_out = ({my, 3'b000} << (8'd27 - d));
      fy = ({my, 3'b000} >> d);
      fy[0] = fy[0] | (|shifted_out);
    end

    sum = eff_sub ? ({1'b0, fx} - {1'b0, fy}) : ({1'b0, fx} + {1'b0, fy});
    exp_s = 10'(signed'({2'b00, x[30:23]}));

    // Normalise.
    lz = 5'd0;
    norm = sum[26:0];
    if (sum[27]) begin
      norm = sum[27:1];
      norm[0] = sum[1] | sum[0];
      exp_s = exp_s + 10'sd1;
    end else begin
      found = 1'b0;
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          lz = 5'(26 - i);
          found = 1'b1;
        end
      end
      norm = sum[26:0] << lz;
      exp_s = exp_s - 10'(lz);
    end

    round_up = norm[2] & ((norm[1] | norm[0]) | norm[3]);
    mant_r = {1'b0, norm[26:3]} + 25'(round_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s = exp_s + 10'sd1;
    end

    if (sum == 28'd0) begin
      s = {(x[31] & y[31]), 31'd0};
    end else if (mx == 24'd0) begin
      s = {x[31], 31'd0};
    end else if (exp_s <= 10'sd0) begin
      s = {x[31], 31'd0};
    end else if (exp_s >= 10'sd255) begin
      s = {x[31], 8'hFF, 23'd0};
    end else begin
      s = {x[31], exp_s[7:0], mant_r[22:0]};
    end
  end

endmodule
