// tb_fp_pkg: reference single precision arithmetic for the testbenches,
// computed through the simulator's double precision `real`.
//
// A product of two single precision numbers is exact in double precision,
// and rounding a double precision sum of two single precision numbers to
// single precision gives the correctly rounded single precision sum, so
// r2f(f2r(a) op f2r(b)) is the IEEE result for + and *. The conversions
// follow the datapath's conventions: subnormals read as zero, results
// below the normal range flushed to a signed zero, round to nearest even.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) d = {f[31], 63'd0};
    else d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [23:0] m;
    logic        g, st, up;
    logic [24:0] mr;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    up = g & (st | m[0]);
    mr = {1'b0, m} + 25'(up);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  function automatic logic [31:0] fmul_ref(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] fadd_ref(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] relu_ref(input logic [31:0] a);
    return (f2r(a) > 0.0) ? a : 32'h0;
  endfunction

  // Equal as numbers: identical words, or both zeros of any sign.
  function automatic bit same(input logic [31:0] a, input logic [31:0] b);
    return (a == b) || (a[30:0] == 31'd0 && b[30:0] == 31'd0);
  endfunction

  // Random single precision number, uniform in (-scale, scale).
  function automatic logic [31:0] rand_f(input real scale);
    real u;
    u = (real'($urandom) / 4294967296.0) * 2.0 - 1.0;
    return r2f(u * scale);
  endfunction

  // Random normal number with exponent field in [elo, ehi].
  function automatic logic [31:0] rand_bits(input int elo, input int ehi);
    int e;
    e = elo + int'($urandom % 32'(ehi - elo + 1));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // One layer, Y = X * W^T + b, accumulated in the order of the hardware:
  // bias first, then the products for k = 0..K-1, each step rounded.
  // X is R x K, W is N x K, Y is R x N, all row-major. With `relu`, the
  // outputs are clamped at zero and `clamped` counts the negative sums.
  function automatic void layer_ref(input int R, input int K, input int N,
                                    ref logic [31:0] X[], ref logic [31:0] W[],
                                    ref logic [31:0] B[], ref logic [31:0] Y[],
                                    input bit relu, ref int clamped);
    logic [31:0] acc;
    Y = new[R * N];
    for (int r = 0; r < R; r++)
      for (int j = 0; j < N; j++) begin
        acc = B[j];
        for (int k = 0; k < K; k++) acc = fadd_ref(acc, fmul_ref(X[r*K + k], W[j*K + k]));
        if (relu) begin
          if (acc[31] && acc[30:0] != 31'd0) clamped++;
          acc = acc[31] ? 32'h0 : acc;
        end
        Y[r*N + j] = acc;
      end
  endfunction

endpackage
