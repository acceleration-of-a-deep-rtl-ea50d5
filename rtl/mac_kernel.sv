// mac_kernel: block convolution with a single multiply-accumulate unit fed
// by two cyclic RAMs.
//
// The kernel convolves an input block X (ROWS_IN x K, 16x4 by default)
// with a weight block W (N x K, 16x4): Y[i][j] = b[j] + sum_k X[i][k]*W[j][k],
// a 16x16 output from 16*16*4 = 1024 multiplications on one multiplier.
// The weight block sits in a cyclic weight RAM of N*K words (W[j][k] at
// j*K + k), loaded once and then read like a ROM. One input row at a time
// is held in a cyclic input RAM of K words. A counter over 0..K-1 addresses
// the input RAM and marks the accumulator reset; a counter over 0..N-1
// counts the weight rows. The input row is repeated N times against the
// weight rows; each time the counter over K wraps, one output element is
// complete. After the last weight row the next input row is taken in.
// The bias preset (accumulator set to b[j] instead of zero) is optional in
// use: load zero biases to get the plain product.
//
// Interface: in_valid/in_data stream the K elements of an input row, one
// per cycle, while in_ready is high. out_valid/out_row/out_col/out_data
// give Y[i][j] in order j = 0..N-1 for each input row i.
// Timing: a row occupies the kernel for N*K issue cycles after its K input
// cycles; element (i, j) appears three cycles after its last multiply.
module mac_kernel
  import llp_pkg::*;
#(
  parameter int K = BLK_COLS,
  parameter int N = BLK_ROWS,
  parameter int ROWS_IN = BLK_ROWS,
  localparam int KW = (K > 1) ? $clog2(K) : 1,
  localparam int NW = (N > 1) ? $clog2(N) : 1,
  localparam int IW = (ROWS_IN > 1) ? $clog2(ROWS_IN) : 1,
  localparam int WW = (N * K > 1) ? $clog2(N * K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          w_we,
  input  logic [WW-1:0] w_addr,
  input  fp32_t         w_data,
  input  logic          b_we,
  input  logic [NW-1:0] b_addr,
  input  fp32_t         b_data,
  input  logic          in_valid,
  output logic          in_ready,
  input  fp32_t         in_data,
  output logic          out_valid,
  output logic [IW-1:0] out_row,
  output logic [NW-1:0] out_col,
  output fp32_t         out_data
);

  typedef enum logic [1:0] {M_FILL, M_RUN, M_LAST} mode_t;
  mode_t mode;

  logic [KW-1:0] k_cnt;      // counter 0..K-1
  logic [NW-1:0] j_cnt;      // counter 0..N-1
  logic [IW-1:0] row_cnt;
  logic [KW-1:0] fill_cnt;
  logic          issue;
  fp32_t         x_q, w_q, b_q;
  fp32_t         b_mem [N];
  logic          v1, first1, last1;
  logic [NW-1:0] j1, j2, j3;
  logic [IW-1:0] i1, i2, i3;

  assign in_ready = (mode == M_FILL);
  assign issue    = (mode == M_RUN);

  // Cyclic input RAM: written in order while filling, then read cyclically
  // by the counter over K.
  cyclic_ram #(.WIDTH(32), .DEPTH(K)) u_xram (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (in_valid && in_ready),
    .waddr   (fill_cnt),
    .wdata   (in_data),
    .restart (1'b0),
    .advance (issue),
    .raddr   (),
    .rdata   (x_q)
  );

  // Cyclic weight RAM over all N*K weights.
  cyclic_ram #(.WIDTH(32), .DEPTH(N * K)) u_wram (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (w_we),
    .waddr   (w_addr),
    .wdata   (w_data),
    .restart (1'b0),
    .advance (issue),
    .raddr   (),
    .rdata   (w_q)
  );

  always_ff @(posedge clk) begin
    if (b_we) b_mem[b_addr] <= b_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode     <= M_FILL;
      k_cnt    <= '0;
      j_cnt    <= '0;
      row_cnt  <= '0;
      fill_cnt <= '0;
    end else begin
      case (mode)
        M_FILL: if (in_valid) begin
          fill_cnt <= (fill_cnt == KW'(K - 1)) ? '0 : fill_cnt + KW'(1);
          if (fill_cnt == KW'(K - 1)) mode <= M_RUN;
        end
        M_RUN: begin
          if (k_cnt == KW'(K - 1)) begin
            k_cnt <= '0;
            if (j_cnt == NW'(N - 1)) begin
              j_cnt <= '0;
              mode  <= M_LAST;
            end else begin
              j_cnt <= j_cnt + NW'(1);
            end
          end else begin
            k_cnt <= k_cnt + KW'(1);
          end
        end
        M_LAST: begin
          // One cycle for the last read to leave the input RAM before it
          // is overwritten by the next row.
          mode    <= M_FILL;
          row_cnt <= (row_cnt == IW'(ROWS_IN - 1)) ? '0 : row_cnt + IW'(1);
        end
        default: mode <= M_FILL;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0;
      j1 <= '0; j2 <= '0; j3 <= '0;
      i1 <= '0; i2 <= '0; i3 <= '0;
      b_q <= FP32_ZERO;
    end else begin
      v1     <= issue;
      first1 <= issue && (k_cnt == '0);
      last1  <= issue && (k_cnt == KW'(K - 1));
      j1 <= j_cnt; j2 <= j1; j3 <= j2;
      i1 <= row_cnt; i2 <= i1; i3 <= i2;
      if (issue) b_q <= b_mem[j_cnt];
    end
  end

  mac_unit u_mac (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v1),
    .in_first  (first1),
    .in_last   (last1),
    .x         (x_q),
    .w         (w_q),
    .bias      (b_q),
    .out_valid (out_valid),
    .acc       (out_data)
  );

  assign out_col = j3;
  assign out_row = i3;

endmodule
