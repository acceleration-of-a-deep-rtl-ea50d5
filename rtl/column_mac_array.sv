// column_mac_array: one convolution (kernel size 1) or dense layer computed
// by one MAC unit per input row, all driven by shared control.
//
// The layer computes Y = X * W^T + b for an input matrix X of ROWS x K, a
// weight matrix W of N x K (one row per filter or node) and a bias vector b
// of N. Each input row lives in a small cyclic RAM of K words; the weights
// live in one cyclic RAM of N*K words in row-major order (W[j][k] at
// j*K + k), read as a ROM. Two shared counters, k over 0..K-1 and j over
// 0..N-1, address every input RAM with k, the weight RAM in sequence and
// the bias RAM with j; the one weight word read each cycle is broadcast to
// all ROWS MAC units. Each MAC unit repeats its input row against every
// weight row and presets its accumulator with b[j] at k = 0, so after K
// cycles MAC r holds Y[r][j]. The input matrix is written one column at a
// time (x_col = k, one element per row, rows masked by x_row_en) and the
// result leaves one column at a time (out_col = j, one element per row).
// The bias follows the weight row, since in a convolution layer each
// filter has one bias.
//
// Timing: `start` (while idle) begins a pass of N*K issue cycles, one
// multiply per MAC per cycle, from the next cycle on. Column j appears with
// out_valid three cycles after its last issue cycle (RAM read, product
// register, accumulator): `done` pulses with the last column, N*K + 3
// cycles after the start cycle. Loads must not overlap a pass. The
// load ports and the latencies are this design's choices.
module column_mac_array
  import llp_pkg::*;
#(
  parameter int ROWS = 16,
  parameter int K = 4,
  parameter int N = 16,
  localparam int KW = (K > 1) ? $clog2(K) : 1,
  localparam int NW = (N > 1) ? $clog2(N) : 1,
  localparam int WD = N * K,
  localparam int WW = (WD > 1) ? $clog2(WD) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // Weight and bias load.
  input  logic               w_we,
  input  logic [WADDR_W-1:0] w_addr,
  input  fp32_t              w_data,
  input  logic               b_we,
  input  logic [IDX_W-1:0]   b_addr,
  input  fp32_t              b_data,
  // Input matrix load, one column per write.
  input  logic               x_we,
  input  logic [IDX_W-1:0]   x_col,
  input  logic [ROWS-1:0]    x_row_en,
  input  fp32_t              x_data [ROWS],
  // Control.
  input  logic               start,
  output logic               busy,
  output logic               done,
  // Output matrix, one column per pulse.
  output logic               out_valid,
  output logic [IDX_W-1:0]   out_col,
  output fp32_t              out_data [ROWS]
);

  fp32_t x_mem [ROWS][K];
  fp32_t b_mem [N];

  logic          running;
  logic [KW-1:0] k_cnt;
  logic [NW-1:0] j_cnt;
  logic          issue_last;

  // Stage 1: RAM outputs and the flags that travel with them.
  fp32_t          x_q [ROWS];
  fp32_t          w_q, b_q;
  logic           v1, first1, last1;
  logic [NW-1:0]  j1, j2, j3;
  logic [ROWS-1:0] mac_valid;

  assign issue_last = running && (k_cnt == KW'(K - 1)) && (j_cnt == NW'(N - 1));

  // Weight memory: read consecutively, wrapping after N*K words.
  cyclic_ram #(.WIDTH(32), .DEPTH(WD)) u_wram (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (w_we),
    .waddr   (WW'(w_addr)),
    .wdata   (w_data),
    .restart (start && !busy),
    .advance (running),
    .raddr   (),
    .rdata   (w_q)
  );

  always_ff @(posedge clk) begin
    if (b_we) b_mem[NW'(b_addr)] <= b_data;
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++) begin
      if (x_we && x_row_en[r]) x_mem[r][KW'(x_col)] <= x_data[r];
    end
  end

  // Shared counters.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      k_cnt   <= '0;
      j_cnt   <= '0;
    end else if (start && !busy) begin
      running <= 1'b1;
      k_cnt   <= '0;
      j_cnt   <= '0;
    end else if (running) begin
      if (k_cnt == KW'(K - 1)) begin
        k_cnt <= '0;
        if (j_cnt == NW'(N - 1)) begin
          j_cnt   <= '0;
          running <= 1'b0;
        end else begin
          j_cnt <= j_cnt + NW'(1);
        end
      end else begin
        k_cnt <= k_cnt + KW'(1);
      end
    end
  end

  // Stage 1 registers: input and bias reads, flags.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      first1 <= 1'b0;
      last1  <= 1'b0;
      j1     <= '0;
      j2     <= '0;
      j3     <= '0;
      b_q    <= FP32_ZERO;
      for (int r = 0; r < ROWS; r++) x_q[r] <= FP32_ZERO;
    end else begin
      v1     <= running;
      first1 <= running && (k_cnt == '0);
      last1  <= running && (k_cnt == KW'(K - 1));
      j1     <= j_cnt;
      j2     <= j1;
      j3     <= j2;
      if (running) begin
        b_q <= b_mem[j_cnt];
        for (int r = 0; r < ROWS; r++) x_q[r] <= x_mem[r][k_cnt];
      end
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_mac
    mac_unit u_mac (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (v1),
      .in_first  (first1),
      .in_last   (last1),
      .x         (x_q[r]),
      .w         (w_q),
      .bias      (b_q),
      .out_valid (mac_valid[r]),
      .acc       (out_data[r])
    );
  end

  // All MAC units run in lockstep; unit 0 stands for all.
  assign out_valid = mac_valid[0];
  assign out_col   = IDX_W'(j3);

  // Busy until the last column has left the pipeline.
  logic [2:0] tail;
  always_ff @(posedge clk) begin
    if (!rst_n) tail <= '0;
    else        tail <= {tail[1:0], issue_last};
  end

  assign busy = running || (|tail[1:0]);
  assign done = tail[2];

endmodule
