// tb_mac_kernel: convolves a random 16x4 input block with a random 16x4
// weight block (plus biases) on the single-MAC kernel and checks all 256
// outputs, their order, the one-output-per-K-cycles rate and the total
// cycle count of the block: 16 rows x (4 fill + 64 issue + 1) cycles.
module tb_mac_kernel;
  import llp_pkg::*;
  import tb_fp_pkg::*;

  localparam int K = 4, N = 16, RI = 16;
  logic clk = 0, rst_n = 0;
  logic w_we = 0, b_we = 0, in_valid = 0;
  logic [5:0] w_addr = '0;
  logic [3:0] b_addr = '0;
  fp32_t w_data = '0, b_data = '0, in_data = '0;
  logic in_ready, out_valid;
  logic [3:0] out_row, out_col;
  fp32_t out_data;

  fp32_t X [RI][K];
  fp32_t W [N][K];
  fp32_t B [N];
  int checks = 0, failures = 0;
  int cycle = 0, n_out = 0, t_first_in = -1, t_last_out = 0, t_prev = 0;

  mac_kernel #(.K(K), .N(N), .ROWS_IN(RI)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready && t_first_in < 0) t_first_in = cycle;
    if (rst_n && out_valid) begin
      int i, j;
      fp32_t e;
      i = n_out / N;
      j = n_out % N;
      e = B[j];
      for (int k = 0; k < K; k++) e = fadd_ref(e, fmul_ref(X[i][k], W[j][k]));
      checks++;
      if (int'(out_row) != i || int'(out_col) != j || !same(out_data, e)) begin
        failures++;
        if (failures < 10)
          $display("FAIL Y[%0d][%0d] got (%0d,%0d) %h expected %h", i, j, out_row, out_col, out_data, e);
      end
      if (j != 0) begin
        checks++;
        if (cycle - t_prev != K) begin
          failures++;
          $display("FAIL output spacing %0d", cycle - t_prev);
        end
      end
      t_prev = cycle;
      t_last_out = cycle;
      n_out++;
    end
  end

  initial begin
    for (int i = 0; i < RI; i++) for (int k = 0; k < K; k++) X[i][k] = rand_f(3.0);
    for (int j = 0; j < N; j++) begin
      B[j] = rand_f(1.0);
      for (int k = 0; k < K; k++) W[j][k] = rand_f(1.0);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < N * K; a++) begin
      @(posedge clk);
      w_we <= 1; w_addr <= 6'(a); w_data <= W[a / K][a % K];
    end
    for (int j = 0; j < N; j++) begin
      @(posedge clk);
      w_we <= 0;
      b_we <= 1; b_addr <= 4'(j); b_data <= B[j];
    end
    @(posedge clk);
    b_we <= 0;
    // Stream rows as fast as the kernel accepts them.
    for (int i = 0; i < RI; i++) begin
      for (int k = 0; k < K; k++) begin
        in_valid <= 1;
        in_data  <= X[i][k];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (200) @(posedge clk);
    checks++;
    if (n_out != RI * N) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", n_out, RI * N);
    end
    // Rows start K + N*K + 1 cycles apart (fill, issue, one turn-around
    // cycle). In the last row the final multiply is issued K + N*K - 1
    // cycles after the row's first input, and its result is seen three
    // cycles after that (RAM read, product, accumulator).
    checks++;
    if (t_last_out - t_first_in != (RI - 1) * (K + N * K + 1) + (K + N * K - 1) + 3) begin
      failures++;
      $display("FAIL block latency %0d cycles", t_last_out - t_first_in);
    end
    $display("block of %0d outputs in %0d cycles", n_out, t_last_out - t_first_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
