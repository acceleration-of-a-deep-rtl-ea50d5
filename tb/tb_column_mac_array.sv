// tb_column_mac_array: runs two layer configurations on column MAC arrays
// and checks every output element, the column order, the one column per K
// cycles rate and the start-to-done time of N*K + 3 cycles.
//   u0: the 16x4 by 16x4 block convolution (16 MAC units, 16x16 output),
//       run twice to show the weight RAM wraps back for the next pass.
//   u1: 25 rows, K = 6, N = 5, with one row masked off on every load.
module tb_column_mac_array;
  import llp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // One test harness per configuration.
  `define CMA_HARNESS(NAME, R, KK, NN) \
  logic NAME``_w_we = 0, NAME``_b_we = 0, NAME``_x_we = 0, NAME``_start = 0; \
  logic [WADDR_W-1:0] NAME``_w_addr = '0; \
  logic [IDX_W-1:0] NAME``_b_addr = '0, NAME``_x_col = '0, NAME``_out_col; \
  logic [R-1:0] NAME``_x_en = '1; \
  fp32_t NAME``_w_data = '0, NAME``_b_data = '0; \
  fp32_t NAME``_x_data [R]; \
  fp32_t NAME``_out [R]; \
  logic NAME``_busy, NAME``_done, NAME``_ov; \
  column_mac_array #(.ROWS(R), .K(KK), .N(NN)) NAME ( \
    .clk(clk), .rst_n(rst_n), \
    .w_we(NAME``_w_we), .w_addr(NAME``_w_addr), .w_data(NAME``_w_data), \
    .b_we(NAME``_b_we), .b_addr(NAME``_b_addr), .b_data(NAME``_b_data), \
    .x_we(NAME``_x_we), .x_col(NAME``_x_col), .x_row_en(NAME``_x_en), .x_data(NAME``_x_data), \
    .start(NAME``_start), .busy(NAME``_busy), .done(NAME``_done), \
    .out_valid(NAME``_ov), .out_col(NAME``_out_col), .out_data(NAME``_out));

  `CMA_HARNESS(u0, 16, 4, 16)
  `CMA_HARNESS(u1, 25, 6, 5)

  `define CMA_RUN(NAME, R, KK, NN, MASKROW) \
  begin \
    fp32_t X [R][KK]; fp32_t W [NN][KK]; fp32_t B [NN]; \
    int t_start, ncol, t_prev; \
    for (int r = 0; r < R; r++) for (int k = 0; k < KK; k++) X[r][k] = rand_f(2.0); \
    for (int j = 0; j < NN; j++) begin B[j] = rand_f(1.0); for (int k = 0; k < KK; k++) W[j][k] = rand_f(1.0); end \
    for (int a = 0; a < NN * KK; a++) begin \
      NAME``_w_we <= 1; NAME``_w_addr <= WADDR_W'(a); NAME``_w_data <= W[a / KK][a % KK]; @(posedge clk); \
    end \
    NAME``_w_we <= 0; \
    for (int j = 0; j < NN; j++) begin \
      NAME``_b_we <= 1; NAME``_b_addr <= IDX_W'(j); NAME``_b_data <= B[j]; @(posedge clk); \
    end \
    NAME``_b_we <= 0; \
    for (int k = 0; k < KK; k++) begin \
      NAME``_x_we <= 1; NAME``_x_col <= IDX_W'(k); \
      for (int r = 0; r < R; r++) NAME``_x_data[r] <= X[r][k]; \
      NAME``_x_en <= '1; \
      if (MASKROW >= 0) NAME``_x_en[MASKROW] <= 1'b0; \
      @(posedge clk); \
    end \
    NAME``_x_we <= 0; \
    for (int pass = 0; pass < 2; pass++) begin \
      NAME``_start <= 1; @(posedge clk); NAME``_start <= 0; t_start = 0; \
      ncol = 0; t_prev = 0; \
      while (ncol < NN) begin \
        @(posedge clk); t_start++; \
        if (NAME``_ov) begin \
          check(int'(NAME``_out_col) == ncol, $sformatf("%s column order", `"NAME`")); \
          if (ncol > 0) check(cycle - t_prev == KK, $sformatf("%s column rate %0d", `"NAME`", cycle - t_prev)); \
          t_prev = cycle; \
          for (int r = 0; r < R; r++) begin \
            fp32_t e; \
            e = B[ncol]; \
            for (int k = 0; k < KK; k++) e = fadd_ref(e, fmul_ref((r == MASKROW) ? NAME``_x_data_old[r][k] : X[r][k], W[ncol][k])); \
            check(same(NAME``_out[r], e), $sformatf("%s Y[%0d][%0d] %h vs %h", `"NAME`", r, ncol, NAME``_out[r], e)); \
          end \
          if (ncol == NN - 1) check(NAME``_done && (t_start == NN * KK + 3), \
                                    $sformatf("%s done after %0d cycles", `"NAME`", t_start)); \
          ncol++; \
        end \
      end \
      @(posedge clk); \
      check(!NAME``_busy, "idle after done"); \
    end \
  end

  // t_start counts the edges after the one that samples start.
  // Values a masked row held before the load (written in an earlier pass).
  fp32_t u0_x_data_old [16][4];
  fp32_t u1_x_data_old [25][6];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    `CMA_RUN(u0, 16, 4, 16, -1)
    // Prime row 3 of u1, then load again with row 3 masked.
    for (int k = 0; k < 6; k++) begin
      u1_x_data_old[3][k] = rand_f(1.0);
      u1_x_we <= 1; u1_x_col <= IDX_W'(k); u1_x_en <= '0; u1_x_en[3] <= 1'b1;
      u1_x_data[3] <= u1_x_data_old[3][k];
      @(posedge clk);
    end
    u1_x_we <= 0;
    `CMA_RUN(u1, 25, 6, 5, 3)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
