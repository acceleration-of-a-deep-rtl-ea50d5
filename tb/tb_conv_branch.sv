// tb_conv_branch: runs the charged-candidate branch at its full size
// (25 x 17 inputs, filters 64, 32, 32, 8) on random inputs and weights and
// checks the 25 x 8 output against a reference computed layer by layer with
// the same rounding and accumulation order. It also checks the branch's
// cycle count and that ReLU clamping occurred. The input matrix is written
// as 16x4 blocks, zero padded.
module tb_conv_branch;
  import llp_pkg::*;
  import tb_fp_pkg::*;

  localparam int ROWS = 25, FEATS = 17;
  localparam int FILT [4] = '{64, 32, 32, 8};
  localparam int NBC = (FEATS + 3) / 4, NBR = (ROWS + 15) / 16, NBLK = NBR * NBC;

  logic clk = 0, rst_n = 0;
  logic blk_we = 0, w_we = 0, b_we = 0, start = 0;
  logic [3:0] blk_idx = '0;
  fp32_t blk_data [BLK_ELEMS];
  logic [1:0] w_layer = '0, b_layer = '0;
  logic [WADDR_W-1:0] w_addr = '0;
  logic [IDX_W-1:0] b_addr = '0, out_col;
  fp32_t w_data = '0, b_data = '0;
  logic busy, done, out_valid;
  fp32_t out_data [ROWS];

  int checks = 0, failures = 0;

  conv_branch #(.ROWS(ROWS), .FEATS(FEATS), .FILTERS(FILT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  logic [31:0] X[], W[4][], B[4][], Y[4][];
  logic [31:0] got [ROWS][8];
  int clamped = 0;

  initial begin
    int K, n, ncol, expect_cycles;
    X = new[ROWS * FEATS];
    foreach (X[i]) X[i] = rand_f(2.0);
    for (int l = 0; l < 4; l++) begin
      K = (l == 0) ? FEATS : FILT[l-1];
      W[l] = new[FILT[l] * K];
      B[l] = new[FILT[l]];
      foreach (W[l][i]) W[l][i] = rand_f(1.5 / $sqrt(real'(K)));
      foreach (B[l][i]) B[l][i] = rand_f(0.2);
    end
    layer_ref(ROWS, FEATS, FILT[0], X, W[0], B[0], Y[0], 1'b1, clamped);
    for (int l = 1; l < 4; l++)
      layer_ref(ROWS, FILT[l-1], FILT[l], Y[l-1], W[l], B[l], Y[l], 1'b1, clamped);

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int l = 0; l < 4; l++) begin
      foreach (W[l][i]) begin
        w_we <= 1; w_layer <= 2'(l); w_addr <= WADDR_W'(i); w_data <= W[l][i];
        @(posedge clk);
      end
      w_we <= 0;
      foreach (B[l][i]) begin
        b_we <= 1; b_layer <= 2'(l); b_addr <= IDX_W'(i); b_data <= B[l][i];
        @(posedge clk);
      end
      b_we <= 0;
    end
    for (int b = 0; b < NBLK; b++) begin
      int rb, cb, r, c;
      rb = b / NBC;
      cb = b % NBC;
      blk_we <= 1; blk_idx <= 4'(b);
      for (int e = 0; e < BLK_ELEMS; e++) begin
        r = rb * 16 + e / 4;
        c = cb * 4 + e % 4;
        blk_data[e] <= (r < ROWS && c < FEATS) ? X[r*FEATS + c] : 32'h0;
      end
      @(posedge clk);
    end
    blk_we <= 0;

    start <= 1;
    @(posedge clk);
    start <= 0;
    n = 0;
    ncol = 0;
    while (!done) begin
      @(posedge clk);
      n++;
      if (out_valid) begin
        for (int r = 0; r < ROWS; r++) got[r][out_col] = out_data[r];
        ncol++;
      end
    end
    // Loader: 6 cycles per block; each layer N*K + 3 cycles plus one to
    // hand over (counted in edges after the one that samples start).
    expect_cycles = 6 * NBLK;
    for (int l = 0; l < 4; l++) expect_cycles += FILT[l] * ((l == 0) ? FEATS : FILT[l-1]) + 4;
    check(n == expect_cycles, $sformatf("branch took %0d cycles, expected %0d", n, expect_cycles));
    check(ncol == 8, "eight output columns");
    for (int r = 0; r < ROWS; r++)
      for (int j = 0; j < 8; j++)
        check(same(got[r][j], Y[3][r*8 + j]), $sformatf("out[%0d][%0d] %h vs %h", r, j, got[r][j], Y[3][r*8 + j]));
    check(clamped > 0, "ReLU clamped some values");
    $display("branch: %0d cycles, %0d values clamped by ReLU", n, clamped);
    @(posedge clk);
    check(!busy, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
