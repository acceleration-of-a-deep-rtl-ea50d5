// tb_dense_stack: runs the dense layers at their full size (347 inputs,
// 200, 100, 100 and 4 nodes) on random weights and checks the four scores
// against a reference with the same rounding and accumulation order, ReLU
// after the hidden layers and none after the last. It checks the cycle
// count (N*K + 3 per layer, plus one) and then runs a second input vector to show the
// cyclic weight RAMs wrap back to the start.
module tb_dense_stack;
  import llp_pkg::*;
  import tb_fp_pkg::*;

  localparam int IN = 347;
  localparam int NODES [4] = '{200, 100, 100, 4};

  logic clk = 0, rst_n = 0;
  logic x_we = 0, w_we = 0, b_we = 0;
  logic [IDX_W-1:0] b_addr = '0;
  logic [WADDR_W-1:0] w_addr = '0;
  logic [1:0] w_layer = '0, b_layer = '0;
  fp32_t x_data = '0, w_data = '0, b_data = '0;
  logic busy, done;
  fp32_t scores [4];
  int checks = 0, failures = 0;

  dense_stack dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
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
  int clamped = 0;

  initial begin
    int K, n, expect_cycles;
    for (int l = 0; l < 4; l++) begin
      K = (l == 0) ? IN : NODES[l-1];
      W[l] = new[NODES[l] * K];
      B[l] = new[NODES[l]];
      foreach (W[l][i]) W[l][i] = rand_f(1.7 / $sqrt(real'(K)));
      foreach (B[l][i]) B[l][i] = rand_f(0.2);
    end
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
    for (int run = 0; run < 2; run++) begin
      X = new[IN];
      foreach (X[i]) X[i] = rand_f(1.0);
      layer_ref(1, IN, NODES[0], X, W[0], B[0], Y[0], 1'b1, clamped);
      for (int l = 1; l < 4; l++)
        layer_ref(1, NODES[l-1], NODES[l], Y[l-1], W[l], B[l], Y[l], l < 3, clamped);
      foreach (X[i]) begin
        x_we <= 1; x_data <= X[i];
        @(posedge clk);
      end
      x_we <= 0;
      n = 0;
      while (!done) begin
        @(posedge clk);
        n++;
      end
      // Counted from the edge that samples the last input word: per layer
      // N*K issue cycles and three pipeline cycles until its last output
      // is taken by the next layer (for the last layer, registered as
      // done), and one cycle until done is seen here.
      expect_cycles = 1;
      for (int l = 0; l < 4; l++) expect_cycles += NODES[l] * ((l == 0) ? IN : NODES[l-1]) + 3;
      check(n == expect_cycles, $sformatf("dense stack took %0d cycles, expected %0d", n, expect_cycles));
      for (int c = 0; c < 4; c++)
        check(same(scores[c], Y[3][c]), $sformatf("score %0d %h vs %h", c, scores[c], Y[3][c]));
      @(posedge clk);
      check(!busy, "idle after done");
    end
    check(clamped > 0, "ReLU clamped some values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
