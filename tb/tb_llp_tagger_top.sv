// tb_llp_tagger_top: end-to-end test of the whole tagger at its full size.
//
// Loads random weights and biases for all 16 layers, then runs two jets
// with random inputs (input matrices written as 16x4 blocks, global
// features and decay length written as words). For each jet the four class
// scores are compared with a reference model that computes every layer
// with the same rounding and accumulation order. It counts the mechanisms
// the design relies on and fails if one never happened: block reads from
// the elementwise stores, layer passes of the column MAC arrays, ReLU
// clamping, the flatten hand-over, a branch finishing before the others
// and waiting, and a second jet reusing the cyclic weight RAMs after they
// wrapped. It also checks the cycle count of a jet.
module tb_llp_tagger_top;
  import llp_pkg::*;
  import tb_fp_pkg::*;

  localparam int CF [4] = '{64, 32, 32, 8};
  localparam int NF [4] = '{32, 16, 16, 4};
  localparam int SF [4] = '{32, 16, 16, 8};
  localparam int DN [4] = '{200, 100, 100, 4};
  localparam int LR [3] = '{CPF_ROWS, NPF_ROWS, SV_ROWS};
  localparam int LF [3] = '{CPF_FEATS, NPF_FEATS, SV_FEATS};
  localparam int NFLAT = 25*8 + 25*4 + 4*8 + 15;

  logic clk = 0, rst_n = 0;
  logic blk_we = 0, g_we = 0, w_we = 0, b_we = 0, start = 0;
  logic [1:0] blk_lane = '0;
  logic [3:0] blk_idx = '0;
  fp32_t blk_data [BLK_ELEMS];
  logic [IDX_W-1:0] g_idx = '0, b_addr = '0;
  logic [LAYER_SEL_W-1:0] w_layer = '0, b_layer = '0;
  logic [WADDR_W-1:0] w_addr = '0;
  fp32_t g_data = '0, w_data = '0, b_data = '0;
  logic busy, done;
  fp32_t scores [4];

  int checks = 0, failures = 0;
  int n_blk_reads = 0, n_layer_passes = 0, n_flat_words = 0, n_waits = 0, n_jets = 0;
  int clamped = 0;

  llp_tagger_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, observed inside the design.
  always @(posedge clk) if (rst_n) begin
    n_blk_reads += int'(dut.u_cpf.st_rd_en) + int'(dut.u_npf.st_rd_en) + int'(dut.u_sv.st_rd_en);
    for (int l = 0; l < 4; l++)
      n_layer_passes += int'(dut.u_cpf.l_done[l]) + int'(dut.u_npf.l_done[l])
                      + int'(dut.u_sv.l_done[l])
                      + int'(dut.u_dense.l_ovld[l] && int'(dut.u_dense.l_ocol[l]) == DN[l] - 1);
    n_flat_words += int'(dut.fl_we);
    // A branch already finished while another is still running.
    if (dut.state == 2'd1 && dut.br_seen != 3'b000 && dut.br_busy != 3'b000) n_waits++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int conv_k(input int lane, input int l);
    if (l == 0) return LF[lane];
    case (lane)
      0: return CF[l-1];
      1: return NF[l-1];
      default: return SF[l-1];
    endcase
  endfunction

  function automatic int conv_n(input int lane, input int l);
    case (lane)
      0: return CF[l];
      1: return NF[l];
      default: return SF[l];
    endcase
  endfunction

  // Weights and biases of layer id 0..15.
  logic [31:0] W[16][], B[16][];

  initial begin
    logic [31:0] X[3][], Y[3][4][], G[], F[], D[4][];
    int K, N, n, expect_cycles, nbc, nbr, pos;
    for (int id = 0; id < 16; id++) begin
      if (id < 12) begin
        K = conv_k(id / 4, id % 4);
        N = conv_n(id / 4, id % 4);
      end else begin
        K = (id == 12) ? NFLAT : DN[id - 13];
        N = DN[id - 12];
      end
      W[id] = new[N * K];
      B[id] = new[N];
      foreach (W[id][i]) W[id][i] = rand_f(1.7 / $sqrt(real'(K)));
      foreach (B[id][i]) B[id][i] = rand_f(0.2);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int id = 0; id < 16; id++) begin
      foreach (W[id][i]) begin
        w_we <= 1; w_layer <= 4'(id); w_addr <= WADDR_W'(i); w_data <= W[id][i];
        @(posedge clk);
      end
      w_we <= 0;
      foreach (B[id][i]) begin
        b_we <= 1; b_layer <= 4'(id); b_addr <= IDX_W'(i); b_data <= B[id][i];
        @(posedge clk);
      end
      b_we <= 0;
    end

    for (int jet = 0; jet < 2; jet++) begin
      // Inputs and reference.
      for (int lane = 0; lane < 3; lane++) begin
        X[lane] = new[LR[lane] * LF[lane]];
        foreach (X[lane][i]) X[lane][i] = rand_f(2.0);
        layer_ref(LR[lane], LF[lane], conv_n(lane, 0), X[lane], W[lane*4], B[lane*4], Y[lane][0], 1'b1, clamped);
        for (int l = 1; l < 4; l++)
          layer_ref(LR[lane], conv_k(lane, l), conv_n(lane, l), Y[lane][l-1], W[lane*4 + l], B[lane*4 + l],
                    Y[lane][l], 1'b1, clamped);
      end
      G = new[15];
      foreach (G[i]) G[i] = rand_f(2.0);
      // Flattened vector: each branch object-major, then global words.
      F = new[NFLAT];
      pos = 0;
      for (int lane = 0; lane < 3; lane++)
        foreach (Y[lane][3][i]) F[pos++] = Y[lane][3][i];
      foreach (G[i]) F[pos++] = G[i];
      layer_ref(1, NFLAT, DN[0], F, W[12], B[12], D[0], 1'b1, clamped);
      for (int l = 1; l < 4; l++)
        layer_ref(1, DN[l-1], DN[l], D[l-1], W[12 + l], B[12 + l], D[l], l < 3, clamped);

      // Write the inputs.
      for (int lane = 0; lane < 3; lane++) begin
        nbc = (LF[lane] + 3) / 4;
        nbr = (LR[lane] + 15) / 16;
        for (int b = 0; b < nbr * nbc; b++) begin
          int r, c;
          blk_we <= 1; blk_lane <= 2'(lane); blk_idx <= 4'(b);
          for (int e = 0; e < BLK_ELEMS; e++) begin
            r = (b / nbc) * 16 + e / 4;
            c = (b % nbc) * 4 + e % 4;
            blk_data[e] <= (r < LR[lane] && c < LF[lane]) ? X[lane][r*LF[lane] + c] : 32'h0;
          end
          @(posedge clk);
        end
      end
      blk_we <= 0;
      foreach (G[i]) begin
        g_we <= 1; g_idx <= IDX_W'(i); g_data <= G[i];
        @(posedge clk);
      end
      g_we <= 0;

      start <= 1;
      @(posedge clk);
      start <= 0;
      n = 0;
      while (!done) begin
        @(posedge clk);
        n++;
      end
      n_jets++;
      // The charged branch is the longest: 6 cycles per block for its 10
      // blocks, then N*K + 4 per layer. Then one cycle to start the
      // flatten unit, 347 words, and two cycles until the first dense
      // layer has taken the last word; then N*K + 3 per dense layer, the
      // last including the registered done.
      expect_cycles = 6 * 10;
      for (int l = 0; l < 4; l++) expect_cycles += conv_n(0, l) * conv_k(0, l) + 4;
      expect_cycles += 1 + NFLAT + 2;
      for (int l = 0; l < 4; l++) expect_cycles += DN[l] * ((l == 0) ? NFLAT : DN[l-1]) + 3;
      check(n == expect_cycles, $sformatf("jet %0d took %0d cycles, expected %0d", jet, n, expect_cycles));
      for (int c = 0; c < 4; c++)
        check(same(scores[c], D[3][c]), $sformatf("jet %0d score %0d %h vs %h", jet, c, scores[c], D[3][c]));
      $display("jet %0d: %0d cycles, scores %h %h %h %h", jet, n, scores[0], scores[1], scores[2], scores[3]);
      @(posedge clk);
      check(!busy, "idle after done");
    end

    $display("mechanisms: block reads %0d, layer passes %0d, ReLU clamps %0d, flatten words %0d, branch waits %0d, jets %0d",
             n_blk_reads, n_layer_passes, clamped, n_flat_words, n_waits, n_jets);
    check(n_blk_reads == 2 * (10 + 4 + 3), "every input block read once per jet");
    check(n_layer_passes == 2 * 16, "16 layer passes per jet");
    check(clamped > 0, "ReLU clamping happened");
    check(n_flat_words == 2 * NFLAT, "flatten hand-over of 347 words per jet");
    check(n_waits > 0, "a finished branch waited for the others");
    check(n_jets == 2, "second jet ran on wrapped weight RAMs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
