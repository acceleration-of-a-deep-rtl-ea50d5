// tb_flatten_unit: feeds column streams of three branch outputs (25x8,
// 25x4, 4x8) and 15 global words, then checks that the serial output
// carries the 347-word vector in flattened order (object-major per
// branch, branches in order, then the global words), one word per cycle,
// with done on the last word.
module tb_flatten_unit;
  import llp_pkg::*;
  import tb_fp_pkg::*;

  localparam int R0 = 25, F0 = 8, R1 = 25, F1 = 4, R2 = 4, F2 = 8, NG = 15;
  localparam int TOTAL = R0*F0 + R1*F1 + R2*F2 + NG;

  logic clk = 0, rst_n = 0;
  logic in0_valid = 0, in1_valid = 0, in2_valid = 0, g_we = 0, start = 0;
  logic [IDX_W-1:0] in0_col = '0, in1_col = '0, in2_col = '0, g_idx = '0, out_idx;
  fp32_t in0_data [R0];
  fp32_t in1_data [R1];
  fp32_t in2_data [R2];
  fp32_t g_data = '0, out_data;
  logic busy, done, out_we;
  fp32_t expv [TOTAL];
  int checks = 0, failures = 0;

  flatten_unit #(.R0(R0), .F0(F0), .R1(R1), .F1(F1), .R2(R2), .F2(F2), .NG(NG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  initial begin
    int n, prev;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Columns arrive in a different order per branch, some overlapping.
    for (int j = 0; j < F0; j++) begin
      in0_valid <= 1; in0_col <= IDX_W'(F0 - 1 - j);
      for (int p = 0; p < R0; p++) begin
        in0_data[p] <= rand_f(1.0);
      end
      if (j < F1) begin
        in1_valid <= 1; in1_col <= IDX_W'(j);
        for (int p = 0; p < R1; p++) in1_data[p] <= rand_f(1.0);
      end else in1_valid <= 0;
      in2_valid <= 1; in2_col <= IDX_W'(j);
      for (int p = 0; p < R2; p++) in2_data[p] <= rand_f(1.0);
      @(posedge clk);
      // Record what was written.
      for (int p = 0; p < R0; p++) expv[p*F0 + int'(in0_col)] = in0_data[p];
      if (in1_valid) for (int p = 0; p < R1; p++) expv[R0*F0 + p*F1 + int'(in1_col)] = in1_data[p];
      for (int p = 0; p < R2; p++) expv[R0*F0 + R1*F1 + p*F2 + int'(in2_col)] = in2_data[p];
    end
    in0_valid <= 0; in1_valid <= 0; in2_valid <= 0;
    for (int g = 0; g < NG; g++) begin
      g_we <= 1; g_idx <= IDX_W'(g); g_data <= rand_f(3.0);
      @(posedge clk);
      expv[TOTAL - NG + int'(g_idx)] = g_data;
    end
    g_we <= 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    n = 0;
    prev = -1;
    while (n < TOTAL) begin
      @(posedge clk);
      if (out_we) begin
        check(int'(out_idx) == prev + 1, "consecutive indices");
        check(out_data == expv[out_idx], $sformatf("word %0d %h vs %h", out_idx, out_data, expv[out_idx]));
        check(done == (int'(out_idx) == TOTAL - 1), "done with the last word");
        prev = int'(out_idx);
        n++;
      end else if (n > 0) begin
        check(0, "gap in the output stream");
        n++;
      end
    end
    @(posedge clk);
    check(!out_we && !busy, "stream ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
