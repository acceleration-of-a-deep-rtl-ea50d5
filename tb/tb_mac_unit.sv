// tb_mac_unit: feeds dot products of random lengths back to back through
// the MAC unit and checks each sum (bias plus products, accumulated in
// order with single precision rounding) and that it appears two cycles
// after its last operand pair.
module tb_mac_unit;
  import llp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  fp32_t x = '0, w = '0, bias = '0;
  logic out_valid;
  fp32_t acc;
  int checks = 0, failures = 0;
  int cycle = 0;
  fp32_t exp_q [$];
  int    exp_t [$];

  mac_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        fp32_t e;
        int t;
        e = exp_q.pop_front();
        t = exp_t.pop_front();
        if (!same(acc, e)) begin
          failures++;
          $display("FAIL acc %h expected %h", acc, e);
        end
        checks++;
        // The pair driven in cycle t is sampled at the next edge; the sum
        // is registered two edges later and seen here one edge after that.
        if (cycle != t + 3) begin
          failures++;
          $display("FAIL latency: out at %0d, last pair at %0d", cycle, t);
        end
      end
    end
  end

  initial begin
    fp32_t s, b;
    int len;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int d = 0; d < 300; d++) begin
      len = 1 + int'($urandom % 20);
      b = rand_f(2.0);
      s = b;
      for (int k = 0; k < len; k++) begin
        fp32_t xv, wv;
        xv = rand_f(4.0);
        wv = rand_f(1.0);
        s = fadd_ref(s, fmul_ref(xv, wv));
        in_valid <= 1;
        in_first <= (k == 0);
        in_last  <= (k == len - 1);
        x <= xv;
        w <= wv;
        bias <= (k == 0) ? b : rand_f(9.0);
        if (k == len - 1) begin
          exp_q.push_back(s);
          exp_t.push_back(cycle);
        end
        @(posedge clk);
        // Occasional bubble inside a dot product.
        if ($urandom % 5 == 0) begin
          in_valid <= 0; in_first <= 0; in_last <= 0;
          @(posedge clk);
        end
      end
    end
    in_valid <= 0; in_first <= 0; in_last <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d sums never appeared", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
