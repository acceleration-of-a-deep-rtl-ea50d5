// tb_cyclic_ram: loads a 5-word cyclic RAM and checks that reads come out
// in order, wrap from the last word to the first, hold when not advanced,
// and start again at word 0 after a restart.
module tb_cyclic_ram;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic we = 0, restart = 0, advance = 0;
  logic [2:0] waddr = '0, raddr;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;
  int expect_idx;

  cyclic_ram #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom;
      @(posedge clk);
      we <= 1; waddr <= 3'(i); wdata <= model[i];
    end
    @(posedge clk);
    we <= 0;
    check(raddr == 0, "counter starts at 0");
    expect_idx = 0;
    for (int n = 0; n < 3 * DEPTH + 2; n++) begin
      advance <= 1;
      @(posedge clk);
      advance <= 0;
      #1;
      check(rdata == model[expect_idx], $sformatf("read %0d", n));
      expect_idx = (expect_idx + 1) % DEPTH;
      check(int'(raddr) == expect_idx, "counter wraps");
      // Idle cycle: output holds.
      @(posedge clk);
      #1;
      check(rdata == model[(expect_idx + DEPTH - 1) % DEPTH], "holds");
    end
    restart <= 1;
    @(posedge clk);
    restart <= 0;
    advance <= 1;
    @(posedge clk);
    advance <= 0;
    #1;
    check(rdata == model[0], "restart reads word 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
