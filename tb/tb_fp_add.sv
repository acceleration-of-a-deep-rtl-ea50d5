// tb_fp_add: checks the single precision adder against double precision
// reference arithmetic, with operands chosen to exercise alignment shifts,
// cancellation, carry-out and signed zeros.
module tb_fp_add;
  import tb_fp_pkg::*;

  logic [31:0] a, b, s;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .s(s));

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp_s;
    a = x;
    b = y;
    #1;
    exp_s = fadd_ref(x, y);
    checks++;
    if (!same(s, exp_s)) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", x, y, s, exp_s);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x;
    check(32'h3f800000, 32'h40000000);  // 1 + 2
    check(32'h3f800000, 32'hbf800000);  // 1 - 1
    check(32'h80000000, 32'h80000000);  // -0 + -0
    check(32'h3f800000, 32'h33800000);  // 1 + 2^-24 (tie)
    check(32'h3f800001, 32'h33800000);  // tie, odd
    check(32'h3f800000, 32'hb3800000);  // 1 - 2^-24
    check(32'h7f000000, 32'h7f000000);  // overflow
    for (int i = 0; i < 20000; i++) check(rand_bits(100, 150), rand_bits(100, 150));
    for (int i = 0; i < 20000; i++) begin
      // Close magnitudes: heavy cancellation.
      x = rand_bits(110, 140);
      check(x, {~x[31], x[30:0]} ^ 32'($urandom % 64));
    end
    for (int i = 0; i < 5000; i++) begin
      x = rand_bits(110, 140);
      check(x, {1'($urandom), 8'(int'(x[30:23]) - int'($urandom % 30)), 23'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
