// tb_fp_mul: checks the single precision multiplier against double
// precision reference arithmetic on special cases and random operands.
module tb_fp_mul;
  import tb_fp_pkg::*;

  logic [31:0] a, b, p;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp_p;
    a = x;
    b = y;
    #1;
    exp_p = fmul_ref(x, y);
    checks++;
    if (!same(p, exp_p)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3f800000, 32'h40000000);  // 1 * 2
    check(32'hbfc00000, 32'h3fc00000);  // -1.5 * 1.5
    check(32'h00000000, 32'h40490fdb);  // 0 * pi
    check(32'h3f800001, 32'h3f800001);  // rounding near 1
    check(32'h3fffffff, 32'h3fffffff);  // carry out of rounding
    for (int i = 0; i < 20000; i++) check(rand_bits(64, 190), rand_bits(64, 190));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
