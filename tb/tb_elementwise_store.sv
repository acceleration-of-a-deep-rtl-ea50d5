// tb_elementwise_store: stores a 25x17 matrix as ten 16x4 blocks and checks
// that every block reads back whole from one block index, in any order,
// that a block rewritten in one cycle is read back new by a read in the
// next (update plus read-out in two cycles), and that element (r, c) of
// each block sits in RAM r*4 + c at the block's address.
module tb_elementwise_store;
  import llp_pkg::*;
  import tb_fp_pkg::*;

  localparam int ROWS = 25, COLS = 17;
  localparam int NBC = (COLS + 3) / 4, NBR = (ROWS + 15) / 16, NBLK = NBR * NBC;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, rd_valid;
  logic [3:0] wr_blk = '0, rd_blk = '0;
  fp32_t wr_data [BLK_ELEMS];
  fp32_t rd_data [BLK_ELEMS];
  fp32_t M [NBR*16][NBC*4];
  int checks = 0, failures = 0;

  elementwise_store #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

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

  task automatic write_block(input int b);
    int rb, cb;
    rb = b / NBC;
    cb = b % NBC;
    wr_en  <= 1;
    wr_blk <= 4'(b);
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 4; c++) wr_data[r*4 + c] <= M[rb*16 + r][cb*4 + c];
  endtask

  task automatic check_block(input int b);
    int rb, cb;
    rb = b / NBC;
    cb = b % NBC;
    check(rd_valid, "read valid");
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 4; c++)
        check(rd_data[r*4 + c] == M[rb*16 + r][cb*4 + c],
              $sformatf("block %0d element (%0d,%0d)", b, r, c));
  endtask

  initial begin
    int order [NBLK];
    // Matrix, zero padded outside 25x17.
    for (int r = 0; r < NBR*16; r++)
      for (int c = 0; c < NBC*4; c++)
        M[r][c] = (r < ROWS && c < COLS) ? rand_f(5.0) : 32'h0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NBLK; b++) begin
      write_block(b);
      @(posedge clk);
    end
    wr_en <= 0;
    // Read back in a shuffled order.
    for (int b = 0; b < NBLK; b++) order[b] = b;
    order.shuffle();
    foreach (order[i]) begin
      rd_en <= 1; rd_blk <= 4'(order[i]);
      @(posedge clk);
      rd_en <= 0;
      @(posedge clk);
      check_block(order[i]);
    end
    // Element placement: RAM r*4+c, address b.
    check(dut.g_ram[1*4 + 2].mem[7] == M[16 + 1][2*4 + 2], "RAM 6 address 7 holds (17,10)");
    // Update then read in consecutive cycles: two cycles to fresh data.
    for (int n = 0; n < 20; n++) begin
      int b;
      b = int'($urandom % NBLK);
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 4; c++)
          if (b / NBC * 16 + r < ROWS && b % NBC * 4 + c < COLS) M[b / NBC * 16 + r][b % NBC * 4 + c] = rand_f(5.0);
      write_block(b);
      @(posedge clk);
      wr_en <= 0;
      rd_en <= 1; rd_blk <= 4'(b);
      @(posedge clk);
      rd_en <= 0;
      #1;
      check_block(b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
