// elementwise_store: block marshalling buffer that stores a matrix in 64
// RAMs, one per element position of a 16x4 block.
//
// The matrix (ROWS x COLS, zero padded up to whole 16x4 blocks) is cut
// into blocks numbered row-major over the block grid: block index
// b = rb * NBC + cb covers matrix rows 16*rb..16*rb+15 and columns
// 4*cb..4*cb+3. Element (r, c) of every block is kept in RAM number
// r*4 + c, at address b. A whole block is therefore written or read by
// presenting the same address, the block index, to all 64 RAMs at once:
// no address arithmetic, and the number of RAMs does not depend on the
// matrix size, only their depth (NBLK words) does. The block numbering
// order is this design's choice.
//
// Interface: wr_en writes the 64 words of wr_data (element r*4 + c at
// index r*4 + c) as block wr_blk. rd_en reads block rd_blk into rd_data,
// valid (rd_valid) in the next cycle; rd_data holds until the next read.
// Timing: a block written in one cycle can be read back by a read issued
// in the next cycle, so update plus read-out takes two cycles.
module elementwise_store
  import llp_pkg::*;
#(
  parameter int ROWS = 25,
  parameter int COLS = 17,
  localparam int NBR = (ROWS + BLK_ROWS - 1) / BLK_ROWS,
  localparam int NBC = (COLS + BLK_COLS - 1) / BLK_COLS,
  localparam int NBLK = NBR * NBC,
  localparam int BW = (NBLK > 1) ? $clog2(NBLK) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [BW-1:0] wr_blk,
  input  fp32_t         wr_data [BLK_ELEMS],
  input  logic          rd_en,
  input  logic [BW-1:0] rd_blk,
  output logic          rd_valid,
  output fp32_t         rd_data [BLK_ELEMS]
);

  for (genvar e = 0; e < BLK_ELEMS; e++) begin : g_ram
    fp32_t mem [NBLK];

    always_ff @(posedge clk) begin
      if (wr_en) mem[wr_blk] <= wr_data[e];
    end

    always_ff @(posedge clk) begin
      if (!rst_n)     rd_data[e] <= FP32_ZERO;
      else if (rd_en) rd_data[e] <= mem[rd_blk];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

endmodule
