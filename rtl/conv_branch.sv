// conv_branch: the convolution tower of one input type (charged or neutral
// particle-flow candidates, or secondary vertices).
//
// The input feature matrix (ROWS objects x FEATS features) is written as
// 16x4 blocks into an elementwise_store. On `start`, a loader reads the
// blocks one by one and copies each, one column per cycle, into the input
// RAMs of the first layer. Four 1-D convolution layers with kernel size 1
// follow, each a column_mac_array with one MAC unit per object; FILTERS
// gives their filter counts. Each output column of a layer goes through a
// ReLU and is written straight into the next layer's input RAMs, so a layer
// starts as soon as the one before it is done. The last layer's columns,
// also after ReLU, leave on out_valid/out_col/out_data. The ReLU activation
// and the layer-by-layer sequencing are this design's choices.
//
// Weight and bias load: w_layer/b_layer select the layer (0..3); addresses
// as in column_mac_array (W[j][k] at j*K + k).
// Timing: loading takes 6 cycles per block; layer l then takes
// FILTERS[l]*K_l + 3 cycles plus one cycle to hand over. `done` pulses
// with the last output column.
module conv_branch
  import llp_pkg::*;
#(
  parameter int ROWS = 25,
  parameter int FEATS = 17,
  parameter int FILTERS [CONV_LAYERS] = '{64, 32, 32, 8},
  localparam int NBR = (ROWS + BLK_ROWS - 1) / BLK_ROWS,
  localparam int NBC = (FEATS + BLK_COLS - 1) / BLK_COLS,
  localparam int NBLK = NBR * NBC,
  localparam int BW = (NBLK > 1) ? $clog2(NBLK) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // Input feature blocks.
  input  logic               blk_we,
  input  logic [BW-1:0]      blk_idx,
  input  fp32_t              blk_data [BLK_ELEMS],
  // Weight and bias load.
  input  logic               w_we,
  input  logic [1:0]         w_layer,
  input  logic [WADDR_W-1:0] w_addr,
  input  fp32_t              w_data,
  input  logic               b_we,
  input  logic [1:0]         b_layer,
  input  logic [IDX_W-1:0]   b_addr,
  input  fp32_t              b_data,
  // Control.
  input  logic               start,
  output logic               busy,
  output logic               done,
  // Output of the last layer, one column per pulse.
  output logic               out_valid,
  output logic [IDX_W-1:0]   out_col,
  output fp32_t              out_data [ROWS]
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_WAIT, S_WR, S_RUN} state_t;
  state_t state;

  logic [BW-1:0]  blk_cnt;
  logic [1:0]     c_cnt;
  logic [$clog2(NBR+1)-1:0] rb;
  logic [$clog2(NBC+1)-1:0] cb;

  logic          st_rd_en;
  logic          st_rd_valid;
  fp32_t         st_rd_data [BLK_ELEMS];

  // Per-layer streams.
  logic                l_start [CONV_LAYERS];
  logic                l_busy  [CONV_LAYERS];
  logic                l_done  [CONV_LAYERS];
  logic                l_ovld  [CONV_LAYERS];
  logic [IDX_W-1:0]    l_ocol  [CONV_LAYERS];
  fp32_t               l_odata [CONV_LAYERS][ROWS];
  logic                l_xwe   [CONV_LAYERS];
  logic [IDX_W-1:0]    l_xcol  [CONV_LAYERS];
  logic [ROWS-1:0]     l_xen   [CONV_LAYERS];
  fp32_t               l_xdata [CONV_LAYERS][ROWS];

  elementwise_store #(.ROWS(ROWS), .COLS(FEATS)) u_store (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (blk_we),
    .wr_blk   (blk_idx),
    .wr_data  (blk_data),
    .rd_en    (st_rd_en),
    .rd_blk   (blk_cnt),
    .rd_valid (st_rd_valid),
    .rd_data  (st_rd_data)
  );

  assign st_rd_en = (state == S_RD);

  // Loader and layer sequencer.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      blk_cnt <= '0;
      c_cnt   <= '0;
      rb      <= '0;
      cb      <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state   <= S_RD;
          blk_cnt <= '0;
          rb      <= '0;
          cb      <= '0;
        end
        S_RD:   state <= S_WAIT;
        S_WAIT: if (st_rd_valid) begin
          state <= S_WR;
          c_cnt <= '0;
        end
        S_WR: begin
          c_cnt <= c_cnt + 2'd1;
          if (c_cnt == 2'd3) begin
            if (blk_cnt == BW'(NBLK - 1)) begin
              state <= S_RUN;
            end else begin
              state   <= S_RD;
              blk_cnt <= blk_cnt + BW'(1);
              if (cb == ($bits(cb))'(NBC - 1)) begin
                cb <= '0;
                rb <= rb + 1'b1;
              end else begin
                cb <= cb + 1'b1;
              end
            end
          end
        end
        S_RUN: if (l_done[CONV_LAYERS-1]) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // First layer input: the block just read, one column per cycle.
  always_comb begin
    l_xwe[0]  = (state == S_WR);
    l_xcol[0] = IDX_W'(cb * BLK_COLS + c_cnt);
    for (int r = 0; r < ROWS; r++) begin
      l_xen[0][r]   = ((r / BLK_ROWS) == int'(rb)) &&
                      (int'(cb) * BLK_COLS + int'(c_cnt) < FEATS);
      l_xdata[0][r] = st_rd_data[(r % BLK_ROWS) * BLK_COLS + int'(c_cnt)];
    end
  end

  // Layer l+1 takes layer l's output columns through a ReLU.
  for (genvar l = 1; l < CONV_LAYERS; l++) begin : g_chain
    always_comb begin
      l_xwe[l]  = l_ovld[l-1];
      l_xcol[l] = l_ocol[l-1];
      l_xen[l]  = '1;
      for (int r = 0; r < ROWS; r++) l_xdata[l][r] = fp_relu(l_odata[l-1][r]);
    end
  end

  // Start layer 0 when loading ends, layer l+1 when layer l is done.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < CONV_LAYERS; l++) l_start[l] <= 1'b0;
    end else begin
      l_start[0] <= (state == S_WR) && (c_cnt == 2'd3) && (blk_cnt == BW'(NBLK - 1));
      for (int l = 1; l < CONV_LAYERS; l++) l_start[l] <= l_done[l-1];
    end
  end

  for (genvar l = 0; l < CONV_LAYERS; l++) begin : g_layer
    localparam int KL = (l == 0) ? FEATS : FILTERS[(l == 0) ? 0 : l - 1];
    localparam int NL = FILTERS[l];

    column_mac_array #(.ROWS(ROWS), .K(KL), .N(NL)) u_layer (
      .clk       (clk),
      .rst_n     (rst_n),
      .w_we      (w_we && (w_layer == 2'(l))),
      .w_addr    (w_addr),
      .w_data    (w_data),
      .b_we      (b_we && (b_layer == 2'(l))),
      .b_addr    (b_addr),
      .b_data    (b_data),
      .x_we      (l_xwe[l]),
      .x_col     (l_xcol[l]),
      .x_row_en  (l_xen[l]),
      .x_data    (l_xdata[l]),
      .start     (l_start[l]),
      .busy      (l_busy[l]),
      .done      (l_done[l]),
      .out_valid (l_ovld[l]),
      .out_col   (l_ocol[l]),
      .out_data  (l_odata[l])
    );
  end

  always_comb begin
    busy = (state != S_IDLE);
    for (int l = 0; l < CONV_LAYERS; l++) busy = busy | l_busy[l];
  end

  assign done      = l_done[CONV_LAYERS-1];
  assign out_valid = l_ovld[CONV_LAYERS-1];
  assign out_col   = l_ocol[CONV_LAYERS-1];
  always_comb begin
    for (int r = 0; r < ROWS; r++) out_data[r] = fp_relu(l_odata[CONV_LAYERS-1][r]);
  end

endmodule
