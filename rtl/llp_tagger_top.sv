// llp_tagger_top: forward inference of the long-lived-particle jet tagging
// network for one jet at a time.
//
// Three convolution branches run in parallel, one per input type: 25
// charged candidates x 17 features (filters 64, 32, 32, 8), 25 neutral
// candidates x 6 features (32, 16, 16, 4) and 4 secondary vertices x 12
// features (32, 16, 16, 8). Each branch has one MAC unit per object in
// every layer. When all three are done, the flatten unit builds the
// 347-word vector (332 flattened branch outputs, 14 global features, the
// decay length) and streams it word by word into the dense stack (200,
// 100, 100 nodes and a 4-node output layer, each a single-MAC kernel), whose four outputs are the class scores
// (LLP, heavy-flavour, light-flavour and gluon jet).
//
// Interface:
//   * blk_we/blk_lane/blk_idx/blk_data: write one 16x4 block of the input
//     matrix of lane 0 (charged), 1 (neutral) or 2 (secondary vertices);
//     element (r, c) of the block at blk_data[r*4 + c], block index
//     row-major over the block grid.
//   * g_we/g_idx/g_data: global feature g_idx (0..13) or the decay length
//     (g_idx 14).
//   * w_we/w_layer/w_addr/w_data and b_we/b_layer/b_addr/b_data: load the
//     weights W[j][k] (address j*K + k) and biases b[j] of layer w_layer:
//     0-3 charged branch, 4-7 neutral branch, 8-11 vertex branch, 12-15
//     dense layers.
//   * start: run the network on the loaded inputs; busy while running;
//     done pulses when `scores` holds the four class scores.
// All values are IEEE-754 single precision. Inputs and weights must not be
// changed while busy.
// Timing at the default sizes: the charged branch is the longest
// (4416 MAC cycles plus loading and pipeline), then 347 cycles of flatten
// hand-over and 99,800 MAC cycles of dense layers: 104,654 cycles from
// start to done.
module llp_tagger_top
  import llp_pkg::*;
#(
  parameter int CPF_FILTERS [CONV_LAYERS] = '{64, 32, 32, 8},
  parameter int NPF_FILTERS [CONV_LAYERS] = '{32, 16, 16, 4},
  parameter int SV_FILTERS  [CONV_LAYERS] = '{32, 16, 16, 8},
  parameter int DENSE_NODES [DENSE_LAYERS] = '{200, 100, 100, N_CLASSES},
  localparam int NOUT = DENSE_NODES[DENSE_LAYERS-1],
  localparam int FLAT = CPF_ROWS * CPF_FILTERS[CONV_LAYERS-1]
                      + NPF_ROWS * NPF_FILTERS[CONV_LAYERS-1]
                      + SV_ROWS * SV_FILTERS[CONV_LAYERS-1]
                      + GLOBAL_FEATS + CTAU_FEATS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   blk_we,
  input  logic [1:0]             blk_lane,
  input  logic [3:0]             blk_idx,
  input  fp32_t                  blk_data [BLK_ELEMS],
  input  logic                   g_we,
  input  logic [IDX_W-1:0]       g_idx,
  input  fp32_t                  g_data,
  input  logic                   w_we,
  input  logic [LAYER_SEL_W-1:0] w_layer,
  input  logic [WADDR_W-1:0]     w_addr,
  input  fp32_t                  w_data,
  input  logic                   b_we,
  input  logic [LAYER_SEL_W-1:0] b_layer,
  input  logic [IDX_W-1:0]       b_addr,
  input  fp32_t                  b_data,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output fp32_t                  scores [NOUT]
);

  localparam int CPF_BW = $clog2(((CPF_ROWS + 15) / 16) * ((CPF_FEATS + 3) / 4));
  localparam int NPF_BW = $clog2(((NPF_ROWS + 15) / 16) * ((NPF_FEATS + 3) / 4));
  localparam int SV_BW  = $clog2(((SV_ROWS + 15) / 16) * ((SV_FEATS + 3) / 4));

  typedef enum logic [1:0] {T_IDLE, T_CONV, T_FLAT, T_DENSE} top_state_t;
  top_state_t state;

  logic [2:0] br_busy, br_done, br_seen;
  logic       br_start;

  logic             o_valid [3];
  logic [IDX_W-1:0] o_col   [3];
  fp32_t            cpf_out [CPF_ROWS];
  fp32_t            npf_out [NPF_ROWS];
  fp32_t            sv_out  [SV_ROWS];

  logic             fl_start, fl_busy, fl_done, fl_we;
  fp32_t            fl_data;
  logic             dn_busy, dn_done;

  assign br_start = start && (state == T_IDLE);

  conv_branch #(.ROWS(CPF_ROWS), .FEATS(CPF_FEATS), .FILTERS(CPF_FILTERS)) u_cpf (
    .clk (clk), .rst_n (rst_n),
    .blk_we (blk_we && blk_lane == 2'd0), .blk_idx (CPF_BW'(blk_idx)), .blk_data (blk_data),
    .w_we (w_we && w_layer[3:2] == 2'd0), .w_layer (w_layer[1:0]), .w_addr (w_addr), .w_data (w_data),
    .b_we (b_we && b_layer[3:2] == 2'd0), .b_layer (b_layer[1:0]), .b_addr (b_addr), .b_data (b_data),
    .start (br_start), .busy (br_busy[0]), .done (br_done[0]),
    .out_valid (o_valid[0]), .out_col (o_col[0]), .out_data (cpf_out)
  );

  conv_branch #(.ROWS(NPF_ROWS), .FEATS(NPF_FEATS), .FILTERS(NPF_FILTERS)) u_npf (
    .clk (clk), .rst_n (rst_n),
    .blk_we (blk_we && blk_lane == 2'd1), .blk_idx (NPF_BW'(blk_idx)), .blk_data (blk_data),
    .w_we (w_we && w_layer[3:2] == 2'd1), .w_layer (w_layer[1:0]), .w_addr (w_addr), .w_data (w_data),
    .b_we (b_we && b_layer[3:2] == 2'd1), .b_layer (b_layer[1:0]), .b_addr (b_addr), .b_data (b_data),
    .start (br_start), .busy (br_busy[1]), .done (br_done[1]),
    .out_valid (o_valid[1]), .out_col (o_col[1]), .out_data (npf_out)
  );

  conv_branch #(.ROWS(SV_ROWS), .FEATS(SV_FEATS), .FILTERS(SV_FILTERS)) u_sv (
    .clk (clk), .rst_n (rst_n),
    .blk_we (blk_we && blk_lane == 2'd2), .blk_idx (SV_BW'(blk_idx)), .blk_data (blk_data),
    .w_we (w_we && w_layer[3:2] == 2'd2), .w_layer (w_layer[1:0]), .w_addr (w_addr), .w_data (w_data),
    .b_we (b_we && b_layer[3:2] == 2'd2), .b_layer (b_layer[1:0]), .b_addr (b_addr), .b_data (b_data),
    .start (br_start), .busy (br_busy[2]), .done (br_done[2]),
    .out_valid (o_valid[2]), .out_col (o_col[2]), .out_data (sv_out)
  );

  flatten_unit #(
    .R0 (CPF_ROWS), .F0 (CPF_FILTERS[CONV_LAYERS-1]),
    .R1 (NPF_ROWS), .F1 (NPF_FILTERS[CONV_LAYERS-1]),
    .R2 (SV_ROWS),  .F2 (SV_FILTERS[CONV_LAYERS-1])
  ) u_flat (
    .clk (clk), .rst_n (rst_n),
    .in0_valid (o_valid[0]), .in0_col (o_col[0]), .in0_data (cpf_out),
    .in1_valid (o_valid[1]), .in1_col (o_col[1]), .in1_data (npf_out),
    .in2_valid (o_valid[2]), .in2_col (o_col[2]), .in2_data (sv_out),
    .g_we (g_we), .g_idx (g_idx), .g_data (g_data),
    .start (fl_start), .busy (fl_busy), .done (fl_done),
    .out_we (fl_we), .out_idx (), .out_data (fl_data)
  );

  dense_stack #(.IN(FLAT), .NODES(DENSE_NODES)) u_dense (
    .clk (clk), .rst_n (rst_n),
    .x_we (fl_we), .x_data (fl_data),
    .w_we (w_we && w_layer[3:2] == 2'd3), .w_layer (w_layer[1:0]), .w_addr (w_addr), .w_data (w_data),
    .b_we (b_we && b_layer[3:2] == 2'd3), .b_layer (b_layer[1:0]), .b_addr (b_addr), .b_data (b_data),
    .busy (dn_busy), .done (dn_done),
    .scores (scores)
  );

  // Sequencer: branches in parallel, then flatten, then dense layers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      br_seen  <= '0;
      fl_start <= 1'b0;
    end else begin
      fl_start <= 1'b0;
      case (state)
        T_IDLE: if (start) begin
          state   <= T_CONV;
          br_seen <= '0;
        end
        T_CONV: begin
          br_seen <= br_seen | br_done;
          if ((br_seen | br_done) == 3'b111) begin
            state    <= T_FLAT;
            fl_start <= 1'b1;
          end
        end
        T_FLAT:  if (fl_done) state <= T_DENSE;
        T_DENSE: if (dn_done) state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  assign busy = (state != T_IDLE) | (|br_busy) | fl_busy | dn_busy;
  assign done = dn_done;

endmodule
