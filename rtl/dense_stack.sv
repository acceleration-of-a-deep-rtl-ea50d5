// dense_stack: the fully connected layers that follow the flattened
// convolution outputs.
//
// A dense layer has a single input row (one jet), so each layer is one
// single-MAC kernel (mac_kernel): the input vector is streamed in one word
// per cycle into its cyclic input RAM, then repeated against every weight
// row of its cyclic weight RAM, giving one output node every K cycles.
// The output nodes of layer l, in order, are exactly the input words of
// layer l+1, so they are passed on through a ReLU as they appear, and
// layer l+1 starts by itself once its last input word has arrived. The
// last layer has no activation; its NODES[DENSE_LAYERS-1] outputs are the
// class scores, captured in `scores`. The ReLU, the absence of an
// activation after the last layer and the four-node output layer are this
// design's choices.
//
// Interface: x_we/x_data stream the IN input words in order (word 0 first);
// the last one starts the first layer. Weights and biases load as in
// mac_kernel (W[j][k] at j*K + k) with w_layer/b_layer = 0..3.
// Timing: a layer starts issuing in the cycle after its last input word,
// issues N*K multiplies, and its last output reaches the next layer three
// cycles after its last multiply, so consecutive layers' last input words
// are N*K + 3 cycles apart. `done` pulses one cycle after the last score
// is valid. busy is high from the first input word until done.
module dense_stack
  import llp_pkg::*;
#(
  parameter int IN = 347,
  parameter int NODES [DENSE_LAYERS] = '{200, 100, 100, 4},
  localparam int NOUT = NODES[DENSE_LAYERS-1],
  localparam int SW = (NOUT > 1) ? $clog2(NOUT) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               x_we,
  input  fp32_t              x_data,
  input  logic               w_we,
  input  logic [1:0]         w_layer,
  input  logic [WADDR_W-1:0] w_addr,
  input  fp32_t              w_data,
  input  logic               b_we,
  input  logic [1:0]         b_layer,
  input  logic [IDX_W-1:0]   b_addr,
  input  fp32_t              b_data,
  output logic               busy,
  output logic               done,
  output fp32_t              scores [NOUT]
);

  logic             l_ovld  [DENSE_LAYERS];
  logic [IDX_W-1:0] l_ocol  [DENSE_LAYERS];
  fp32_t            l_odata [DENSE_LAYERS];
  logic             l_ivld  [DENSE_LAYERS];
  fp32_t            l_idata [DENSE_LAYERS];

  always_comb begin
    l_ivld[0]  = x_we;
    l_idata[0] = x_data;
    for (int l = 1; l < DENSE_LAYERS; l++) begin
      l_ivld[l]  = l_ovld[l-1];
      l_idata[l] = fp_relu(l_odata[l-1]);
    end
  end

  for (genvar l = 0; l < DENSE_LAYERS; l++) begin : g_layer
    localparam int KL = (l == 0) ? IN : NODES[(l == 0) ? 0 : l - 1];
    localparam int NL = NODES[l];
    localparam int NW = (NL > 1) ? $clog2(NL) : 1;
    localparam int WW = (NL * KL > 1) ? $clog2(NL * KL) : 1;
    logic [NW-1:0] col;

    mac_kernel #(.K(KL), .N(NL), .ROWS_IN(1)) u_layer (
      .clk       (clk),
      .rst_n     (rst_n),
      .w_we      (w_we && (w_layer == 2'(l))),
      .w_addr    (WW'(w_addr)),
      .w_data    (w_data),
      .b_we      (b_we && (b_layer == 2'(l))),
      .b_addr    (NW'(b_addr)),
      .b_data    (b_data),
      .in_valid  (l_ivld[l]),
      .in_ready  (),
      .in_data   (l_idata[l]),
      .out_valid (l_ovld[l]),
      .out_row   (),
      .out_col   (col),
      .out_data  (l_odata[l])
    );

    assign l_ocol[l] = IDX_W'(col);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NOUT; n++) scores[n] <= FP32_ZERO;
      done <= 1'b0;
      busy <= 1'b0;
    end else begin
      if (l_ovld[DENSE_LAYERS-1])
        scores[SW'(l_ocol[DENSE_LAYERS-1])] <= l_odata[DENSE_LAYERS-1];
      done <= l_ovld[DENSE_LAYERS-1] && (l_ocol[DENSE_LAYERS-1] == IDX_W'(NOUT - 1));
      if (x_we) busy <= 1'b1;
      else if (done) busy <= 1'b0;
    end
  end

endmodule
