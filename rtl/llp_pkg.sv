// llp_pkg: types and network dimensions shared by the LLP jet tagger RTL.
//
// All datapath values are IEEE-754 single precision words (fp32_t). The
// network dimensions below are those of the forward-inference graph: three
// per-particle input types pass through four 1-D convolution layers each
// (kernel size 1, i.e. a matrix product per particle), are flattened,
// concatenated with the global features and the LLP decay length, and go
// through a stack of dense layers. The four-node output layer is this
// design's choice: the graph names four target classes but draws only the
// three hidden dense layers.
package llp_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP32_ZERO = 32'h0000_0000;

  // Block geometry of the block marshalling store and convolution kernel.
  localparam int BLK_ROWS = 16;
  localparam int BLK_COLS = 4;
  localparam int BLK_ELEMS = BLK_ROWS * BLK_COLS;  // 64 RAMs

  // Number of conv layers per input branch.
  localparam int CONV_LAYERS = 4;

  // Charged particle-flow candidates: 25 particles x 17 features.
  localparam int CPF_ROWS = 25;
  localparam int CPF_FEATS = 17;
  // Neutral particle-flow candidates: 25 particles x 6 features.
  localparam int NPF_ROWS = 25;
  localparam int NPF_FEATS = 6;
  // Secondary vertices: 4 vertices x 12 features.
  localparam int SV_ROWS = 4;
  localparam int SV_FEATS = 12;
  // Global features and the LLP proper decay length input.
  localparam int GLOBAL_FEATS = 14;
  localparam int CTAU_FEATS = 1;

  // Dense layers: three hidden layers and the four-class output layer.
  localparam int DENSE_LAYERS = 4;
  localparam int N_CLASSES = 4;

  // Index of a layer on the weight/bias load bus.
  localparam int LAYER_SEL_W = 4;  // 16 layers: 0-3 cpf, 4-7 npf, 8-11 sv, 12-15 dense
  // Word address within one layer's weight memory (the largest layer,
  // 347 x 200 weights, needs 17 bits) and index of a matrix column or row.
  localparam int WADDR_W = 17;
  localparam int IDX_W = 9;

  function automatic int ceil_div(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  // ReLU on an fp32 word: negative numbers and -0 become +0.
  function automatic fp32_t fp_relu(input fp32_t v);
    return v[31] ? FP32_ZERO : v;
  endfunction

endpackage
