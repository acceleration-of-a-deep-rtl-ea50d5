// flatten_unit: flattens the outputs of the three convolution branches and
// concatenates them with the global features and the LLP decay length into
// the input vector of the first dense layer.
//
// The vector is held in registers. Branch outputs arrive one column
// (filter j, one value per object p) per pulse and are stored at
// OFF + p*F + j, i.e. each branch's output matrix is flattened row by row
// (object-major), charged candidates first, then neutral candidates, then
// secondary vertices, then the global features and finally the decay
// length, which are written over g_we/g_idx (g_idx 0..13 global, 14 decay
// length). On `start` the whole vector is sent out one word per cycle
// (out_we/out_idx/out_data) into the first dense layer's input RAM, and
// `done` pulses with the last word. Element order and the serial hand-over
// are this design's choices.
module flatten_unit
  import llp_pkg::*;
#(
  parameter int R0 = 25, parameter int F0 = 8,
  parameter int R1 = 25, parameter int F1 = 4,
  parameter int R2 = 4,  parameter int F2 = 8,
  parameter int NG = GLOBAL_FEATS + CTAU_FEATS,
  localparam int OFF1 = R0 * F0,
  localparam int OFF2 = OFF1 + R1 * F1,
  localparam int OFFG = OFF2 + R2 * F2,
  localparam int TOTAL = OFFG + NG
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in0_valid,
  input  logic [IDX_W-1:0] in0_col,
  input  fp32_t            in0_data [R0],
  input  logic             in1_valid,
  input  logic [IDX_W-1:0] in1_col,
  input  fp32_t            in1_data [R1],
  input  logic             in2_valid,
  input  logic [IDX_W-1:0] in2_col,
  input  fp32_t            in2_data [R2],
  input  logic             g_we,
  input  logic [IDX_W-1:0] g_idx,
  input  fp32_t            g_data,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             out_we,
  output logic [IDX_W-1:0] out_idx,
  output fp32_t            out_data
);

  fp32_t vec [TOTAL];
  logic  sending;
  logic [IDX_W-1:0] idx;

  always_ff @(posedge clk) begin
    for (int p = 0; p < R0; p++)
      if (in0_valid && int'(in0_col) < F0) vec[p*F0 + int'(in0_col)] <= in0_data[p];
    for (int p = 0; p < R1; p++)
      if (in1_valid && int'(in1_col) < F1) vec[OFF1 + p*F1 + int'(in1_col)] <= in1_data[p];
    for (int p = 0; p < R2; p++)
      if (in2_valid && int'(in2_col) < F2) vec[OFF2 + p*F2 + int'(in2_col)] <= in2_data[p];
    if (g_we && int'(g_idx) < NG) vec[OFFG + int'(g_idx)] <= g_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sending  <= 1'b0;
      idx      <= '0;
      out_we   <= 1'b0;
      out_idx  <= '0;
      out_data <= FP32_ZERO;
      done     <= 1'b0;
    end else begin
      out_we <= sending;
      done   <= 1'b0;
      if (sending) begin
        out_idx  <= idx;
        out_data <= vec[idx];
        if (idx == IDX_W'(TOTAL - 1)) begin
          sending <= 1'b0;
          done    <= 1'b1;
        end
        idx <= idx + IDX_W'(1);
      end else if (start) begin
        sending <= 1'b1;
        idx     <= '0;
      end
    end
  end

  assign busy = sending | out_we;

endmodule
