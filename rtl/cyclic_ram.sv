// cyclic_ram: a fixed-size RAM whose read address comes from its own
// wrapping counter, so words are read out consecutively and the read cycles
// back to word 0 after the last one.
//
// A write port (we/waddr/wdata) loads the contents; for the weight memories
// of the network this is done once, after which the RAM behaves as a ROM.
// Each cycle with `advance` high the word at the counter is read into
// `rdata` (one cycle read latency, as a block RAM) and the counter steps,
// wrapping from DEPTH-1 to 0. `restart` returns the counter to 0 without a
// read. `raddr` shows the counter. The separate load port and the one-cycle
// read are choices of this design.
module cyclic_ram #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 64,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             restart,
  input  logic             advance,
  output logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      raddr <= '0;
      rdata <= '0;
    end else if (restart) begin
      raddr <= '0;
    end else if (advance) begin
      rdata <= mem[raddr];
      raddr <= (raddr == AW'(DEPTH - 1)) ? '0 : raddr + AW'(1);
    end
  end

endmodule
