// feature_mem: one block of the input frame memory (register group A).
//
// The architecture stores the frame's feature tensor in N single-port
// synchronous memories of J words x 32 bits, one memory per feature
// dimension. This module is one such memory: a single address port shared by
// reads and writes, a write when `we` is high, and read data that appears on
// `rdata` one clock after the address (registered read). The block count,
// depth and width follow the architecture; the read latency of one cycle is
// this implementation's choice of "synchronous".
module feature_mem #(
  parameter int unsigned DEPTH = 24882,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
