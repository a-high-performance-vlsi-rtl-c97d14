// sum_tree: balanced adder tree over NUM unsigned operands of W bits.
//
// The operands are split into a lower and an upper half, each half is summed
// by a smaller tree and the two sums are added; a single operand passes
// through. Each level adds one bit of width, so the result has
// W + ceil(log2(NUM)) bits and cannot overflow. Purely combinational. Used by
// the ones compressor for the adder layers after its full-adder layer.
// When this module is the top, the lint of Verilator reports the two half
// results as undriven. That is a side effect of how it handles a module that
// instantiates itself: simulation with it and synthesis both see them driven.
module sum_tree #(
  parameter int unsigned NUM = 4,
  parameter int unsigned W   = 2,
  localparam int unsigned OW = W + $clog2(NUM)
) (
  input  logic [NUM-1:0][W-1:0] in,
  output logic [OW-1:0]         sum
);

  if (NUM == 1) begin : g_leaf
    assign sum = OW'(in[0]);
  end else begin : g_node
    localparam int unsigned NL  = NUM / 2;
    localparam int unsigned NR  = NUM - NL;
    localparam int unsigned OWL = W + $clog2(NL);
    localparam int unsigned OWR = W + $clog2(NR);
    logic [OWL-1:0] sum_l;
    logic [OWR-1:0] sum_r;
    sum_tree #(.NUM(NL), .W(W)) u_lo (.in(in[NL-1:0]),   .sum(sum_l));
    sum_tree #(.NUM(NR), .W(W)) u_hi (.in(in[NUM-1:NL]), .sum(sum_r));
    assign sum = OW'(sum_l) + OW'(sum_r);
  end

endmodule
