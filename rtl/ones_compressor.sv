// ones_compressor: counts the ones among J bits (J : ceil(log2 J) compressor).
//
// The first layer groups the inputs by three into full adders, each giving
// a 2-bit count 0..3; the remaining layers add these counts pairwise in a
// balanced tree of growing width (sum_tree), as in the compressor structure
// of the architecture (full-adder layer, then adder layers of 2, 3, ... bits).
// The result is capped at J and delivered on ceil(log2(J+1)) bits. Inputs
// beyond a multiple of three are padded with zeros. Combinational.
module ones_compressor #(
  parameter int unsigned J = 24882,
  localparam int unsigned CW = $clog2(J + 1),
  localparam int unsigned G  = (J + 2) / 3,          // full adders
  localparam int unsigned SW = 2 + $clog2(G)         // width of the tree sum
) (
  input  logic [J-1:0]  bits,
  output logic [CW-1:0] count
);

  logic [3*G-1:0]     padded;
  logic [G-1:0][1:0]  fa_sum;
  logic [SW-1:0]      total;

  assign padded = (3*G)'(bits);

  // full-adder layer: {carry, sum} of three input bits
  for (genvar g = 0; g < G; g++) begin : g_fa
    assign fa_sum[g] = {1'b0, padded[3*g]} + {1'b0, padded[3*g+1]} + {1'b0, padded[3*g+2]};
  end

  sum_tree #(.NUM(G), .W(2)) u_tree (.in(fa_sum), .sum(total));

  // cap at J, then fit the output width
  if (SW > CW) begin : g_wide
    assign count = (total > SW'(J)) ? CW'(J) : CW'(total);
  end else begin : g_narrow
    assign count = (CW'(total) > CW'(J)) ? CW'(J) : CW'(total);
  end

endmodule
