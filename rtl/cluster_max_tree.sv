// cluster_max_tree: J:1 tree of MAX cluster elements.
//
// Reduces NUM (label coordinates, count) pairs to the pair with the largest
// count. The inputs are split into a lower and an upper half, each reduced by
// a smaller tree, and the two winners meet in one cluster_max_pe (lower half
// as operand a, upper half as b, so on equal counts the upper half wins).
// Depth is ceil(log2(NUM)) elements. Combinational.
// When this module is the top, the lint of Verilator reports the two half
// results as undriven. That is a side effect of how it handles a module that
// instantiates itself: simulation with it and synthesis both see them driven.
module cluster_max_tree
  import hpc_pkg::*;
#(
  parameter int unsigned NUM = 4,
  parameter int unsigned N   = 22,
  parameter int unsigned CW  = 15
) (
  input  logic [N-1:0][IDX_W-1:0] coo [NUM],
  input  logic [CW-1:0]           cou [NUM],
  output logic [N-1:0][IDX_W-1:0] coor,
  output logic [CW-1:0]           cell_count
);

  if (NUM == 1) begin : g_leaf
    assign coor       = coo[0];
    assign cell_count = cou[0];
  end else begin : g_node
    localparam int unsigned NL = NUM / 2;
    localparam int unsigned NR = NUM - NL;
    logic [N-1:0][IDX_W-1:0] coo_l [NL];
    logic [CW-1:0]           cou_l [NL];
    logic [N-1:0][IDX_W-1:0] coo_r [NR];
    logic [CW-1:0]           cou_r [NR];
    logic [N-1:0][IDX_W-1:0] win_coo_l, win_coo_r;
    logic [CW-1:0]           win_cou_l, win_cou_r;

    always_comb begin
      for (int i = 0; i < NL; i++) begin
        coo_l[i] = coo[i];
        cou_l[i] = cou[i];
      end
      for (int i = 0; i < NR; i++) begin
        coo_r[i] = coo[NL+i];
        cou_r[i] = cou[NL+i];
      end
    end

    cluster_max_tree #(.NUM(NL), .N(N), .CW(CW)) u_lo (
      .coo(coo_l), .cou(cou_l), .coor(win_coo_l), .cell_count(win_cou_l));
    cluster_max_tree #(.NUM(NR), .N(N), .CW(CW)) u_hi (
      .coo(coo_r), .cou(cou_r), .coor(win_coo_r), .cell_count(win_cou_r));
    cluster_max_pe #(.N(N), .CW(CW)) u_max (
      .coo_a(win_coo_l), .cou_a(win_cou_l),
      .coo_b(win_coo_r), .cou_b(win_cou_r),
      .coor(coor), .cell_count(cell_count));
  end

endmodule
