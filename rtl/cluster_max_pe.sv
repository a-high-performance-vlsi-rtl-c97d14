// cluster_max_pe: MAX cluster processing element.
//
// Compares the counts of two (label coordinates, count) pairs and passes on
// the pair with the larger count: a if count a > count b, else b (so on equal
// counts b wins). It is the node of the J:1 maximum tree of the link step and
// also the selection part of the link element. Combinational.
module cluster_max_pe
  import hpc_pkg::*;
#(
  parameter int unsigned N  = 22,
  parameter int unsigned CW = 15
) (
  input  logic [N-1:0][IDX_W-1:0] coo_a,
  input  logic [CW-1:0]           cou_a,
  input  logic [N-1:0][IDX_W-1:0] coo_b,
  input  logic [CW-1:0]           cou_b,
  output logic [N-1:0][IDX_W-1:0] coor,
  output logic [CW-1:0]           cell_count
);

  logic a_gt_b;

  always_comb begin
    a_gt_b     = (cou_a > cou_b);
    coor       = a_gt_b ? coo_a : coo_b;
    cell_count = a_gt_b ? cou_a : cou_b;
  end

endmodule
