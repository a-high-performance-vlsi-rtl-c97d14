// link_pe: link and cluster processing element (one per vector).
//
// In each cycle of the link step one reference vector (REF) is broadcast to
// all J elements; each element holds its own vector (COMP). The element
//   - tests whether the two vectors' histogram bins are neighbours: every
//     coordinate differs by at most one, which bounds the bins' distance by
//     sqrt(N) without computing it (NEIGHBOR, which also serves as UPDATE);
//   - compares the counts (a > b ?, a = REF, b = COMP) and multiplexes the
//     label (COO) and count (COU) of the larger, its own on equal counts;
//   - ANDs the chosen label and count with NEIGHBOR, so a non-neighbour
//     offers count 0 to the maximum tree.
// The neighbour test uses the bin coordinates of the two vectors, the label
// is their current cluster label (linkto coordinates). Combinational.
module link_pe
  import hpc_pkg::*;
#(
  parameter int unsigned N  = 22,
  parameter int unsigned CW = 15
) (
  input  logic [N-1:0][IDX_W-1:0] ref_bin,    // bin coordinates of REF
  input  logic [N-1:0][IDX_W-1:0] ref_coo,    // COO (REF): label of REF
  input  logic [CW-1:0]           ref_cou,    // COU (REF)
  input  logic [N-1:0][IDX_W-1:0] comp_bin,   // bin coordinates of COMP
  input  logic [N-1:0][IDX_W-1:0] comp_coo,   // COO (COMP)
  input  logic [CW-1:0]           comp_cou,   // COU (COMP)
  output logic                    neighbor,
  output logic [N-1:0][IDX_W-1:0] coor,
  output logic [CW-1:0]           cell_count
);

  logic ref_gt;

  always_comb begin
    // neighbour detector
    neighbor   = bins_are_neighbors((MAX_DIM*IDX_W)'(ref_bin), (MAX_DIM*IDX_W)'(comp_bin), N);
    // a > b ? and the two multiplexers
    ref_gt     = (ref_cou > comp_cou);
    // AND gates
    coor       = (ref_gt ? ref_coo : comp_coo) & {(N*IDX_W){neighbor}};
    cell_count = (ref_gt ? ref_cou : comp_cou) & {CW{neighbor}};
  end

endmodule
