// link_unit: links histogram bins and assigns clusters (one reference per cycle).
//
// The J:1 multiplexer selects reference vector `sel`; J link elements compare
// it with every vector in parallel; the J:1 maximum tree reduces their
// outputs to the label and count of the densest candidate among the
// reference and its neighbours. That winner is returned on `best_coord` /
// `best_cnt`, and `upd` marks every vector whose bin neighbours the
// reference's bin (the reference included): the register bank writes the
// winner into all of them at the clock edge, so the reference and all its
// neighbours inherit the label of the densest bin around. Combinational.
module link_unit
  import hpc_pkg::*;
#(
  parameter int unsigned N = 22,
  parameter int unsigned J = 24882,
  localparam int unsigned AW = (J > 1) ? $clog2(J) : 1,
  localparam int unsigned CW = $clog2(J + 1)
) (
  input  logic [N-1:0][IDX_W-1:0] coord  [J],
  input  logic [N-1:0][IDX_W-1:0] linkto [J],
  input  logic [CW-1:0]           count  [J],
  input  logic [AW-1:0]           sel,
  output logic [J-1:0]            upd,
  output logic [N-1:0][IDX_W-1:0] best_coord,
  output logic [CW-1:0]           best_cnt
);

  logic [N-1:0][IDX_W-1:0] ref_bin, ref_coo;
  logic [CW-1:0]           ref_cou;
  logic [N-1:0][IDX_W-1:0] pe_coo [J];
  logic [CW-1:0]           pe_cou [J];

  always_comb begin
    ref_bin = coord[sel];
    ref_coo = linkto[sel];
    ref_cou = count[sel];
  end

  for (genvar g = 0; g < (J + GROUP - 1) / GROUP; g++) begin : g_row
    for (genvar i = 0; i < GROUP; i++) begin : g_col
      if (g * GROUP + i < J) begin : g_pe
        localparam int unsigned JJ = g * GROUP + i;
        link_pe #(.N(N), .CW(CW)) u_pe (
          .ref_bin (ref_bin),   .ref_coo (ref_coo),    .ref_cou (ref_cou),
          .comp_bin(coord[JJ]), .comp_coo(linkto[JJ]), .comp_cou(count[JJ]),
          .neighbor(upd[JJ]),   .coor(pe_coo[JJ]),     .cell_count(pe_cou[JJ]));
      end
    end
  end

  cluster_max_tree #(.NUM(J), .N(N), .CW(CW)) u_tree (
    .coo(pe_coo), .cou(pe_cou), .coor(best_coord), .cell_count(best_cnt));

endmodule
