// density_unit: finds histogram bin densities (one reference vector per cycle).
//
// The reference multiplexer selects vector `sel` (its coordinates and binned
// flag); J density elements compare it with every vector in parallel; the
// ones compressor counts their update bits. If the reference vector is not
// yet binned, every vector in its bin raises `upd` and `cnt` is the bin's
// density (the reference counts itself); the register bank writes `cnt` and
// the binned flag into those vectors at the clock edge. If the reference is
// already binned no element updates and `cnt` is 0. Running `sel` over all J
// vectors takes J cycles and leaves every vector with its bin density.
//
// The architecture draws a (J-1):1 multiplexer inside every element; here one
// J:1 multiplexer is shared by all elements, which gives the same result.
// Combinational.
module density_unit
  import hpc_pkg::*;
#(
  parameter int unsigned N = 22,
  parameter int unsigned J = 24882,
  localparam int unsigned AW = (J > 1) ? $clog2(J) : 1,
  localparam int unsigned CW = $clog2(J + 1)
) (
  input  logic [N-1:0][IDX_W-1:0] coord [J],
  input  logic [J-1:0]            binned,
  input  logic [AW-1:0]           sel,
  output logic [J-1:0]            upd,
  output logic [CW-1:0]           cnt
);

  logic [N-1:0][IDX_W-1:0] ref_coord;
  logic                    ref_binned;

  always_comb begin
    ref_coord  = coord[sel];
    ref_binned = binned[sel];
  end

  for (genvar g = 0; g < (J + GROUP - 1) / GROUP; g++) begin : g_row
    for (genvar i = 0; i < GROUP; i++) begin : g_col
      if (g * GROUP + i < J) begin : g_pe
        density_pe #(.N(N)) u_pe (
          .ref_coord (ref_coord),
          .ref_binned(ref_binned),
          .comp_coord(coord[g*GROUP+i]),
          .update    (upd[g*GROUP+i])
        );
      end
    end
  end

  ones_compressor #(.J(J)) u_cmp (.bits(upd), .count(cnt));

endmodule
