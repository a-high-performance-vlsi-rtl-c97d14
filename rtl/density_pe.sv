// density_pe: histogram bin density processing element (one per vector).
//
// Each of the J vectors has one of these elements. In every cycle of the
// density step the coordinates of one reference vector are broadcast to all
// elements; each compares them with the coordinates of its own vector
// (COMP). `update` is raised when the coordinates are equal and the
// reference vector has not been binned yet:
//   update = NOR(binned_ref, NOT equ).
// The update bits of all elements are counted by the ones compressor; the
// count is the density of the reference vector's bin and is written, with
// the binned flag, into every vector that raised `update`. Combinational.
module density_pe
  import hpc_pkg::*;
#(
  parameter int unsigned N = 22
) (
  input  logic [N-1:0][IDX_W-1:0] ref_coord,   // REF_I
  input  logic                    ref_binned,  // BINNED of the reference
  input  logic [N-1:0][IDX_W-1:0] comp_coord,  // COMP_I, this element's vector
  output logic                    update
);

  logic equ;  // EQU of the comparator

  always_comb begin
    equ    = (ref_coord == comp_coord);
    update = ~(ref_binned | ~equ);
  end

endmodule
