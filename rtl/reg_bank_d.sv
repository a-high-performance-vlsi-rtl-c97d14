// reg_bank_d: the per-vector histogram register bank (register group D).
//
// For each of the J feature vectors it keeps
//   coord   - the vector's histogram bin coordinates, N x 3 bits,
//   linkto  - the coordinates of the bin it is linked to (its cluster label),
//   binned  - set once the vector's bin density has been counted,
//   count   - the bin density, later the density of the label's bin,
// i.e. 2*3*N + 1 + ceil(log2(J+1)) bits per vector. All entries are visible
// in parallel, which the density and link steps need. Three write ports,
// used in different steps:
//   index step   : `idx_we` writes coord and linkto of vector `idx_addr`
//                  (each vector initially linked to itself) and clears its
//                  binned flag and count;
//   density step : every vector with `den_upd[j]` takes count `den_cnt` and
//                  sets its binned flag;
//   link step    : every vector with `lnk_upd[j]` takes label `lnk_coord`
//                  and count `lnk_cnt`.
// Writes happen at the clock edge. The bank has no reset: each frame's index
// step initialises every entry before it is read.
module reg_bank_d
  import hpc_pkg::*;
#(
  parameter int unsigned N = 22,
  parameter int unsigned J = 24882,
  localparam int unsigned AW = (J > 1) ? $clog2(J) : 1,
  localparam int unsigned CW = $clog2(J + 1)
) (
  input  logic                    clk,
  // index step
  input  logic                    idx_we,
  input  logic [AW-1:0]           idx_addr,
  input  logic [N-1:0][IDX_W-1:0] idx_coord,
  // density step
  input  logic                    den_we,
  input  logic [J-1:0]            den_upd,
  input  logic [CW-1:0]           den_cnt,
  // link step
  input  logic                    lnk_we,
  input  logic [J-1:0]            lnk_upd,
  input  logic [N-1:0][IDX_W-1:0] lnk_coord,
  input  logic [CW-1:0]           lnk_cnt,
  // parallel read
  output logic [N-1:0][IDX_W-1:0] coord  [J],
  output logic [N-1:0][IDX_W-1:0] linkto [J],
  output logic [J-1:0]            binned,
  output logic [CW-1:0]           count  [J]
);

  always_ff @(posedge clk) begin
    for (int j = 0; j < J; j++) begin
      if (idx_we && idx_addr == AW'(j)) begin
        coord[j]  <= idx_coord;
        linkto[j] <= idx_coord;
        binned[j] <= 1'b0;
        count[j]  <= '0;
      end else if (den_we && den_upd[j]) begin
        binned[j] <= 1'b1;
        count[j]  <= den_cnt;
      end else if (lnk_we && lnk_upd[j]) begin
        linkto[j] <= lnk_coord;
        count[j]  <= lnk_cnt;
      end
    end
  end

endmodule
