// cs_pe: cell-size processing element.
//
// Computes the histogram cell length of one dimension,
//   CS(k) = (f_max(k) - f_min(k)) / Q,
// without a divider: because Q is limited to 3..8, 1/Q is read from a
// six-entry reciprocal table (hpc_pkg::q_inverse) and multiplied with the
// range. Inputs and result use the 1.31 fixed-point format of the features.
// The range f_max - f_min can reach almost 2, so it is formed on 33 bits;
// the product is scaled back by 2^31 (truncation). The result is below 2/3
// and fits the 1.31 format.
//
// One instance serves all dimensions: the controller presents dimension k
// for one cycle and writes `cs` into register bank C. The element is purely
// combinational; its result is taken at the next clock edge.
module cs_pe
  import hpc_pkg::*;
(
  input  logic signed [DATA_W-1:0] fmin,
  input  logic signed [DATA_W-1:0] fmax,
  input  logic        [Q_W-1:0]    q,
  output logic        [DATA_W-1:0] cs
);

  logic [DATA_W:0]     range_w;   // f_max - f_min, non-negative, 33 bits
  logic [DATA_W-1:0]   qinv;      // 1/Q in 0.31
  logic [2*DATA_W:0]   prod;      // only bits 61:31 can be non-zero

  always_comb begin
    range_w = (fmax >= fmin) ? ({fmax[DATA_W-1], fmax} - {fmin[DATA_W-1], fmin}) : '0;
    qinv    = q_inverse(q_clamp(q));
    prod    = (2*DATA_W+1)'(range_w) * (2*DATA_W+1)'(qinv);
    cs      = prod[DATA_W-1 +: DATA_W];
  end

endmodule
