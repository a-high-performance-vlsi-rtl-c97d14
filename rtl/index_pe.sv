// index_pe: histogram index processing element for one dimension.
//
// Computes the bin index of one feature sample,
//   d_k = INT((f(k) - f_min(k)) / CS(k)),
// with a parallel restoring divider that produces only the three most
// significant quotient bits (weights 4, 2, 1): Q <= 8 means any bin index
// fits in 3 bits. Three subtract-and-compare stages are chained
// combinationally. A quotient of 8 or more saturates, and the index is then
// limited to Q-1, so the largest sample of a dimension falls in the top bin
// rather than in an extra one (the algorithm's d_k = INT(x/CS + 1) is
// 1-based; this element produces the 0-based index 0..Q-1). A zero cell size
// (all samples equal) gives index 0.
//
// N instances run in parallel, one per dimension, each handling one sample
// per cycle. Purely combinational.
module index_pe
  import hpc_pkg::*;
(
  input  logic signed [DATA_W-1:0] f,
  input  logic signed [DATA_W-1:0] fmin,
  input  logic        [DATA_W-1:0] cs,
  input  logic        [Q_W-1:0]    q,
  output logic        [IDX_W-1:0]  idx
);

  logic [DATA_W:0]   diff;        // f - f_min, 33 bits
  logic [DATA_W+3:0] rem [4];     // partial remainders, 36 bits
  logic [DATA_W+3:0] dvs;         // divisor, zero-extended
  logic [IDX_W-1:0]  quo;
  logic              sat;
  logic [Q_W-1:0]    qc;

  always_comb begin
    qc     = q_clamp(q);
    diff   = {f[DATA_W-1], f} - {fmin[DATA_W-1], fmin};
    rem[0] = (f >= fmin) ? (DATA_W+4)'(diff) : '0;
    dvs    = (DATA_W+4)'(cs);
    // a quotient of 8 or more does not fit three bits
    sat    = rem[0] >= (dvs << 3);
    // restoring division, most significant quotient bit first
    for (int b = IDX_W-1; b >= 0; b--) begin
      int s;
      s = IDX_W-1-b;
      if (rem[s] >= (dvs << b)) begin
        quo[b]   = 1'b1;
        rem[s+1] = rem[s] - (dvs << b);
      end else begin
        quo[b]   = 1'b0;
        rem[s+1] = rem[s];
      end
    end
    if (cs == '0)                         idx = '0;
    else if (sat || Q_W'(quo) >= qc)     idx = IDX_W'(qc - 1);
    else                                  idx = quo;
  end

endmodule
