// minmax_pe: Min-Max processing element for one feature dimension.
//
// One instance runs per dimension. It holds a single comparison cell that is
// used twice in sequence: during the minimum pass (`find_max` low) it decides
// whether the sample is below the running minimum, during the maximum pass
// (`find_max` high) whether it is above the running maximum, so a frame of J
// vectors takes 2*J samples. The first sample of each pass (`first` high) is
// taken unconditionally (f_min <- f_0, then compare). Samples are signed 1.31.
//
// The running values live in register banks B (minimum) and C (maximum); the
// element is combinational and returns the write enables for them, which
// the banks act on at the next clock edge together with `sample` as data.
module minmax_pe
  import hpc_pkg::*;
(
  input  logic                     valid,     // `sample` is valid this cycle
  input  logic                     first,     // first sample of a pass
  input  logic                     find_max,  // 0: minimum pass, 1: maximum pass
  input  logic signed [DATA_W-1:0] sample,
  input  logic signed [DATA_W-1:0] cur_min,   // running minimum (bank B)
  input  logic signed [DATA_W-1:0] cur_max,   // running maximum (bank C)
  output logic                     wr_min,    // write `sample` into bank B
  output logic                     wr_max     // write `sample` into bank C
);

  // the single MIN/MAX cell: one comparator, its operand chosen by the pass
  logic signed [DATA_W-1:0] cur;
  logic                     beyond;

  always_comb begin
    cur    = find_max ? cur_max : cur_min;
    beyond = find_max ? (sample > cur) : (sample < cur);
    wr_min = valid && !find_max && (first || beyond);
    wr_max = valid &&  find_max && (first || beyond);
  end

endmodule
