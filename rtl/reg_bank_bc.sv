// reg_bank_bc: an N x 32-bit register bank (register groups B and C).
//
// Group B holds the per-dimension running minimum during the Min-Max step
// and keeps the final minimum for the index step. Group C holds the running
// maximum and is then reused: the cell-size step overwrites entry k with
// CS(k). The bank therefore has two write ports: a per-entry port (`we_vec`,
// one enable per dimension, used by the N Min-Max elements in parallel) and
// an indexed port (`we`/`waddr`, one cell-size result per cycle). The
// indexed port wins when both write the same entry. All entries are visible
// in parallel on `q`; writes take effect at the clock edge; reset clears it.
module reg_bank_bc
  import hpc_pkg::*;
#(
  parameter int unsigned N = 22,
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             we_vec,
  input  logic [N-1:0][DATA_W-1:0] d_vec,
  input  logic                     we,
  input  logic [KW-1:0]            waddr,
  input  logic [DATA_W-1:0]        wdata,
  output logic [N-1:0][DATA_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      for (int k = 0; k < N; k++)
        if (we_vec[k]) q[k] <= d_vec[k];
      if (we) q[waddr] <= wdata;
    end
  end

endmodule
