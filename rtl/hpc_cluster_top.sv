// hpc_cluster_top: histogram peak-climbing clustering processor.
//
// Clusters a frame of J = JV x JH feature vectors of N dimensions (32-bit
// 1.31 fixed point) into the modes of their N-dimensional histogram with Q
// levels per dimension (Q = 3..8). The steps run one after another, with
// register banks between them:
//   A  frame memory, N single-port memories of J x 32 bits;
//   Min-Max (N elements in parallel) -> B (minimum) and C (maximum);
//   cell size (one element, N cycles)  -> C (reused for CS);
//   index    (N elements in parallel, J cycles) -> D (bin coordinates);
//   density  (J elements + ones compressor, J cycles) -> D (bin counts);
//   link     (J elements + J:1 maximum tree, 2*J-1 cycles) -> D (labels).
// After `done`, entry i of bank D holds vector i's cluster label: the bin
// coordinates of the densest bin its neighbourhood chain led to. Reading the
// labels in raster order gives the JV x JH cluster map; distinct labels give
// the number of clusters. The read port is combinational.
//
// Interface: while idle, the frame is written one vector per cycle through
// in_we / in_addr / in_data (all N dimensions at once). A `start` pulse with
// `q` starts a frame; `q` is sampled then. `busy` is high for 6*J + N + 2
// cycles and `done` pulses in the last. The defaults are the DVD-resolution
// configuration (702 x 576 pixels, 8x8 windows with step 4: JV = 143,
// JH = 174, J = 24882; N = 22).
module hpc_cluster_top
  import hpc_pkg::*;
#(
  parameter int unsigned N  = 22,
  parameter int unsigned JV = 143,
  parameter int unsigned JH = 174,
  localparam int unsigned J  = JV * JH,
  localparam int unsigned AW = (J > 1) ? $clog2(J) : 1,
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = $clog2(J + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // frame load (while idle)
  input  logic                     in_we,
  input  logic [AW-1:0]            in_addr,
  input  logic [N-1:0][DATA_W-1:0] in_data,
  // control
  input  logic                     start,
  input  logic [Q_W-1:0]           q,
  output logic                     busy,
  output logic                     done,
  output phase_e                   phase,
  // result read
  input  logic [AW-1:0]            rd_addr,
  output logic [N-1:0][IDX_W-1:0]  rd_coord,
  output logic [N-1:0][IDX_W-1:0]  rd_linkto,
  output logic [CW-1:0]            rd_count
);

  // ---------------- controller ----------------
  logic          mm_valid, mm_first, mm_max;
  logic          cs_we, idx_we, den_we, lnk_we;
  logic [KW-1:0] cs_k;
  logic [AW-1:0] ctl_addr, idx_addr, den_sel, lnk_sel;

  hpc_controller #(.N(N), .J(J)) u_ctl (
    .clk, .rst_n, .start(start && !busy), .phase, .busy, .done,
    .mem_addr(ctl_addr),
    .mm_valid, .mm_first, .mm_max,
    .cs_we, .cs_k,
    .idx_we, .idx_addr,
    .den_we, .den_sel,
    .lnk_we, .lnk_sel);

  logic [Q_W-1:0] q_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              q_r <= Q_W'(Q_MAX);
    else if (start && !busy) q_r <= q_clamp(q);
  end

  // ---------------- A: frame memory ----------------
  logic [AW-1:0]            mem_addr;
  logic [N-1:0][DATA_W-1:0] mem_rdata;

  assign mem_addr = busy ? ctl_addr : in_addr;

  for (genvar k = 0; k < N; k++) begin : g_mem
    feature_mem #(.DEPTH(J), .WIDTH(DATA_W)) u_mem (
      .clk, .we(in_we && !busy), .addr(mem_addr),
      .wdata(in_data[k]), .rdata(mem_rdata[k]));
  end

  // ---------------- Min-Max -> B and C ----------------
  logic [N-1:0][DATA_W-1:0] bank_b, bank_c;
  logic [N-1:0]             wr_min, wr_max;
  logic [DATA_W-1:0]        cs_val;

  for (genvar k = 0; k < N; k++) begin : g_minmax
    minmax_pe u_mm (
      .valid(mm_valid), .first(mm_first), .find_max(mm_max),
      .sample(mem_rdata[k]), .cur_min(bank_b[k]), .cur_max(bank_c[k]),
      .wr_min(wr_min[k]), .wr_max(wr_max[k]));
  end

  reg_bank_bc #(.N(N)) u_bank_b (
    .clk, .rst_n, .we_vec(wr_min), .d_vec(mem_rdata),
    .we(1'b0), .waddr('0), .wdata('0), .q(bank_b));

  reg_bank_bc #(.N(N)) u_bank_c (
    .clk, .rst_n, .we_vec(wr_max), .d_vec(mem_rdata),
    .we(cs_we), .waddr(cs_k), .wdata(cs_val), .q(bank_c));

  // ---------------- cell size (one element, reused N times) ----------------
  cs_pe u_cs (.fmin(bank_b[cs_k]), .fmax(bank_c[cs_k]), .q(q_r), .cs(cs_val));

  // ---------------- index -> D ----------------
  logic [N-1:0][IDX_W-1:0] idx_coord;

  for (genvar k = 0; k < N; k++) begin : g_index
    index_pe u_idx (
      .f(mem_rdata[k]), .fmin(bank_b[k]), .cs(bank_c[k]), .q(q_r),
      .idx(idx_coord[k]));
  end

  // ---------------- D: per-vector histogram bank ----------------
  logic [N-1:0][IDX_W-1:0] d_coord  [J];
  logic [N-1:0][IDX_W-1:0] d_linkto [J];
  logic [J-1:0]            d_binned;
  logic [CW-1:0]           d_count  [J];
  logic [J-1:0]            den_upd, lnk_upd;
  logic [CW-1:0]           den_cnt, lnk_cnt;
  logic [N-1:0][IDX_W-1:0] lnk_coord;

  reg_bank_d #(.N(N), .J(J)) u_bank_d (
    .clk,
    .idx_we, .idx_addr, .idx_coord,
    .den_we, .den_upd, .den_cnt,
    .lnk_we, .lnk_upd, .lnk_coord, .lnk_cnt,
    .coord(d_coord), .linkto(d_linkto), .binned(d_binned), .count(d_count));

  // ---------------- density ----------------
  density_unit #(.N(N), .J(J)) u_density (
    .coord(d_coord), .binned(d_binned), .sel(den_sel),
    .upd(den_upd), .cnt(den_cnt));

  // ---------------- link and cluster ----------------
  link_unit #(.N(N), .J(J)) u_link (
    .coord(d_coord), .linkto(d_linkto), .count(d_count), .sel(lnk_sel),
    .upd(lnk_upd), .best_coord(lnk_coord), .best_cnt(lnk_cnt));

  // ---------------- result read ----------------
  always_comb begin
    rd_coord  = d_coord[rd_addr];
    rd_linkto = d_linkto[rd_addr];
    rd_count  = d_count[rd_addr];
  end

  // the frame may only be rewritten while the processor is idle
  a_no_load_while_busy : assert property (@(posedge clk) disable iff (!rst_n) !(in_we && busy))
    else $error("frame memory write ignored while a frame is being processed");

endmodule
