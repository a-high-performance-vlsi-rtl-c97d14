// tb_hpc_cluster_128: the 128 x 128-pixel frame configuration.
//
// Runs the processor at the smaller of the two frame sizes the architecture
// was built for: 8x8 windows with a step of 4 on a 128 x 128 image give
// JV = JH = 31, J = 961 vectors of N = 22 dimensions. Three frames of
// synthetic clustered features (2 to 4 random centres with small spread) are
// clustered with Q = 3, 5 and 8 and checked vector by vector against the
// same independent behavioural model as the end-to-end test; each frame must
// take 6J+N+2 = 5790 busy cycles. Label changes in the backward pass are
// reported but not required, since they depend on the data order.
module tb_hpc_cluster_128;
  import hpc_pkg::*;
  localparam int unsigned N = 22, JV = 31, JH = 31, J = JV * JH;
  localparam int unsigned AW = $clog2(J), CW = $clog2(J + 1);
  localparam int unsigned FRAMES = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic                     in_we, start, busy, done;
  logic [AW-1:0]            in_addr, rd_addr;
  logic [N-1:0][31:0]       in_data;
  logic [3:0]               q;
  phase_e                   phase;
  logic [N-1:0][2:0]        rd_coord, rd_linkto;
  logic [CW-1:0]            rd_count;

  hpc_cluster_top #(.N(N), .JV(JV), .JH(JH)) dut (.clk, .rst_n, .in_we, .in_addr, .in_data,
    .start, .q, .busy, .done, .phase, .rd_addr, .rd_coord, .rd_linkto, .rd_count);

  int checks = 0, failures = 0;
  int n_clamp = 0, n_skip = 0, n_far = 0, n_fwd = 0, n_bwd = 0, n_qswitch = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- behavioural model ----------------
  longint            f   [J][N];
  logic [N-1:0][2:0] m_coord [J], m_link [J];
  int                m_count [J];

  function automatic bit nb(input logic [N-1:0][2:0] a, input logic [N-1:0][2:0] b);
    for (int k = 0; k < N; k++) begin
      int d;
      d = int'(a[k]) - int'(b[k]);
      if (d > 1 || d < -1) return 0;
    end
    return 1;
  endfunction

  task automatic model(input int qq);
    longint lo, hi, cs;
    bit     binned [J];
    for (int k = 0; k < N; k++) begin
      lo = f[0][k]; hi = f[0][k];
      for (int i = 1; i < J; i++) begin
        if (f[i][k] < lo) lo = f[i][k];
        if (f[i][k] > hi) hi = f[i][k];
      end
      cs = ((hi - lo) * ((longint'(1) <<< 31) / qq)) >>> 31;
      for (int i = 0; i < J; i++) begin
        longint d;
        d = (cs == 0) ? 0 : (f[i][k] - lo) / cs;
        if (d > qq - 1) begin d = qq - 1; n_clamp++; end
        m_coord[i][k] = 3'(d);
      end
    end
    // densities: the first vector of each bin counts it
    for (int i = 0; i < J; i++) binned[i] = 0;
    for (int s = 0; s < J; s++) begin
      int c;
      if (binned[s]) begin n_skip++; continue; end
      c = 0;
      for (int j = 0; j < J; j++) if (m_coord[j] == m_coord[s]) c++;
      for (int j = 0; j < J; j++) if (m_coord[j] == m_coord[s]) begin binned[j] = 1; m_count[j] = c; end
    end
    for (int i = 0; i < J; i++) m_link[i] = m_coord[i];
    // link steps
    for (int t = 0; t < 2*J-1; t++) begin
      int s, bc;
      logic [N-1:0][2:0] bl;
      s = (t < J-1) ? t : 2*J-2-t;
      bc = -1; bl = '0;
      for (int j = 0; j < J; j++) begin
        if (nb(m_coord[s], m_coord[j])) begin
          int cc;
          logic [N-1:0][2:0] cl;
          if (m_count[s] > m_count[j]) begin cc = m_count[s]; cl = m_link[s]; end
          else                         begin cc = m_count[j]; cl = m_link[j]; end
          if (cc >= bc) begin bc = cc; bl = cl; end
        end else n_far++;
      end
      for (int j = 0; j < J; j++)
        if (nb(m_coord[s], m_coord[j])) begin
          if (m_link[j] != bl) begin if (t < J-1) n_fwd++; else n_bwd++; end
          m_link[j] = bl; m_count[j] = bc;
        end
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    int last_q;
    in_we = 0; in_addr = 0; in_data = '0; start = 0; q = 3; rd_addr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    last_q = -1;
    for (int fr = 0; fr < FRAMES; fr++) begin
      int qq, ncent, busy_cycles, dones, labels;
      longint cent [4][N];
      qq = (fr == 0) ? 3 : ((fr == 1) ? 5 : 8);
      ncent = 2 + (fr % 3);
      for (int c = 0; c < ncent; c++)
        for (int k = 0; k < N; k++)
          cent[c][k] = longint'($signed($urandom_range(0, 32'h7000_0000))) * ((($urandom & 1) != 0) ? 1 : -1);
      for (int i = 0; i < J; i++) begin
        int c;
        c = $urandom_range(0, ncent - 1);
        for (int k = 0; k < N; k++)
          f[i][k] = cent[c][k] + longint'($urandom_range(0, 32'h0800_0000)) - 64'sh0400_0000;
      end
      if (fr == 1) for (int k = 0; k < N; k++) f[5][k] = f[4][k];  // identical vectors
      // load the frame while idle
      for (int i = 0; i < J; i++) begin
        @(negedge clk);
        in_we = 1; in_addr = AW'(i);
        for (int k = 0; k < N; k++) in_data[k] = 32'(f[i][k]);
      end
      @(negedge clk); in_we = 0;
      // run
      q = 4'(qq); start = 1;
      @(negedge clk); start = 0;
      if (last_q >= 0 && last_q != qq) n_qswitch++;
      last_q = qq;
      busy_cycles = 0; dones = 0;
      while (busy) begin
        if (done) dones++;
        busy_cycles++;
        @(negedge clk);
      end
      checks += 2;
      if (busy_cycles != 6*J + N + 2) begin failures++; $display("frame %0d: %0d cycles, expected %0d", fr, busy_cycles, 6*J+N+2); end
      if (dones != 1) begin failures++; $display("frame %0d: %0d done pulses", fr, dones); end
      model(qq);
      labels = 0;
      for (int i = 0; i < J; i++) begin
        rd_addr = AW'(i);
        #1;
        if (m_link[i] == m_coord[i]) labels++;
        checks += 3;
        if (rd_coord  !== m_coord[i]) begin failures++; $display("frame %0d vec %0d coord %h vs %h", fr, i, rd_coord, m_coord[i]); end
        if (rd_linkto !== m_link[i])  begin failures++; $display("frame %0d vec %0d label %h vs %h", fr, i, rd_linkto, m_link[i]); end
        if (int'(rd_count) != m_count[i]) begin failures++; $display("frame %0d vec %0d count %0d vs %0d", fr, i, rd_count, m_count[i]); end
      end
      $display("frame %0d Q=%0d: %0d cycles, %0d vectors sit on their own peak", fr, qq, busy_cycles, labels);
    end
    $display("mechanisms: clamp=%0d skip=%0d far=%0d fwd=%0d bwd=%0d qswitch=%0d",
             n_clamp, n_skip, n_far, n_fwd, n_bwd, n_qswitch);
    checks += 5;
    if (n_clamp == 0)   begin failures++; $display("top-bin limit never happened"); end
    if (n_skip == 0)    begin failures++; $display("binned reference never happened"); end
    if (n_far == 0)     begin failures++; $display("non-neighbour never happened"); end
    if (n_fwd == 0)     begin failures++; $display("forward-pass label change never happened"); end
    if (n_qswitch == 0) begin failures++; $display("Q never changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
