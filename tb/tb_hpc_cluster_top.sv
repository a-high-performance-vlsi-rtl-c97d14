// tb_hpc_cluster_top: end-to-end test of the clustering processor.
//
// A reduced frame (N = 3 dimensions, 3 x 4 windows, J = 12 vectors) is
// generated around a few random cluster centres, loaded through the frame
// port and clustered, for several frames with Q running over 3..8 (a mode
// switch between frames). An independent behavioural model in this file
// recomputes every step from the samples: per-dimension minimum and maximum,
// CS = floor((max-min) * floor(2^31/Q) / 2^31), bin index
// min(floor((f-min)/CS), Q-1), bin densities by direct counting, and the
// link step rule (2J-1 reference steps, winner written into all neighbours).
// The bin coordinates, labels and counts read back must match the model,
// and every frame must take exactly 6J+N+2 busy cycles with one done pulse.
// Each mechanism is counted over the run and must occur at least once: the
// top-bin limit of the index step, a density reference that was already
// binned, a non-neighbour pair, label changes in the forward and in the
// backward link pass, and a change of Q between frames.
module tb_hpc_cluster_top;
  import hpc_pkg::*;
  localparam int unsigned N = 3, JV = 3, JH = 4, J = JV * JH;
  localparam int unsigned AW = $clog2(J), CW = $clog2(J + 1);
  localparam int unsigned FRAMES = 12;

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
    repeat (20000) @(posedge clk);
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
      qq = (fr == 0) ? 8 : 3 + (fr % 6);
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
      if (fr == 0) begin
        // a chain of bins along dimension 0 whose densest bin is stored last,
        // so its label reaches the far end of the chain only in the second pass
        int chain [J] = '{3, 2, 2, 1, 1, 1, 0, 0, 0, 0, 7, 6};
        for (int i = 0; i < J; i++) begin
          f[i][0] = -(64'sd1 <<< 30) + longint'(chain[i]) * (64'sd1 <<< 27) + (64'sd1 <<< 26);
          for (int k = 1; k < N; k++) f[i][k] = 64'sd12345;
        end
      end
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
    checks += 6;
    if (n_clamp == 0)   begin failures++; $display("top-bin limit never happened"); end
    if (n_skip == 0)    begin failures++; $display("binned reference never happened"); end
    if (n_far == 0)     begin failures++; $display("non-neighbour never happened"); end
    if (n_fwd == 0)     begin failures++; $display("forward-pass label change never happened"); end
    if (n_bwd == 0)     begin failures++; $display("backward-pass label change never happened"); end
    if (n_qswitch == 0) begin failures++; $display("Q never changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
