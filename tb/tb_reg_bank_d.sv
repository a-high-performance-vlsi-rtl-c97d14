// tb_reg_bank_d: self-checking test of the per-vector histogram bank
// (N = 3, J = 8). Random sequences of index-step writes, density updates
// (several vectors at once) and link updates are applied and every entry's
// coordinates, label, binned flag and count are compared with a model after
// each clock. An index write must also reset the label to the coordinates.
module tb_reg_bank_d;
  localparam int unsigned N = 3, J = 8, AW = 3, CW = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic                idx_we, den_we, lnk_we;
  logic [AW-1:0]       idx_addr;
  logic [N-1:0][2:0]   idx_coord, lnk_coord;
  logic [J-1:0]        den_upd, lnk_upd, binned;
  logic [CW-1:0]       den_cnt, lnk_cnt;
  logic [N-1:0][2:0]   coord [J], linkto [J];
  logic [CW-1:0]       count [J];
  logic [N-1:0][2:0]   m_coord [J], m_linkto [J];
  logic [CW-1:0]       m_count [J];
  logic [J-1:0]        m_binned;
  int checks = 0, failures = 0;

  reg_bank_d #(.N(N), .J(J)) dut (.clk, .idx_we, .idx_addr, .idx_coord,
    .den_we, .den_upd, .den_cnt, .lnk_we, .lnk_upd, .lnk_coord, .lnk_cnt,
    .coord, .linkto, .binned, .count);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idx_we = 0; den_we = 0; lnk_we = 0; idx_addr = 0; idx_coord = 0; lnk_coord = 0;
    den_upd = 0; lnk_upd = 0; den_cnt = 0; lnk_cnt = 0;
    // initialise every entry through the index port
    for (int j = 0; j < J; j++) begin
      @(negedge clk);
      idx_we = 1; idx_addr = AW'(j); idx_coord = (N*3)'($urandom);
      m_coord[j] = idx_coord; m_linkto[j] = idx_coord; m_count[j] = 0; m_binned[j] = 0;
    end
    for (int t = 0; t < 500; t++) begin
      int op;
      @(negedge clk);
      op = $urandom_range(0, 2);
      idx_we = (op == 0); den_we = (op == 1); lnk_we = (op == 2);
      idx_addr = AW'($urandom); idx_coord = (N*3)'($urandom);
      den_upd = J'($urandom); den_cnt = CW'($urandom);
      lnk_upd = J'($urandom); lnk_coord = (N*3)'($urandom); lnk_cnt = CW'($urandom);
      for (int j = 0; j < J; j++) begin
        if (idx_we && idx_addr == AW'(j)) begin
          m_coord[j] = idx_coord; m_linkto[j] = idx_coord; m_binned[j] = 0; m_count[j] = 0;
        end else if (den_we && den_upd[j]) begin
          m_binned[j] = 1; m_count[j] = den_cnt;
        end else if (lnk_we && lnk_upd[j]) begin
          m_linkto[j] = lnk_coord; m_count[j] = lnk_cnt;
        end
      end
      @(posedge clk); #1;
      for (int j = 0; j < J; j++) begin
        checks++;
        if (coord[j] !== m_coord[j] || linkto[j] !== m_linkto[j] ||
            count[j] !== m_count[j] || binned[j] !== m_binned[j]) begin
          failures++; $display("entry %0d differs at step %0d", j, t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
