// tb_hpc_controller: self-checking test of the step sequencer (N = 3, J = 5).
// Records every control output over a frame and checks: the memory address
// sequence of both Min-Max passes and of the index step, the one-cycle
// alignment of the Min-Max and index controls, N cell-size cycles with
// dimensions 0..N-1, density references 0..J-1, link references 0..J-2 then
// J-1..0, the step lengths, a busy time of 6J+N+2 cycles, a single done
// pulse, and that a start during a frame is ignored.
module tb_hpc_controller;
  import hpc_pkg::*;
  localparam int unsigned N = 3, J = 5, AW = 3, KW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  phase_e phase;
  logic [AW-1:0] mem_addr, idx_addr, den_sel, lnk_sel;
  logic mm_valid, mm_first, mm_max, cs_we, idx_we, den_we, lnk_we;
  logic [KW-1:0] cs_k;
  int checks = 0, failures = 0;

  hpc_controller #(.N(N), .J(J)) dut (.clk, .rst_n, .start, .phase, .busy, .done,
    .mem_addr, .mm_valid, .mm_first, .mm_max, .cs_we, .cs_k, .idx_we, .idx_addr,
    .den_we, .den_sel, .lnk_we, .lnk_sel);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d, expected %0d", what, got, exp); end
  endtask

  initial begin
    int mm_addr_q[$], mm_data_q[$], idx_q[$], idx_mem_q[$], cs_q[$], den_q[$], lnk_q[$];
    int mm_first_q[$], mm_max_q[$];
    int busy_cycles, dones, mm_cycles;
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 2; frame++) begin
      mm_addr_q.delete(); mm_data_q.delete(); idx_q.delete(); idx_mem_q.delete();
      cs_q.delete(); den_q.delete(); lnk_q.delete(); mm_first_q.delete(); mm_max_q.delete();
      busy_cycles = 0; dones = 0; mm_cycles = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (busy) begin
        if (phase == PH_MINMAX) begin
          mm_cycles++;
          if (mm_cycles <= 2*J) mm_addr_q.push_back(int'(mem_addr));
          if (mm_valid) begin
            mm_data_q.push_back(mm_cycles);
            mm_first_q.push_back(int'(mm_first));
            mm_max_q.push_back(int'(mm_max));
          end
        end
        if (phase == PH_INDEX) idx_mem_q.push_back(int'(mem_addr));
        if (idx_we) idx_q.push_back(int'(idx_addr));
        if (cs_we)  cs_q.push_back(int'(cs_k));
        if (den_we) den_q.push_back(int'(den_sel));
        if (lnk_we) lnk_q.push_back(int'(lnk_sel));
        if (done) dones++;
        if (busy_cycles == 3) start = 1;   // must be ignored
        if (busy_cycles == 4) start = 0;
        busy_cycles++;
        @(negedge clk);
      end
      expect_eq("busy cycles", busy_cycles, 6*J + N + 2);
      expect_eq("done pulses", dones, 1);
      expect_eq("minmax cycles", mm_cycles, 2*J + 1);
      expect_eq("minmax samples", mm_data_q.size(), 2*J);
      for (int i = 0; i < 2*J; i++) begin
        expect_eq("minmax address", mm_addr_q[i], i % J);
        expect_eq("minmax data cycle", mm_data_q[i], i + 2);
        expect_eq("minmax first", mm_first_q[i], int'(i % J == 0));
        expect_eq("minmax pass", mm_max_q[i], int'(i >= J));
      end
      expect_eq("cs cycles", cs_q.size(), N);
      for (int k = 0; k < N; k++) expect_eq("cs dimension", cs_q[k], k);
      expect_eq("index writes", idx_q.size(), J);
      for (int i = 0; i < J; i++) begin
        expect_eq("index address", idx_q[i], i);
        expect_eq("index read address", idx_mem_q[i], i);
      end
      expect_eq("density cycles", den_q.size(), J);
      for (int i = 0; i < J; i++) expect_eq("density reference", den_q[i], i);
      expect_eq("link cycles", lnk_q.size(), 2*J - 1);
      for (int i = 0; i < 2*J-1; i++)
        expect_eq("link reference", lnk_q[i], (i < J-1) ? i : 2*J-2-i);
      repeat (3) @(negedge clk);
      expect_eq("idle after frame", int'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
