// tb_density_unit: self-checking test of the bin-density step (N = 3, J = 16).
// The testbench holds the bank D contents. Vectors are drawn from a few pool
// so that pool have several members. The reference runs over all J vectors,
// one per cycle, and the unit's writes are applied. Each cycle the update
// vector and count are checked; at the end every vector must hold the number
// of vectors sharing its bin (counted directly) and be marked binned. Counts
// how often a reference was already binned (no update).
module tb_density_unit;
  localparam int unsigned N = 3, J = 16, AW = 4, CW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [N-1:0][2:0] coord [J];
  logic [J-1:0]      binned, upd;
  logic [CW-1:0]     count [J];
  logic [AW-1:0]     sel;
  logic [CW-1:0]     cnt;
  int checks = 0, failures = 0, skipped = 0;

  density_unit #(.N(N), .J(J)) dut (.coord, .binned, .sel, .upd, .cnt);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0][2:0] pool [5];
    for (int round = 0; round < 20; round++) begin
      for (int b = 0; b < 5; b++) pool[b] = (N*3)'($urandom);
      for (int j = 0; j < J; j++) begin
        coord[j] = pool[$urandom_range(0, (round % 2) ? 4 : 2)];
        binned[j] = 0; count[j] = 0;
      end
      for (int s = 0; s < J; s++) begin
        logic [J-1:0] e_upd;
        int e_cnt;
        @(negedge clk);
        sel = AW'(s);
        #1;
        e_cnt = 0;
        for (int j = 0; j < J; j++) begin
          e_upd[j] = !binned[s] && (coord[j] == coord[s]);
          e_cnt += int'(e_upd[j]);
        end
        if (binned[s]) skipped++;
        checks += 2;
        if (upd !== e_upd)     begin failures++; $display("upd %b vs %b", upd, e_upd); end
        if (int'(cnt) != e_cnt) begin failures++; $display("cnt %0d vs %0d", cnt, e_cnt); end
        @(posedge clk);
        for (int j = 0; j < J; j++) if (upd[j]) begin binned[j] = 1; count[j] = cnt; end
      end
      for (int j = 0; j < J; j++) begin
        int dens;
        dens = 0;
        for (int i = 0; i < J; i++) if (coord[i] == coord[j]) dens++;
        checks++;
        if (int'(count[j]) != dens || !binned[j]) begin
          failures++; $display("vector %0d density %0d vs %0d", j, count[j], dens);
        end
      end
    end
    checks++;
    if (skipped == 0) begin failures++; $display("binned reference never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
