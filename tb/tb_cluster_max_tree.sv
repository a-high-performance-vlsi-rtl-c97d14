// tb_cluster_max_tree: self-checking test of the maximum tree and its nodes.
// A 13-input tree (N = 4, 6-bit counts) receives random counts, often with
// repeated maxima; the winner must carry the largest count and, among equal
// largest counts, the coordinates of the highest-numbered input.
module tb_cluster_max_tree;
  localparam int unsigned NUM = 13, N = 4, CW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [N-1:0][2:0] coo [NUM];
  logic [CW-1:0]     cou [NUM];
  logic [N-1:0][2:0] coor;
  logic [CW-1:0]     cell_count;
  int checks = 0, failures = 0, ties = 0;

  cluster_max_tree #(.NUM(NUM), .N(N), .CW(CW)) dut (.coo, .cou, .coor, .cell_count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int best, nbest;
      for (int i = 0; i < NUM; i++) begin
        coo[i] = (N*3)'(i * 7 + 1);
        cou[i] = (t % 3 == 0) ? CW'($urandom_range(0, 3)) : CW'($urandom);
      end
      #1;
      best = 0; nbest = 0;
      for (int i = 0; i < NUM; i++) if (int'(cou[i]) >= int'(cou[best])) best = i;
      for (int i = 0; i < NUM; i++) if (cou[i] == cou[best]) nbest++;
      if (nbest > 1) ties++;
      checks += 2;
      if (cell_count !== cou[best]) begin failures++; $display("count %0d vs %0d", cell_count, cou[best]); end
      if (coor !== coo[best])       begin failures++; $display("winner coordinates wrong at %0d", t); end
    end
    checks++;
    if (ties == 0) begin failures++; $display("ties never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
