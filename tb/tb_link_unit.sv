// tb_link_unit: self-checking test of the link and cluster step (N = 2,
// J = 12 and N = 3, J = 10).
// Part 1 uses a hand-made 2-D histogram: a chain of bins x = 3, 2, 1, 0 on
// y = 0 with densities 3, 5, 7, 9 (stored in that index order, so the label
// must travel against the first pass), and a second hill at x = 5..7, y = 5
// with densities 2, 6, 4, separated from the first by two cells, plus
// repeated vectors in the same bins. After the 2J-1 steps (0..J-2, then
// J-1..0) every vector of the first hill must carry label (0,0) with count
// 9 and every vector of the second hill label (6,5) with count 6.
// Part 2 runs random histograms and compares each step with a sequential
// model of the step rule: winner = the largest count among max(ref, j) over
// the reference's neighbours j (ties to the higher index), written into all
// neighbours. Counts label changes in each of the two passes.
module tb_link_unit;
  localparam int unsigned N = 2, J = 12, AW = 4, CW = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [N-1:0][2:0] coord [J], linkto [J], best_coord;
  logic [CW-1:0]     count [J], best_cnt;
  logic [AW-1:0]     sel;
  logic [J-1:0]      upd;
  int checks = 0, failures = 0, chg_fwd = 0, chg_bwd = 0, far_pairs = 0;

  link_unit #(.N(N), .J(J)) dut (.coord, .linkto, .count, .sel, .upd, .best_coord, .best_cnt);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit nb(input logic [N-1:0][2:0] a, input logic [N-1:0][2:0] b);
    for (int k = 0; k < N; k++) begin
      int d;
      d = int'(a[k]) - int'(b[k]);
      if (d > 1 || d < -1) return 0;
    end
    return 1;
  endfunction

  // run the 2J-1 steps, compare every step with the model, apply the writes
  task automatic run_link();
    for (int t = 0; t < 2*J-1; t++) begin
      int s, bj;
      logic [N-1:0][2:0] c_coo, b_coo;
      int c_cou, b_cou;
      logic [J-1:0] e_upd;
      s = (t < J-1) ? t : 2*J-2-t;
      @(negedge clk);
      sel = AW'(s);
      #1;
      b_cou = -1; b_coo = '0;
      for (int j = 0; j < J; j++) begin
        e_upd[j] = nb(coord[s], coord[j]);
        if (!e_upd[j]) far_pairs++;
        if (e_upd[j]) begin
          if (count[s] > count[j]) begin c_coo = linkto[s]; c_cou = int'(count[s]); end
          else                     begin c_coo = linkto[j]; c_cou = int'(count[j]); end
          if (c_cou >= b_cou) begin b_cou = c_cou; b_coo = c_coo; end
        end
      end
      checks += 3;
      if (upd !== e_upd)           begin failures++; $display("step %0d upd %b vs %b", t, upd, e_upd); end
      if (int'(best_cnt) != b_cou) begin failures++; $display("step %0d cnt %0d vs %0d", t, best_cnt, b_cou); end
      if (best_coord !== b_coo)    begin failures++; $display("step %0d label differs", t); end
      @(posedge clk);
      for (int j = 0; j < J; j++)
        if (upd[j]) begin
          if (linkto[j] != best_coord) begin
            if (t < J-1) chg_fwd++; else chg_bwd++;
          end
          linkto[j] = best_coord; count[j] = best_cnt;
        end
    end
  endtask

  initial begin
    // ---- part 1: two hills ----
    int xs [J] = '{3, 2, 1, 0, 6, 5, 7, 0, 1, 6, 3, 2};
    int ys [J] = '{0, 0, 0, 0, 5, 5, 5, 0, 0, 5, 0, 0};
    int ds [8] = '{9, 7, 5, 3, 0, 2, 6, 4};   // density by x
    sel = 0;
    for (int j = 0; j < J; j++) begin
      coord[j]  = {3'(ys[j]), 3'(xs[j])};
      linkto[j] = coord[j];
      count[j]  = CW'(ds[xs[j]]);
    end
    run_link();
    for (int j = 0; j < J; j++) begin
      logic [N-1:0][2:0] e;
      int ec;
      e  = (xs[j] <= 3) ? {3'd0, 3'd0} : {3'd5, 3'd6};
      ec = (xs[j] <= 3) ? 9 : 6;
      checks++;
      if (linkto[j] !== e || int'(count[j]) != ec) begin
        failures++; $display("vector %0d label %h/%0d, expected %h/%0d", j, linkto[j], count[j], e, ec);
      end
    end
    // ---- part 2: random histograms against the step model ----
    for (int r = 0; r < 30; r++) begin
      for (int j = 0; j < J; j++) begin
        coord[j]  = {3'($urandom_range(0, 4)), 3'($urandom_range(0, 4))};
        linkto[j] = coord[j];
        count[j]  = CW'($urandom_range(1, 15));
      end
      run_link();
    end
    checks += 3;
    if (chg_fwd == 0)   begin failures++; $display("no label change in the forward pass"); end
    if (chg_bwd == 0)   begin failures++; $display("no label change in the backward pass"); end
    if (far_pairs == 0) begin failures++; $display("no non-neighbour pair"); end
    $display("forward changes %0d, backward changes %0d", chg_fwd, chg_bwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
