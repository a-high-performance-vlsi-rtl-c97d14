// tb_link_pe: self-checking test of the link element, N = 22.
// Random pairs of bins are built so that each dimension differs by 0, 1 or
// more (with a chosen probability), including the extremes 0 and 7; the
// expected NEIGHBOR is "every dimension differs by at most one". Labels and
// counts are random (often equal): the outputs must be the label and count
// of the reference when its count is strictly larger, the element's own
// otherwise, and all zero for a non-neighbour.
module tb_link_pe;
  localparam int unsigned N = 22, CW = 15;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [N-1:0][2:0] ref_bin, comp_bin, ref_coo, comp_coo, coor;
  logic [CW-1:0]     ref_cou, comp_cou, cell_count;
  logic              neighbor;
  int checks = 0, failures = 0, n_yes = 0, n_no = 0;

  link_pe #(.N(N), .CW(CW)) dut (.ref_bin, .ref_coo, .ref_cou, .comp_bin, .comp_coo, .comp_cou,
    .neighbor, .coor, .cell_count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      bit e;
      int pfar;
      logic [N-1:0][2:0] e_coo;
      logic [CW-1:0]     e_cou;
      pfar = (t % 2) ? 0 : 3;
      for (int k = 0; k < N; k++) begin
        int d, av, bv;
        av = $urandom_range(0, 7);
        d  = ($urandom_range(0, 99) < pfar) ? $urandom_range(2, 7) : $urandom_range(0, 1);
        bv = ($urandom_range(0, 1) && av + d <= 7) ? av + d : ((av - d >= 0) ? av - d : av + d);
        if (bv > 7) bv = av;
        ref_bin[k] = 3'(av); comp_bin[k] = 3'(bv);
      end
      if (t == 0) begin ref_bin = '0; comp_bin = '1; end
      ref_coo  = (N*3)'({$urandom, $urandom, $urandom});
      comp_coo = (N*3)'({$urandom, $urandom, $urandom});
      ref_cou  = CW'($urandom_range(0, 20));
      comp_cou = (t % 4 == 0) ? ref_cou : CW'($urandom_range(0, 20));
      #1;
      e = 1;
      for (int k = 0; k < N; k++) begin
        int da;
        da = int'(ref_bin[k]) - int'(comp_bin[k]);
        if (da > 1 || da < -1) e = 0;
      end
      if (e) n_yes++; else n_no++;
      if (!e)                       begin e_coo = '0;       e_cou = '0;       end
      else if (ref_cou > comp_cou)  begin e_coo = ref_coo;  e_cou = ref_cou;  end
      else                          begin e_coo = comp_coo; e_cou = comp_cou; end
      checks += 3;
      if (neighbor !== e)       begin failures++; $display("pair %0d: neighbor %b vs %b", t, neighbor, e); end
      if (coor !== e_coo)       begin failures++; $display("pair %0d: label differs", t); end
      if (cell_count !== e_cou) begin failures++; $display("pair %0d: count %0d vs %0d", t, cell_count, e_cou); end
    end
    checks++;
    if (n_yes == 0 || n_no == 0) begin failures++; $display("both outcomes not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
