// tb_index_pe: self-checking test of the histogram index element.
// For every Q in 3..8 and random ranges, the cell size is formed as the
// cell-size step does, then random samples inside the range, the range ends
// and samples just below bin boundaries are indexed. The expected index is
// min(floor((f - f_min) / CS), Q - 1), computed with 64-bit division; a zero
// cell size must give 0. Counts how often the top-bin limit was exercised.
module tb_index_pe;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [31:0] f, fmin;
  logic [31:0]        cs;
  logic [3:0]         q;
  logic [2:0]         idx;
  int checks = 0, failures = 0, clamped = 0;

  index_pe dut (.f, .fmin, .cs, .q, .idx);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int qq, input longint lo, input longint csv, input longint fv);
    longint e;
    f = 32'(fv); fmin = 32'(lo); cs = 32'(csv); q = 4'(qq);
    #1;
    if (csv == 0) e = 0;
    else begin
      e = (fv - lo) / csv;
      if (e > qq - 1) begin e = qq - 1; clamped++; end
    end
    checks++;
    if (longint'(idx) != e) begin
      failures++; $display("Q=%0d f=%0d fmin=%0d cs=%0d idx=%0d exp=%0d", qq, fv, lo, csv, idx, e);
    end
  endtask

  initial begin
    for (int qq = 3; qq <= 8; qq++) begin
      for (int t = 0; t < 200; t++) begin
        longint lo, hi, csv, fv;
        logic signed [31:0] a, b;
        a = $signed($urandom); b = $signed($urandom);
        if (t == 0) begin a = 32'sh8000_0000; b = 32'sh7fff_ffff; end
        lo  = (a < b) ? longint'(a) : longint'(b);
        hi  = (a < b) ? longint'(b) : longint'(a);
        csv = ((hi - lo) * ((longint'(1) <<< 31) / qq)) >>> 31;
        check_one(qq, lo, csv, lo);
        check_one(qq, lo, csv, hi);
        for (int i = 0; i < 8; i++) begin
          fv = lo + longint'($urandom_range(0, 32'hffff_ffff)) % (hi - lo + 1);
          check_one(qq, lo, csv, fv);
        end
        for (int bnd = 1; bnd < qq; bnd++) begin
          check_one(qq, lo, csv, lo + bnd * csv - 1);
          check_one(qq, lo, csv, lo + bnd * csv);
        end
      end
      check_one(qq, 100, 0, 100);   // all samples equal
    end
    checks++;
    if (clamped == 0) begin failures++; $display("top-bin limit never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
