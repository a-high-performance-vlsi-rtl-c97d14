// tb_cs_pe: self-checking test of the cell-size element and its 1/Q table.
// For every Q in 3..8 and random pairs f_min <= f_max (including the full
// range -1 .. 1-2^-31 and an empty range) the result must equal
// floor((f_max - f_min) * floor(2^31/Q) / 2^31), computed here with 64-bit
// integers, and must lie within Q+2 LSBs of the exact (f_max - f_min)/Q.
module tb_cs_pe;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [31:0] fmin, fmax;
  logic [3:0]         q;
  logic [31:0]        cs;
  int checks = 0, failures = 0;

  cs_pe dut (.fmin, .fmax, .q, .cs);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint range, qinv, exp_cs, exact_x_q;
    for (int qq = 3; qq <= 8; qq++) begin
      for (int t = 0; t < 300; t++) begin
        logic signed [31:0] a, b;
        a = $signed($urandom); b = $signed($urandom);
        if (t == 0) begin a = 32'sh8000_0000; b = 32'sh7fff_ffff; end
        if (t == 1) begin a = 32'sh1234_5678; b = a; end
        fmin = (a < b) ? a : b; fmax = (a < b) ? b : a; q = 4'(qq);
        #1;
        range  = longint'(fmax) - longint'(fmin);
        qinv   = (longint'(1) <<< 31) / qq;
        exp_cs = (range * qinv) >>> 31;
        checks++;
        if (longint'(cs) != exp_cs) begin
          failures++; $display("Q=%0d range=%0d cs=%0d exp=%0d", qq, range, cs, exp_cs);
        end
        exact_x_q = longint'(cs) * qq;
        checks++;
        if (exact_x_q > range || range - exact_x_q > 2 * qq + 2) begin
          failures++; $display("Q=%0d cs=%0d not close to range/Q (range %0d)", qq, cs, range);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
