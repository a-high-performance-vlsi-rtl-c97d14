// tb_minmax_pe: self-checking test of the Min-Max element.
// The testbench plays the role of register banks B and C: it keeps the
// running minimum and maximum and writes the sample when the element asks.
// Several random passes (including negative numbers and the extreme values
// -1 and 1-2^-31) are run as a minimum pass followed by a maximum pass; the
// results are compared with a minimum and maximum computed directly from
// the sample list. Also checks that nothing is written when `valid` is low.
module tb_minmax_pe;
  logic clk = 0;
  always #5 clk = ~clk;
  logic valid, first, find_max, wr_min, wr_max;
  logic signed [31:0] sample, cur_min, cur_max;
  logic signed [31:0] xs [40];
  int checks = 0, failures = 0;

  minmax_pe dut (.valid, .first, .find_max, .sample, .cur_min, .cur_max, .wr_min, .wr_max);

  always_ff @(posedge clk) begin
    if (wr_min) cur_min <= sample;
    if (wr_max) cur_max <= sample;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [31:0] emin, emax;
    valid = 0; first = 0; find_max = 0; sample = 0; cur_min = 0; cur_max = 0;
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < 40; i++) xs[i] = $signed($urandom);
      if (t == 1) xs[7]  = 32'sh8000_0000;
      if (t == 2) xs[39] = 32'sh7fff_ffff;
      if (t == 3) xs[0]  = 32'sh8000_0000;
      emin = xs[0]; emax = xs[0];
      for (int i = 1; i < 40; i++) begin
        if (xs[i] < emin) emin = xs[i];
        if (xs[i] > emax) emax = xs[i];
      end
      for (int p = 0; p < 2; p++)
        for (int i = 0; i < 40; i++) begin
          @(negedge clk);
          valid = 1; first = (i == 0); find_max = (p == 1); sample = xs[i];
        end
      @(negedge clk); valid = 0;
      checks++; if (cur_min !== emin) begin failures++; $display("min %h vs %h", cur_min, emin); end
      checks++; if (cur_max !== emax) begin failures++; $display("max %h vs %h", cur_max, emax); end
      // invalid samples must not write
      sample = 32'sh8000_0000; find_max = 0; first = 1; #1;
      checks++; if (wr_min || wr_max) begin failures++; $display("write while not valid"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
