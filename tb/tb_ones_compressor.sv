// tb_ones_compressor: self-checking test of the ones compressor.
// Two instances, 37 inputs and 961 inputs (the 128x128-pixel frame size),
// receive random bit patterns of varying density plus all-zero and all-one
// patterns; each count is compared with a bit-by-bit count made here.
module tb_ones_compressor;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [36:0]  b37;
  logic [960:0] b961;
  logic [5:0]   c37;
  logic [9:0]   c961;
  int checks = 0, failures = 0;

  ones_compressor #(.J(37))  dut_a (.bits(b37),  .count(c37));
  ones_compressor #(.J(961)) dut_b (.bits(b961), .count(c961));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int e37, e961, dens;
      dens = $urandom_range(0, 100);
      for (int i = 0; i < 37; i++)  b37[i]  = ($urandom_range(0, 99) < dens);
      for (int i = 0; i < 961; i++) b961[i] = ($urandom_range(0, 99) < dens);
      if (t == 0) begin b37 = '0; b961 = '0; end
      if (t == 1) begin b37 = '1; b961 = '1; end
      #1;
      e37 = 0; e961 = 0;
      for (int i = 0; i < 37; i++)  e37  += int'(b37[i]);
      for (int i = 0; i < 961; i++) e961 += int'(b961[i]);
      checks += 2;
      if (int'(c37)  != e37)  begin failures++; $display("J=37 %0d vs %0d", c37, e37); end
      if (int'(c961) != e961) begin failures++; $display("J=961 %0d vs %0d", c961, e961); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
