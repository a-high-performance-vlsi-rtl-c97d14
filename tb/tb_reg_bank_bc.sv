// tb_reg_bank_bc: self-checking test of the N x 32 register bank.
// Random per-entry writes, indexed writes and both at once (the indexed port
// must win on the same entry) are checked against a model after every clock.
// Reset must clear all entries.
module tb_reg_bank_bc;
  localparam int unsigned N = 22;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0]             we_vec;
  logic [N-1:0][31:0]       d_vec, q, model;
  logic                     we;
  logic [4:0]               waddr;
  logic [31:0]              wdata;
  int checks = 0, failures = 0;

  reg_bank_bc #(.N(N)) dut (.clk, .rst_n, .we_vec, .d_vec, .we, .waddr, .wdata, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_vec = 0; d_vec = 0; we = 0; waddr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (q !== '0) begin failures++; $display("reset value wrong"); end
    model = '0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) d_vec[k] = $urandom;
      we_vec = N'({$urandom, $urandom});
      we     = $urandom_range(0, 1);
      waddr  = 5'($urandom_range(0, N-1));
      wdata  = $urandom;
      for (int k = 0; k < N; k++) if (we_vec[k]) model[k] = d_vec[k];
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin failures++; $display("bank mismatch at step %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
