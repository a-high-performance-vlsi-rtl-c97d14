// tb_feature_mem: self-checking test of one frame-memory block.
// Fills a 64-word memory with random words, reads every word back and checks
// that the data appears exactly one clock after the address; also checks
// that a read during no write leaves contents unchanged. Watchdog included.
module tb_feature_mem;
  localparam int unsigned DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        we;
  logic [5:0]  addr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  feature_mem #(.DEPTH(DEPTH), .WIDTH(32)) dut (.clk, .we, .addr, .wdata, .rdata);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; addr = 6'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = DEPTH-1; i >= 0; i--) begin
      @(negedge clk); addr = 6'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++; $display("mismatch addr %0d: %h vs %h", i, rdata, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
