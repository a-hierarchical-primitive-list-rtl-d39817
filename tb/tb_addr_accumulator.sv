// Address accumulator test: successive allocations return 0, N, 2N, ...;
// idle cycles do not move it; it reports full once fewer than N entries are
// left and then holds; a clear starts again from 0.
module tb_addr_accumulator;
  import hpl_pkg::*;
  localparam int N = 8, DEPTH = 100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, alloc = 0;
  lbaddr_t blk_addr;
  logic full;
  logic [LBADDR_W:0] used;

  always #5 clk = ~clk;

  addr_accumulator #(.N(N), .DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .alloc, .blk_addr, .full, .used);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      expv = 0;
      for (int n = 0; n < 30; n++) begin
        @(negedge clk);
        alloc = ($urandom_range(0, 3) != 0);
        checks++;
        if (int'(blk_addr) != (expv % 65536) || full != (expv + N > DEPTH) || int'(used) != expv) begin
          failures++;
          $display("FAIL step %0d addr %0d full %0d expected %0d", n, blk_addr, full, expv);
        end
        if (alloc && expv + N <= DEPTH) expv += N;
      end
      @(negedge clk);
      alloc = 0;
      checks++;
      if (!full) begin failures++; $display("FAIL never full"); end
      clear = 1;
      @(negedge clk);
      clear = 0;
      checks++;
      if (blk_addr != 0 || full) begin failures++; $display("FAIL clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
