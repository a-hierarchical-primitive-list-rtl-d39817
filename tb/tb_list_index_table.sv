// Index table test: entries start NULL, written entries read back valid with
// one cycle of latency on both ports, and a frame clear makes them NULL again.
module tb_list_index_table;
  import hpl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, we = 0;
  lidx_t waddr, ra_addr, rb_addr;
  pl_entry_t wdata, ra_data, rb_data;
  logic ra_valid, rb_valid;
  pl_entry_t shadow [int];

  always #5 clk = ~clk;

  list_index_table #(.NUM_LISTS(256)) dut (.clk, .rst_n, .clear, .we, .waddr, .wdata,
    .ra_addr, .ra_data, .ra_valid, .rb_addr, .rb_data, .rb_valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(int a, int b);
    @(negedge clk);
    ra_addr = lidx_t'(a); rb_addr = lidx_t'(b);
    @(negedge clk);
    checks++;
    if (ra_valid != shadow.exists(a) || rb_valid != shadow.exists(b)
        || (ra_valid && ra_data != shadow[a]) || (rb_valid && rb_data != shadow[b])) begin
      failures++;
      $display("FAIL read %0d (v%0d) %0d (v%0d)", a, ra_valid, b, rb_valid);
    end
  endtask

  initial begin
    waddr = '0; wdata = '0; ra_addr = '0; rb_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < 200; n++) begin
        int a;
        a = $urandom_range(0, 255);
        @(negedge clk);
        we = 1; waddr = lidx_t'(a);
        wdata = '{entry: lbaddr_t'($urandom), next: lbaddr_t'($urandom), count: 16'($urandom)};
        shadow[a] = wdata;
        @(negedge clk);
        we = 0;
        read_check(a, $urandom_range(0, 255));
      end
      for (int n = 0; n < 256; n++) read_check(n, 255 - n);
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      shadow.delete();
      for (int n = 0; n < 256; n += 17) read_check(n, n + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
