// List buffer test: random writes, then reads of random addresses, with the
// read data checked one cycle after the address against a shadow copy.
module tb_list_buffer;
  import hpl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  lbaddr_t waddr, raddr;
  saddr_t wdata, rdata;
  saddr_t shadow [int];

  always #5 clk = ~clk;

  list_buffer #(.DEPTH(1024)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = '0; wdata = '0; raddr = '0;
    for (int n = 0; n < 3000; n++) begin
      int a;
      a = $urandom_range(0, 1023);
      @(negedge clk);
      we = 1; waddr = lbaddr_t'(a); wdata = saddr_t'($urandom); shadow[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    foreach (shadow[a]) begin
      @(negedge clk);
      raddr = lbaddr_t'(a);
      @(negedge clk);
      checks++;
      if (rdata != shadow[a]) begin
        failures++;
        $display("FAIL addr %0d read %h expected %h", a, rdata, shadow[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
