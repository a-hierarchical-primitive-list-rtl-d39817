// List manager test with the real index table and list buffer: random appends
// to 24 lists, with gaps between requests, into a small buffer (32 blocks of
// 8) so that first blocks, chained blocks and overflow drops all happen. A
// reference model replays the allocation rule; afterwards every list is
// walked through the memories (following link slots) and compared record by
// record, and the event counts and the cycles per append are checked.
module tb_list_manager;
  import hpl_pkg::*;
  localparam int N = 8, DEPTH = 256, NL = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0;
  logic req_valid = 0, req_ready;
  append_t req;
  lidx_t it_raddr, it_waddr;
  pl_entry_t it_rdata, it_wdata, unused_rb;
  logic it_rvalid, it_we, unused_rbv;
  logic lb_we, busy, overflow, ev_new_list, ev_chain, ev_drop;
  lbaddr_t lb_waddr, lb_raddr;
  saddr_t lb_wdata, lb_rdata;
  logic [LBADDR_W:0] lb_used;

  always #5 clk = ~clk;

  list_manager #(.N(N), .DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .req_valid, .req_ready, .req,
    .it_raddr, .it_rdata, .it_rvalid, .it_we, .it_waddr, .it_wdata,
    .lb_we, .lb_waddr, .lb_wdata, .busy, .overflow, .ev_new_list, .ev_chain, .ev_drop, .lb_used);

  list_index_table #(.NUM_LISTS(NL)) u_it (.clk, .rst_n, .clear, .we(it_we), .waddr(it_waddr),
    .wdata(it_wdata), .ra_addr(it_raddr), .ra_data(it_rdata), .ra_valid(it_rvalid),
    .rb_addr('0), .rb_data(unused_rb), .rb_valid(unused_rbv));

  list_buffer #(.DEPTH(DEPTH)) u_lb (.clk, .we(lb_we), .waddr(lb_waddr), .wdata(lb_wdata),
    .raddr(lb_raddr), .rdata(lb_rdata));

  int n_new = 0, n_chain = 0, n_drop = 0;
  always @(posedge clk) begin
    if (ev_new_list) n_new++;
    if (ev_chain) n_chain++;
    if (ev_drop) n_drop++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  saddr_t model [int][$];
  int blocks_used, exp_new, exp_chain, exp_drop;

  task automatic model_append(int l, saddr_t sa);
    bit need;
    need = !model.exists(l) || (model[l].size() % (N - 1) == 0);
    if (need) begin
      if ((blocks_used + 1) * N > DEPTH) begin exp_drop++; return; end
      blocks_used++;
      if (!model.exists(l)) exp_new++; else exp_chain++;
    end
    model[l].push_back(sa);
  endtask

  task automatic read_lb(int a, output saddr_t d);
    @(negedge clk);
    lb_raddr = lbaddr_t'(a);
    @(negedge clk);
    d = lb_rdata;
  endtask

  initial begin
    int t0, t1;
    saddr_t d;
    req = '0; lb_raddr = '0;
    blocks_used = 0; exp_new = 0; exp_chain = 0; exp_drop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // timing: a lone append to a fresh list completes in two cycles
    @(negedge clk);
    req_valid = 1; req.lidx = lidx_t'(40); req.saddr = saddr_t'(24'h000003);
    t0 = int'($time);
    @(negedge clk);
    req_valid = 0;
    model_append(40, saddr_t'(24'h000003));
    while (busy) @(negedge clk);
    t1 = int'($time);
    checks++;
    if ((t1 - t0) / 10 != 2) begin failures++; $display("FAIL append took %0d cycles", (t1 - t0) / 10); end
    // random appends
    for (int n = 0; n < 300; n++) begin
      int l;
      saddr_t sa;
      l = $urandom_range(0, 23);
      sa = saddr_t'($urandom);
      @(negedge clk);
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      req_valid = 1; req.lidx = lidx_t'(l); req.saddr = sa;
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      model_append(l, sa);
      @(negedge clk);
      req_valid = 0;
    end
    while (busy) @(negedge clk);
    // walk every list
    for (int l = 0; l < NL; l++) begin
      pl_entry_t e;
      int a, cnt;
      e = u_it.mem[l];
      checks++;
      if (u_it.valid[l] != model.exists(l)) begin
        failures++; $display("FAIL list %0d valid %0d", l, u_it.valid[l]); continue;
      end
      if (!model.exists(l)) continue;
      checks++;
      if (int'(e.count) != model[l].size()) begin
        failures++; $display("FAIL list %0d count %0d expected %0d", l, e.count, model[l].size());
        continue;
      end
      a = int'(e.entry); cnt = 0;
      while (cnt < model[l].size()) begin
        read_lb(a, d);
        if (a % N == N - 1) begin a = int'(d); continue; end
        checks++;
        if (d != model[l][cnt]) begin
          failures++; $display("FAIL list %0d record %0d = %h expected %h", l, cnt, d, model[l][cnt]);
        end
        cnt++; a++;
      end
      checks++;
      if (a != int'(e.next)) begin failures++; $display("FAIL list %0d next %0d vs %0d", l, e.next, a); end
    end
    checks++;
    if (n_new != exp_new || n_chain != exp_chain || n_drop != exp_drop || overflow != (exp_drop > 0)) begin
      failures++;
      $display("FAIL events new %0d/%0d chain %0d/%0d drop %0d/%0d", n_new, exp_new, n_chain, exp_chain,
               n_drop, exp_drop);
    end
    checks++;
    if (exp_chain == 0 || exp_drop == 0) begin failures++; $display("FAIL chaining or overflow never exercised"); end
    $display("new lists %0d, chained blocks %0d, dropped records %0d", n_new, n_chain, n_drop);
    // clear empties everything
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    checks++;
    if (overflow || lb_used != 0 || u_it.valid != '0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
