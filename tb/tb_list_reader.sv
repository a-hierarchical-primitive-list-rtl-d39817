// List reader test. The testbench builds hierarchical lists itself for a
// 640x480 screen (20x15 tiles, five layers): every list gets 0..17 random
// records in 8-entry blocks taken in a scattered order and chained through
// the link slots, written straight into the index table and list buffer. Then
// tiles are requested and the streamed records are compared, in order, with
// the concatenation of the lists that cover the tile (layer 0 to 4; square,
// horizontal, vertical, unaligned grid within a layer), with all five layers
// or only three in use. Records are consumed
// with random stalls; on unstalled tiles the cycle count is checked too.
module tb_list_reader;
  import hpl_pkg::*;
  import hpl_ref_pkg::*;
  localparam int N = 8, NLAY = 5, TX = 20, TY = 15, DEPTH = 8192;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  tcoord_t tiles_x, tiles_y;
  layer_t top_layer;
  logic tile_valid = 0, tile_ready;
  tcoord_t tile_x, tile_y;
  layer_t off_layer;
  ltype_e off_type;
  lidx_t off_base;
  lidx_t it_raddr;
  pl_entry_t it_rdata, unused_ra;
  logic it_rvalid, unused_rav;
  lbaddr_t lb_raddr;
  saddr_t lb_rdata;
  logic rec_valid, rec_ready, tile_done, busy;
  saddr_t rec_saddr;
  ltype_e rec_ltype;
  layer_t rec_layer;
  // table write side, driven by the testbench
  logic it_we = 0, lb_we = 0, off_we = 0;
  lidx_t it_waddr;
  pl_entry_t it_wdata;
  lbaddr_t lb_waddr;
  saddr_t lb_wdata;
  layer_t off_wlayer;
  ltype_e off_wtype;
  lidx_t off_wdata;
  bit stall = 1'b1;

  always #5 clk = ~clk;

  list_reader #(.NUM_LAYERS(NLAY), .N(N)) dut (.clk, .rst_n, .tiles_x, .tiles_y, .top_layer, .tile_valid,
    .tile_ready, .tile_x, .tile_y, .off_layer, .off_type, .off_base, .it_raddr, .it_rdata,
    .it_rvalid, .lb_raddr, .lb_rdata, .rec_valid, .rec_ready, .rec_saddr, .rec_ltype, .rec_layer,
    .tile_done, .busy);

  layer_offset_table #(.NUM_LAYERS(NLAY)) u_off (.clk, .rst_n, .we(off_we), .wlayer(off_wlayer),
    .wtype(off_wtype), .wdata(off_wdata), .ra_layer(off_layer), .ra_type(off_type),
    .ra_data(off_base), .rb_layer('0), .rb_type(LT_SQUARE), .rb_data());

  list_index_table #(.NUM_LISTS(1024)) u_it (.clk, .rst_n, .clear(1'b0), .we(it_we),
    .waddr(it_waddr), .wdata(it_wdata), .ra_addr('0), .ra_data(unused_ra), .ra_valid(unused_rav),
    .rb_addr(it_raddr), .rb_data(it_rdata), .rb_valid(it_rvalid));

  list_buffer #(.DEPTH(DEPTH)) u_lb (.clk, .we(lb_we), .waddr(lb_waddr), .wdata(lb_wdata),
    .raddr(lb_raddr), .rdata(lb_rdata));

  always @(negedge clk) rec_ready = stall ? ($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  saddr_t lists [int][$];
  int nlinks [int];
  int free_blocks [$];

  task automatic wr_lb(int a, saddr_t d);
    @(negedge clk);
    lb_we = 1; lb_waddr = lbaddr_t'(a); lb_wdata = d;
    @(negedge clk);
    lb_we = 0;
  endtask

  // Lay one list out in blocks, chaining them.
  task automatic build_list(int idx, int cnt);
    int blk, slot, first;
    pl_entry_t e;
    blk = free_blocks.pop_front(); first = blk; slot = 0;
    nlinks[idx] = 0;
    for (int k = 0; k < cnt; k++) begin
      saddr_t sa;
      if (slot == N - 1) begin
        int nb;
        nb = free_blocks.pop_front();
        wr_lb(blk * N + N - 1, saddr_t'(nb * N));
        blk = nb; slot = 0;
        nlinks[idx]++;
      end
      sa = saddr_t'($urandom);
      lists[idx].push_back(sa);
      wr_lb(blk * N + slot, sa);
      slot++;
    end
    e.entry = lbaddr_t'(first * N);
    e.next  = lbaddr_t'(blk * N + slot);
    e.count = 16'(cnt);
    @(negedge clk);
    it_we = 1; it_waddr = lidx_t'(idx); it_wdata = e;
    @(negedge clk);
    it_we = 0;
  endtask

  initial begin
    int total, cyc, exp_cyc;
    saddr_t exp_q [$];
    int exp_t [$], exp_l [$];
    tiles_x = tcoord_t'(TX); tiles_y = tcoord_t'(TY);
    tile_x = '0; tile_y = '0;
    it_waddr = '0; it_wdata = '0; lb_waddr = '0; lb_wdata = '0;
    off_wlayer = '0; off_wtype = LT_SQUARE; off_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < NLAY; l++)
      for (int t = 0; t < 4; t++) begin
        @(negedge clk);
        off_we = 1; off_wlayer = layer_t'(l); off_wtype = ltype_e'(t);
        off_wdata = lidx_t'(offset(l, t, TX, TY));
      end
    @(negedge clk);
    off_we = 0;
    total = total_lists(NLAY, TX, TY);
    // scattered block order
    for (int b = 0; b < DEPTH / N; b++) free_blocks.push_back(b);
    free_blocks.shuffle();
    for (int i = 0; i < total; i++) begin
      int c;
      c = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 17);
      if (c > 0) build_list(i, c);
    end
    for (int n = 0; n < 2 * TX * TY; n++) begin
      int x, y;
      x = n % TX; y = (n / TX) % TY;
      stall = (n >= TX * TY);
      top_layer = layer_t'((n % 4 == 3) ? 2 : NLAY - 1);
      exp_q.delete(); exp_t.delete(); exp_l.delete();
      exp_cyc = 2;  // accept, done
      for (int l = 0; l <= int'(top_layer); l++)
        for (int t = 0; t < 4; t++) begin
          int idx;
          saddr_t lq [$];
          idx = tile_list(t, l, x, y, TX, TY);
          if (idx < 0) begin exp_cyc += 1; continue; end
          exp_cyc += 2;
          if (!lists.exists(idx)) continue;
          exp_cyc += 2 * (lists[idx].size() + nlinks[idx]);
          lq = lists[idx];
          foreach (lq[k]) begin
            exp_q.push_back(lq[k]); exp_t.push_back(t); exp_l.push_back(l);
          end
        end
      @(negedge clk);
      tile_valid = 1; tile_x = tcoord_t'(x); tile_y = tcoord_t'(y);
      cyc = 0;
      @(posedge clk);
      #1 tile_valid = 0;
      cyc = 1;
      forever begin
        @(posedge clk);
        cyc++;
        if (rec_valid && rec_ready) begin
          checks++;
          if (exp_q.size() == 0 || rec_saddr != exp_q[0] || int'(rec_ltype) != exp_t[0]
              || int'(rec_layer) != exp_l[0]) begin
            failures++;
            $display("FAIL tile %0d,%0d record %h (kind %0d layer %0d)", x, y, rec_saddr, rec_ltype, rec_layer);
          end
          if (exp_q.size() > 0) begin
            void'(exp_q.pop_front()); void'(exp_t.pop_front()); void'(exp_l.pop_front());
          end
        end
        if (tile_done) break;
      end
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("FAIL tile %0d,%0d missed %0d records", x, y, exp_q.size()); end
      if (!stall) begin
        checks++;
        if (cyc != exp_cyc) begin failures++; $display("FAIL tile %0d,%0d took %0d cycles, expected %0d", x, y, cyc, exp_cyc); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
