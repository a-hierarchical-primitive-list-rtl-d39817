// Workload sweeps of the hierarchical primitive-list engine: the
// configurations the design is evaluated in, run on the RTL with synthetic
// scenes.
//
// Ten copies of hpl_top, identical except for the list-buffer block size
// N = 2, 4, 8, ... 1024 (the default 65536-entry list buffer and 4096-entry
// index table in all of them), receive the same primitive stream. A primitive
// is offered to all copies at once and accepted when every copy is ready.
// After binning, each copy reads back every tile on its own, and the record
// sequence of every tile is compared with a reference model that also
// predicts, per block size, which records are dropped when the list buffer
// runs out.
//
// Frames, each with the same mix of random triangles on screens of 320x240,
// 640x480, 1280x1024 and 1600x1200 (10x8, 20x15, 40x32 and 50x38 tiles):
//   - square hierarchies only (unaligned grids off, rectangle threshold at
//     its maximum) with 2, 3, 4 and 5 layers at every resolution;
//   - at three layers for 320x240 and four for the others, with rectangle
//     thresholds 2, 4, 8 and 10 tiles: unaligned grids only, rectangles only,
//     and both (the main configuration).
// Per frame it prints the records a flat per-tile list would need, the
// records the hierarchy stores, the reduction, the records read at tiles the
// primitive's box does not touch (redundant reads), and per block size the
// list-buffer entries the frame needs and the records dropped. Checked:
// every record sequence, the list-buffer fill level and overflow flag of
// every copy, that no primitive takes more records than the tiles its box
// touches, and, where nothing was dropped, that every primitive reaches every
// tile of its box. The scenes are random; the triangle mix is this
// testbench's choice.
module tb_hpl_workloads;
  import hpl_pkg::*;
  import hpl_ref_pkg::*;
  localparam int NI = 10;
  localparam int NLAY = 5, LBD = 65536, NP = 300;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, frame_clear = 0;
  tcoord_t tiles_x, tiles_y;
  logic [TCOORD_W:0] thresh;
  logic ug_en;
  layer_t top_layer;
  logic off_we = 0;
  layer_t off_wlayer;
  ltype_e off_wtype;
  lidx_t off_wdata;
  logic prim_valid = 0;
  saddr_t prim_saddr;
  pcoord_t prim_vx [3], prim_vy [3];

  logic [NI-1:0] prim_ready, read_go, read_done;
  logic [NI-1:0] overflow;
  logic [LBADDR_W:0] lb_used [NI];
  wire all_ready = &prim_ready;

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state of one frame: records per list and block size, keyed
  // list index * 16 + copy
  saddr_t lists [int][$];
  int cnt_all [int];              // records offered per list
  int blocks_used [NI];
  int drops [NI];
  int bx0 [int], by0 [int], bx1 [int], by1 [int];
  int redundant;

  function automatic int bsize(int i);
    return 2 << i;
  endfunction

  task automatic model_append(int idx, saddr_t sa);
    if (!cnt_all.exists(idx)) cnt_all[idx] = 0;
    cnt_all[idx]++;
    for (int i = 0; i < NI; i++) begin
      int key = idx * 16 + i;
      if (!lists.exists(key) || lists[key].size() % (bsize(i) - 1) == 0) begin
        if ((blocks_used[i] + 1) * bsize(i) > LBD) begin drops[i]++; continue; end
        blocks_used[i]++;
      end
      lists[key].push_back(sa);
    end
  endtask

  for (genvar gi = 0; gi < NI; gi++) begin : g_cp
    logic tile_valid = 0, tile_ready;
    tcoord_t tile_x, tile_y;
    logic rec_valid, rec_ready, tile_done;
    saddr_t rec_saddr;
    ltype_e rec_ltype, fit_ltype;
    layer_t rec_layer, fit_layer;
    logic rz_valid, rz_last, rz_busy;   // tile order stream, unused here
    tcoord_t rz_x, rz_y;
    logic bin_busy, fit_valid, fit_step, fit_clamped, ev_new_list, ev_chain, ev_drop;

    hpl_top #(.NUM_LAYERS(NLAY), .N(2 << gi), .LB_DEPTH(LBD), .NUM_LISTS(4096)) dut (
      .clk, .rst_n, .frame_clear, .tiles_x, .tiles_y, .thresh, .ug_en, .top_layer,
      .off_we, .off_wlayer, .off_wtype, .off_wdata,
      .prim_valid(prim_valid && all_ready), .prim_ready(prim_ready[gi]), .prim_saddr,
      .prim_vx, .prim_vy, .tile_valid, .tile_ready, .tile_x, .tile_y, .rec_valid, .rec_ready,
      .rec_saddr, .rec_ltype, .rec_layer, .tile_done, .rz_start(1'b0), .rz_valid, .rz_ready(1'b0), .rz_x, .rz_y, .rz_last, .rz_busy,
      .bin_busy, .overflow(overflow[gi]),
      .lb_used(lb_used[gi]), .fit_valid, .fit_ltype, .fit_layer, .fit_step, .fit_clamped,
      .ev_new_list, .ev_chain, .ev_drop);

    always @(negedge clk) rec_ready = ($urandom_range(0, 3) != 0);

    initial begin
      read_done[gi] = 1'b0;
      tile_x = '0; tile_y = '0;
      forever begin
        @(posedge clk);
        if (read_go[gi] && !read_done[gi]) begin
          int tx, ty, nl;
          tx = int'(tiles_x); ty = int'(tiles_y); nl = int'(top_layer) + 1;
          for (int y = 0; y < ty; y++)
            for (int x = 0; x < tx; x++) begin
              saddr_t exp_q [$];
              bit got [int];
              for (int l = 0; l < nl; l++)
                for (int t = 0; t < 4; t++) begin
                  int idx;
                  idx = tile_list(t, l, x, y, tx, ty);
                  if (idx >= 0 && lists.exists(idx * 16 + gi))
                    exp_q = {exp_q, lists[idx * 16 + gi]};
                end
              @(negedge clk);
              tile_valid = 1; tile_x = tcoord_t'(x); tile_y = tcoord_t'(y);
              @(posedge clk);
              while (!tile_ready) @(posedge clk);
              #1 tile_valid = 0;
              forever begin
                @(posedge clk);
                if (rec_valid && rec_ready) begin
                  int p;
                  p = int'(rec_saddr);
                  got[p] = 1;
                  if (gi == 2 && !(x >= bx0[p] && x <= bx1[p] && y >= by0[p] && y <= by1[p]))
                    redundant++;
                  checks++;
                  if (exp_q.size() == 0 || rec_saddr != exp_q[0]) begin
                    failures++;
                    $display("FAIL N=%0d tile %0d,%0d got %0d expected %0d", 2 << gi, x, y,
                             rec_saddr, (exp_q.size() > 0) ? int'(exp_q[0]) : -1);
                  end
                  if (exp_q.size() > 0) void'(exp_q.pop_front());
                end
                if (tile_done) break;
              end
              checks++;
              if (exp_q.size() != 0) begin
                failures++;
                $display("FAIL N=%0d tile %0d,%0d missed %0d", 2 << gi, x, y, exp_q.size());
              end
              if (drops[gi] == 0)
                foreach (bx0[p])
                  if (x >= bx0[p] && x <= bx1[p] && y >= by0[p] && y <= by1[p]) begin
                    checks++;
                    if (!got.exists(p)) begin
                      failures++;
                      $display("FAIL N=%0d tile %0d,%0d lacks prim %0d", 2 << gi, x, y, p);
                    end
                  end
            end
          read_done[gi] = 1'b1;
        end
      end
    end
  end

  task automatic make_prim(int tx, int ty, int n);
    int cx, cy, k, s, sx, sy;
    cx = $urandom_range(0, tx * 32 - 1); cy = $urandom_range(0, ty * 32 - 1);
    k = n % 8;
    sx = (k < 3) ? 40 : (k < 5) ? 200 : (k == 5) ? 800 : (k == 6) ? 600 : 60;
    sy = (k < 3) ? 40 : (k < 5) ? 200 : (k == 5) ? 800 : (k == 6) ? 60 : 600;
    for (int i = 0; i < 3; i++) begin
      s = cx + $urandom_range(0, sx); prim_vx[i] = pcoord_t'(s > tx * 32 - 1 ? tx * 32 - 1 : s);
      s = cy + $urandom_range(0, sy); prim_vy[i] = pcoord_t'(s > ty * 32 - 1 ? ty * 32 - 1 : s);
    end
  endtask

  task automatic run_frame(string tag, int tx, int ty, int th, bit ug, int nl);
    int x0, y0, x1, y1, flat, stored, ncell;
    string line;
    fit_t r;
    lists.delete(); cnt_all.delete(); bx0.delete(); by0.delete(); bx1.delete(); by1.delete();
    for (int i = 0; i < NI; i++) begin blocks_used[i] = 0; drops[i] = 0; end
    redundant = 0; flat = 0; stored = 0;
    @(negedge clk);
    frame_clear = 1;
    tiles_x = tcoord_t'(tx); tiles_y = tcoord_t'(ty); thresh = (TCOORD_W+1)'(th);
    ug_en = ug; top_layer = layer_t'(nl - 1);
    @(negedge clk);
    frame_clear = 0;
    for (int l = 0; l < NLAY; l++)
      for (int t = 0; t < 4; t++) begin
        off_we = 1; off_wlayer = layer_t'(l); off_wtype = ltype_e'(t);
        off_wdata = lidx_t'(offset(l, t, tx, ty));
        @(negedge clk);
      end
    off_we = 0;
    for (int n = 0; n < NP; n++) begin
      make_prim(tx, ty, n);
      prim_saddr = saddr_t'(n + 1);
      x0 = 9999; y0 = 9999; x1 = -1; y1 = -1;
      for (int i = 0; i < 3; i++) begin
        if (int'(prim_vx[i]) / 32 < x0) x0 = int'(prim_vx[i]) / 32;
        if (int'(prim_vx[i]) / 32 > x1) x1 = int'(prim_vx[i]) / 32;
        if (int'(prim_vy[i]) / 32 < y0) y0 = int'(prim_vy[i]) / 32;
        if (int'(prim_vy[i]) / 32 > y1) y1 = int'(prim_vy[i]) / 32;
      end
      bx0[n + 1] = x0; by0[n + 1] = y0; bx1[n + 1] = x1; by1[n + 1] = y1;
      r = fit(x0, y0, x1, y1, tx, ty, th, nl, ug);
      ncell = 0;
      for (int yy = cy_of(r.ltype, r.layer, y0, ty); yy <= cy_of(r.ltype, r.layer, y1, ty); yy++)
        for (int xx = cx_of(r.ltype, r.layer, x0, tx); xx <= cx_of(r.ltype, r.layer, x1, tx); xx++) begin
          model_append(lindex(r.ltype, r.layer, xx, yy, tx, ty), saddr_t'(n + 1));
          ncell++;
        end
      flat += (x1 - x0 + 1) * (y1 - y0 + 1);
      stored += ncell;
      checks++;
      if (ncell > (x1 - x0 + 1) * (y1 - y0 + 1)) begin
        failures++;
        $display("FAIL prim %0d takes %0d records for %0d tiles", n + 1, ncell, (x1 - x0 + 1) * (y1 - y0 + 1));
      end
      prim_valid = 1;
      @(posedge clk);
      while (!all_ready) @(posedge clk);
      @(negedge clk);
      prim_valid = 0;
    end
    read_go = '1;
    while (read_done != '1) @(posedge clk);
    read_go = '0;
    @(posedge clk);
    read_done = '0;
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (overflow[i] != (drops[i] > 0) || int'(lb_used[i]) != blocks_used[i] * bsize(i)) begin
        failures++;
        $display("FAIL N=%0d overflow %0d (drops %0d) used %0d expected %0d", bsize(i), overflow[i],
                 drops[i], lb_used[i], blocks_used[i] * bsize(i));
      end
    end
    $display("%s %0dx%0d tiles, %0d layers, threshold %0d, unaligned grids %s: flat %0d records, stored %0d (%0d%% less), redundant reads %0d",
             tag, tx, ty, nl, th, ug ? "on" : "off", flat, stored, (flat - stored) * 100 / flat, redundant);
    line = "  list-buffer entries needed / records dropped per block size:";
    for (int i = 0; i < NI; i++) begin
      int need = 0;
      foreach (cnt_all[idx]) need += cdiv(cnt_all[idx], bsize(i) - 1) * bsize(i);
      line = {line, $sformatf(" N=%0d %0d/%0d", bsize(i), need, drops[i])};
    end
    $display("%s", line);
  endtask

  initial begin
    automatic int rx [4] = '{10, 20, 40, 50};
    automatic int ry [4] = '{8, 15, 32, 38};
    automatic int rth [4] = '{2, 4, 8, 10};
    automatic int rnl [4] = '{3, 4, 4, 4};
    prim_saddr = '0; read_go = '0;
    off_wlayer = '0; off_wtype = LT_SQUARE; off_wdata = '0;
    tiles_x = '0; tiles_y = '0; thresh = '0; top_layer = '0; ug_en = 1'b0;
    for (int i = 0; i < 3; i++) begin prim_vx[i] = '0; prim_vy[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // square hierarchies only, 2 to 5 layers
    for (int s = 0; s < 4; s++)
      for (int nl = 2; nl <= 5; nl++)
        run_frame("square only:", rx[s], ry[s], 255, 1'b0, nl);
    // unaligned grids and rectangular layers
    for (int s = 0; s < 4; s++) begin
      run_frame("unaligned grids:", rx[s], ry[s], 255, 1'b1, rnl[s]);
      run_frame("rectangles:", rx[s], ry[s], rth[s], 1'b0, rnl[s]);
      run_frame("both:", rx[s], ry[s], rth[s], 1'b1, rnl[s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
