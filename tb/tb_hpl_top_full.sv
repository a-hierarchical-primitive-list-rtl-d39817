// Full-size run of the hierarchical primitive-list engine at its default
// sizes (five layers, 8-entry blocks, 65536-entry list buffer, 4096 lists):
// one complete frame on a 1600x1200 screen (50x38 tiles, rectangle threshold
// 10, four layers in use as evaluated for that resolution) with 3000 random
// triangles, binned and then read back tile by tile.
// The reference model predicts the fitting result of every primitive and the
// exact record sequence of every tile, and every primitive must reach every
// tile its bounding box touches. The buffer is large enough that nothing is
// dropped here; overflow is exercised by the reduced-size end-to-end test.
module tb_hpl_top_full;
  import hpl_pkg::*;
  import hpl_ref_pkg::*;
  localparam int NLAY = 5, N = 8, LBD = 65536;
  localparam bit REQUIRE_DROP = 0;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, frame_clear = 0;
  tcoord_t tiles_x, tiles_y;
  logic [TCOORD_W:0] thresh;
  layer_t top_layer;
  logic off_we = 0;
  layer_t off_wlayer;
  ltype_e off_wtype;
  lidx_t off_wdata;
  logic prim_valid = 0, prim_ready;
  saddr_t prim_saddr;
  pcoord_t prim_vx [3], prim_vy [3];
  logic tile_valid = 0, tile_ready;
  tcoord_t tile_x, tile_y;
  logic rec_valid, rec_ready, tile_done;
  logic rz_valid, rz_last, rz_busy;   // tile order stream, unused here
  tcoord_t rz_x, rz_y;
  saddr_t rec_saddr;
  ltype_e rec_ltype;
  layer_t rec_layer;
  logic bin_busy, overflow, fit_valid, fit_step, fit_clamped, ev_new_list, ev_chain, ev_drop;
  logic [LBADDR_W:0] lb_used;
  ltype_e fit_ltype;
  layer_t fit_layer;

  always #5 clk = ~clk;

  hpl_top dut (
    .clk, .rst_n, .frame_clear, .tiles_x, .tiles_y, .thresh, .ug_en(1'b1), .top_layer, .off_we, .off_wlayer, .off_wtype,
    .off_wdata, .prim_valid, .prim_ready, .prim_saddr, .prim_vx, .prim_vy, .tile_valid,
    .tile_ready, .tile_x, .tile_y, .rec_valid, .rec_ready, .rec_saddr, .rec_ltype, .rec_layer,
    .tile_done, .rz_start(1'b0), .rz_valid, .rz_ready(1'b0), .rz_x, .rz_y, .rz_last, .rz_busy, .bin_busy, .overflow, .lb_used, .fit_valid, .fit_ltype, .fit_layer, .fit_step,
    .fit_clamped, .ev_new_list, .ev_chain, .ev_drop);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) rec_ready = ($urandom_range(0, 4) != 0);

  // mechanism counters
  int m_kind [4];
  int m_step_sq = 0, m_step_rect = 0, m_clamp = 0, m_new = 0, m_chain = 0, m_drop = 0;
  int m_redundant = 0, m_wait = 0;
  always @(posedge clk) begin
    if (fit_valid && prim_ready) begin
      m_kind[fit_ltype]++;
      if (fit_step && fit_ltype == LT_SQUARE) m_step_sq++;
      if (fit_step && fit_ltype != LT_SQUARE) m_step_rect++;
      if (fit_clamped) m_clamp++;
    end
    if (ev_new_list) m_new++;
    if (ev_chain) m_chain++;
    if (ev_drop) m_drop++;
    if (tile_valid && !tile_ready && bin_busy) m_wait++;
  end

  // reference state of one frame
  saddr_t lists [int][$];
  int blocks_used;
  int exp_drops;
  int bx0 [int], by0 [int], bx1 [int], by1 [int];

  task automatic model_append(int idx, saddr_t sa);
    if (!lists.exists(idx) || lists[idx].size() % (N - 1) == 0) begin
      if ((blocks_used + 1) * N > LBD) begin exp_drops++; return; end
      blocks_used++;
    end
    lists[idx].push_back(sa);
  endtask

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

  task automatic run_frame(int tx, int ty, int th, int nl, int nprims, bit check_cover);
    int x0, y0, x1, y1, wait_tile;
    fit_t r;
    lists.delete(); bx0.delete(); by0.delete(); bx1.delete(); by1.delete();
    blocks_used = 0; exp_drops = 0;
    @(negedge clk);
    frame_clear = 1;
    tiles_x = tcoord_t'(tx); tiles_y = tcoord_t'(ty); thresh = (TCOORD_W+1)'(th);
    top_layer = layer_t'(nl - 1);
    @(negedge clk);
    frame_clear = 0;
    for (int l = 0; l < NLAY; l++)
      for (int t = 0; t < 4; t++) begin
        off_we = 1; off_wlayer = layer_t'(l); off_wtype = ltype_e'(t);
        off_wdata = lidx_t'(offset(l, t, tx, ty));
        @(negedge clk);
      end
    off_we = 0;
    // bin
    for (int n = 0; n < nprims; n++) begin
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
      r = fit(x0, y0, x1, y1, tx, ty, th, nl);
      for (int yy = cy_of(r.ltype, r.layer, y0, ty); yy <= cy_of(r.ltype, r.layer, y1, ty); yy++)
        for (int xx = cx_of(r.ltype, r.layer, x0, tx); xx <= cx_of(r.ltype, r.layer, x1, tx); xx++)
          model_append(lindex(r.ltype, r.layer, xx, yy, tx, ty), saddr_t'(n + 1));
      prim_valid = 1;
      @(posedge clk);
      while (!prim_ready) @(posedge clk);
      checks++;
      if (!fit_valid || int'(fit_ltype) != r.ltype || int'(fit_layer) != r.layer) begin
        failures++;
        $display("FAIL prim %0d fit %0d/%0d expected %0d/%0d", n, fit_ltype, fit_layer, r.ltype, r.layer);
      end
      @(negedge clk);
      prim_valid = 0;
    end
    // read back every tile; the first request arrives while binning may still run
    wait_tile = 1;
    for (int y = 0; y < ty; y++)
      for (int x = 0; x < tx; x++) begin
        saddr_t exp_q [$];
        bit got [int];
        for (int l = 0; l < nl; l++)
          for (int t = 0; t < 4; t++) begin
            int idx;
            idx = tile_list(t, l, x, y, tx, ty);
            if (idx >= 0 && lists.exists(idx))
              exp_q = {exp_q, lists[idx]};
          end
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
            if (!(x >= bx0[p] && x <= bx1[p] && y >= by0[p] && y <= by1[p])) m_redundant++;
            checks++;
            if (exp_q.size() == 0 || rec_saddr != exp_q[0]) begin
              failures++;
              $display("FAIL tile %0d,%0d got %0d expected %0d", x, y, rec_saddr,
                       (exp_q.size() > 0) ? int'(exp_q[0]) : -1);
            end
            if (exp_q.size() > 0) void'(exp_q.pop_front());
          end
          if (tile_done) break;
        end
        checks++;
        if (exp_q.size() != 0) begin failures++; $display("FAIL tile %0d,%0d missed %0d", x, y, exp_q.size()); end
        if (check_cover)
          foreach (bx0[p])
            if (x >= bx0[p] && x <= bx1[p] && y >= by0[p] && y <= by1[p]) begin
              checks++;
              if (!got.exists(p)) begin failures++; $display("FAIL tile %0d,%0d lacks prim %0d", x, y, p); end
            end
        @(negedge clk);
      end
    checks++;
    if (overflow != (exp_drops > 0) || int'(lb_used) != blocks_used * N) begin
      failures++;
      $display("FAIL frame status overflow %0d (drops %0d) used %0d expected %0d", overflow,
               exp_drops, lb_used, blocks_used * N);
    end
    $display("frame %0dx%0d tiles, %0d layers: %0d primitives, %0d blocks, %0d records dropped", tx, ty, nl,
             nprims, blocks_used, exp_drops);
  endtask

  initial begin
    prim_saddr = '0; tile_x = '0; tile_y = '0;
    off_wlayer = '0; off_wtype = LT_SQUARE; off_wdata = '0;
    tiles_x = '0; tiles_y = '0; thresh = '0; top_layer = '0;
    for (int i = 0; i < 3; i++) begin prim_vx[i] = '0; prim_vy[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(50, 38, 10, 4, 3000, 1);
    begin
      automatic string names [12] = '{"square list", "horizontal rectangle", "vertical rectangle",
        "unaligned grid", "square step-down", "rectangle step-down", "top-layer clamp",
        "first block", "chained block", "overflow drop", "redundant read", "render waits for binning"};
      int cnt [12];
      cnt = '{m_kind[0], m_kind[1], m_kind[2], m_kind[3], m_step_sq, m_step_rect, m_clamp, m_new,
              m_chain, m_drop, m_redundant, m_wait};
      for (int i = 0; i < 12; i++) begin
        checks++;
        $display("mechanism %-26s %0d", names[i], cnt[i]);
        if (cnt[i] == 0 && (REQUIRE_DROP || i != 9)) begin failures++; $display("FAIL mechanism never happened: %s", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
