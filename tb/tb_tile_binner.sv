// Tile binner test: random triangles on a 640x480 screen (20x15 tiles,
// threshold 4) and a 1600x1200 one (50x38 tiles, threshold 10), with random
// stalls on the append side. Every fitting result and every append request is
// compared with the reference model (same list indices in the same row-major
// order), and the cycle count of an unstalled primitive (1 + cells) is
// checked. Counts that each list kind and both step-downs occur.
module tb_tile_binner;
  import hpl_pkg::*;
  import hpl_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  tcoord_t tiles_x, tiles_y;
  logic [TCOORD_W:0] thresh;
  layer_t top_layer;
  logic prim_valid = 0, prim_ready;
  saddr_t prim_saddr;
  pcoord_t prim_vx [3], prim_vy [3];
  layer_t off_layer;
  ltype_e off_type;
  lidx_t off_base;
  logic app_valid, app_ready;
  append_t app;
  logic fit_valid, fit_step, fit_clamped, busy;
  ltype_e fit_ltype;
  layer_t fit_layer;
  int kinds [4];
  int steps_sq = 0, steps_rect = 0;
  bit stall = 1'b1;

  always #5 clk = ~clk;

  tile_binner #(.NUM_LAYERS(5)) dut (.clk, .rst_n, .tiles_x, .tiles_y, .thresh, .ug_en(1'b1), .top_layer, .prim_valid,
    .prim_ready, .prim_saddr, .prim_vx, .prim_vy, .off_layer, .off_type, .off_base, .app_valid,
    .app_ready, .app, .fit_valid, .fit_ltype, .fit_layer, .fit_step, .fit_clamped, .busy);

  // offset table as the reference layout
  assign off_base = lidx_t'(offset(int'(off_layer), int'(off_type), int'(tiles_x), int'(tiles_y)));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) app_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    int tx, ty, th, cx, cy, x0, y0, x1, y1, ncell, t0;
    fit_t r;
    int exp_idx [$];
    prim_saddr = '0;
    for (int i = 0; i < 3; i++) begin prim_vx[i] = '0; prim_vy[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      if (n < 750) begin tx = 20; ty = 15; th = 4; end
      else begin tx = 50; ty = 38; th = 10; end
      stall = (n % 10 != 0);
      tiles_x = tcoord_t'(tx); tiles_y = tcoord_t'(ty); thresh = (TCOORD_W+1)'(th);
      cx = $urandom_range(0, tx * 32 - 1); cy = $urandom_range(0, ty * 32 - 1);
      for (int i = 0; i < 3; i++) begin
        int s;
        s = (n % 4 == 0) ? 400 : 100;
        prim_vx[i] = pcoord_t'((cx + $urandom_range(0, s) > tx * 32 - 1) ? tx * 32 - 1 : cx + $urandom_range(0, s));
        prim_vy[i] = pcoord_t'((cy + $urandom_range(0, s) > ty * 32 - 1) ? ty * 32 - 1 : cy + $urandom_range(0, s));
      end
      if (n % 9 == 0) prim_vx[1] = pcoord_t'(tx * 32 - 1 - $urandom_range(0, 40));
      prim_saddr = saddr_t'(n);
      x0 = 9999; y0 = 9999; x1 = -1; y1 = -1;
      for (int i = 0; i < 3; i++) begin
        if (int'(prim_vx[i]) / 32 < x0) x0 = int'(prim_vx[i]) / 32;
        if (int'(prim_vx[i]) / 32 > x1) x1 = int'(prim_vx[i]) / 32;
        if (int'(prim_vy[i]) / 32 < y0) y0 = int'(prim_vy[i]) / 32;
        if (int'(prim_vy[i]) / 32 > y1) y1 = int'(prim_vy[i]) / 32;
      end
      top_layer = layer_t'((n % 3 == 0) ? 3 : 4);
      r = fit(x0, y0, x1, y1, tx, ty, th, int'(top_layer) + 1);
      kinds[r.ltype]++;
      if (r.step != 0 && r.ltype == 0) steps_sq++;
      if (r.step != 0 && r.ltype != 0) steps_rect++;
      exp_idx.delete();
      for (int yy = cy_of(r.ltype, r.layer, y0, ty); yy <= cy_of(r.ltype, r.layer, y1, ty); yy++)
        for (int xx = cx_of(r.ltype, r.layer, x0, tx); xx <= cx_of(r.ltype, r.layer, x1, tx); xx++)
          exp_idx.push_back(lindex(r.ltype, r.layer, xx, yy, tx, ty));
      ncell = exp_idx.size();
      @(negedge clk);
      prim_valid = 1;
      #1;
      checks++;
      if (!fit_valid || int'(fit_ltype) != r.ltype || int'(fit_layer) != r.layer || int'(fit_step) != r.step) begin
        failures++;
        $display("FAIL prim %0d fit %0d/%0d/%0d expected %0d/%0d/%0d", n, fit_ltype, fit_layer,
                 fit_step, r.ltype, r.layer, r.step);
      end
      t0 = 0;
      @(posedge clk);  // accepted here
      t0++;
      #1 prim_valid = 0;
      while (exp_idx.size() > 0) begin
        @(posedge clk);
        t0++;
        if (app_valid && app_ready) begin
          checks++;
          if (int'(app.lidx) != exp_idx[0] || app.saddr != saddr_t'(n)) begin
            failures++;
            $display("FAIL prim %0d append list %0d expected %0d", n, app.lidx, exp_idx[0]);
          end
          void'(exp_idx.pop_front());
        end
      end
      #1;
      checks++;
      if (busy || app_valid) begin failures++; $display("FAIL prim %0d extra appends", n); end
      if (!stall) begin
        checks++;
        if (t0 != ncell + 1) begin
          failures++;
          $display("FAIL prim %0d took %0d cycles for %0d cells", n, t0, ncell);
        end
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (kinds[i] == 0) begin failures++; $display("FAIL list kind %0d never chosen", i); end
    end
    checks++;
    if (steps_sq == 0 || steps_rect == 0) begin failures++; $display("FAIL step-down not seen"); end
    $display("kinds: square %0d hrect %0d vrect %0d ugrid %0d; step-downs square %0d rect %0d",
             kinds[0], kinds[1], kinds[2], kinds[3], steps_sq, steps_rect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
