// Random test of the whole primitive-hierarchy fitting unit against the
// reference model: list kind, final layer and step-down for random boxes on
// the four screen sizes (with their rectangle thresholds 2, 4, 8, 10), plus
// the worked example of the design (a 1x4 box fits layer 0, a 2x4 box
// layer 1), with three, four and five layers in use, and with the unaligned
// grids switched on and (for one box in six) off. Counts that every list kind and both kinds of step-down occur.
module tb_hier_fit;
  import hpl_pkg::*;
  import hpl_ref_pkg::*;
  int checks = 0, failures = 0;
  tbbox_t bb;
  logic [TCOORD_W:0] w, h, thresh;
  tcoord_t tiles_x, tiles_y;
  ltype_e ltype;
  layer_t layer_id, sel_layer;
  logic step_down, clamped;
  layer_t top_layer;
  int nl_now = 5;
  logic ug_en = 1'b1;
  int kinds [4];
  int steps_sq = 0, steps_rect = 0;

  hier_fit #(.NUM_LAYERS(5)) dut (.bb, .w, .h, .tiles_x, .tiles_y, .thresh, .ltype, .layer_id,
                                  .sel_layer, .step_down, .top_layer, .ug_en, .clamped);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int x0, int y0, int x1, int y1, int tx, int ty, int th);
    fit_t r;
    bb = '{x0: tcoord_t'(x0), y0: tcoord_t'(y0), x1: tcoord_t'(x1), y1: tcoord_t'(y1)};
    w = (TCOORD_W+1)'(x1 - x0 + 1); h = (TCOORD_W+1)'(y1 - y0 + 1);
    tiles_x = tcoord_t'(tx); tiles_y = tcoord_t'(ty); thresh = (TCOORD_W+1)'(th);
    top_layer = layer_t'(nl_now - 1);
    r = fit(x0, y0, x1, y1, tx, ty, th, nl_now, ug_en);
    #1;
    checks++;
    kinds[r.ltype]++;
    if (r.step != 0 && r.ltype == 0) steps_sq++;
    if (r.step != 0 && r.ltype != 0) steps_rect++;
    if (int'(ltype) != r.ltype || int'(layer_id) != r.layer || int'(step_down) != r.step
        || int'(sel_layer) != r.sel
        || clamped != (imin(x1 - x0 + 1, y1 - y0 + 1) > (1 << r.sel))) begin
      failures++;
      $display("FAIL box %0d,%0d-%0d,%0d -> kind %0d layer %0d step %0d, expected %0d %0d %0d",
               x0, y0, x1, y1, ltype, layer_id, step_down, r.ltype, r.layer, r.step);
    end
  endtask

  initial begin
    int tx, ty, th, x0, y0, x1, y1, sz;
    // shorter side as reference: a 1-wide, 4-high box stays in layer 0
    apply(0, 0, 0, 3, 50, 38, 10);
    checks++;
    if (layer_id != 0 || ltype != LT_SQUARE) begin failures++; $display("FAIL 1x4 example"); end
    // a 2-wide, 4-high aligned box goes to layer 1
    apply(2, 4, 3, 7, 50, 38, 10);
    checks++;
    if (layer_id != 1 || ltype != LT_SQUARE) begin failures++; $display("FAIL 2x4 example"); end
    for (int n = 0; n < 8000; n++) begin
      case (n % 4)
        0: begin tx = 10; ty = 8;  th = 2;  end
        1: begin tx = 20; ty = 15; th = 4;  end
        2: begin tx = 40; ty = 32; th = 8;  end
        default: begin tx = 50; ty = 38; th = 10; end
      endcase
      sz = (n % 3 == 0) ? 24 : 6;
      nl_now = (n % 5 == 0) ? 3 : (n % 5 == 1) ? 4 : 5;
      x0 = $urandom_range(0, tx - 1); y0 = $urandom_range(0, ty - 1);
      x1 = x0 + $urandom_range(0, sz); y1 = y0 + $urandom_range(0, sz);
      if (n % 7 == 0) x1 = x0 + $urandom_range(th, th + 20);
      if (n % 11 == 0) y1 = y0 + $urandom_range(th, th + 20);
      if (x1 > tx - 1) x1 = tx - 1;
      if (y1 > ty - 1) y1 = ty - 1;
      ug_en = (n % 6 != 5);
      apply(x0, y0, x1, y1, tx, ty, th);
    end
    ug_en = 1'b1;
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
