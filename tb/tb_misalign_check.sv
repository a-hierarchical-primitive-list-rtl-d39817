// Random test of the misalignment and unaligned-grid boundary checks on a
// 1600x1200 screen (50x38 tiles) and a 320x240 one (10x8 tiles), for every
// layer, against division-based reference rules; also counts that each
// outcome (aligned, fits the unaligned grid, fails it, rectangle misaligned)
// was exercised.
module tb_misalign_check;
  import hpl_pkg::*;
  import hpl_ref_pkg::*;
  int checks = 0, failures = 0;
  tbbox_t bb;
  logic [TCOORD_W:0] w, h;
  layer_t layer_id;
  shape_e shape;
  tcoord_t tiles_x, tiles_y;
  malign_e malign;
  logic rect_mis;
  int seen [4];

  misalign_check dut (.bb, .w, .h, .layer_id, .shape, .tiles_x, .tiles_y, .malign, .rect_mis);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tx, ty, x0, y0, x1, y1, l, g, em, er;
    bit mis, pass;
    for (int n = 0; n < 6000; n++) begin
      tx = (n % 2 != 0) ? 50 : 10; ty = (n % 2 != 0) ? 38 : 8;
      x0 = $urandom_range(0, tx - 1); y0 = $urandom_range(0, ty - 1);
      x1 = x0 + $urandom_range(0, 9); y1 = y0 + $urandom_range(0, 9);
      if (x1 > tx - 1) x1 = tx - 1;
      if (y1 > ty - 1) y1 = ty - 1;
      l = $urandom_range(0, 4); g = 1 << l;
      bb = '{x0: tcoord_t'(x0), y0: tcoord_t'(y0), x1: tcoord_t'(x1), y1: tcoord_t'(y1)};
      w = (TCOORD_W+1)'(x1 - x0 + 1); h = (TCOORD_W+1)'(y1 - y0 + 1);
      layer_id = layer_t'(l);
      shape = shape_e'($urandom_range(0, 2));
      tiles_x = tcoord_t'(tx); tiles_y = tcoord_t'(ty);
      mis  = crosses(x0, x1, g) || crosses(y0, y1, g);
      pass = (l >= 1) && ug_ok(x0, x1, g, tx) && ug_ok(y0, y1, g, ty);
      em = !mis ? 0 : pass ? 1 : 2;
      er = (shape == SH_WIDE) ? int'(crosses(y0, y1, g)) :
           (shape == SH_HIGH) ? int'(crosses(x0, x1, g)) : 0;
      #1;
      checks++;
      seen[em]++;
      if (er != 0) seen[3]++;
      if (int'(malign) != em || int'(rect_mis) != er) begin
        failures++;
        $display("FAIL box %0d,%0d-%0d,%0d L%0d shape %0d -> %0d/%0d expected %0d/%0d",
                 x0, y0, x1, y1, l, shape, malign, rect_mis, em, er);
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL outcome %0d never seen", i); end
    end
    $display("outcomes: aligned %0d, unaligned grid %0d, boundary fail %0d, rect misaligned %0d",
             seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
