// Random test of the tile-based bounding box: min corner rounded down to a
// tile edge, max corner rounded up (an exact edge moved one tile on), all
// worked out with integer division on random triangles, plus edge cases.
module tb_tile_bbox;
  import hpl_pkg::*;
  int checks = 0, failures = 0;
  pcoord_t vx [3], vy [3];
  tbbox_t bb;
  logic [TCOORD_W:0] w, h;

  tile_bbox dut (.vx, .vy, .bb, .w, .h);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int mnx, mxx, mny, mxy, ex0, ex1, ey0, ey1;
    mnx = 4096; mny = 4096; mxx = -1; mxy = -1;
    for (int i = 0; i < 3; i++) begin
      if (int'(vx[i]) < mnx) mnx = int'(vx[i]);
      if (int'(vx[i]) > mxx) mxx = int'(vx[i]);
      if (int'(vy[i]) < mny) mny = int'(vy[i]);
      if (int'(vy[i]) > mxy) mxy = int'(vy[i]);
    end
    ex0 = mnx / 32; ey0 = mny / 32;
    ex1 = (mxx / 32 + 1) - 1; ey1 = (mxy / 32 + 1) - 1;  // exclusive edge minus one tile
    #1;
    checks++;
    if (int'(bb.x0) != ex0 || int'(bb.y0) != ey0 || int'(bb.x1) != ex1 || int'(bb.y1) != ey1
        || int'(w) != ex1 - ex0 + 1 || int'(h) != ey1 - ey0 + 1) begin
      failures++;
      $display("FAIL box %0d,%0d-%0d,%0d w%0d h%0d expected %0d,%0d-%0d,%0d", bb.x0, bb.y0,
               bb.x1, bb.y1, w, h, ex0, ey0, ex1, ey1);
    end
  endtask

  initial begin
    // a triangle whose maximum lies exactly on a tile edge counts that tile
    vx = '{12'd0, 12'd32, 12'd10}; vy = '{12'd0, 12'd5, 12'd64};
    check_one();
    checks++;
    if (w != 2 || h != 3) begin failures++; $display("FAIL edge case w%0d h%0d", w, h); end
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 3; i++) begin
        vx[i] = pcoord_t'($urandom_range(0, 1599));
        vy[i] = pcoord_t'($urandom_range(0, 1199));
      end
      if (n % 2 == 0) begin  // small triangles
        vx[1] = pcoord_t'(int'(vx[0]) + $urandom_range(0, 80) > 1599 ? 1599 : int'(vx[0]) + $urandom_range(0, 80));
        vy[1] = pcoord_t'(int'(vy[0]) + $urandom_range(0, 80) > 1199 ? 1199 : int'(vy[0]) + $urandom_range(0, 80));
        vx[2] = vx[0]; vy[2] = vy[1];
      end
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
