// Tile-based bounding box construction.
//
// Takes the three screen-space vertices of a transformed triangle and returns
// the bounding box snapped outward to tile edges, given as inclusive tile
// coordinates, plus its width and height counted in tiles. The minimum corner
// is rounded down to a multiple of the tile size; the maximum corner is rounded
// up, and a maximum lying exactly on a tile edge is moved to the next edge, so
// that a box touching an edge still counts the tile it touches. With
// power-of-two tiles both are plain shifts: x0 = min(x) >> 5, x1 = max(x) >> 5,
// width = x1 - x0 + 1. The rounding rule follows the design; integer pixel
// coordinates that are already clipped to the screen are this design's
// assumption.
//
// Purely combinational.
module tile_bbox
  import hpl_pkg::*;
(
  input  pcoord_t        vx [3],   // vertex x, pixels
  input  pcoord_t        vy [3],   // vertex y, pixels
  output tbbox_t         bb,       // inclusive tile box
  output logic [TCOORD_W:0] w,     // width in tiles (1..2^TCOORD_W)
  output logic [TCOORD_W:0] h      // height in tiles
);

  pcoord_t min_x, max_x, min_y, max_y;

  always_comb begin
    min_x = vx[0];
    max_x = vx[0];
    min_y = vy[0];
    max_y = vy[0];
    for (int i = 1; i < 3; i++) begin
      if (vx[i] < min_x) min_x = vx[i];
      if (vx[i] > max_x) max_x = vx[i];
      if (vy[i] < min_y) min_y = vy[i];
      if (vy[i] > max_y) max_y = vy[i];
    end
    bb.x0 = min_x[COORD_W-1:TILE_SHIFT];
    bb.y0 = min_y[COORD_W-1:TILE_SHIFT];
    bb.x1 = max_x[COORD_W-1:TILE_SHIFT];
    bb.y1 = max_y[COORD_W-1:TILE_SHIFT];
    w = {1'b0, bb.x1} - {1'b0, bb.x0} + 1'b1;
    h = {1'b0, bb.y1} - {1'b0, bb.y0} + 1'b1;
  end

endmodule
