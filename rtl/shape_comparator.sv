// Side comparator of the layer fitting circuit.
//
// Compares the width and height (in tiles) of a tile-based bounding box. The
// shorter side becomes the reference side that drives layer selection. If the
// longer side exceeds the shorter by more than a threshold the primitive is
// classed as wide (width longer) or high (height longer), otherwise as normal.
// A tie goes to the "high" branch, whose difference is then zero and so never
// passes the threshold. The strict "greater than" follows the comparator's
// behavioural description; the threshold is a run-time input because the
// design picks it per screen resolution (2, 4, 8 and 10 tiles for 320x240,
// 640x480, 1280x1024 and 1600x1200).
//
// Purely combinational.
module shape_comparator
  import hpl_pkg::*;
(
  input  logic [TCOORD_W:0] w,        // box width in tiles
  input  logic [TCOORD_W:0] h,        // box height in tiles
  input  logic [TCOORD_W:0] thresh,   // rectangle threshold in tiles
  output logic [TCOORD_W:0] ref_len,  // shorter side
  output shape_e            shape     // normal / wide / high
);

  logic [TCOORD_W:0] diff;
  shape_e            temp;

  always_comb begin
    if (w > h) begin
      ref_len = h;
      diff    = w - h;
      temp    = SH_WIDE;
    end else begin
      ref_len = w;
      diff    = h - w;
      temp    = SH_HIGH;
    end
    shape = (diff > thresh) ? temp : SH_NORMAL;
  end

endmodule
