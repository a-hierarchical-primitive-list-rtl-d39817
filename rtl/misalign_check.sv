// Misalignment check and unaligned-grid boundary check.
//
// For the selected layer L (group edge G = 2^L tiles) the box is misaligned
// when, in a dimension whose length fits in one group (length <= G), its first
// and last tiles fall in different groups: the box straddles a group edge it
// could have avoided. In hardware this is a comparison of the coordinate bits
// above bit L, i.e. a multiplexer per box coordinate selecting bits by layer.
// A misaligned box passes the boundary check when the unaligned grid of layer
// L (groups of the same size, shifted by G/2 in x and y, covering the screen
// interior only: ceil(T/G)-1 groups per dimension) contains the whole box and,
// in every dimension that fits one group, holds it within one shifted group.
// Layer 0 has no unaligned grid.
// The rectangle-misalignment flag reports, for a wide (high) box, whether its
// height (width), the side the rectangle layer is one group thick in,
// straddles a group edge.
// That misalignment is read from the coordinates' low bits and that the grid
// starts at half a group follow the design; the exact straddle rule, applied
// per dimension, and the containment rule of the boundary check are this
// design's reading of it.
//
// Purely combinational.
module misalign_check
  import hpl_pkg::*;
(
  input  tbbox_t            bb,        // inclusive tile box
  input  logic [TCOORD_W:0] w,         // width in tiles
  input  logic [TCOORD_W:0] h,         // height in tiles
  input  layer_t            layer_id,  // selected layer
  input  shape_e            shape,     // from the side comparator
  input  tcoord_t           tiles_x,   // screen width in tiles
  input  tcoord_t           tiles_y,   // screen height in tiles
  output malign_e           malign,    // square misalignment status
  output logic              rect_mis   // rectangle misalignment
);

  logic              cross_x, cross_y, pass_x, pass_y;

  // Does one dimension [lo, hi] straddle a group edge of layer l?
  function automatic logic straddles(input tcoord_t lo, input tcoord_t hi,
                                     input logic [TCOORD_W:0] len, input layer_t l);
    return (len <= (TCOORD_W+1)'(1) << l) && ((lo >> l) != (hi >> l));
  endfunction

  // Is [lo, hi] inside the shifted grid of layer l (l >= 1), and, if it fits
  // one group, inside a single shifted group?
  function automatic logic ug_fits(input tcoord_t lo, input tcoord_t hi,
                                   input logic [TCOORD_W:0] len, input layer_t l,
                                   input tcoord_t tiles);
    logic [TCOORD_W:0] gg, hf, ngroups, lo_s, hi_s;
    gg      = (TCOORD_W+1)'(1) << l;
    hf      = gg >> 1;
    ngroups = ({1'b0, tiles} + gg - 1'b1) >> l;
    if ({1'b0, lo} < hf) return 1'b0;
    lo_s = {1'b0, lo} - hf;
    hi_s = {1'b0, hi} - hf;
    if ((hi_s >> l) + 1'b1 >= ngroups) return 1'b0;
    if (len <= gg && (lo_s >> l) != (hi_s >> l)) return 1'b0;
    return 1'b1;
  endfunction

  always_comb begin
    cross_x = straddles(bb.x0, bb.x1, w, layer_id);
    cross_y = straddles(bb.y0, bb.y1, h, layer_id);
    pass_x  = ug_fits(bb.x0, bb.x1, w, layer_id, tiles_x);
    pass_y  = ug_fits(bb.y0, bb.y1, h, layer_id, tiles_y);
    if (!(cross_x || cross_y))
      malign = MA_NONE;
    else if (layer_id != '0 && pass_x && pass_y)
      malign = MA_UGRID;
    else
      malign = MA_BFAIL;
    unique case (shape)
      SH_WIDE: rect_mis = cross_y;
      SH_HIGH: rect_mis = cross_x;
      default: rect_mis = 1'b0;
    endcase
  end

endmodule
