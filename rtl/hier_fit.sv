// Primitive-hierarchy fitting: picks the list kind and layer for one primitive.
//
// Given the tile-based bounding box of a primitive, the side comparator
// chooses the shorter side as reference and classes the box as normal, wide
// or high; the layer select logic turns the reference length into a layer
// (ceil(log2(length))), limited to the top layer in use (the run-time
// top_layer, itself at most NUM_LAYERS-1); the
// misalignment check tests the box against that layer's group edges and the
// unaligned grid; the layer type select table resolves the final list kind and
// whether to step down one layer. The algorithm takes a fixed number of steps
// for any box, which is the point of the design: the whole unit is one
// combinational cone. A box longer than a top-layer group in some dimension is
// never called misaligned in that dimension (it spans several top-layer groups
// anyway); clamping to the top layer is this design's choice, since the layer
// select logic itself names layers 0..4. The ug_en input turns the unaligned
// grids off (a misaligned box then steps down in the square hierarchy, as when
// the boundary check fails); with ug_en low and the threshold above any
// possible side difference the unit fits square hierarchies only, the
// configuration the block-size and layer-count comparisons are made in.
//
// Purely combinational.
module hier_fit
  import hpl_pkg::*;
#(
  parameter int unsigned NUM_LAYERS = 5     // layers 0..NUM_LAYERS-1
)(
  input  tbbox_t            bb,       // inclusive tile box
  input  logic [TCOORD_W:0] w,        // width in tiles
  input  logic [TCOORD_W:0] h,        // height in tiles
  input  tcoord_t           tiles_x,  // screen width in tiles
  input  tcoord_t           tiles_y,  // screen height in tiles
  input  logic [TCOORD_W:0] thresh,   // rectangle threshold in tiles
  input  layer_t            top_layer,// highest layer in use
  input  logic              ug_en,    // unaligned grids in use
  output ltype_e            ltype,    // chosen list kind
  output layer_t            layer_id, // chosen layer
  output layer_t            sel_layer,// layer before any step-down
  output logic              step_down,// a step-down happened
  output logic              clamped   // short side exceeds a top-layer group
);

  logic [TCOORD_W:0] ref_len;
  shape_e            shape;
  layer_t            lsl_id, top;
  malign_e           malign, mis_raw;
  logic              rect_mis;

  shape_comparator u_cmp (
    .w, .h, .thresh, .ref_len, .shape
  );

  layer_select u_lsl (
    .len(ref_len), .layer_id(lsl_id)
  );

  always_comb begin
    top = (top_layer > layer_t'(NUM_LAYERS - 1)) ? layer_t'(NUM_LAYERS - 1) : top_layer;
    if (lsl_id > top)
      sel_layer = top;
    else
      sel_layer = lsl_id;
    clamped = ref_len > ((TCOORD_W+1)'(1) << sel_layer);
  end

  misalign_check u_mis (
    .bb, .w, .h, .layer_id(sel_layer), .shape, .tiles_x, .tiles_y,
    .malign(mis_raw), .rect_mis
  );

  // With the unaligned grids switched off, a box that would have gone there
  // takes the boundary-check-failed row of the table: a square step-down.
  assign malign = (!ug_en && mis_raw == MA_UGRID) ? MA_BFAIL : mis_raw;

  layer_type_select u_lts (
    .malign,
    .shape3({shape == SH_HIGH, shape == SH_WIDE, rect_mis}),
    .ltype, .step_down
  );

  assign layer_id = step_down ? sel_layer - 1'b1 : sel_layer;

  // A step-down is only ever asked for above the bottom layer.
  always_comb assert (!(step_down && sel_layer == '0));

endmodule
