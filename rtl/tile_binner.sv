// Tile binner: sorts one primitive into the hierarchical primitive lists.
//
// A primitive (scene-buffer address and three screen-space vertices) is taken
// in one cycle: its tile-based bounding box is built, the fitting unit picks
// the list kind and layer, and the box corners are mapped to the first and
// last cell (layered tile, rectangle or shifted group) of that kind and layer.
// The binner then walks the covered cells row by row and issues one append
// request per cell, list index = layer-offset base + row * columns + column.
// For horizontal (vertical) rectangles the columns (rows) are the two screen
// halves. Recording the primitive in every covered list of the chosen layer
// follows the design; the cell walk order and the handshakes are this design's.
//
// Handshakes: prim_valid/prim_ready (accepted only when idle), app_valid/
// app_ready towards the list manager. A primitive covering k cells takes
// 1 + k cycles when the list manager never stalls. fit_valid pulses with the
// fitting result when a primitive is accepted. The fitting unit's sel_layer
// output (the layer before any step-down) is left open: the binner needs only
// the final layer.
module tile_binner
  import hpl_pkg::*;
#(
  parameter int unsigned NUM_LAYERS = 5
)(
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  tcoord_t           tiles_x,
  input  tcoord_t           tiles_y,
  input  logic [TCOORD_W:0] thresh,
  input  logic              ug_en,
  input  layer_t            top_layer,
  // primitives
  input  logic              prim_valid,
  output logic              prim_ready,
  input  saddr_t            prim_saddr,
  input  pcoord_t           prim_vx [3],
  input  pcoord_t           prim_vy [3],
  // layer offset table read port
  output layer_t            off_layer,
  output ltype_e            off_type,
  input  lidx_t             off_base,
  // append requests to the list manager
  output logic              app_valid,
  input  logic              app_ready,
  output append_t           app,
  // fitting result of the accepted primitive
  output logic              fit_valid,
  output ltype_e            fit_ltype,
  output layer_t            fit_layer,
  output logic              fit_step,
  output logic              fit_clamped,
  output logic              busy
);

  // combinational front end
  tbbox_t            bb;
  logic [TCOORD_W:0] w, h;
  ltype_e            c_ltype;
  layer_t            c_layer;
  logic              c_step, c_clamped;

  tile_bbox u_bbox (.vx(prim_vx), .vy(prim_vy), .bb, .w, .h);

  hier_fit #(.NUM_LAYERS(NUM_LAYERS)) u_fit (
    .bb, .w, .h, .tiles_x, .tiles_y, .thresh, .top_layer, .ug_en,
    .ltype(c_ltype), .layer_id(c_layer), .sel_layer(), .step_down(c_step),
    .clamped(c_clamped)
  );

  // registered walk state
  logic              active;
  ltype_e            r_ltype;
  layer_t            r_layer;
  saddr_t            r_saddr;
  tcoord_t           cx0, cx1, cy1, cx, cy;
  logic [TCOORD_W:0] r_cols;

  assign prim_ready  = !active;
  assign busy        = active;
  assign fit_valid   = prim_valid && prim_ready;
  assign fit_ltype   = c_ltype;
  assign fit_layer   = c_layer;
  assign fit_step    = c_step;
  assign fit_clamped = c_clamped;

  assign off_layer = r_layer;
  assign off_type  = r_ltype;
  assign app_valid = active;
  assign app.saddr = r_saddr;
  assign app.lidx  = list_index(off_base, cx, cy, r_cols);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      r_ltype <= LT_SQUARE;
      r_layer <= '0;
      r_saddr <= '0;
      cx0     <= '0;
      cx1     <= '0;
      cy1     <= '0;
      cx      <= '0;
      cy      <= '0;
      r_cols  <= '0;
    end else if (!active) begin
      if (prim_valid) begin
        active  <= 1'b1;
        r_ltype <= c_ltype;
        r_layer <= c_layer;
        r_saddr <= prim_saddr;
        cx0     <= cell_x(c_ltype, c_layer, bb.x0, tiles_x);
        cx1     <= cell_x(c_ltype, c_layer, bb.x1, tiles_x);
        cy1     <= cell_y(c_ltype, c_layer, bb.y1, tiles_y);
        cx      <= cell_x(c_ltype, c_layer, bb.x0, tiles_x);
        cy      <= cell_y(c_ltype, c_layer, bb.y0, tiles_y);
        r_cols  <= list_cols(c_ltype, c_layer, tiles_x);
      end
    end else if (app_ready) begin
      if (cx == cx1) begin
        cx <= cx0;
        if (cy == cy1) active <= 1'b0;
        else           cy     <= cy + 1'b1;
      end else begin
        cx <= cx + 1'b1;
      end
    end
  end

  // Requests hold steady until taken.
  property p_app_stable;
    @(posedge clk) disable iff (!rst_n) app_valid && !app_ready |=> app_valid && $stable(app);
  endproperty
  assert property (p_app_stable);

endmodule
