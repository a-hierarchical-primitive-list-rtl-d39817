// Hierarchical primitive-list binning and retrieval for a tile-based renderer.
//
// Binning side: primitives (scene-buffer address plus three screen-space
// vertices) enter the tile binner, which fits each one to a list kind and
// layer and issues one append per covered cell to the list manager. The
// manager keeps every list as a chain of N-entry blocks in the shared list
// buffer, using the primitive list index table (first block, next free slot,
// record count per list) and the address accumulator (next free block).
// Rendering side: the list reader, given a tile, walks every list of every
// layer and kind that covers the tile and streams the recorded scene-buffer
// addresses. The layer offset table maps (layer, kind) to the segment of the
// index table holding that layer's lists; the host writes it for the screen
// size before binning.
//
// The two sides share the tables, so the top interlocks them: a tile request
// is accepted only while no primitive is being binned, and a primitive only
// while no tile is being read (binning a whole frame before rendering it is
// how the design works; the interlock is this design's way of enforcing it).
// frame_clear empties all lists in one cycle. The run-time inputs thresh and
// ug_en select the list kinds in use: all four (the design's main
// configuration), or square hierarchies only with ug_en low and thresh at its
// maximum.
//
// The recursive-Z sequencer stands beside the reader: after rz_start it
// offers every tile of the screen in recursive-Z order on the rz_* stream,
// for the renderer to pass back as tile requests, so that the tiles of one
// layered tile are rendered together and share its records.
//
// Defaults: five layers (0..4), eight-entry blocks, a 65536-entry list buffer
// and a 4096-entry index table, enough for the lists of a 1600x1200 screen.
module hpl_top
  import hpl_pkg::*;
#(
  parameter int unsigned NUM_LAYERS = 5,
  parameter int unsigned N          = 8,
  parameter int unsigned LB_DEPTH   = 65536,
  parameter int unsigned NUM_LISTS  = 4096
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_clear,
  // configuration
  input  tcoord_t           tiles_x,
  input  tcoord_t           tiles_y,
  input  logic [TCOORD_W:0] thresh,
  input  logic              ug_en,      // unaligned grids in use
  input  layer_t            top_layer,  // highest layer in use (layers 0..top_layer)
  input  logic              off_we,
  input  layer_t            off_wlayer,
  input  ltype_e            off_wtype,
  input  lidx_t             off_wdata,
  // primitives to bin
  input  logic              prim_valid,
  output logic              prim_ready,
  input  saddr_t            prim_saddr,
  input  pcoord_t           prim_vx [3],
  input  pcoord_t           prim_vy [3],
  // tiles to render
  input  logic              tile_valid,
  output logic              tile_ready,
  input  tcoord_t           tile_x,
  input  tcoord_t           tile_y,
  // records of the requested tile
  output logic              rec_valid,
  input  logic              rec_ready,
  output saddr_t            rec_saddr,
  output ltype_e            rec_ltype,
  output layer_t            rec_layer,
  output logic              tile_done,
  // recursive-Z tile order
  input  logic              rz_start,
  output logic              rz_valid,
  input  logic              rz_ready,
  output tcoord_t           rz_x,
  output tcoord_t           rz_y,
  output logic              rz_last,
  output logic              rz_busy,
  // status and events
  output logic              bin_busy,
  output logic              overflow,
  output logic [LBADDR_W:0] lb_used,
  output logic              fit_valid,
  output ltype_e            fit_ltype,
  output layer_t            fit_layer,
  output logic              fit_step,
  output logic              fit_clamped,
  output logic              ev_new_list,
  output logic              ev_chain,
  output logic              ev_drop
);

  // binner <-> manager
  logic      app_valid, app_ready;
  append_t   app;
  logic      binner_busy, mgr_busy, rd_busy;
  logic      bin_prim_valid, bin_prim_ready, rd_tile_ready;

  // offset table ports
  layer_t    offa_layer, offb_layer;
  ltype_e    offa_type, offb_type;
  lidx_t     offa_base, offb_base;

  // index table ports
  lidx_t     it_ra_addr, it_rb_addr, it_waddr;
  pl_entry_t it_ra_data, it_rb_data, it_wdata;
  logic      it_ra_valid, it_rb_valid, it_we;

  // list buffer ports
  logic      lb_we;
  lbaddr_t   lb_waddr, lb_rb_addr;
  saddr_t    lb_wdata, lb_rb_data;

  assign bin_prim_valid = prim_valid && !rd_busy;
  assign prim_ready     = bin_prim_ready && !rd_busy;
  assign bin_busy       = binner_busy || mgr_busy;
  assign tile_ready     = rd_tile_ready && !bin_busy;

  layer_offset_table #(.NUM_LAYERS(NUM_LAYERS)) u_off (
    .clk, .rst_n,
    .we(off_we), .wlayer(off_wlayer), .wtype(off_wtype), .wdata(off_wdata),
    .ra_layer(offa_layer), .ra_type(offa_type), .ra_data(offa_base),
    .rb_layer(offb_layer), .rb_type(offb_type), .rb_data(offb_base)
  );

  tile_binner #(.NUM_LAYERS(NUM_LAYERS)) u_bin (
    .clk, .rst_n, .tiles_x, .tiles_y, .thresh, .top_layer, .ug_en,
    .prim_valid(bin_prim_valid), .prim_ready(bin_prim_ready),
    .prim_saddr, .prim_vx, .prim_vy,
    .off_layer(offa_layer), .off_type(offa_type), .off_base(offa_base),
    .app_valid, .app_ready, .app,
    .fit_valid, .fit_ltype, .fit_layer, .fit_step, .fit_clamped,
    .busy(binner_busy)
  );

  list_manager #(.N(N), .DEPTH(LB_DEPTH)) u_mgr (
    .clk, .rst_n, .clear(frame_clear),
    .req_valid(app_valid), .req_ready(app_ready), .req(app),
    .it_raddr(it_ra_addr), .it_rdata(it_ra_data), .it_rvalid(it_ra_valid),
    .it_we, .it_waddr, .it_wdata,
    .lb_we, .lb_waddr, .lb_wdata,
    .busy(mgr_busy), .overflow, .ev_new_list, .ev_chain, .ev_drop, .lb_used
  );

  list_index_table #(.NUM_LISTS(NUM_LISTS)) u_it (
    .clk, .rst_n, .clear(frame_clear),
    .we(it_we), .waddr(it_waddr), .wdata(it_wdata),
    .ra_addr(it_ra_addr), .ra_data(it_ra_data), .ra_valid(it_ra_valid),
    .rb_addr(it_rb_addr), .rb_data(it_rb_data), .rb_valid(it_rb_valid)
  );

  list_buffer #(.DEPTH(LB_DEPTH)) u_lb (
    .clk, .we(lb_we), .waddr(lb_waddr), .wdata(lb_wdata),
    .raddr(lb_rb_addr), .rdata(lb_rb_data)
  );

  list_reader #(.NUM_LAYERS(NUM_LAYERS), .N(N)) u_rd (
    .clk, .rst_n, .tiles_x, .tiles_y, .top_layer,
    .tile_valid(tile_valid && !bin_busy), .tile_ready(rd_tile_ready),
    .tile_x, .tile_y,
    .off_layer(offb_layer), .off_type(offb_type), .off_base(offb_base),
    .it_raddr(it_rb_addr), .it_rdata(it_rb_data), .it_rvalid(it_rb_valid),
    .lb_raddr(lb_rb_addr), .lb_rdata(lb_rb_data),
    .rec_valid, .rec_ready, .rec_saddr, .rec_ltype, .rec_layer, .tile_done,
    .busy(rd_busy)
  );

  rz_sequencer u_rz (
    .clk, .rst_n, .start(rz_start), .tiles_x, .tiles_y,
    .out_valid(rz_valid), .out_ready(rz_ready), .out_x(rz_x), .out_y(rz_y),
    .out_last(rz_last), .busy(rz_busy)
  );

endmodule
