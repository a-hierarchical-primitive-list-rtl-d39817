// List reader: gathers every primitive a screen tile must render.
//
// With hierarchical lists a tile's primitives are spread over all layers: its
// own layer-0 list, the list of the layered tile containing it in every upper
// layer in use (up to the run-time top_layer), the unaligned-grid group containing it (layers 1 and up, where the
// shifted grid reaches it), and the horizontal and vertical rectangles
// containing it in every layer. For a requested tile the reader visits these
// lists layer by layer (square, horizontal rectangle, vertical rectangle,
// unaligned grid within a layer), skips lists that are NULL, and walks each
// list through the list buffer, following the link slot at the end of every
// full block, streaming out the scene-buffer addresses it finds. A primitive
// may thus be delivered to tiles its own box does not touch (a redundant
// read), but every tile its box touches receives it. Traversing all layers
// follows the design; the visiting order and the streaming interface are this
// design's.
//
// Handshakes: tile_valid/tile_ready (accepted when idle), rec_valid/rec_ready
// for the records, tile_done pulses once all lists of the tile are read.
// Timing: two cycles per list visited plus two cycles per list-buffer read.
// Of an index-table entry only the first-block address is used; the next-slot
// and count fields belong to the list manager, so their bits are unused here.
module list_reader
  import hpl_pkg::*;
#(
  parameter int unsigned NUM_LAYERS = 5,
  parameter int unsigned N          = 8
)(
  input  logic      clk,
  input  logic      rst_n,
  input  tcoord_t   tiles_x,
  input  tcoord_t   tiles_y,
  input  layer_t    top_layer,  // highest layer in use
  // tile requests
  input  logic      tile_valid,
  output logic      tile_ready,
  input  tcoord_t   tile_x,
  input  tcoord_t   tile_y,
  // layer offset table read port
  output layer_t    off_layer,
  output ltype_e    off_type,
  input  lidx_t     off_base,
  // index table read port
  output lidx_t     it_raddr,
  input  pl_entry_t it_rdata,
  input  logic      it_rvalid,
  // list buffer read port
  output lbaddr_t   lb_raddr,
  input  saddr_t    lb_rdata,
  // records
  output logic      rec_valid,
  input  logic      rec_ready,
  output saddr_t    rec_saddr,
  output ltype_e    rec_ltype,
  output layer_t    rec_layer,
  output logic      tile_done,
  output logic      busy
);

  localparam int NB = $clog2(N);

  typedef enum logic [2:0] {S_IDLE, S_LIST, S_WAITIT, S_RDLB, S_WAITLB, S_DONE} state_e;

  state_e      state;
  tcoord_t     tx, ty;
  layer_t      layer;
  ltype_e      ltype;
  lbaddr_t     addr;
  logic [15:0] remaining;
  logic        exists, last_list;
  tcoord_t     half;
  layer_t      top;

  assign top = (top_layer > layer_t'(NUM_LAYERS - 1)) ? layer_t'(NUM_LAYERS - 1) : top_layer;

  assign off_layer = layer;
  assign off_type  = ltype;

  // Does the current (layer, kind) have a list holding this tile?
  always_comb begin
    half = tcoord_t'((TCOORD_W+1)'(1) << layer) >> 1;
    if (ltype == LT_UGRID)
      exists = (layer != '0) && (tx >= half) && (ty >= half)
            && ({1'b0, cell_x(LT_UGRID, layer, tx, tiles_x)} < list_cols(LT_UGRID, layer, tiles_x))
            && ({1'b0, cell_y(LT_UGRID, layer, ty, tiles_y)} < list_cols(LT_UGRID, layer, tiles_y));
    else
      exists = 1'b1;
    last_list = (ltype == LT_UGRID) && (layer == top);
  end

  assign it_raddr   = list_index(off_base, cell_x(ltype, layer, tx, tiles_x),
                                 cell_y(ltype, layer, ty, tiles_y),
                                 list_cols(ltype, layer, tiles_x));
  assign lb_raddr   = addr;
  assign tile_ready = (state == S_IDLE);
  assign busy       = (state != S_IDLE);
  assign rec_valid  = (state == S_WAITLB) && (addr[NB-1:0] != NB'(N - 1));
  assign rec_saddr  = lb_rdata;
  assign rec_ltype  = ltype;
  assign rec_layer  = layer;
  assign tile_done  = (state == S_DONE);

  // The next (layer, kind) pair to visit.
  state_e adv_state;
  layer_t adv_layer;
  ltype_e adv_ltype;

  always_comb begin
    adv_state = S_LIST;
    adv_layer = layer;
    adv_ltype = ltype_e'(ltype + 1'b1);
    if (last_list) begin
      adv_state = S_DONE;
      adv_ltype = ltype;
    end else if (ltype == LT_UGRID) begin
      adv_ltype = LT_SQUARE;
      adv_layer = layer + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      tx        <= '0;
      ty        <= '0;
      layer     <= '0;
      ltype     <= LT_SQUARE;
      addr      <= '0;
      remaining <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (tile_valid) begin
          tx    <= tile_x;
          ty    <= tile_y;
          layer <= '0;
          ltype <= LT_SQUARE;
          state <= S_LIST;
        end
        S_LIST: begin
          if (exists) state <= S_WAITIT;
          else        begin state <= adv_state; layer <= adv_layer; ltype <= adv_ltype; end
        end
        S_WAITIT: begin
          if (it_rvalid && it_rdata.count != 0) begin
            addr      <= it_rdata.entry;
            remaining <= it_rdata.count;
            state     <= S_RDLB;
          end else begin
            begin state <= adv_state; layer <= adv_layer; ltype <= adv_ltype; end
          end
        end
        S_RDLB: state <= S_WAITLB;
        S_WAITLB: begin
          if (addr[NB-1:0] == NB'(N - 1)) begin
            addr  <= lbaddr_t'(lb_rdata);      // follow the link slot
            state <= S_RDLB;
          end else if (rec_ready) begin
            addr      <= addr + 1'b1;
            remaining <= remaining - 1'b1;
            if (remaining == 16'd1) begin state <= adv_state; layer <= adv_layer; ltype <= adv_ltype; end
            else                    state <= S_RDLB;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
