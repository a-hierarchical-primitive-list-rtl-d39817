// Layer offset table: base index of every (layer, list kind) segment.
//
// The primitive list index table holds the lists of all layers and all four
// list kinds (square, horizontal rectangle, vertical rectangle, unaligned
// grid) one segment after another. This two-dimensional table, NUM_LAYERS x 4
// entries, gives the first index of each segment; a list's index is that base
// plus the list's position inside its layer. The table is written by the host
// before a frame is binned (one entry per cycle through the write port), which
// lets the same hardware serve any screen size; the write port and the reset
// to zero are this design's choice. Two combinational read ports serve the
// binner and the list reader.
module layer_offset_table
  import hpl_pkg::*;
#(
  parameter int unsigned NUM_LAYERS = 5
)(
  input  logic   clk,
  input  logic   rst_n,
  // write port
  input  logic   we,
  input  layer_t wlayer,
  input  ltype_e wtype,
  input  lidx_t  wdata,
  // read port A
  input  layer_t ra_layer,
  input  ltype_e ra_type,
  output lidx_t  ra_data,
  // read port B
  input  layer_t rb_layer,
  input  ltype_e rb_type,
  output lidx_t  rb_data
);

  lidx_t off [NUM_LAYERS][4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < int'(NUM_LAYERS); l++)
        for (int t = 0; t < 4; t++)
          off[l][t] <= '0;
    end else if (we && 32'(wlayer) < NUM_LAYERS) begin
      off[wlayer][wtype] <= wdata;
    end
  end

  always_comb begin
    ra_data = (32'(ra_layer) < NUM_LAYERS) ? off[ra_layer][ra_type] : '0;
    rb_data = (32'(rb_layer) < NUM_LAYERS) ? off[rb_layer][rb_type] : '0;
  end

endmodule
