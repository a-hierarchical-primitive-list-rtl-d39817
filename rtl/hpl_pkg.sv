// Shared types and constants of the hierarchical primitive-list tile binner.
//
// The screen is cut into 32x32-pixel tiles (layer 0). Layer L groups
// 2^L x 2^L tiles into one "layered tile". Besides these square layers there
// are three other kinds of list: unaligned grids (square groups shifted by half
// a group in x and y), horizontal rectangles (group-high strips that span half
// the screen width) and vertical rectangles (group-wide strips that span half
// the screen height). The 2-bit layer-type code below is the one the layer type
// selection table uses; the shape and misalignment codes are the ones its inputs
// use. Widths that the design fixes itself (pixel and tile coordinate widths,
// list-table index width) are chosen to hold a 1600x1200 screen with room to
// spare; the 24-bit scene-buffer address matches six-hex-digit addresses.
package hpl_pkg;

  // Pixel coordinates of transformed vertices (integer pixels, 0..4095).
  localparam int COORD_W = 12;
  // log2 of the tile edge in pixels: 32x32-pixel tiles.
  localparam int TILE_SHIFT = 5;
  // Tile coordinates and tile-based lengths.
  localparam int TCOORD_W = COORD_W - TILE_SHIFT;
  // Layer identifiers 0..7 (the layer select logic produces 0..4).
  localparam int LAYER_W = 3;
  // Scene-buffer address recorded in a primitive list.
  localparam int SADDR_W = 24;
  // Index into the primitive list index table (all lists of all layer kinds).
  localparam int LIDX_W = 12;

  // List-buffer addresses (up to 65536 entries).
  localparam int LBADDR_W = 16;

  typedef logic [TCOORD_W-1:0] tcoord_t;
  typedef logic [LBADDR_W-1:0] lbaddr_t;
  typedef logic [COORD_W-1:0]  pcoord_t;
  typedef logic [LAYER_W-1:0]  layer_t;
  typedef logic [SADDR_W-1:0]  saddr_t;
  typedef logic [LIDX_W-1:0]   lidx_t;

  // Kind of list a primitive is stored in.
  typedef enum logic [1:0] {
    LT_SQUARE = 2'b00,   // square hierarchy ("normal")
    LT_HRECT  = 2'b01,   // horizontal (wide) rectangle layer
    LT_VRECT  = 2'b10,   // vertical (high) rectangle layer
    LT_UGRID  = 2'b11    // unaligned (inter-group) grid
  } ltype_e;

  // Shape class from the side comparator.
  typedef enum logic [1:0] {
    SH_NORMAL = 2'b00,
    SH_WIDE   = 2'b01,
    SH_HIGH   = 2'b10
  } shape_e;

  // Misalignment status of the square hierarchy at the selected layer.
  typedef enum logic [1:0] {
    MA_NONE   = 2'b00,   // fits one layered tile in every short dimension
    MA_UGRID  = 2'b01,   // misaligned, passes the unaligned-grid boundary check
    MA_BFAIL  = 2'b10    // misaligned, boundary check failed
  } malign_e;

  // Tile-based bounding box, inclusive tile coordinates.
  typedef struct packed {
    tcoord_t x0;
    tcoord_t y0;
    tcoord_t x1;
    tcoord_t y1;
  } tbbox_t;

  // One record to append: which list, and the primitive's scene-buffer address.
  typedef struct packed {
    lidx_t  lidx;
    saddr_t saddr;
  } append_t;

  // One entry of the primitive list index table.
  typedef struct packed {
    lbaddr_t     entry;   // list-buffer address of the first block
    lbaddr_t     next;    // list-buffer address of the next free slot
    logic [15:0] count;   // records stored in the list
  } pl_entry_t;

  // Number of list columns of one kind at layer l for a screen tiles_x wide.
  // Square and vertical-rectangle layers have ceil(tiles_x / 2^l) columns, the
  // unaligned grid one fewer, horizontal-rectangle layers two (screen halves).
  function automatic logic [TCOORD_W:0] list_cols(input ltype_e t, input layer_t l,
                                                  input tcoord_t tiles_x);
    logic [TCOORD_W:0] n;
    n = ({1'b0, tiles_x} + ((TCOORD_W+1)'(1) << l) - 1'b1) >> l;
    unique case (t)
      LT_UGRID: return n - 1'b1;
      LT_HRECT: return (TCOORD_W+1)'(2);
      default:  return n;
    endcase
  endfunction

  // Column of the list of kind t at layer l that holds tile column x.
  // Horizontal rectangles split the screen at ceil(tiles_x / 2).
  // For the unaligned grid x must be at least half a group.
  function automatic tcoord_t cell_x(input ltype_e t, input layer_t l,
                                     input tcoord_t x, input tcoord_t tiles_x);
    tcoord_t half;
    half = tcoord_t'((TCOORD_W+1)'(1) << l) >> 1;
    unique case (t)
      LT_UGRID: return (x - half) >> l;
      LT_HRECT: return tcoord_t'(x >= ((tiles_x + 1'b1) >> 1));
      default:  return x >> l;
    endcase
  endfunction

  // Row of the list of kind t at layer l that holds tile row y.
  // Vertical rectangles split the screen at ceil(tiles_y / 2).
  function automatic tcoord_t cell_y(input ltype_e t, input layer_t l,
                                     input tcoord_t y, input tcoord_t tiles_y);
    tcoord_t half;
    half = tcoord_t'((TCOORD_W+1)'(1) << l) >> 1;
    unique case (t)
      LT_UGRID: return (y - half) >> l;
      LT_VRECT: return tcoord_t'(y >= ((tiles_y + 1'b1) >> 1));
      default:  return y >> l;
    endcase
  endfunction

  // Index of a list: the kind/layer base from the layer offset table plus the
  // row-major position of the cell within that layer.
  function automatic lidx_t list_index(input lidx_t base, input tcoord_t cx,
                                       input tcoord_t cy, input logic [TCOORD_W:0] cols);
    return base + lidx_t'(cy * cols) + lidx_t'(cx);
  endfunction

endpackage
