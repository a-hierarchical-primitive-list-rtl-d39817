// Recursive-Z tile sequencer: the tile rendering order that keeps the
// records of upper layers shared by the tiles rendered together.
//
// The order is the Z (Morton) order of the tile coordinates: a counter is
// split into its even bits (tile x) and odd bits (tile y), so the first four
// tiles are the 2x2 group at the origin (x first, then y), the next four the
// 2x2 group to its right, and after four 2x2 groups the walk moves on to the
// next 4x4 group, and so on up the layers. Every tile of a 2^L x 2^L group is
// therefore rendered before any tile outside it, which is what lets a
// layered-tile's records be reused by all the tiles it covers. The
// recursive-Z order and its tile-by-tile example (on a six-tile-wide screen
// the first tiles are 1, 2, 7, 8, then 3, 4, 9, 10) follow the document's
// rendering sequence for parallel tile renderers; the hardware (a counter
// with bit de-interleaving) is this design's own.
//
// Interface: a start pulse while idle begins a walk over a tiles_x x tiles_y
// screen (both must stay stable during the walk). The tiles come out on a
// valid/ready stream (out_x, out_y), with out_last on the final one; busy is
// high from start until the last tile is taken. Timing: the counter advances
// one code per cycle; an on-screen code waits for out_ready, an off-screen
// code (beyond the screen edge inside the enclosing power-of-two square) is
// skipped in one cycle without output. A walk therefore ends after at most
// 4^ceil(log2(max(tiles_x, tiles_y))) cycles plus the cycles out_ready is low.
module rz_sequencer
  import hpl_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  tcoord_t tiles_x,
  input  tcoord_t tiles_y,
  output logic    out_valid,
  input  logic    out_ready,
  output tcoord_t out_x,
  output tcoord_t out_y,
  output logic    out_last,
  output logic    busy
);

  localparam int CW = 2 * TCOORD_W;

  logic [CW-1:0] code;   // Morton code of the current position
  logic [CW-1:0] left;   // on-screen tiles still to emit
  logic          active;
  logic          on_screen;

  always_comb begin
    for (int i = 0; i < TCOORD_W; i++) begin
      out_x[i] = code[2*i];
      out_y[i] = code[2*i+1];
    end
    on_screen = (out_x < tiles_x) && (out_y < tiles_y);
    out_valid = active && on_screen;
    out_last  = (left == CW'(1));
    busy      = active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      code   <= '0;
      left   <= '0;
    end else if (!active) begin
      if (start && tiles_x != '0 && tiles_y != '0) begin
        active <= 1'b1;
        code   <= '0;
        left   <= CW'(tiles_x) * CW'(tiles_y);
      end
    end else if (!on_screen) begin
      code <= code + 1'b1;
    end else if (out_ready) begin
      code <= code + 1'b1;
      left <= left - 1'b1;
      if (left == CW'(1)) active <= 1'b0;
    end
  end

  // The walk never runs past the last code.
  always_ff @(posedge clk) if (rst_n && active) assert (!(code == '1 && !on_screen));

endmodule
