// Layer select logic: ceil(log2(length)) for a five-layer hierarchy.
//
// Input is the length, in tiles, of the reference (shorter) side of a
// tile-based bounding box; output is the layer whose layered tile is the
// smallest power of two that still spans that length (1 -> 0, 2 -> 1,
// 3..4 -> 2, 5..8 -> 3, above 8 -> 4). Lengths above 8 give layer 4 directly;
// otherwise the four low bits, named A (bit 3, the MSB) down to D (bit 0), feed
// the two sum-of-products terms of the Karnaugh-map reduced lookup table:
//   id[0] = A | B&D | C&~D,   id[1] = A | B | C&D,   id[2] = 0.
// Both the table and these equations are the design's own; the letter order
// (A as the most significant input bit) is the reading under which the
// equations reproduce the table. A length of 0 never occurs (a box is at least
// one tile wide) and gives layer 0.
//
// Purely combinational.
module layer_select
  import hpl_pkg::*;
(
  input  logic [TCOORD_W:0] len,      // reference side length in tiles
  output layer_t            layer_id  // selected layer 0..4
);

  logic a, b, c, d;

  always_comb begin
    a = len[3];
    b = len[2];
    c = len[1];
    d = len[0];
    if (len > 8) begin
      layer_id = 3'd4;
    end else begin
      layer_id[0] = a | (b & d) | (c & ~d);
      layer_id[1] = a | b | (c & d);
      layer_id[2] = 1'b0;
    end
  end

endmodule
