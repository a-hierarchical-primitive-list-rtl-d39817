// Layer type select: the priority table of the layer fitting circuit.
//
// Combines the square misalignment status, the shape class and the rectangle
// misalignment flag into the kind of list to use and whether to step down one
// layer from the selected one. Priorities, highest first: rectangle layer
// (wide or high box), unaligned grid (misaligned box that passes the boundary
// check), square hierarchy. A misaligned rectangle steps down one layer; a
// misaligned box that fails the boundary check stays in the square hierarchy
// one layer down. The full table follows the design row by row:
//
//   misalign  shape            -> type     step
//   none      normal           -> square   0
//   ugrid     normal           -> ugrid    0
//   bfail     normal           -> square   1
//   any       wide             -> hrect    0
//   any       high             -> vrect    0
//   any       wide, misaligned -> hrect    1
//   any       high, misaligned -> vrect    1
//
// The shape input is the 3-bit code {high, wide, rect misaligned}.
//
// Purely combinational.
module layer_type_select
  import hpl_pkg::*;
(
  input  malign_e    malign,    // square misalignment status
  input  logic [2:0] shape3,    // {high, wide, rect misaligned}
  output ltype_e     ltype,     // kind of list
  output logic       step_down  // 1: store one layer below the selected one
);

  always_comb begin
    ltype     = LT_SQUARE;
    step_down = 1'b0;
    unique casez (shape3)
      3'b000: begin
        unique case (malign)
          MA_UGRID: begin ltype = LT_UGRID;  step_down = 1'b0; end
          MA_BFAIL: begin ltype = LT_SQUARE; step_down = 1'b1; end
          default:  begin ltype = LT_SQUARE; step_down = 1'b0; end
        endcase
      end
      3'b010:  begin ltype = LT_HRECT; step_down = 1'b0; end
      3'b100:  begin ltype = LT_VRECT; step_down = 1'b0; end
      3'b011:  begin ltype = LT_HRECT; step_down = 1'b1; end
      3'b101:  begin ltype = LT_VRECT; step_down = 1'b1; end
      default: begin ltype = LT_SQUARE; step_down = 1'b0; end
    endcase
  end

endmodule
