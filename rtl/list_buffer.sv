// List buffer: the shared store of all primitive-list records.
//
// Lists are chains of N-entry blocks. In each block the first N-1 entries hold
// scene-buffer addresses and the last entry holds the address of the next
// block of the same list; that slot is recognised by the low log2(N) address
// bits all being one. Because every list, of every layer and list kind, draws
// blocks from this one buffer, adding list kinds only adds index-table entries.
// Block layout follows the design; the buffer depth (65536 entries) is this
// design's choice.
//
// Plain memory: one write port and one synchronous read port (the list manager only
// writes; the list reader reads), read data the
// cycle after the address.
module list_buffer
  import hpl_pkg::*;
#(
  parameter int unsigned DEPTH = 65536
)(
  input  logic    clk,
  input  logic    we,
  input  lbaddr_t waddr,
  input  saddr_t  wdata,
  input  lbaddr_t raddr,
  output saddr_t  rdata
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  saddr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr[AW-1:0]] <= wdata;
    rdata <= mem[raddr[AW-1:0]];
  end

endmodule
