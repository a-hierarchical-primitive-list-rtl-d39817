// Address accumulator of the list buffer: the block allocator.
//
// The list buffer is handed out in blocks of N entries from the bottom up.
// The accumulator holds the address of the next free block; each allocation
// returns that address and adds N. Nothing is ever freed within a frame; a
// clear at the start of a frame returns the whole buffer. When fewer than N
// entries remain the accumulator reports full and ignores allocations: the
// full flag and its handling are this design's choice.
//
// Timing: the address is valid combinationally; an allocation takes effect at
// the next clock edge.
module addr_accumulator
  import hpl_pkg::*;
#(
  parameter int unsigned N     = 8,       // entries per block
  parameter int unsigned DEPTH = 65536    // list-buffer entries
)(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,     // new frame: whole buffer free
  input  logic    alloc,     // take the block at blk_addr
  output lbaddr_t blk_addr,  // next free block
  output logic    full,      // no whole block left
  output logic [LBADDR_W:0] used // entries handed out so far
);

  logic [LBADDR_W:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           acc <= '0;
    else if (clear)       acc <= '0;
    else if (alloc && !full) acc <= acc + (LBADDR_W+1)'(N);
  end

  assign full     = (acc + (LBADDR_W+1)'(N)) > (LBADDR_W+1)'(DEPTH);
  assign blk_addr = acc[LBADDR_W-1:0];
  assign used     = acc;

endmodule
