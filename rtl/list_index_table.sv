// Primitive list index table.
//
// One entry per list (every tile and layered tile of every list kind): the
// list-buffer address of the list's first block, the address of the next free
// record slot and a count of the records in the list. A per-entry valid bit
// stands for "entry address is NULL": a frame clear drops all of them in one
// cycle, so the table needs no sweep between frames (this bit vector is this
// design's way of holding NULL).
//
// One write port and two synchronous read ports (binning side and rendering
// side). Read data, with its valid bit, appears the cycle after the address.
// A write to the address being read in the same cycle is not forwarded.
module list_index_table
  import hpl_pkg::*;
#(
  parameter int unsigned NUM_LISTS = 4096
)(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  // write port
  input  logic      we,
  input  lidx_t     waddr,
  input  pl_entry_t wdata,
  // read port A
  input  lidx_t     ra_addr,
  output pl_entry_t ra_data,
  output logic      ra_valid,
  // read port B
  input  lidx_t     rb_addr,
  output pl_entry_t rb_data,
  output logic      rb_valid
);

  localparam int unsigned AW = (NUM_LISTS > 1) ? $clog2(NUM_LISTS) : 1;

  pl_entry_t mem [NUM_LISTS];
  logic [NUM_LISTS-1:0] valid;

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < NUM_LISTS) mem[waddr[AW-1:0]] <= wdata;
    ra_data <= mem[ra_addr[AW-1:0]];
    rb_data <= mem[rb_addr[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      ra_valid <= 1'b0;
      rb_valid <= 1'b0;
    end else begin
      if (clear)
        valid <= '0;
      else if (we && 32'(waddr) < NUM_LISTS)
        valid[waddr[AW-1:0]] <= 1'b1;
      ra_valid <= (32'(ra_addr) < NUM_LISTS) && valid[ra_addr[AW-1:0]] && !clear;
      rb_valid <= (32'(rb_addr) < NUM_LISTS) && valid[rb_addr[AW-1:0]] && !clear;
    end
  end

endmodule
