// Primitive list manager: appends one scene-buffer address to one list.
//
// For each request (list index, scene-buffer address) the manager reads the
// list's entry in the primitive list index table and then:
//  - entry NULL (list never used this frame): takes a fresh block from the
//    address accumulator, writes the record into its first slot and sets
//    entry = block, next = block + 1, count = 1;
//  - next free slot is a block's link slot (count is a multiple of N-1, the
//    block is full): takes a fresh block, writes its address into the link
//    slot, then writes the record into the new block's first slot;
//  - otherwise: writes the record at next, then next + 1, count + 1.
// The block-chaining scheme follows the design; recognising a full block from
// the low bits of the next address instead of dividing the count by N-1 is
// this design's equivalent, and an assertion checks the two agree. When the
// buffer has no block left the record is dropped and the sticky overflow flag
// is raised (overflow handling is this design's choice).
//
// Handshake: req_valid/req_ready. A request is accepted in IDLE and takes two
// cycles (three when a block is chained), so requests are fully serialised and
// a request never sees a stale index-table entry.
module list_manager
  import hpl_pkg::*;
#(
  parameter int unsigned N     = 8,       // entries per list-buffer block
  parameter int unsigned DEPTH = 65536    // list-buffer entries
)(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,       // new frame
  // append requests
  input  logic      req_valid,
  output logic      req_ready,
  input  append_t   req,
  // index table
  output lidx_t     it_raddr,
  input  pl_entry_t it_rdata,
  input  logic      it_rvalid,
  output logic      it_we,
  output lidx_t     it_waddr,
  output pl_entry_t it_wdata,
  // list buffer write port
  output logic      lb_we,
  output lbaddr_t   lb_waddr,
  output saddr_t    lb_wdata,
  // status
  output logic      busy,
  output logic      overflow,     // sticky: a record was dropped
  output logic      ev_new_list,  // pulse: a list got its first block
  output logic      ev_chain,     // pulse: a full block was chained
  output logic      ev_drop,      // pulse: a record was dropped
  output logic [LBADDR_W:0] lb_used // list-buffer entries allocated
);

  localparam int NB = $clog2(N);

  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_LINK} state_e;

  state_e    state;
  append_t   cur;
  pl_entry_t ent;
  lbaddr_t   newblk;
  logic      alloc, full;
  lbaddr_t   blk_addr;
  logic      link_slot;

  addr_accumulator #(.N(N), .DEPTH(DEPTH)) u_acc (
    .clk, .rst_n, .clear, .alloc, .blk_addr, .full, .used(lb_used)
  );

  assign req_ready = (state == S_IDLE) && !clear;
  assign busy      = (state != S_IDLE);
  assign it_raddr  = req.lidx;
  assign link_slot = (it_rdata.next[NB-1:0] == NB'(N - 1));

  always_comb begin
    alloc       = 1'b0;
    it_we       = 1'b0;
    it_waddr    = cur.lidx;
    it_wdata    = it_rdata;
    lb_we       = 1'b0;
    lb_waddr    = it_rdata.next;
    lb_wdata    = cur.saddr;
    ev_new_list = 1'b0;
    ev_chain    = 1'b0;
    ev_drop     = 1'b0;
    unique case (state)
      S_LOOK: begin
        if (!it_rvalid) begin
          if (full) begin
            ev_drop = 1'b1;
          end else begin
            alloc          = 1'b1;
            ev_new_list    = 1'b1;
            lb_we          = 1'b1;
            lb_waddr       = blk_addr;
            it_we          = 1'b1;
            it_wdata.entry = blk_addr;
            it_wdata.next  = blk_addr + 1'b1;
            it_wdata.count = 16'd1;
          end
        end else if (link_slot) begin
          if (full) begin
            ev_drop = 1'b1;
          end else begin
            alloc    = 1'b1;
            ev_chain = 1'b1;
            lb_we    = 1'b1;
            lb_waddr = it_rdata.next;
            lb_wdata = saddr_t'(blk_addr);
          end
        end else begin
          lb_we          = 1'b1;
          lb_waddr       = it_rdata.next;
          it_we          = 1'b1;
          it_wdata.next  = it_rdata.next + 1'b1;
          it_wdata.count = it_rdata.count + 1'b1;
        end
      end
      S_LINK: begin
        lb_we          = 1'b1;
        lb_waddr       = newblk;
        it_we          = 1'b1;
        it_wdata       = ent;
        it_wdata.next  = newblk + 1'b1;
        it_wdata.count = ent.count + 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur      <= '0;
      ent      <= '0;
      newblk   <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      state    <= S_IDLE;
      overflow <= 1'b0;
    end else begin
      if (ev_drop) overflow <= 1'b1;
      unique case (state)
        S_IDLE: if (req_valid) begin
          cur   <= req;
          state <= S_LOOK;
        end
        S_LOOK: begin
          if (it_rvalid && link_slot && !full) begin
            ent    <= it_rdata;
            newblk <= blk_addr;
            state  <= S_LINK;
          end else begin
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A block is full exactly when the count is a positive multiple of N-1.
  always_ff @(posedge clk)
    if (state == S_LOOK && it_rvalid)
      assert (link_slot == (it_rdata.count != 0 && (it_rdata.count % 16'(N - 1)) == 0))
        else $error("list_manager: link slot and record count disagree");

endmodule
