// reorder_buffer: PE-local memory interface for streaming PEs.
//
// A streaming PE (for example a pipelined FFT core) has no use for a cache,
// but the memory system answers reads out of order.  This buffer gives every
// read a slot in a circular buffer; the slot number is the request's tag.
// Replies are written into their slot in whatever order they come back, and
// the client receives read data strictly in request order from the head slot.
// Writes are posted: they pass straight to memory and take no slot.
//
// Client side (one read port and one write port, as in the MARC front ends):
//   rd_req_*  read request, valid/ready;  rd_rsp_*  in-order read data, valid/ready
//   wr_req_*  posted write, valid/ready
// Memory side: mreq_* valid/ready request carrying the slot tag;
//   mrsp_* read reply, always accepted (its slot is reserved).
// Timing: a request is forwarded in the cycle it is accepted; read data leave
// the buffer the cycle after their reply arrives, if they are at the head.
// Reads and writes compete for the memory port in round-robin order.
//
// From the PHAT description: the function (in-order delivery of reordered AEMS
// replies for streaming PEs).  The depth of 512 slots (one 36 kbit block RAM of
// 64-bit words) and the arbitration are this design's choices.
module reorder_buffer
  import phat_pkg::*;
#(
  parameter int DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // read port
  input  logic              rd_req_valid,
  output logic              rd_req_ready,
  input  logic [ADDR_W-1:0] rd_req_addr,
  output logic              rd_rsp_valid,
  input  logic              rd_rsp_ready,
  output logic [DATA_W-1:0] rd_rsp_data,
  // write port
  input  logic              wr_req_valid,
  output logic              wr_req_ready,
  input  logic [ADDR_W-1:0] wr_req_addr,
  input  logic [DATA_W-1:0] wr_req_data,
  input  logic [BE_W-1:0]   wr_req_be,
  // memory side
  output logic              mreq_valid,
  input  logic              mreq_ready,
  output mem_req_t          mreq,
  input  logic              mrsp_valid,
  input  mem_rsp_t          mrsp
);
  localparam int PW = $clog2(DEPTH);

  logic [DATA_W-1:0] slot_data [DEPTH];
  logic [DEPTH-1:0]  slot_full;
  logic [PW-1:0]     head, tail;
  logic [PW:0]       used;
  logic              last_was_read;

  logic space, grant_rd, grant_wr, pop;

  assign space = (used < (PW+1)'(DEPTH));

  // Round-robin choice between a waiting read and a waiting write.
  always_comb begin
    grant_rd = 1'b0;
    grant_wr = 1'b0;
    if (rd_req_valid && space && wr_req_valid) begin
      grant_rd = !last_was_read;
      grant_wr = last_was_read;
    end else if (rd_req_valid && space) begin
      grant_rd = 1'b1;
    end else if (wr_req_valid) begin
      grant_wr = 1'b1;
    end
  end

  assign mreq_valid   = grant_rd | grant_wr;
  assign rd_req_ready = grant_rd & mreq_ready;
  assign wr_req_ready = grant_wr & mreq_ready;

  always_comb begin
    mreq       = '0;
    mreq.write = grant_wr;
    mreq.addr  = grant_wr ? wr_req_addr : rd_req_addr;
    mreq.data  = wr_req_data;
    mreq.be    = grant_wr ? wr_req_be : '1;
    mreq.tag   = TAG_W'(tail);
  end

  assign rd_rsp_valid = slot_full[head];
  assign rd_rsp_data  = slot_data[head];
  assign pop          = rd_rsp_valid & rd_rsp_ready;

  always_ff @(posedge clk) begin
    if (mrsp_valid) slot_data[mrsp.tag[PW-1:0]] <= mrsp.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_full     <= '0;
      head          <= '0;
      tail          <= '0;
      used          <= '0;
      last_was_read <= 1'b0;
    end else begin
      if (mrsp_valid) slot_full[mrsp.tag[PW-1:0]] <= 1'b1;
      if (pop) begin
        slot_full[head] <= 1'b0;
        head            <= head + 1'b1;
      end
      if (rd_req_ready) tail <= tail + 1'b1;
      used <= used + (PW+1)'(rd_req_ready) - (PW+1)'(pop);
      if (rd_req_ready)      last_was_read <= 1'b1;
      else if (wr_req_ready) last_was_read <= 1'b0;
    end
  end

  // A reply may only come for a slot that is waiting for one.
  a_reply_to_waiting_slot: assert property (@(posedge clk) disable iff (!rst_n)
    mrsp_valid |-> !slot_full[mrsp.tag[PW-1:0]]);

endmodule
