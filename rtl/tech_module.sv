// tech_module: the Technology Module between a PE's memory interface (MARC II
// or reorder buffer) and its NoC router.
//
// Outgoing: a generic memory request becomes one single-flit NoC packet in the
// PHAT packet layout.  The destination is the memory controller interface
// (MCI) that owns the address under linear interleaving (successive 8-byte
// blocks on successive MCIs); the 32-bit ID carries this node's number in its
// upper byte and the client's reorder tag below it, so the MCI can return the
// reply and the client can place it.  MCI m sits at ring node
// floor(m * 26 / 8) by default (see phat_pkg).  Requests use the lower half of the
// virtual channels, spread by tag.
// Incoming: a read-reply packet becomes a tagged read reply to the client,
// which always has room for it (ej_ready is tied high for that reason).
//
// Purely combinational; valid/ready pass straight through.
// From the PHAT description: the module's role and the packet fields.  ID
// layout, VC assignment and node numbering are this design's choices.
module tech_module
  import phat_pkg::*;
#(
  parameter int NODE    = 0,
  parameter int NUM_PE  = 18,
  parameter int NUM_MCI = 8,
  parameter int NUM_VC  = 2
) (
  // client side
  input  logic      mreq_valid,
  output logic      mreq_ready,
  input  mem_req_t  mreq,
  output logic      mrsp_valid,
  output mem_rsp_t  mrsp,
  // router side
  output logic      inj_valid,
  input  logic      inj_ready,
  output noc_flit_t inj_flit,
  input  logic      ej_valid,
  output logic      ej_ready,
  input  noc_flit_t ej_flit
);
  localparam int REQ_VCS = (NUM_VC > 1) ? NUM_VC / 2 : 1;

  assign inj_valid  = mreq_valid;
  assign mreq_ready = inj_ready;

  // which MCI owns the address, then that MCI's ring node (constant table)
  logic [NOC_DST_W-1:0] mci_idx;
  assign mci_idx = NOC_DST_W'(mci_of_addr(mreq.addr, NUM_MCI));

  always_comb begin
    inj_flit       = '0;
    inj_flit.tail  = 1'b1;
    for (int m = 0; m < NUM_MCI; m++)
      if (mci_idx == NOC_DST_W'(m)) inj_flit.dst = mci_node(m, NUM_PE, NUM_MCI);
    inj_flit.vc    = VC_W'(mreq.addr[ADDR_W-1:6] % (ADDR_W-6)'(REQ_VCS));
    inj_flit.write = mreq.write;
    inj_flit.be    = mreq.be;
    inj_flit.addr  = mreq.addr;
    inj_flit.data  = mreq.data;
    inj_flit.id    = {SRC_W'(NODE), mreq.tag};
  end

  assign ej_ready   = 1'b1;
  assign mrsp_valid = ej_valid && !ej_flit.write;
  assign mrsp.tag   = ej_flit.id[TAG_W-1:0];
  assign mrsp.data  = ej_flit.data;

endmodule
