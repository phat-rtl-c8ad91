// mci_endpoint: NoC endpoint in front of one memory controller interface
// (MCI) of the off-chip memory system.
//
// Request packets leaving the NoC here are handed to the memory controller as
// they are (address, data, byte enables, read/write, and the 32-bit ID that
// the controller returns with read data).  Read replies, which the controller
// may deliver in any order, are queued and sent back as packets to the node
// named in the ID's upper byte, on a reply virtual channel.  Writes are posted
// and produce no packet.
//
// Interface: ej_* from the router (valid/ready; ready follows the controller's
// request acceptance), mc_req_* to the controller (valid/ready), mc_rsp_* from
// the controller (valid/ready, ready low when the reply queue is full), inj_*
// to the router.  A reply leaves one cycle after it is queued at the earliest.
//
// From the PHAT description: this endpoint is the only part tied to the memory
// platform; replies carry the read ID.  The reply queue depth and the reply
// VC choice are this design's.
module mci_endpoint
  import phat_pkg::*;
#(
  parameter int NUM_VC    = 2,
  parameter int RSP_DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  // router side
  input  logic      ej_valid,
  output logic      ej_ready,
  input  noc_flit_t ej_flit,
  output logic      inj_valid,
  input  logic      inj_ready,
  output noc_flit_t inj_flit,
  // memory controller side
  output logic      mc_req_valid,
  input  logic      mc_req_ready,
  output mc_req_t   mc_req,
  input  logic      mc_rsp_valid,
  output logic      mc_rsp_ready,
  input  mc_rsp_t   mc_rsp
);
  localparam int REQ_VCS = (NUM_VC > 1) ? NUM_VC / 2 : 1;
  localparam int RSP_VCS = (NUM_VC > 1) ? NUM_VC - REQ_VCS : 1;
  localparam int RSP_VC0 = (NUM_VC > 1) ? REQ_VCS : 0;

  assign mc_req_valid = ej_valid;
  assign ej_ready     = mc_req_ready;
  assign mc_req.write = ej_flit.write;
  assign mc_req.addr  = ej_flit.addr;
  assign mc_req.data  = ej_flit.data;
  assign mc_req.be    = ej_flit.be;
  assign mc_req.id    = ej_flit.id;

  mc_rsp_t q_rsp;
  logic    q_valid;

  sync_fifo #(.T(mc_rsp_t), .DEPTH(RSP_DEPTH)) u_rsp_q (
    .clk, .rst_n,
    .in_valid (mc_rsp_valid), .in_ready (mc_rsp_ready), .in_data (mc_rsp),
    .out_valid(q_valid),      .out_ready(inj_ready),    .out_data(q_rsp)
  );

  assign inj_valid = q_valid;
  always_comb begin
    inj_flit       = '0;
    inj_flit.tail  = 1'b1;
    inj_flit.dst   = q_rsp.id[TAG_W +: NOC_DST_W];
    inj_flit.vc    = VC_W'(RSP_VC0) + VC_W'(q_rsp.id[TAG_W-1:0] % TAG_W'(RSP_VCS));
    inj_flit.write = 1'b0;
    inj_flit.be    = '1;
    inj_flit.data  = q_rsp.data;
    inj_flit.id    = q_rsp.id;
  end

endmodule
