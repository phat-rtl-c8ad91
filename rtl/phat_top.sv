// phat_top: the processing-element array of one PHAT FPGA (one Convey
// application engine): NUM_PE PE slots and NUM_MCI memory controller
// interfaces joined by a double-ring network-on-chip.
//
// Each PE slot holds a PE-local memory interface (pemi) and a NoC node.  The
// PEs themselves (r-VEX VLIW cores, compiled or hand-written accelerators,
// streaming IP blocks) attach at the slot's client ports, which this module
// brings out as arrays indexed by slot.  The memory controllers of the
// off-chip memory system attach at the mc_* ports, one per MCI; they may
// answer reads in any order, the PEMIs put the replies back in order.
// Addresses are interleaved over the MCIs in 8-byte blocks.
//
// Slot kinds: slots 0 .. NUM_PE-NUM_ACCEL-NUM_STREAM-1 carry r-VEX PEMIs
// (cache + IMEM), the next NUM_ACCEL slots accelerator PEMIs (cache only), the
// last NUM_STREAM slots streaming PEMIs (reorder buffer).  The default of 16 +
// 1 + 1 places one of each kind in the array; NUM_ACCEL = NUM_STREAM = 0 gives
// the homogeneous 18-core r-VEX array and NUM_STREAM = 18 the 18-block
// streaming array.  The MCIs are spread evenly around the ring (MCI m at node
// floor(m * 26 / 8): 0, 3, 6, 9, 13, 16, 19, 22) and the PE slots take the
// remaining nodes in order, so that memory traffic uses every ring link rather
// than crossing the two links at the edge of a block of MCIs.
//
// From the PHAT description: 18 PE slots, 8 MCIs, 26 NoC endpoints on a double
// ring, 2 virtual channels, the PEMI variants and cache configuration.  The
// default mix of slot kinds and the node order are this design's choices.
module phat_top
  import phat_pkg::*;
#(
  parameter int NUM_PE     = 18,
  parameter int NUM_MCI    = 8,
  parameter int NUM_ACCEL  = 1,
  parameter int NUM_STREAM = 1,
  parameter int NUM_VC     = 2,
  parameter int LINES      = 1024,
  parameter int PREFETCH   = 32,
  parameter int IMEM_DEPTH = 1024,
  parameter int ROB_DEPTH  = 512,
  parameter int IAW        = $clog2(IMEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // PE slots
  input  logic              ctrl_start     [NUM_PE],
  input  logic [ADDR_W-1:0] ctrl_prog_addr [NUM_PE],
  input  logic [IAW:0]      ctrl_prog_len  [NUM_PE],
  output logic              ctrl_busy      [NUM_PE],
  output logic              ctrl_done      [NUM_PE],
  output logic              core_run       [NUM_PE],
  input  logic              fetch_en       [NUM_PE],
  input  logic [IAW-1:0]    fetch_addr     [NUM_PE],
  output logic [127:0]      fetch_data     [NUM_PE],
  input  logic              rd_req_valid   [NUM_PE],
  output logic              rd_req_ready   [NUM_PE],
  input  logic [ADDR_W-1:0] rd_req_addr    [NUM_PE],
  output logic              rd_rsp_valid   [NUM_PE],
  input  logic              rd_rsp_ready   [NUM_PE],
  output logic [DATA_W-1:0] rd_rsp_data    [NUM_PE],
  input  logic              wr_req_valid   [NUM_PE],
  output logic              wr_req_ready   [NUM_PE],
  input  logic [ADDR_W-1:0] wr_req_addr    [NUM_PE],
  input  logic [DATA_W-1:0] wr_req_data    [NUM_PE],
  input  logic [BE_W-1:0]   wr_req_be      [NUM_PE],
  output logic              stat_hit       [NUM_PE],
  output logic              stat_miss      [NUM_PE],
  output logic              stat_wb        [NUM_PE],
  output logic              stat_prefetch  [NUM_PE],
  // memory controllers
  output logic              mc_req_valid   [NUM_MCI],
  input  logic              mc_req_ready   [NUM_MCI],
  output mc_req_t           mc_req         [NUM_MCI],
  input  logic              mc_rsp_valid   [NUM_MCI],
  output logic              mc_rsp_ready   [NUM_MCI],
  input  mc_rsp_t           mc_rsp         [NUM_MCI]
);
  localparam int N        = NUM_PE + NUM_MCI;
  localparam int NUM_RVEX = NUM_PE - NUM_ACCEL - NUM_STREAM;

  logic      inj_valid [N];
  logic      inj_ready [N];
  noc_flit_t inj_flit  [N];
  logic      ej_valid  [N];
  logic      ej_ready  [N];
  noc_flit_t ej_flit   [N];

  noc_double_ring #(.N(N), .NUM_VC(NUM_VC)) u_noc (
    .clk, .rst_n,
    .inj_valid, .inj_ready, .inj_flit,
    .ej_valid,  .ej_ready,  .ej_flit
  );

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    localparam pemi_kind_e KIND = (p < NUM_RVEX)             ? PEMI_RVEX  :
                                  (p < NUM_RVEX + NUM_ACCEL) ? PEMI_ACCEL : PEMI_STREAM;
    localparam int NODE = int'(pe_node(p, NUM_PE, NUM_MCI));
    pemi #(
      .KIND(KIND), .NODE(NODE), .NUM_PE(NUM_PE), .NUM_MCI(NUM_MCI), .NUM_VC(NUM_VC),
      .LINES(LINES), .PREFETCH(PREFETCH), .IMEM_DEPTH(IMEM_DEPTH), .ROB_DEPTH(ROB_DEPTH)
    ) u_pemi (
      .clk, .rst_n,
      .ctrl_start(ctrl_start[p]), .ctrl_prog_addr(ctrl_prog_addr[p]),
      .ctrl_prog_len(ctrl_prog_len[p]), .ctrl_busy(ctrl_busy[p]),
      .ctrl_done(ctrl_done[p]), .core_run(core_run[p]),
      .fetch_en(fetch_en[p]), .fetch_addr(fetch_addr[p]), .fetch_data(fetch_data[p]),
      .rd_req_valid(rd_req_valid[p]), .rd_req_ready(rd_req_ready[p]), .rd_req_addr(rd_req_addr[p]),
      .rd_rsp_valid(rd_rsp_valid[p]), .rd_rsp_ready(rd_rsp_ready[p]), .rd_rsp_data(rd_rsp_data[p]),
      .wr_req_valid(wr_req_valid[p]), .wr_req_ready(wr_req_ready[p]), .wr_req_addr(wr_req_addr[p]),
      .wr_req_data(wr_req_data[p]), .wr_req_be(wr_req_be[p]),
      .inj_valid(inj_valid[NODE]), .inj_ready(inj_ready[NODE]), .inj_flit(inj_flit[NODE]),
      .ej_valid(ej_valid[NODE]), .ej_ready(ej_ready[NODE]), .ej_flit(ej_flit[NODE]),
      .stat_hit(stat_hit[p]), .stat_miss(stat_miss[p]), .stat_wb(stat_wb[p]),
      .stat_prefetch(stat_prefetch[p])
    );
  end

  for (genvar m = 0; m < NUM_MCI; m++) begin : g_mci
    localparam int NODE = int'(mci_node(m, NUM_PE, NUM_MCI));
    mci_endpoint #(.NUM_VC(NUM_VC)) u_mci (
      .clk, .rst_n,
      .ej_valid(ej_valid[NODE]), .ej_ready(ej_ready[NODE]), .ej_flit(ej_flit[NODE]),
      .inj_valid(inj_valid[NODE]), .inj_ready(inj_ready[NODE]), .inj_flit(inj_flit[NODE]),
      .mc_req_valid(mc_req_valid[m]), .mc_req_ready(mc_req_ready[m]), .mc_req(mc_req[m]),
      .mc_rsp_valid(mc_rsp_valid[m]), .mc_rsp_ready(mc_rsp_ready[m]), .mc_rsp(mc_rsp[m])
    );
  end

  initial begin
    assert (N <= (1 << NOC_DST_W)) else $error("too many NoC nodes for the destination field");
    assert (NUM_RVEX >= 0) else $error("more accelerator and streaming slots than PE slots");
  end
endmodule
