// pemi: PE-local Memory Interface of one PE slot.
//
// Every processing element (PE) reaches shared memory through its own PEMI,
// which has a client side facing the PE and a network side facing the slot's
// NoC router.  Its inside depends on the PE kind:
//   PEMI_RVEX   MARC II cache + local instruction memory (IMEM) + loader.  At
//               start the loader copies the program through the cache into
//               IMEM and holds the core (core_run low); afterwards the cache
//               serves data only and the core fetches from IMEM.
//   PEMI_ACCEL  MARC II cache alone, for accelerators that fetch no code.
//   PEMI_STREAM reorder buffer alone, for streaming PEs without data reuse.
// In each case a Technology Module turns the memory requests into NoC packets
// and NoC replies into tagged memory replies.
//
// Client side (same for all kinds, unused parts idle): ctrl_* start/status of
// the program load; fetch_* the IMEM port (data one cycle after fetch_en);
// rd_req_*/rd_rsp_* read port and wr_req_* write port, valid/ready.  With a
// MARC cache rd_rsp_valid is a one-cycle pulse and rd_rsp_ready is ignored;
// with the reorder buffer the client may hold off read data with rd_rsp_ready.
// stat_* are cache event pulses (zero for PEMI_STREAM).
//
// From the PHAT description: the three PEMI variants, their contents and the
// Technology Module between PEMI and router.  Port naming and the handling of
// the unused ports are this design's.
module pemi
  import phat_pkg::*;
#(
  parameter pemi_kind_e KIND       = PEMI_RVEX,
  parameter int         NODE       = 0,
  parameter int         NUM_PE     = 18,
  parameter int         NUM_MCI    = 8,
  parameter int         NUM_VC     = 2,
  parameter int         LINES      = 1024,
  parameter int         PREFETCH   = 32,
  parameter int         IMEM_DEPTH = 1024,
  parameter int         ROB_DEPTH  = 512,
  parameter int         IAW        = $clog2(IMEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              ctrl_start,
  input  logic [ADDR_W-1:0] ctrl_prog_addr,
  input  logic [IAW:0]      ctrl_prog_len,
  output logic              ctrl_busy,
  output logic              ctrl_done,
  output logic              core_run,
  // instruction fetch
  input  logic              fetch_en,
  input  logic [IAW-1:0]    fetch_addr,
  output logic [127:0]      fetch_data,
  // data read port
  input  logic              rd_req_valid,
  output logic              rd_req_ready,
  input  logic [ADDR_W-1:0] rd_req_addr,
  output logic              rd_rsp_valid,
  input  logic              rd_rsp_ready,
  output logic [DATA_W-1:0] rd_rsp_data,
  // data write port
  input  logic              wr_req_valid,
  output logic              wr_req_ready,
  input  logic [ADDR_W-1:0] wr_req_addr,
  input  logic [DATA_W-1:0] wr_req_data,
  input  logic [BE_W-1:0]   wr_req_be,
  // NoC side
  output logic              inj_valid,
  input  logic              inj_ready,
  output noc_flit_t         inj_flit,
  input  logic              ej_valid,
  output logic              ej_ready,
  input  noc_flit_t         ej_flit,
  // cache events
  output logic              stat_hit,
  output logic              stat_miss,
  output logic              stat_wb,
  output logic              stat_prefetch
);
  logic     mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t mreq;
  mem_rsp_t mrsp;

  tech_module #(.NODE(NODE), .NUM_PE(NUM_PE), .NUM_MCI(NUM_MCI), .NUM_VC(NUM_VC)) u_tech (
    .mreq_valid, .mreq_ready, .mreq, .mrsp_valid, .mrsp,
    .inj_valid, .inj_ready, .inj_flit, .ej_valid, .ej_ready, .ej_flit
  );

  if (KIND == PEMI_STREAM) begin : g_stream
    reorder_buffer #(.DEPTH(ROB_DEPTH)) u_rob (
      .clk, .rst_n,
      .rd_req_valid, .rd_req_ready, .rd_req_addr,
      .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_data,
      .wr_req_valid, .wr_req_ready, .wr_req_addr, .wr_req_data, .wr_req_be,
      .mreq_valid, .mreq_ready, .mreq, .mrsp_valid, .mrsp
    );
    assign ctrl_busy     = 1'b0;
    assign ctrl_done     = ctrl_start;
    assign core_run      = 1'b1;
    assign fetch_data    = '0;
    assign stat_hit      = 1'b0;
    assign stat_miss     = 1'b0;
    assign stat_wb       = 1'b0;
    assign stat_prefetch = 1'b0;
  end else begin : g_marc
    logic              c_rd_valid, c_rd_ready, c_rsp_valid;
    logic [ADDR_W-1:0] c_rd_addr;
    logic [DATA_W-1:0] c_rsp_data;

    marc_cache #(.LINES(LINES), .PREFETCH(PREFETCH)) u_marc (
      .clk, .rst_n,
      .rd_req_valid(c_rd_valid), .rd_req_ready(c_rd_ready), .rd_req_addr(c_rd_addr),
      .rd_rsp_valid(c_rsp_valid), .rd_rsp_data(c_rsp_data),
      .wr_req_valid, .wr_req_ready, .wr_req_addr, .wr_req_data, .wr_req_be,
      .mreq_valid, .mreq_ready, .mreq, .mrsp_valid, .mrsp,
      .stat_hit, .stat_miss, .stat_wb, .stat_prefetch
    );

    if (KIND == PEMI_RVEX) begin : g_rvex
      logic              ld_busy, ld_rd_valid, ld_we;
      logic [ADDR_W-1:0] ld_rd_addr;
      logic [IAW-1:0]    ld_addr;
      logic [127:0]      ld_data;

      imem_loader #(.DEPTH(IMEM_DEPTH)) u_loader (
        .clk, .rst_n,
        .start(ctrl_start), .prog_addr(ctrl_prog_addr), .prog_len(ctrl_prog_len),
        .busy(ld_busy), .done(ctrl_done), .core_run,
        .rd_req_valid(ld_rd_valid), .rd_req_ready(c_rd_ready), .rd_req_addr(ld_rd_addr),
        .rd_rsp_valid(c_rsp_valid), .rd_rsp_data(c_rsp_data),
        .ld_we, .ld_addr, .ld_data
      );

      imem #(.DEPTH(IMEM_DEPTH), .WIDTH(128)) u_imem (
        .clk, .fetch_en, .fetch_addr, .fetch_data,
        .ld_we, .ld_addr, .ld_data
      );

      // The loader owns the cache read port while it runs.
      assign ctrl_busy    = ld_busy;
      assign c_rd_valid   = ld_busy ? ld_rd_valid : rd_req_valid;
      assign c_rd_addr    = ld_busy ? ld_rd_addr  : rd_req_addr;
      assign rd_req_ready = !ld_busy && c_rd_ready;
      assign rd_rsp_valid = !ld_busy && c_rsp_valid;
    end else begin : g_accel
      assign ctrl_busy    = 1'b0;
      assign ctrl_done    = ctrl_start;
      assign core_run     = 1'b1;
      assign fetch_data   = '0;
      assign c_rd_valid   = rd_req_valid;
      assign c_rd_addr    = rd_req_addr;
      assign rd_req_ready = c_rd_ready;
      assign rd_rsp_valid = c_rsp_valid;
    end
    assign rd_rsp_data = c_rsp_data;
  end

endmodule
