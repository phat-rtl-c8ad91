// tb_pemi: one PEMI of each kind (r-VEX, accelerator, streaming), each wired
// to an MCI endpoint and an out-of-order memory controller model, with no
// network between them (a single MCI, so every request goes there).
// r-VEX slot: a program load of 40 bundles must end with core_run high, IMEM
// must then hold the program (lower word in bits 63:0), and the data port must
// be refused while the loader owns the cache.  All slots: random data traffic
// checked against a shadow memory, in request order; every packet must come
// back to its own node.
module tb_pemi;
  import phat_pkg::*;
  localparam int NUM_PE = 3, NUM_MCI = 1, IMEM_DEPTH = 64, IAW = 6, PROG_LEN = 40;
  localparam logic [63:0] PROG = 64'h0008_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c_checks [3], c_fail [3], c_stall [3];
  logic c_done [3];

  logic              ctrl_start;
  logic              ctrl_busy [3], ctrl_done [3], core_run [3];
  logic              fetch_en;
  logic [IAW-1:0]    fetch_addr;
  logic [127:0]      fetch_data [3];
  int                busy_refused = 0;
  logic [127:0]      exp_bundle;

  for (genvar p = 0; p < 3; p++) begin : g_slot
    localparam pemi_kind_e KIND = (p == 0) ? PEMI_RVEX : (p == 1) ? PEMI_ACCEL : PEMI_STREAM;
    logic              rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready;
    logic [ADDR_W-1:0] rd_req_addr, wr_req_addr;
    logic [DATA_W-1:0] rd_rsp_data, wr_req_data;
    logic              wr_req_valid, wr_req_ready;
    logic [BE_W-1:0]   wr_req_be;
    logic              inj_valid, inj_ready, ej_valid, ej_ready;
    noc_flit_t         inj_flit, ej_flit;
    logic              s_hit, s_miss, s_wb, s_pf;
    logic              mc_req_valid, mc_req_ready, mc_rsp_valid, mc_rsp_ready;
    mc_req_t           mc_req;
    mc_rsp_t           mc_rsp;

    pemi #(.KIND(KIND), .NODE(p), .NUM_PE(NUM_PE), .NUM_MCI(NUM_MCI), .LINES(64),
           .PREFETCH(8), .IMEM_DEPTH(IMEM_DEPTH), .ROB_DEPTH(16)) u_pemi (
      .clk, .rst_n,
      .ctrl_start, .ctrl_prog_addr(PROG), .ctrl_prog_len((IAW+1)'(PROG_LEN)),
      .ctrl_busy(ctrl_busy[p]), .ctrl_done(ctrl_done[p]), .core_run(core_run[p]),
      .fetch_en, .fetch_addr, .fetch_data(fetch_data[p]),
      .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_data,
      .wr_req_valid, .wr_req_ready, .wr_req_addr, .wr_req_data, .wr_req_be,
      .inj_valid, .inj_ready, .inj_flit, .ej_valid, .ej_ready, .ej_flit,
      .stat_hit(s_hit), .stat_miss(s_miss), .stat_wb(s_wb), .stat_prefetch(s_pf));

    mci_endpoint #(.NUM_VC(2)) u_mci (
      .clk, .rst_n,
      .ej_valid(inj_valid), .ej_ready(inj_ready), .ej_flit(inj_flit),
      .inj_valid(ej_valid), .inj_ready(ej_ready), .inj_flit(ej_flit),
      .mc_req_valid, .mc_req_ready, .mc_req, .mc_rsp_valid, .mc_rsp_ready, .mc_rsp);

    mc_model #(.SLOTS(8), .LAT_MIN(2), .LAT_MAX(30)) u_mc (
      .clk, .rst_n, .req_valid(mc_req_valid), .req_ready(mc_req_ready), .req(mc_req),
      .rsp_valid(mc_rsp_valid), .rsp_ready(mc_rsp_ready), .rsp(mc_rsp));

    pemi_client #(.BASE(64'h1_0000 * (p + 1)), .WORDS(KIND == PEMI_STREAM ? 64 : 256),
                  .N_READS(600), .HOLD(KIND == PEMI_STREAM)) u_client (
      .clk, .rst_n, .enable(core_run[p] && !ctrl_busy[p]),
      .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_data,
      .wr_req_valid, .wr_req_ready, .wr_req_addr, .wr_req_data, .wr_req_be,
      .done(c_done[p]), .checks(c_checks[p]), .failures(c_fail[p]), .stall_cycles(c_stall[p]));

    always_ff @(posedge clk) begin
      if (rst_n && ej_valid && ej_ready) begin
        checks++;
        if (int'(ej_flit.dst) != p || int'(ej_flit.id[28:24]) != p) begin
          failures++; $display("slot %0d got a packet for node %0d", p, ej_flit.dst);
        end
      end
    end
  end

  // the data port of the r-VEX slot is refused while its loader runs
  always_ff @(posedge clk) begin
    if (rst_n && ctrl_busy[0]) begin
      if (g_slot[0].rd_req_ready) begin checks++; failures++; $display("data read accepted during load"); end
      busy_refused++;
    end
  end

  initial begin
    ctrl_start = 0; fetch_en = 0; fetch_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); ctrl_start = 1;
    @(negedge clk); ctrl_start = 0;
    // hold a data read request on the r-VEX slot during the load
    force g_slot[0].rd_req_valid = 1'b1;
    wait (ctrl_done[0]);
    release g_slot[0].rd_req_valid;
    @(negedge clk);
    checks++; if (!core_run[0] || busy_refused == 0) begin failures++; $display("core not released"); end
    for (int i = 0; i < PROG_LEN; i++) begin
      @(negedge clk); fetch_en = 1; fetch_addr = IAW'(i);
      @(posedge clk); #1;
      exp_bundle = {tb_pkg::mem_init(PROG + 64'(i) * 16 + 8), tb_pkg::mem_init(PROG + 64'(i) * 16)};
      checks++;
      if (fetch_data[0] !== exp_bundle) begin failures++; $display("IMEM bundle %0d wrong", i); end
    end
    fetch_en = 0;
    wait (c_done[0] && c_done[1] && c_done[2]);
    repeat (10) @(posedge clk);
    for (int p = 0; p < 3; p++) begin
      checks += c_checks[p];
      failures += c_fail[p];
      checks++;
      if (c_stall[p] == 0) begin failures++; $display("slot %0d never stalled", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
