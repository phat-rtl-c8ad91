// tb_phat_top: end-to-end run of the whole PE array at its default size
// (18 PE slots: 16 r-VEX, 1 accelerator, 1 streaming; 8 MCIs; 26-node double
// ring with 2 VCs; 1024-line caches with 32-line prefetch; 1024-bundle IMEMs).
//
// Eight out-of-order memory controller models sit on the MCI ports.  Every
// r-VEX slot first loads a program of PROG_LEN bundles into its IMEM (checked
// bundle by bundle through the fetch port); then every slot runs random data
// traffic on its own address range, four times the cache size, checked against
// a shadow memory.  Requests must reach the MCI that owns the address (8-byte
// interleaving).  The run counts and requires each mechanism at least once:
// cache hit, miss, dirty write-back and prefetch, PE stall on a miss,
// out-of-order memory replies, memory controller stall, reorder-buffer
// delivery, IMEM load, and traffic on both rings.
module tb_phat_top;
  import phat_pkg::*;
  localparam int NUM_PE = 18, NUM_MCI = 8, NUM_RVEX = 16, IAW = 10, PROG_LEN = 24;
  localparam int N = NUM_PE + NUM_MCI;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              ctrl_start     [NUM_PE];
  logic [ADDR_W-1:0] ctrl_prog_addr [NUM_PE];
  logic [IAW:0]      ctrl_prog_len  [NUM_PE];
  logic              ctrl_busy      [NUM_PE];
  logic              ctrl_done      [NUM_PE];
  logic              core_run       [NUM_PE];
  logic              fetch_en       [NUM_PE];
  logic [IAW-1:0]    fetch_addr     [NUM_PE];
  logic [127:0]      fetch_data     [NUM_PE];
  logic              rd_req_valid   [NUM_PE];
  logic              rd_req_ready   [NUM_PE];
  logic [ADDR_W-1:0] rd_req_addr    [NUM_PE];
  logic              rd_rsp_valid   [NUM_PE];
  logic              rd_rsp_ready   [NUM_PE];
  logic [DATA_W-1:0] rd_rsp_data    [NUM_PE];
  logic              wr_req_valid   [NUM_PE];
  logic              wr_req_ready   [NUM_PE];
  logic [ADDR_W-1:0] wr_req_addr    [NUM_PE];
  logic [DATA_W-1:0] wr_req_data    [NUM_PE];
  logic [BE_W-1:0]   wr_req_be      [NUM_PE];
  logic              stat_hit       [NUM_PE];
  logic              stat_miss      [NUM_PE];
  logic              stat_wb        [NUM_PE];
  logic              stat_prefetch  [NUM_PE];
  logic              mc_req_valid   [NUM_MCI];
  logic              mc_req_ready   [NUM_MCI];
  mc_req_t           mc_req         [NUM_MCI];
  logic              mc_rsp_valid   [NUM_MCI];
  logic              mc_rsp_ready   [NUM_MCI];
  mc_rsp_t           mc_rsp         [NUM_MCI];

  phat_top dut (.*);

  int checks = 0, failures = 0;
  int c_checks [NUM_PE], c_fail [NUM_PE], c_stall [NUM_PE];
  logic c_done [NUM_PE];
  int n_hit = 0, n_miss = 0, n_wb = 0, n_pf = 0, n_cw = 0, n_ccw = 0, n_loaded = 0;
  int ooo [NUM_MCI], mc_stall [NUM_MCI];
  logic load_phase_over = 0;

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    pemi_client #(.BASE(64'h10_0000 * (p + 1)), .WORDS(4096), .N_READS(250),
                  .HOLD(p >= NUM_PE - 1)) u_client (
      .clk, .rst_n, .enable(load_phase_over),
      .rd_req_valid(rd_req_valid[p]), .rd_req_ready(rd_req_ready[p]), .rd_req_addr(rd_req_addr[p]),
      .rd_rsp_valid(rd_rsp_valid[p]), .rd_rsp_ready(rd_rsp_ready[p]), .rd_rsp_data(rd_rsp_data[p]),
      .wr_req_valid(wr_req_valid[p]), .wr_req_ready(wr_req_ready[p]), .wr_req_addr(wr_req_addr[p]),
      .wr_req_data(wr_req_data[p]), .wr_req_be(wr_req_be[p]),
      .done(c_done[p]), .checks(c_checks[p]), .failures(c_fail[p]), .stall_cycles(c_stall[p]));
  end

  for (genvar m = 0; m < NUM_MCI; m++) begin : g_mc
    mc_model #(.SLOTS(16), .LAT_MIN(8), .LAT_MAX(60), .STALL_PCT(5)) u_mc (
      .clk, .rst_n, .req_valid(mc_req_valid[m]), .req_ready(mc_req_ready[m]), .req(mc_req[m]),
      .rsp_valid(mc_rsp_valid[m]), .rsp_ready(mc_rsp_ready[m]), .rsp(mc_rsp[m]));
    assign ooo[m]      = u_mc.stat_ooo;
    assign mc_stall[m] = u_mc.stat_stall;
  end

  // requests at the MCIs: right MCI, and which ring they travelled on
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int m = 0; m < NUM_MCI; m++) begin
        if (mc_req_valid[m] && mc_req_ready[m]) begin
          int src, hops;
          checks++;
          if (int'(mc_req[m].addr[63:3] % 61'(NUM_MCI)) != m) begin
            failures++; $display("address %h reached MCI %0d", mc_req[m].addr, m);
          end
          src  = int'(mc_req[m].id[31:24]);
          hops = (int'(phat_pkg::mci_node(m, NUM_PE, NUM_MCI)) - src + N) % N;
          if (hops > N / 2) n_ccw++; else n_cw++;
        end
      end
      for (int p = 0; p < NUM_PE; p++) begin
        n_hit  += int'(stat_hit[p]);
        n_miss += int'(stat_miss[p]);
        n_wb   += int'(stat_wb[p]);
        n_pf   += int'(stat_prefetch[p]);
        if (ctrl_done[p]) n_loaded++;
      end
    end
  end

  task automatic need(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("mechanism never seen: %s", what); end
  endtask

  initial begin
    int sum_ooo, sum_stall, sum_pe_stall;
    logic [63:0] a;
    for (int p = 0; p < NUM_PE; p++) begin
      ctrl_start[p] = 0; ctrl_prog_addr[p] = 64'h800_0000 + 64'(p) * 64'h1000;
      ctrl_prog_len[p] = (IAW+1)'(PROG_LEN); fetch_en[p] = 0; fetch_addr[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < NUM_PE; p++) ctrl_start[p] = 1;
    @(negedge clk);
    for (int p = 0; p < NUM_PE; p++) ctrl_start[p] = 0;
    for (int p = 0; p < NUM_RVEX; p++) begin
      checks++;
      if (core_run[p] || !ctrl_busy[p]) begin failures++; $display("slot %0d not loading", p); end
    end
    wait (n_loaded >= NUM_PE);
    @(negedge clk);
    for (int p = 0; p < NUM_PE; p++) begin
      checks++;
      if (!core_run[p]) begin failures++; $display("slot %0d not released", p); end
    end
    for (int i = 0; i < PROG_LEN; i++) begin
      @(negedge clk);
      for (int p = 0; p < NUM_RVEX; p++) begin fetch_en[p] = 1; fetch_addr[p] = IAW'(i); end
      @(posedge clk); #1;
      for (int p = 0; p < NUM_RVEX; p++) begin
        a = ctrl_prog_addr[p] + 64'(i) * 16;
        checks++;
        if (fetch_data[p] !== {tb_pkg::mem_init(a + 8), tb_pkg::mem_init(a)}) begin
          failures++; $display("slot %0d bundle %0d wrong", p, i);
        end
      end
    end
    for (int p = 0; p < NUM_PE; p++) fetch_en[p] = 0;
    load_phase_over = 1;
    for (int p = 0; p < NUM_PE; p++) wait (c_done[p]);
    repeat (20) @(posedge clk);
    sum_ooo = 0; sum_stall = 0; sum_pe_stall = 0;
    for (int m = 0; m < NUM_MCI; m++) begin sum_ooo += ooo[m]; sum_stall += mc_stall[m]; end
    for (int p = 0; p < NUM_PE; p++) begin
      checks += c_checks[p]; failures += c_fail[p]; sum_pe_stall += c_stall[p];
    end
    need(n_loaded >= NUM_RVEX, "IMEM load");
    need(n_hit > 0, "cache hit");
    need(n_miss > 0, "cache miss");
    need(n_wb > 0, "dirty write-back");
    need(n_pf > 0, "prefetch");
    need(sum_pe_stall > 0, "PE stalled on a miss");
    need(sum_ooo > 0, "out-of-order memory reply");
    need(sum_stall > 0, "memory controller stall");
    need(c_checks[NUM_PE-1] > 0, "reorder-buffer delivery");
    need(n_cw > 0, "clockwise ring");
    need(n_ccw > 0, "counter-clockwise ring");
    $display("hits %0d misses %0d write-backs %0d prefetches %0d | ooo %0d mc-stall %0d pe-stall %0d | cw %0d ccw %0d",
             n_hit, n_miss, n_wb, n_pf, sum_ooo, sum_stall, sum_pe_stall, n_cw, n_ccw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
