// tb_fft_stream_array: the streaming stress test of the PHAT evaluation, run
// on an array of 18 streaming slots (reorder-buffer PEMIs) with 8 MCIs and a
// 2-VC double ring.  For 1, 2, 4, 9 and 18 active blocks, each block streams
// 16 FFT frames (256 32-bit samples = 128 8-byte words per frame) from memory
// through a behavioural streaming PE and writes the results back; the output
// is then read back and checked word by word.  The memory controllers are
// behavioural models that accept one request per cycle each, as a bound of
// 8 x 8 B per cycle (9.6 GB/s at 150 MHz).
// Reported per run: memory throughput at 150 MHz in GB/s (input plus output
// bytes over the streaming time) and NoC packets per cycle (two per read, one
// per write).  Checked: all data, that every run ends, and that no run moves
// more than the eight controllers could serve.
module tb_fft_stream_array;
  import phat_pkg::*;
  localparam int NUM_PE = 18, NUM_MCI = 8, IAW = 10, FRAMES = 16, WORDS = 128 * FRAMES;
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

  phat_top #(.NUM_PE(NUM_PE), .NUM_MCI(NUM_MCI), .NUM_ACCEL(0), .NUM_STREAM(NUM_PE)) dut (.*);

  int checks = 0, failures = 0;
  logic go [NUM_PE];
  logic [63:0] in_base [NUM_PE], out_base [NUM_PE];
  logic s_done [NUM_PE], f_done [NUM_PE];
  int   errs [NUM_PE], ver [NUM_PE];
  int   n_words = WORDS;

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    stream_pe_model u_pe (
      .clk, .rst_n, .start(go[p]), .in_base(in_base[p]), .out_base(out_base[p]), .n_words(n_words),
      .stream_done(s_done[p]), .done(f_done[p]), .errors(errs[p]), .verified(ver[p]),
      .rd_req_valid(rd_req_valid[p]), .rd_req_ready(rd_req_ready[p]), .rd_req_addr(rd_req_addr[p]),
      .rd_rsp_valid(rd_rsp_valid[p]), .rd_rsp_ready(rd_rsp_ready[p]), .rd_rsp_data(rd_rsp_data[p]),
      .wr_req_valid(wr_req_valid[p]), .wr_req_ready(wr_req_ready[p]), .wr_req_addr(wr_req_addr[p]),
      .wr_req_data(wr_req_data[p]), .wr_req_be(wr_req_be[p]));
  end

  for (genvar m = 0; m < NUM_MCI; m++) begin : g_mc
    mc_model #(.SLOTS(32), .LAT_MIN(20), .LAT_MAX(40), .STALL_PCT(0)) u_mc (
      .clk, .rst_n, .req_valid(mc_req_valid[m]), .req_ready(mc_req_ready[m]), .req(mc_req[m]),
      .rsp_valid(mc_rsp_valid[m]), .rsp_ready(mc_rsp_ready[m]), .rsp(mc_rsp[m]));
  end

  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic run(input int k, input int round);
    longint t0, t1;
    real gbs, pkts;
    int all;
    for (int p = 0; p < NUM_PE; p++) begin
      in_base[p]  = 64'h1000_0000 + 64'(round) * 64'h100_0000 + 64'(p) * 64'h10_0000;
      out_base[p] = in_base[p] + 64'h8_0000;
    end
    @(negedge clk);
    for (int p = 0; p < k; p++) go[p] = 1;
    t0 = cyc;
    @(negedge clk);
    for (int p = 0; p < k; p++) go[p] = 0;
    do begin
      @(posedge clk);
      all = 1;
      for (int p = 0; p < k; p++) if (!s_done[p]) all = 0;
    end while (!all);
    t1 = cyc;
    do begin
      @(posedge clk);
      all = 1;
      for (int p = 0; p < k; p++) if (!f_done[p]) all = 0;
    end while (!all);
    for (int p = 0; p < k; p++) begin
      checks++;
      if (errs[p] != 0 || ver[p] != WORDS) begin
        failures++; $display("block %0d: %0d wrong output words of %0d", p, errs[p], ver[p]);
      end
    end
    gbs  = real'(k) * WORDS * 16.0 * 0.15 / real'(t1 - t0);
    pkts = real'(k) * WORDS * 3.0 / real'(t1 - t0);
    checks++;
    if (gbs > 8.0 * 8.0 * 0.15) begin failures++; $display("throughput above the controllers' bound"); end
    $display("FFT blocks %2d: %6d cycles, memory %5.2f GB/s at 150 MHz, NoC %5.2f packets/cycle",
             k, t1 - t0, gbs, pkts);
  endtask

  initial begin
    for (int p = 0; p < NUM_PE; p++) begin
      go[p] = 0; ctrl_start[p] = 0; ctrl_prog_addr[p] = 0; ctrl_prog_len[p] = 0;
      fetch_en[p] = 0; fetch_addr[p] = 0; in_base[p] = 0; out_base[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 0);
    run(2, 1);
    run(4, 2);
    run(9, 3);
    run(18, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
