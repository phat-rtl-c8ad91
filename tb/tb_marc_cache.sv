// tb_marc_cache: random byte-masked writes and reads over an address range four
// times the cache size, against an out-of-order memory model.  A byte-exact
// shadow memory predicts every read; a read that hits must answer in the next
// cycle.  Hits, misses, dirty write-backs and prefetch reads must all occur,
// and each miss must issue a full prefetch burst before the client resumes.
module tb_marc_cache;
  import phat_pkg::*;

  localparam int LINES = 64, PREFETCH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              rd_req_valid, rd_req_ready, rd_rsp_valid;
  logic [ADDR_W-1:0] rd_req_addr, wr_req_addr;
  logic [DATA_W-1:0] rd_rsp_data, wr_req_data;
  logic              wr_req_valid, wr_req_ready;
  logic [BE_W-1:0]   wr_req_be;
  logic              mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t          mreq;
  mem_rsp_t          mrsp;
  logic              stat_hit, stat_miss, stat_wb, stat_prefetch;
  mc_req_t           mc_req;
  mc_rsp_t           mc_rsp;
  logic              mc_rsp_valid;

  marc_cache #(.LINES(LINES), .PREFETCH(PREFETCH)) dut (.*);

  assign mc_req.write = mreq.write;
  assign mc_req.addr  = mreq.addr;
  assign mc_req.data  = mreq.data;
  assign mc_req.be    = mreq.be;
  assign mc_req.id    = {8'h00, mreq.tag};
  assign mrsp_valid   = mc_rsp_valid;
  assign mrsp.tag     = mc_rsp.id[TAG_W-1:0];
  assign mrsp.data    = mc_rsp.data;

  mc_model #(.SLOTS(8), .LAT_MIN(2), .LAT_MAX(25)) u_mem (
    .clk, .rst_n, .req_valid(mreq_valid), .req_ready(mreq_ready), .req(mc_req),
    .rsp_valid(mc_rsp_valid), .rsp_ready(1'b1), .rsp(mc_rsp));

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wb = 0, n_pf = 0, n_rd_issued = 0, reads_done = 0;
  logic [63:0] shadow [logic [60:0]];
  logic        pend;
  logic [63:0] pend_val;

  function automatic logic [63:0] sh(input logic [63:0] a);
    if (shadow.exists(a[63:3])) return shadow[a[63:3]];
    return tb_pkg::mem_init(a);
  endfunction

  function automatic logic [63:0] rnd_addr();
    return 64'h4_0000 + 64'($urandom_range(0, 4 * LINES - 1)) * 8;
  endfunction

  always_ff @(posedge clk) begin
    if (rst_n) begin
      n_hit  += int'(stat_hit);
      n_miss += int'(stat_miss);
      n_wb   += int'(stat_wb);
      n_pf   += int'(stat_prefetch);
      if (mreq_valid && mreq_ready && !mreq.write) n_rd_issued++;
      // response check: exactly one cycle after acceptance
      if (pend) begin
        checks++;
        if (!rd_rsp_valid || rd_rsp_data !== pend_val) begin
          failures++;
          $display("read mismatch/late: valid=%b got %h exp %h", rd_rsp_valid, rd_rsp_data, pend_val);
        end
        reads_done++;
      end else if (rd_rsp_valid) begin
        checks++; failures++;
        $display("unexpected read response");
      end
      pend <= rd_req_valid && rd_req_ready;
      if (rd_req_valid && rd_req_ready) pend_val <= sh(rd_req_addr);
      if (wr_req_valid && wr_req_ready) begin
        logic [63:0] w;
        w = sh(wr_req_addr);
        for (int b = 0; b < 8; b++) if (wr_req_be[b]) w[8*b +: 8] = wr_req_data[8*b +: 8];
        shadow[wr_req_addr[63:3]] = w;
      end
      if ((!rd_req_valid || rd_req_ready) && !pend) begin
        rd_req_valid <= ($urandom_range(0, 9) < 6);
        rd_req_addr  <= rnd_addr();
      end else if (rd_req_ready) rd_req_valid <= 1'b0;
      if (!wr_req_valid || wr_req_ready) begin
        wr_req_valid <= ($urandom_range(0, 9) < 3);
        wr_req_addr  <= rnd_addr();
        wr_req_data  <= {$urandom, $urandom};
        wr_req_be    <= 8'($urandom);
      end
    end
  end

  initial begin
    pend = 0; rd_req_valid = 0; wr_req_valid = 0;
    rd_req_addr = 0; wr_req_addr = 0; wr_req_data = 0; wr_req_be = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (reads_done >= 3000);
    @(posedge clk);
    checks++; if (n_hit  == 0) begin failures++; $display("no hit");        end
    checks++; if (n_miss == 0) begin failures++; $display("no miss");       end
    checks++; if (n_wb   == 0) begin failures++; $display("no write-back"); end
    checks++; if (n_pf   == 0) begin failures++; $display("no prefetch");   end
    // every read sent to memory is either the missing line or a prefetch
    checks++; if (n_rd_issued < n_pf) begin failures++; $display("prefetch count"); end
    checks++; if (u_mem.stat_ooo == 0) begin failures++; $display("no out-of-order fill"); end
    $display("hits %0d misses %0d write-backs %0d prefetches %0d ooo %0d",
             n_hit, n_miss, n_wb, n_pf, u_mem.stat_ooo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
