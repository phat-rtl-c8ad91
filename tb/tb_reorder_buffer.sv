// tb_reorder_buffer: random reads and posted writes through the reorder
// buffer into an out-of-order memory model.  A shadow memory in the testbench
// predicts every read's data at the moment the read is accepted; read data must
// come back in request order and match.  Also checks that out-of-order replies
// actually occurred, that the buffer fills up (back-pressure) and that a full
// buffer stalls reads.
module tb_reorder_buffer;
  import phat_pkg::*;

  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready;
  logic [ADDR_W-1:0] rd_req_addr, wr_req_addr;
  logic [DATA_W-1:0] rd_rsp_data, wr_req_data;
  logic              wr_req_valid, wr_req_ready;
  logic [BE_W-1:0]   wr_req_be;
  logic              mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t          mreq;
  mem_rsp_t          mrsp;
  mc_req_t           mc_req;
  mc_rsp_t           mc_rsp;
  logic              mc_rsp_valid;

  reorder_buffer #(.DEPTH(DEPTH)) dut (.*);

  assign mc_req.write = mreq.write;
  assign mc_req.addr  = mreq.addr;
  assign mc_req.data  = mreq.data;
  assign mc_req.be    = mreq.be;
  assign mc_req.id    = {8'h00, mreq.tag};
  assign mrsp_valid   = mc_rsp_valid;
  assign mrsp.tag     = mc_rsp.id[TAG_W-1:0];
  assign mrsp.data    = mc_rsp.data;

  mc_model #(.SLOTS(12), .LAT_MIN(2), .LAT_MAX(40)) u_mem (
    .clk, .rst_n, .req_valid(mreq_valid), .req_ready(mreq_ready), .req(mc_req),
    .rsp_valid(mc_rsp_valid), .rsp_ready(1'b1), .rsp(mc_rsp));

  int checks = 0, failures = 0;
  logic [63:0] shadow [logic [60:0]];
  logic [63:0] expq [$];
  int full_cycles = 0, reads_done = 0;

  function automatic logic [63:0] sh(input logic [63:0] a);
    if (shadow.exists(a[63:3])) return shadow[a[63:3]];
    return tb_pkg::mem_init(a);
  endfunction

  // stimulus
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (rd_req_valid && rd_req_ready) expq.push_back(sh(rd_req_addr));
      if (wr_req_valid && wr_req_ready) begin
        logic [63:0] w;
        w = sh(wr_req_addr);
        for (int b = 0; b < 8; b++) if (wr_req_be[b]) w[8*b +: 8] = wr_req_data[8*b +: 8];
        shadow[wr_req_addr[63:3]] = w;
      end
      if (!rd_req_valid || rd_req_ready) begin
        rd_req_valid <= ($urandom_range(0, 9) < 8);
        rd_req_addr  <= 64'h1000 + 64'($urandom_range(0, 63)) * 8;
      end
      if (!wr_req_valid || wr_req_ready) begin
        wr_req_valid <= ($urandom_range(0, 9) < 2);
        wr_req_addr  <= 64'h1000 + 64'($urandom_range(0, 63)) * 8;
        wr_req_data  <= {$urandom, $urandom};
        wr_req_be    <= 8'($urandom);
      end
      rd_rsp_ready <= ($urandom_range(0, 9) < 6);
      if (rd_req_valid && !rd_req_ready && expq.size() == DEPTH) full_cycles++;
      if (rd_rsp_valid && rd_rsp_ready) begin
        checks++;
        reads_done++;
        if (expq.size() == 0 || rd_rsp_data !== expq[0]) begin
          failures++;
          $display("mismatch: got %h expected %h", rd_rsp_data, expq.size() ? expq[0] : 64'h0);
        end
        if (expq.size()) void'(expq.pop_front());
      end
    end
  end

  initial begin
    rd_req_valid = 0; wr_req_valid = 0; rd_rsp_ready = 0;
    rd_req_addr = 0; wr_req_addr = 0; wr_req_data = 0; wr_req_be = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (reads_done >= 2000);
    checks++;
    if (u_mem.stat_ooo == 0) begin failures++; $display("no out-of-order reply seen"); end
    checks++;
    if (full_cycles == 0) begin failures++; $display("buffer never filled"); end
    $display("out-of-order replies %0d, cycles with full buffer %0d", u_mem.stat_ooo, full_cycles);
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
