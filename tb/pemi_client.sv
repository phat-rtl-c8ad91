// pemi_client: testbench model of a PE's data traffic on a PEMI client port.
//
// Issues random reads and byte-masked writes to 8-byte words in
// [BASE, BASE + 8*WORDS) while enable is high, keeps a shadow copy of that
// memory as the PE sees it, and checks that read data come back in request
// order with the shadow's value at the time the read was accepted.  After
// N_READS reads have returned it raises done and stops issuing.  With HOLD set
// it also refuses read data at random (a MARC cache port cannot be held off).
// The address range must belong to this client alone.
module pemi_client
  import phat_pkg::*;
#(
  parameter logic [63:0] BASE    = 64'h1_0000,
  parameter int          WORDS   = 256,
  parameter int          N_READS = 200,
  parameter int          RD_PCT  = 50,
  parameter int          WR_PCT  = 30,
  parameter bit          HOLD    = 0     // 1: randomly hold off read data (reorder buffer only)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output logic [ADDR_W-1:0] rd_req_addr,
  input  logic              rd_rsp_valid,
  output logic              rd_rsp_ready,
  input  logic [DATA_W-1:0] rd_rsp_data,
  output logic              wr_req_valid,
  input  logic              wr_req_ready,
  output logic [ADDR_W-1:0] wr_req_addr,
  output logic [DATA_W-1:0] wr_req_data,
  output logic [BE_W-1:0]   wr_req_be,
  output logic              done,
  output int                checks,
  output int                failures,
  output int                stall_cycles
);
  logic [63:0] shadow [logic [60:0]];
  logic [63:0] expq [$];
  int          reads_done;

  function automatic logic [63:0] sh(input logic [63:0] a);
    if (shadow.exists(a[63:3])) return shadow[a[63:3]];
    return tb_pkg::mem_init(a);
  endfunction

  function automatic logic [63:0] rnd_addr();
    return BASE + 64'($urandom_range(0, WORDS - 1)) * 8;
  endfunction

  assign done = (reads_done >= N_READS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_req_valid <= 0; rd_req_addr <= BASE; rd_rsp_ready <= 1;
      wr_req_valid <= 0; wr_req_addr <= BASE; wr_req_data <= 0; wr_req_be <= 0;
      checks <= 0; failures <= 0; reads_done <= 0; stall_cycles <= 0;
    end else begin
      if (rd_req_valid && !rd_req_ready) stall_cycles <= stall_cycles + 1;
      if (rd_req_valid && rd_req_ready) expq.push_back(sh(rd_req_addr));
      if (wr_req_valid && wr_req_ready) begin
        logic [63:0] w;
        w = sh(wr_req_addr);
        for (int b = 0; b < 8; b++) if (wr_req_be[b]) w[8*b +: 8] = wr_req_data[8*b +: 8];
        shadow[wr_req_addr[63:3]] = w;
      end
      if (rd_rsp_valid && rd_rsp_ready) begin
        checks     <= checks + 1;
        reads_done <= reads_done + 1;
        if (expq.size() == 0 || rd_rsp_data !== expq[0]) begin
          failures <= failures + 1;
          $display("%m: read data %h, expected %h", rd_rsp_data, expq.size() ? expq[0] : 64'h0);
        end
        if (expq.size()) void'(expq.pop_front());
      end
      // A PEMI accepts at most one of the two ports per cycle, so the shadow
      // is updated in the order the PEMI serves the requests.
      if (!rd_req_valid || rd_req_ready) begin
        rd_req_valid <= enable && !done && ($urandom_range(0, 99) < RD_PCT);
        rd_req_addr  <= rnd_addr();
      end
      if (!wr_req_valid || wr_req_ready) begin
        wr_req_valid <= enable && !done && ($urandom_range(0, 99) < WR_PCT);
        wr_req_addr  <= rnd_addr();
        wr_req_data  <= {$urandom, $urandom};
        wr_req_be    <= 8'($urandom);
      end
      rd_rsp_ready <= !HOLD || ($urandom_range(0, 9) < 8);
    end
  end
endmodule
