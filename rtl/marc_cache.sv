// marc_cache: the caching mid-end of a MARC II instance in a PE-local memory
// interface, in the configuration PHAT uses for its experiments: one read and
// one write port (R1W1), direct mapped, write-back, 8-byte lines, 1024 lines,
// prefetch length 32 lines, with replies accepted in any order.
//
// How it works.  A request that hits is served in one cycle: a write merges its
// byte enables into the line and marks it dirty, a read returns the line one
// cycle later on rd_rsp_*.  A miss starts a burst over PREFETCH consecutive
// lines beginning at the missing one.  For each line of the burst that is not
// already cached, a dirty victim is first written back, then a read is issued
// whose tag is the line's position in the burst.  Because the off-chip memory
// answers out of order, each reply is placed by its tag; the burst ends when
// all of its replies are in, after which the stalled request is retried and
// hits.  A client is stalled (ready low) for the whole burst.
//
// Interface: rd_req_* and wr_req_* are valid/ready; when both are valid in
// the same cycle the write is served first.  rd_rsp_valid is a one-cycle pulse
// that the client must take.  mreq_* is the valid/ready request to the
// Technology Module; writes are posted; mrsp_* read replies are always taken.
// stat_* are one-cycle event pulses (hit, miss, victim write-back, prefetch
// read) for performance counting.
//
// From the PHAT description: port count, mapping, write policy, line width,
// line count, prefetch length and out-of-order acceptance.  The burst starting
// at the missing line, waiting for the whole burst, write priority and
// write-allocate on a write miss are this design's choices.
module marc_cache
  import phat_pkg::*;
#(
  parameter int LINES    = 1024,
  parameter int PREFETCH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // read port
  input  logic              rd_req_valid,
  output logic              rd_req_ready,
  input  logic [ADDR_W-1:0] rd_req_addr,
  output logic              rd_rsp_valid,
  output logic [DATA_W-1:0] rd_rsp_data,
  // write port
  input  logic              wr_req_valid,
  output logic              wr_req_ready,
  input  logic [ADDR_W-1:0] wr_req_addr,
  input  logic [DATA_W-1:0] wr_req_data,
  input  logic [BE_W-1:0]   wr_req_be,
  // memory side
  output logic              mreq_valid,
  input  logic              mreq_ready,
  output mem_req_t          mreq,
  input  logic              mrsp_valid,
  input  mem_rsp_t          mrsp,
  // event pulses
  output logic              stat_hit,
  output logic              stat_miss,
  output logic              stat_wb,
  output logic              stat_prefetch
);
  localparam int IW  = $clog2(LINES);
  localparam int LAW = ADDR_W - 3;          // line address width
  localparam int TGW = LAW - IW;            // tag width
  localparam int KW  = $clog2(PREFETCH) + 1;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;
  state_e state;

  logic [DATA_W-1:0] data_arr [LINES];
  logic [TGW-1:0]    tag_arr  [LINES];
  logic [LINES-1:0]  valid_q, dirty_q;
  logic [PREFETCH-1:0] pending;
  logic [LAW-1:0]    base_line;
  logic [KW-1:0]     k;
  logic              wb_sent;

  // ---- lookup for the request at the head of the idle state ----
  logic              use_wr;
  logic [ADDR_W-1:0] req_addr;
  logic [IW-1:0]     req_idx;
  logic [TGW-1:0]    req_tag;
  logic              req_hit;

  assign use_wr   = wr_req_valid;
  assign req_addr = use_wr ? wr_req_addr : rd_req_addr;
  assign req_idx  = req_addr[3 +: IW];
  assign req_tag  = req_addr[ADDR_W-1 -: TGW];
  assign req_hit  = valid_q[req_idx] && (tag_arr[req_idx] == req_tag);

  // ---- burst line under consideration ----
  logic [LAW-1:0] cur_line;
  logic [IW-1:0]  cur_idx;
  logic [TGW-1:0] cur_tag;
  logic           cur_present, cur_dirty_victim;

  assign cur_line         = base_line + LAW'(k);
  assign cur_idx          = cur_line[IW-1:0];
  assign cur_tag          = cur_line[LAW-1 -: TGW];
  assign cur_present      = valid_q[cur_idx] && (tag_arr[cur_idx] == cur_tag);
  assign cur_dirty_victim = valid_q[cur_idx] && dirty_q[cur_idx] && !wb_sent;

  // ---- fill from an out-of-order reply ----
  logic [LAW-1:0] fill_line;
  logic [IW-1:0]  fill_idx;
  assign fill_line = base_line + LAW'(mrsp.tag[KW-2:0]);
  assign fill_idx  = fill_line[IW-1:0];

  logic idle_req;
  assign idle_req = (state == S_IDLE) && (rd_req_valid || wr_req_valid);

  assign wr_req_ready = idle_req && use_wr && req_hit;
  assign rd_req_ready = idle_req && !use_wr && req_hit;

  always_comb begin
    mreq       = '0;
    mreq_valid = 1'b0;
    if (state == S_ISSUE && k < KW'(PREFETCH) && !cur_present) begin
      mreq_valid = 1'b1;
      if (cur_dirty_victim) begin
        mreq.write = 1'b1;
        mreq.addr  = {tag_arr[cur_idx], cur_idx, 3'b000};
        mreq.data  = data_arr[cur_idx];
        mreq.be    = '1;
      end else begin
        mreq.write = 1'b0;
        mreq.addr  = {cur_line, 3'b000};
        mreq.be    = '1;
        mreq.tag   = TAG_W'(k);
      end
    end
  end

  logic [DATA_W-1:0] merged;
  always_comb begin
    merged = data_arr[req_idx];
    for (int b = 0; b < BE_W; b++)
      if (wr_req_be[b]) merged[8*b +: 8] = wr_req_data[8*b +: 8];
  end

  assign stat_hit      = rd_req_ready | wr_req_ready;
  assign stat_miss     = idle_req && !req_hit;
  assign stat_wb       = mreq_valid && mreq_ready && mreq.write;
  assign stat_prefetch = mreq_valid && mreq_ready && !mreq.write && (k != '0);

  // ---- arrays ----
  always_ff @(posedge clk) begin
    if (wr_req_ready) data_arr[req_idx] <= merged;
    else if (mrsp_valid) data_arr[fill_idx] <= mrsp.data;
    if (state == S_ISSUE && mreq_valid && mreq_ready && !mreq.write)
      tag_arr[cur_idx] <= cur_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      valid_q      <= '0;
      dirty_q      <= '0;
      pending      <= '0;
      base_line    <= '0;
      k            <= '0;
      wb_sent      <= 1'b0;
      rd_rsp_valid <= 1'b0;
      rd_rsp_data  <= '0;
    end else begin
      rd_rsp_valid <= rd_req_ready;
      if (rd_req_ready) rd_rsp_data <= data_arr[req_idx];
      if (wr_req_ready) dirty_q[req_idx] <= 1'b1;

      if (mrsp_valid) begin
        valid_q[fill_idx]         <= 1'b1;
        dirty_q[fill_idx]         <= 1'b0;
        pending[mrsp.tag[KW-2:0]] <= 1'b0;
      end

      unique case (state)
        S_IDLE: begin
          if (idle_req && !req_hit) begin
            state     <= S_ISSUE;
            base_line <= req_addr[ADDR_W-1:3];
            k         <= '0;
            wb_sent   <= 1'b0;
          end
        end
        S_ISSUE: begin
          if (k == KW'(PREFETCH)) begin
            state <= S_WAIT;
          end else if (cur_present) begin
            k <= k + 1'b1;
          end else if (mreq_ready) begin
            if (cur_dirty_victim) begin
              wb_sent          <= 1'b1;
              dirty_q[cur_idx] <= 1'b0;
            end else begin
              valid_q[cur_idx]        <= 1'b0;
              pending[k[KW-2:0]]      <= 1'b1;
              k                       <= k + 1'b1;
              wb_sent                 <= 1'b0;
            end
          end
        end
        S_WAIT: begin
          if (pending == '0) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_fill_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mrsp_valid |-> pending[mrsp.tag[KW-2:0]]);
  a_no_client_in_burst: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_IDLE) |-> !(rd_req_ready || wr_req_ready));

endmodule
