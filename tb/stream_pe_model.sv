// stream_pe_model: behavioural model of a streaming PE such as a pipelined
// FFT core (not synthesizable; testbench only).  The transform itself is not
// modelled: each input word is replaced by a fixed function of itself
// (halves swapped, XOR with a constant) and written out in order.
//
// On start it streams n_words 8-byte words from in_base (one read request per
// cycle when accepted), consumes read data one word per cycle, writes the
// results to out_base, and raises stream_done when the last write is
// accepted.  It then reads the output region back and counts words that
// differ from the expected result (errors); done goes high at the end.
module stream_pe_model
  import phat_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [63:0]       in_base,
  input  logic [63:0]       out_base,
  input  int                n_words,
  output logic              stream_done,
  output logic              done,
  output int                errors,
  output int                verified,
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
  output logic [BE_W-1:0]   wr_req_be
);
  function automatic logic [63:0] xform(input logic [63:0] w);
    return {w[31:0], w[63:32]} ^ 64'h0F0F_1234_F0F0_8765;
  endfunction

  typedef enum logic [1:0] {IDLE, STREAM, CHECK, FIN} st_e;
  st_e st;
  int ri, rr, wi, ci;
  logic [63:0] q [$];

  assign rd_rsp_ready = 1'b1;
  assign wr_req_be    = '1;
  assign stream_done  = (st == CHECK) || (st == FIN);
  assign done         = (st == FIN);

  always_comb begin
    rd_req_valid = 1'b0;
    rd_req_addr  = '0;
    if (st == STREAM && ri < n_words) begin
      rd_req_valid = 1'b1;
      rd_req_addr  = in_base + 64'(ri) * 8;
    end else if (st == CHECK && ri < n_words) begin
      rd_req_valid = 1'b1;
      rd_req_addr  = out_base + 64'(ri) * 8;
    end
    wr_req_valid = (st == STREAM) && (q.size() != 0);
    wr_req_addr  = out_base + 64'(wi) * 8;
    wr_req_data  = (q.size() != 0) ? q[0] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; ri <= 0; rr <= 0; wi <= 0; ci <= 0; errors <= 0; verified <= 0;
    end else begin
      unique case (st)
        IDLE: if (start) begin st <= STREAM; ri <= 0; rr <= 0; wi <= 0; errors <= 0; verified <= 0; end
        STREAM: begin
          if (rd_req_valid && rd_req_ready) ri <= ri + 1;
          if (rd_rsp_valid) begin q.push_back(xform(rd_rsp_data)); rr <= rr + 1; end
          if (wr_req_valid && wr_req_ready) begin
            void'(q.pop_front());
            wi <= wi + 1;
            if (wi + 1 == n_words) begin st <= CHECK; ri <= 0; ci <= 0; end
          end
        end
        CHECK: begin
          if (rd_req_valid && rd_req_ready) ri <= ri + 1;
          if (rd_rsp_valid) begin
            verified <= verified + 1;
            if (rd_rsp_data !== xform(tb_pkg::mem_init(in_base + 64'(ci) * 8))) errors <= errors + 1;
            ci <= ci + 1;
            if (ci + 1 == n_words) st <= FIN;
          end
        end
        FIN: if (start) begin st <= STREAM; ri <= 0; rr <= 0; wi <= 0; errors <= 0; verified <= 0; end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
