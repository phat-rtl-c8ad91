// imem_loader: fills an r-VEX PE's instruction memory from shared memory.
//
// When the control processor starts a PE (start pulse with the program's
// byte address and its length in bundles), the loader holds the core in reset,
// reads the program through the PE's own MARC read port two 8-byte words per
// 128-bit bundle, writes each bundle into IMEM, and then releases the core
// (core_run high, done pulse).  Reads go through the cache like any other, so
// the MARC prefetch streams the program in.
//
// Interface: start/prog_addr/prog_len from the control side; busy and
// core_run status; rd_req_*/rd_rsp_* drive a MARC read port (the response is
// a one-cycle pulse); ld_* write IMEM.  One read is outstanding at a time.
// Word order is little-endian: the word at the lower address becomes bits
// 63:0 of the bundle.
//
// From the PHAT description: IMEM is initialised from shared memory through
// the PE's MARC instance when the PE starts, after which MARC serves data only.
// The start/length interface, word order and holding the core in reset are
// this design's choices.
module imem_loader
  import phat_pkg::*;
#(
  parameter int DEPTH = 1024,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] prog_addr,
  input  logic [AW:0]       prog_len,    // bundles, 1..DEPTH
  output logic              busy,
  output logic              done,
  output logic              core_run,
  // MARC read port
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output logic [ADDR_W-1:0] rd_req_addr,
  input  logic              rd_rsp_valid,
  input  logic [DATA_W-1:0] rd_rsp_data,
  // IMEM write port
  output logic              ld_we,
  output logic [AW-1:0]     ld_addr,
  output logic [127:0]      ld_data
);
  typedef enum logic [1:0] {L_IDLE, L_REQ, L_WAIT} lstate_e;
  lstate_e state;

  logic [ADDR_W-1:0] addr;
  logic [AW:0]       bundle, len;
  logic              half;          // 0: low word, 1: high word
  logic [DATA_W-1:0] low_word;

  assign busy         = (state != L_IDLE);
  assign rd_req_valid = (state == L_REQ);
  assign rd_req_addr  = addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= L_IDLE;
      addr     <= '0;
      bundle   <= '0;
      len      <= '0;
      half     <= 1'b0;
      low_word <= '0;
      done     <= 1'b0;
      core_run <= 1'b0;
      ld_we    <= 1'b0;
      ld_addr  <= '0;
      ld_data  <= '0;
    end else begin
      done  <= 1'b0;
      ld_we <= 1'b0;
      unique case (state)
        L_IDLE: begin
          if (start) begin
            core_run <= 1'b0;
            addr     <= {prog_addr[ADDR_W-1:3], 3'b000};
            len      <= prog_len;
            bundle   <= '0;
            half     <= 1'b0;
            state    <= (prog_len == '0) ? L_IDLE : L_REQ;
            if (prog_len == '0) begin
              done     <= 1'b1;
              core_run <= 1'b1;
            end
          end
        end
        L_REQ: if (rd_req_ready) state <= L_WAIT;
        L_WAIT: begin
          if (rd_rsp_valid) begin
            addr <= addr + ADDR_W'(8);
            half <= ~half;
            if (!half) begin
              low_word <= rd_rsp_data;
              state    <= L_REQ;
            end else begin
              ld_we   <= 1'b1;
              ld_addr <= bundle[AW-1:0];
              ld_data <= {rd_rsp_data, low_word};
              bundle  <= bundle + 1'b1;
              if (bundle + 1'b1 == len) begin
                state    <= L_IDLE;
                done     <= 1'b1;
                core_run <= 1'b1;
              end else begin
                state <= L_REQ;
              end
            end
          end
        end
        default: state <= L_IDLE;
      endcase
    end
  end
endmodule
