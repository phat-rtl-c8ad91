// tb_imem_loader: starts a program load of LEN bundles from a byte address and
// serves the loader's read requests like a cache read port (random wait before
// accepting, one-cycle response pulse, data = tb_pkg::mem_init(address)).
// Checks every IMEM write (address, 128-bit bundle with the lower word in bits
// 63:0), the number of reads (two per bundle), that the core is held until
// the load ends and released with the done pulse, and a second load.
module tb_imem_loader;
  import phat_pkg::*;
  localparam int DEPTH = 1024, AW = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start, busy, done, core_run;
  logic [ADDR_W-1:0] prog_addr;
  logic [AW:0]       prog_len;
  logic              rd_req_valid, rd_req_ready, rd_rsp_valid;
  logic [ADDR_W-1:0] rd_req_addr;
  logic [DATA_W-1:0] rd_rsp_data;
  logic              ld_we;
  logic [AW-1:0]     ld_addr;
  logic [127:0]      ld_data;

  imem_loader dut (.*);

  int checks = 0, failures = 0;
  int n_reads = 0, n_writes = 0, n_done = 0;
  logic [ADDR_W-1:0] base;

  // read-port model
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_rsp_valid <= 0; rd_rsp_data <= 0; rd_req_ready <= 0;
    end else begin
      rd_req_ready <= ($urandom_range(0, 3) == 0);
      rd_rsp_valid <= rd_req_valid && rd_req_ready;
      if (rd_req_valid && rd_req_ready) begin
        rd_rsp_data <= tb_pkg::mem_init(rd_req_addr);
        n_reads++;
      end
      if (ld_we) begin
        logic [63:0] a;
        a = base + 64'(ld_addr) * 16;
        checks++;
        if (ld_addr != AW'(n_writes) ||
            ld_data !== {tb_pkg::mem_init(a + 8), tb_pkg::mem_init(a)}) begin
          failures++;
          $display("bad IMEM write %0d: addr %0d data %h", n_writes, ld_addr, ld_data);
        end
        n_writes++;
      end
      if (done) n_done++;
      if (busy && core_run) begin checks++; failures++; $display("core released during load"); end
    end
  end

  task automatic load(input logic [ADDR_W-1:0] a, input int len);
    n_reads = 0; n_writes = 0; n_done = 0; base = a;
    @(negedge clk); start = 1; prog_addr = a; prog_len = (AW+1)'(len);
    @(negedge clk); start = 0;
    checks++; if (!busy || core_run) begin failures++; $display("not busy after start"); end
    wait (done); @(posedge clk); #1;
    checks++; if (n_writes != len) begin failures++; $display("writes %0d != %0d", n_writes, len); end
    checks++; if (n_reads != 2 * len) begin failures++; $display("reads %0d", n_reads); end
    checks++; if (!core_run || busy || n_done != 1) begin failures++; $display("core not released"); end
  endtask

  initial begin
    start = 0; prog_addr = 0; prog_len = 0; base = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++; if (core_run) begin failures++; $display("core runs before any load"); end
    load(64'h0000_1234_5600, 37);
    load(64'h0000_0000_8000, 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
