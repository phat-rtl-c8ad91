// imem: local instruction memory of an r-VEX processing element.
//
// The fetch stage of the r-VEX core reads one 128-bit instruction bundle per
// cycle (four 32-bit syllables for a 4-issue core) straight from this on-chip
// memory instead of going through the shared memory system; that leaves the
// PE's MARC cache to data accesses alone.  The memory is filled once, at PE
// start, through the write port by imem_loader.
//
// Interface: fetch_en/fetch_addr in, fetch_data out one cycle later (block-RAM
// timing: fetch_data is registered).  ld_we/ld_addr/ld_data write one bundle.
// From the PHAT description: 1024 bundles of 128 bits, single-cycle fetch,
// initialised from shared memory.  The synchronous read is this design's
// choice, matching an FPGA block RAM.
module imem #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 128,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             fetch_en,
  input  logic [AW-1:0]    fetch_addr,
  output logic [WIDTH-1:0] fetch_data,
  input  logic             ld_we,
  input  logic [AW-1:0]    ld_addr,
  input  logic [WIDTH-1:0] ld_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
    if (fetch_en) fetch_data <= mem[fetch_addr];
  end
endmodule
