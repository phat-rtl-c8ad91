// mc_model: behavioural model of one memory controller of the off-chip memory
// system (not synthesizable; testbench only).
//
// Writes are applied in the cycle they are accepted.  A read captures its data
// when accepted and is answered after a random latency of LAT_MIN..LAT_MAX
// cycles; up to SLOTS reads are outstanding and the ones that are due leave in
// a random order, so replies come back out of order as from the real memory
// system.  With probability STALL_PCT % the model refuses a request for a cycle.
// Memory that was never written reads as tb_pkg::mem_init(address).
// stat_ooo counts replies that overtook an older outstanding read.
module mc_model
  import phat_pkg::*;
#(
  parameter int SLOTS     = 8,
  parameter int LAT_MIN   = 4,
  parameter int LAT_MAX   = 30,
  parameter int STALL_PCT = 10
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid,
  output logic    req_ready,
  input  mc_req_t req,
  output logic    rsp_valid,
  input  logic    rsp_ready,
  output mc_rsp_t rsp
);
  logic [63:0] mem [logic [60:0]];

  logic          busy   [SLOTS];
  int            due    [SLOTS];
  longint        age    [SLOTS];
  mc_rsp_t       data   [SLOTS];
  longint        seq;
  int            pick;
  logic          stall;
  int            stat_ooo = 0;
  int            stat_stall = 0;

  function automatic logic [63:0] rd(input logic [63:0] a);
    if (mem.exists(a[63:3])) return mem[a[63:3]];
    return tb_pkg::mem_init(a);
  endfunction

  always_comb begin
    int free_slots;
    free_slots = 0;
    for (int s = 0; s < SLOTS; s++) if (!busy[s]) free_slots++;
    req_ready = !stall && (free_slots > 0);
  end

  // choose a reply among the due slots, starting from a random slot
  always_comb begin
    int start;
    pick  = -1;
    start = int'(seq % SLOTS);
    for (int i = 0; i < SLOTS; i++) begin
      int s;
      s = (start + i) % SLOTS;
      if (pick < 0 && busy[s] && due[s] <= 0) pick = s;
    end
    rsp_valid = (pick >= 0);
    rsp       = (pick >= 0) ? data[pick] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) begin busy[s] <= 1'b0; due[s] <= 0; age[s] <= 0; end
      seq   <= 0;
      stall <= 1'b0;
    end else begin
      seq   <= seq + 1 + longint'($urandom_range(0, 3));
      stall <= ($urandom_range(0, 99) < STALL_PCT);
      if (stall && req_valid) stat_stall <= stat_stall + 1;
      for (int s = 0; s < SLOTS; s++) if (busy[s] && due[s] > 0) due[s] <= due[s] - 1;
      if (rsp_valid && rsp_ready) begin
        for (int s = 0; s < SLOTS; s++)
          if (busy[s] && s != pick && age[s] < age[pick]) begin
            stat_ooo <= stat_ooo + 1;
            break;
          end
        busy[pick] <= 1'b0;
      end
      if (req_valid && req_ready) begin
        if (req.write) begin
          logic [63:0] w;
          w = rd(req.addr);
          for (int b = 0; b < 8; b++) if (req.be[b]) w[8*b +: 8] = req.data[8*b +: 8];
          mem[req.addr[63:3]] = w;
        end else begin
          int f;
          f = -1;
          for (int s = 0; s < SLOTS; s++) if (f < 0 && !busy[s] && !(rsp_valid && rsp_ready && s == pick)) f = s;
          if (f < 0) for (int s = 0; s < SLOTS; s++) if (f < 0 && !busy[s]) f = s;
          busy[f]      <= 1'b1;
          due[f]       <= $urandom_range(LAT_MIN, LAT_MAX);
          age[f]       <= seq;
          data[f].id   <= req.id;
          data[f].data <= rd(req.addr);
        end
      end
    end
  end
endmodule
