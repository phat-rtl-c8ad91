// noc_router: one node of the double-ring network-on-chip that links the PE
// slots and the memory controller interfaces.
//
// Two unidirectional rings run in opposite directions (CW: node i to i+1,
// CCW: node i to i-1).  A packet is injected on the ring that reaches its
// destination in fewer hops and stays on that ring until it is ejected.  Every
// ring input has one FIFO per virtual channel; a physical link carries one
// flit per cycle, the VCs sharing it round-robin.  The FIFOs are DEPTH = 4
// flits deep: with only two, the bubble rule below lets a node inject at
// most every other cycle.
//
// Flow control is by buffer state, not by a ready wire: a router sends on a
// link only when the downstream FIFO of that VC has room, which the downstream
// router reports as free1 (at least one slot) and free2 (at least two slots),
// both taken from registers.  Packets already on the ring need free1; a newly
// injected packet needs free2 ("bubble" rule), so a ring can never fill up
// completely and cannot deadlock.  Ring traffic has priority over injection.
// Per cycle the router ejects at most one flit (round-robin over its FIFOs).
//
// Interface: cw_in/ccw_in links from the neighbours (valid + flit) with their
// free1/free2 outputs; cw_out/ccw_out links to the neighbours with their
// free1/free2 inputs; inj_* (valid/ready) and ej_* (valid/ready) to the local
// endpoint.  Latency: one cycle per hop (the FIFO register), plus one to eject.
//
// From the PHAT description: double-ring topology, virtual channels, the
// packet format and 5-bit destination.  PHAT uses routers generated by the
// CONNECT NoC generator, whose internals are not given; this router's
// buffering, routing and arbitration are this design's own.
module noc_router
  import phat_pkg::*;
#(
  parameter int N      = 26,
  parameter int NODE   = 0,
  parameter int NUM_VC = 2,
  parameter int DEPTH  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // incoming ring links: index 0 = CW ring, 1 = CCW ring
  input  logic [1:0]        in_valid,
  input  noc_flit_t         in_flit  [2],
  output logic [NUM_VC-1:0] in_free1 [2],
  output logic [NUM_VC-1:0] in_free2 [2],
  // outgoing ring links
  output logic [1:0]        out_valid,
  output noc_flit_t         out_flit  [2],
  input  logic [NUM_VC-1:0] out_free1 [2],
  input  logic [NUM_VC-1:0] out_free2 [2],
  // local endpoint
  input  logic              inj_valid,
  output logic              inj_ready,
  input  noc_flit_t         inj_flit,
  output logic              ej_valid,
  input  logic              ej_ready,
  output noc_flit_t         ej_flit
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int NQ = 2 * NUM_VC;               // queue q = dir*NUM_VC + vc
  localparam int QW = (NQ > 1) ? $clog2(NQ) : 1;
  localparam int VW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  noc_flit_t     mem   [NQ][DEPTH];
  logic [PW-1:0] rd_ptr[NQ], wr_ptr[NQ];
  logic [PW:0]   count [NQ];

  logic [NQ-1:0] hv, for_me;
  noc_flit_t     head [NQ];
  logic [NQ-1:0] pop;
  logic [NQ-1:0] push;

  always_comb begin
    for (int q = 0; q < NQ; q++) begin
      head[q]   = mem[q][rd_ptr[q]];
      hv[q]     = (count[q] != '0);
      for_me[q] = hv[q] && (int'(head[q].dst) == NODE);
    end
  end

  // Room reported upstream.
  always_comb begin
    for (int d = 0; d < 2; d++)
      for (int v = 0; v < NUM_VC; v++) begin
        in_free1[d][v] = (count[d*NUM_VC+v] <= (PW+1)'(DEPTH-1));
        in_free2[d][v] = (count[d*NUM_VC+v] <= (PW+1)'(DEPTH-2));
      end
  end

  // Injection direction: the shorter way round, CW on a tie.
  int unsigned hops_cw;
  logic        inj_dir;      // 0 = CW, 1 = CCW
  always_comb begin
    hops_cw = (int'(inj_flit.dst) - NODE + N) % N;
    inj_dir = (hops_cw > N / 2);
  end

  // ---- round-robin pointers ----
  logic [QW-1:0] ej_rr;
  logic [VW-1:0] out_rr [2];

  // ---- ejection ----
  logic [QW-1:0] ej_sel;
  always_comb begin
    ej_valid = 1'b0;
    ej_sel   = '0;
    for (int i = 0; i < NQ; i++) begin
      if (!ej_valid && for_me[(int'(ej_rr) + i) % NQ]) begin
        ej_valid = 1'b1;
        ej_sel   = QW'((int'(ej_rr) + i) % NQ);
      end
    end
    ej_flit = head[ej_sel];
  end

  // ---- ring outputs: transit first, then injection ----
  logic [1:0]    tr_valid;
  logic [VW-1:0] tr_vc [2];
  always_comb begin
    inj_ready = 1'b0;
    for (int d = 0; d < 2; d++) begin
      tr_valid[d] = 1'b0;
      tr_vc[d]    = '0;
      for (int i = 0; i < NUM_VC; i++) begin
        if (!tr_valid[d] && hv[d*NUM_VC + (int'(out_rr[d]) + i) % NUM_VC] &&
            !for_me[d*NUM_VC + (int'(out_rr[d]) + i) % NUM_VC] &&
            out_free1[d][(int'(out_rr[d]) + i) % NUM_VC]) begin
          tr_valid[d] = 1'b1;
          tr_vc[d]    = VW'((int'(out_rr[d]) + i) % NUM_VC);
        end
      end
      out_valid[d] = tr_valid[d];
      out_flit[d]  = head[d*NUM_VC + int'(tr_vc[d])];
      if (!tr_valid[d] && inj_valid && (int'(inj_dir) == d) &&
          out_free2[d][int'(inj_flit.vc) % NUM_VC]) begin
        out_valid[d] = 1'b1;
        out_flit[d]  = inj_flit;
        inj_ready    = 1'b1;
      end
    end
  end

  always_comb begin
    pop  = '0;
    push = '0;
    if (ej_valid && ej_ready) pop[ej_sel] = 1'b1;
    for (int d = 0; d < 2; d++) begin
      if (tr_valid[d]) pop[d*NUM_VC + int'(tr_vc[d])] = 1'b1;
      if (in_valid[d]) push[d*NUM_VC + int'(in_flit[d].vc) % NUM_VC] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int d = 0; d < 2; d++)
      if (in_valid[d])
        mem[d*NUM_VC + int'(in_flit[d].vc) % NUM_VC][wr_ptr[d*NUM_VC + int'(in_flit[d].vc) % NUM_VC]] <= in_flit[d];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NQ; q++) begin
        rd_ptr[q] <= '0;
        wr_ptr[q] <= '0;
        count[q]  <= '0;
      end
      ej_rr     <= '0;
      out_rr[0] <= '0;
      out_rr[1] <= '0;
    end else begin
      for (int q = 0; q < NQ; q++) begin
        if (push[q]) wr_ptr[q] <= (wr_ptr[q] == PW'(DEPTH-1)) ? '0 : wr_ptr[q] + 1'b1;
        if (pop[q])  rd_ptr[q] <= (rd_ptr[q] == PW'(DEPTH-1)) ? '0 : rd_ptr[q] + 1'b1;
        count[q] <= count[q] + (PW+1)'(push[q]) - (PW+1)'(pop[q]);
      end
      if (ej_valid && ej_ready) ej_rr <= QW'((int'(ej_sel) + 1) % NQ);
      for (int d = 0; d < 2; d++)
        if (tr_valid[d]) out_rr[d] <= VW'((int'(tr_vc[d]) + 1) % NUM_VC);
    end
  end

  // Flow-control rules: never overfill a FIFO, never inject to oneself.
  for (genvar q = 0; q < NQ; q++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(push[q] && !pop[q] && count[q] == (PW+1)'(DEPTH)));
  end
  a_no_self_injection: assert property (@(posedge clk) disable iff (!rst_n)
    inj_valid |-> int'(inj_flit.dst) != NODE);

endmodule
