// noc_double_ring: the on-chip network of one PHAT FPGA, a double ring of N
// noc_router nodes.
//
// Router i sends clockwise to router i+1 and counter-clockwise to router i-1
// (indices modulo N); each link carries one single-flit packet per cycle and
// the per-VC room signals of the receiving router back to the sender.  Every
// node has a local injection and ejection port in valid/ready form.  With
// the default of 26 nodes the ring connects 18 PE slots and 8 memory
// controller interfaces; a packet needs at most N/2 hops.  Which endpoint
// sits at which node is decided by the top level.
//
// From the PHAT description: the double-ring topology, 26 endpoints in the
// largest configuration and two virtual channels by default.  The router
// internals are this design's (see noc_router).
module noc_double_ring
  import phat_pkg::*;
#(
  parameter int N      = 26,
  parameter int NUM_VC = 2,
  parameter int DEPTH  = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      inj_valid [N],
  output logic      inj_ready [N],
  input  noc_flit_t inj_flit  [N],
  output logic      ej_valid  [N],
  input  logic      ej_ready  [N],
  output noc_flit_t ej_flit   [N]
);
  logic [1:0]        o_valid [N];
  noc_flit_t         o_flit  [N][2];
  logic [NUM_VC-1:0] i_free1 [N][2];
  logic [NUM_VC-1:0] i_free2 [N][2];

  for (genvar i = 0; i < N; i++) begin : g_node
    localparam int PREV = (i + N - 1) % N;
    localparam int NEXT = (i + 1) % N;

    logic [1:0]        in_valid;
    noc_flit_t         in_flit   [2];
    logic [NUM_VC-1:0] out_free1 [2];
    logic [NUM_VC-1:0] out_free2 [2];

    assign in_valid[0]  = o_valid[PREV][0];   // clockwise from the previous node
    assign in_flit[0]   = o_flit[PREV][0];
    assign in_valid[1]  = o_valid[NEXT][1];   // counter-clockwise from the next node
    assign in_flit[1]   = o_flit[NEXT][1];
    assign out_free1[0] = i_free1[NEXT][0];
    assign out_free2[0] = i_free2[NEXT][0];
    assign out_free1[1] = i_free1[PREV][1];
    assign out_free2[1] = i_free2[PREV][1];

    noc_router #(.N(N), .NODE(i), .NUM_VC(NUM_VC), .DEPTH(DEPTH)) u_router (
      .clk, .rst_n,
      .in_valid (in_valid),  .in_flit (in_flit),
      .in_free1 (i_free1[i]), .in_free2 (i_free2[i]),
      .out_valid(o_valid[i]), .out_flit(o_flit[i]),
      .out_free1(out_free1), .out_free2(out_free2),
      .inj_valid(inj_valid[i]), .inj_ready(inj_ready[i]), .inj_flit(inj_flit[i]),
      .ej_valid (ej_valid[i]),  .ej_ready (ej_ready[i]),  .ej_flit (ej_flit[i])
    );
  end
endmodule
