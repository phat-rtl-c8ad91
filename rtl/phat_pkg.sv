// phat_pkg: types and constants shared by the PHAT processing-element array.
//
// The NoC flit follows the packet layout of the PHAT packet table bit for bit:
// a 32-bit reorder/source ID in bits 31:0, 64-bit data, 64-bit address, 8-bit
// byte enable, a read/write bit, the virtual channel, a 5-bit destination node
// and a tail bit.  The valid bit (bit 176 of the table) travels as a separate
// handshake signal.  With VC_W = 1 (two virtual channels) the flit is 176 bits.
//
// Design choices of this implementation (not fixed by the PHAT description):
//  * The 32-bit ID carries the requesting node in bits 31:24 and the client's
//    reorder tag in bits 23:0, so a memory endpoint can address its reply.
//  * Node numbering: the memory controller interfaces (MCIs) are spread
//    evenly around the ring (mci_node), the PE slots take the other nodes in
//    order (pe_node).
//  * Requests travel on the lower half of the virtual channels and replies on
//    the upper half, so replies can never be blocked behind requests.
//  * Linear interleaving: successive 8-byte blocks go to successive MCIs.
package phat_pkg;

  parameter int VC_W        = 1;   // virtual-channel field width ("at least 1b")
  parameter int NOC_DST_W   = 5;   // destination node field width
  parameter int ADDR_W      = 64;  // address field of the packet
  parameter int DATA_W      = 64;  // one 8-byte memory word
  parameter int BE_W        = DATA_W / 8;
  parameter int ID_W        = 32;
  parameter int TAG_W       = 24;  // client tag part of the ID
  parameter int SRC_W       = ID_W - TAG_W;

  // NoC packet without its valid bit; the first member is the most significant.
  typedef struct packed {
    logic                 tail;   // 175 (unused, single-flit packets)
    logic [NOC_DST_W-1:0] dst;    // 174:170
    logic [VC_W-1:0]      vc;     // 169
    logic                 write;  // 168: 1 = write, 0 = read / read reply
    logic [BE_W-1:0]      be;     // 167:160
    logic [ADDR_W-1:0]    addr;   // 159:96
    logic [DATA_W-1:0]    data;   // 95:32
    logic [ID_W-1:0]      id;     // 31:0
  } noc_flit_t;

  // Generic memory request as issued by MARC or the reorder buffer.
  typedef struct packed {
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [BE_W-1:0]   be;
    logic [TAG_W-1:0]  tag;
  } mem_req_t;

  // Read reply to MARC or the reorder buffer (writes are posted, no reply).
  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [DATA_W-1:0] data;
  } mem_rsp_t;

  // Request and reply at a memory controller interface.
  typedef struct packed {
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [BE_W-1:0]   be;
    logic [ID_W-1:0]   id;
  } mc_req_t;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] data;
  } mc_rsp_t;

  // Kinds of PE-local memory interface (PEMI) a slot can carry.
  typedef enum logic [1:0] {
    PEMI_RVEX   = 2'd0,  // MARC II cache plus local instruction memory
    PEMI_ACCEL  = 2'd1,  // MARC II cache only (compiled or wrapped accelerator)
    PEMI_STREAM = 2'd2   // reorder buffer only (streaming IP block)
  } pemi_kind_e;

  // MCI that serves an address under linear 8-byte interleaving.
  function automatic int unsigned mci_of_addr(input logic [ADDR_W-1:0] a,
                                              input int unsigned num_mci);
    return int'(a[ADDR_W-1:3] % (ADDR_W-3)'(num_mci));
  endfunction

  // Ring placement (own choice): the MCIs are spread evenly around the ring,
  // MCI m sits at node floor(m * N / num_mci), and the PE slots fill the other
  // nodes in order.  With 18 PEs and 8 MCIs the MCIs are at nodes
  // 0, 3, 6, 9, 13, 16, 19 and 22, so no single ring link carries all traffic.
  function automatic logic [NOC_DST_W-1:0] mci_node(input int unsigned m,
                                                    input int unsigned num_pe,
                                                    input int unsigned num_mci);
    return NOC_DST_W'((m * (num_pe + num_mci)) / num_mci);
  endfunction

  // NoC node of PE slot p: the p-th node that does not hold an MCI.
  function automatic logic [NOC_DST_W-1:0] pe_node(input int unsigned p,
                                                   input int unsigned num_pe,
                                                   input int unsigned num_mci);
    int unsigned seen, res;
    bit taken;
    seen = 0; res = 0;
    for (int unsigned n = 0; n < num_pe + num_mci; n++) begin
      taken = 0;
      for (int unsigned m = 0; m < num_mci; m++)
        if (int'(mci_node(m, num_pe, num_mci)) == n) taken = 1;
      if (!taken) begin
        if (seen == p) res = n;
        seen++;
      end
    end
    return NOC_DST_W'(res);
  endfunction

endpackage
