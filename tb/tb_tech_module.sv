// tb_tech_module: random memory requests through the Technology Module of
// node 3 of an 18-PE, 8-MCI array.  Checks each packet field against the
// layout (destination MCI by 8-byte interleaving, source node and tag in the
// ID, request VC, tail bit), the valid/ready pass-through, and the conversion
// of reply packets into tagged read replies (write packets give no reply).
module tb_tech_module;
  import phat_pkg::*;
  localparam int NODE = 3, NUM_PE = 18, NUM_MCI = 8, NUM_VC = 2;

  logic      mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t  mreq;
  mem_rsp_t  mrsp;
  logic      inj_valid, inj_ready, ej_valid, ej_ready;
  noc_flit_t inj_flit, ej_flit;

  tech_module #(.NODE(NODE), .NUM_PE(NUM_PE), .NUM_MCI(NUM_MCI), .NUM_VC(NUM_VC)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int seen [NUM_MCI];
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 500; i++) begin
      logic [63:0] a;
      a = {$urandom, $urandom};
      mreq.write = 1'($urandom);
      mreq.addr  = a;
      mreq.data  = {$urandom, $urandom};
      mreq.be    = 8'($urandom);
      mreq.tag   = 24'($urandom);
      mreq_valid = 1'($urandom);
      inj_ready  = 1'($urandom);
      #1;
      chk(inj_valid == mreq_valid && mreq_ready == inj_ready, "handshake");
      chk(inj_flit.dst == phat_pkg::mci_node(int'((a >> 3) % 64'(NUM_MCI)), NUM_PE, NUM_MCI), "destination");
      seen[(a >> 3) % 64'(NUM_MCI)]++;
      chk(inj_flit.id == {8'(NODE), mreq.tag}, "id");
      chk(inj_flit.addr == a && inj_flit.data == mreq.data && inj_flit.be == mreq.be &&
          inj_flit.write == mreq.write, "payload");
      chk(inj_flit.vc == 1'b0 && inj_flit.tail == 1'b1, "vc/tail");
      // Table I bit positions
      chk(inj_flit[31:0] == inj_flit.id && inj_flit[95:32] == mreq.data &&
          inj_flit[159:96] == a && inj_flit[167:160] == mreq.be &&
          inj_flit[168] == mreq.write && inj_flit[174:170] == inj_flit.dst, "bit layout");
      // reply direction
      ej_flit       = '0;
      ej_flit.write = 1'($urandom);
      ej_flit.id    = {$urandom};
      ej_flit.data  = {$urandom, $urandom};
      ej_valid      = 1'($urandom);
      #1;
      chk(ej_ready, "always takes replies");
      chk(mrsp_valid == (ej_valid && !ej_flit.write), "reply valid");
      chk(mrsp.tag == ej_flit.id[23:0] && mrsp.data == ej_flit.data, "reply fields");
    end
    for (int m = 0; m < NUM_MCI; m++) chk(seen[m] > 0, "every MCI addressed");
    // consecutive 8-byte blocks go to consecutive MCIs
    for (int i = 0; i < 16; i++) begin
      mreq.addr = 64'h1000 + 64'(i) * 8; #1;
      chk(inj_flit.dst == phat_pkg::mci_node((512 + i) % NUM_MCI, NUM_PE, NUM_MCI), "linear interleave");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
