// tb_noc_router: one router (node 2 of an 8-node double ring, 2 VCs) with
// randomised neighbours.  The testbench sends flits on both ring inputs only
// when the router reports room, injects local flits to random destinations,
// and grants random room on the outputs.  Every flit must leave exactly once
// on the right port: ejected if addressed to node 2, otherwise onward on its
// own ring, and an injected flit on the ring with fewer hops.  Flow-control
// rules are checked on every cycle: ring flits need one free slot downstream,
// injected flits two (bubble rule).  Blocked injections, ejection back-pressure
// and both ring directions must all occur.
module tb_noc_router;
  import phat_pkg::*;
  localparam int N = 8, NODE = 2, NUM_VC = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]        in_valid, out_valid;
  noc_flit_t         in_flit [2], out_flit [2];
  logic [NUM_VC-1:0] in_free1 [2], in_free2 [2], out_free1 [2], out_free2 [2];
  logic              inj_valid, inj_ready, ej_valid, ej_ready;
  noc_flit_t         inj_flit, ej_flit;

  noc_router #(.N(N), .NODE(NODE), .NUM_VC(NUM_VC), .DEPTH(2)) dut (.*);

  int checks = 0, failures = 0;
  int exp_port [logic [31:0]];     // 0 = CW out, 1 = CCW out, 2 = eject
  logic injected [logic [31:0]];
  logic [31:0] next_id = 1;
  int n_bubble = 0, n_ej_stall = 0, n_out [3], sent = 0, received = 0;
  logic stop = 0;
  noc_flit_t cand [2];
  logic [1:0] cand_v;
  for (genvar d = 0; d < 2; d++) begin : g_in
    assign in_valid[d] = cand_v[d] && in_free1[d][cand[d].vc];
    assign in_flit[d]  = cand[d];
  end

  function automatic noc_flit_t mk(input int dst, input logic [31:0] id);
    noc_flit_t f;
    f      = '0;
    f.dst  = 5'(dst);
    f.vc   = 1'($urandom);
    f.id   = id;
    f.data = {$urandom, $urandom};
    return f;
  endfunction

  task automatic leave(input int port, input noc_flit_t f);
    checks++;
    received++;
    n_out[port]++;
    if (!exp_port.exists(f.id) || exp_port[f.id] != port) begin
      failures++;
      $display("flit %0d left on port %0d", f.id, port);
    end else exp_port.delete(f.id);
  endtask

  always_ff @(posedge clk) begin
    if (rst_n) begin
      // injection bookkeeping
      if (inj_valid && inj_ready) begin
        exp_port[inj_flit.id] = (((int'(inj_flit.dst) - NODE + N) % N) > N / 2) ? 1 : 0;
        injected[inj_flit.id] = 1'b1;
        sent++;
      end
      // outputs
      for (int d = 0; d < 2; d++) if (out_valid[d]) begin
        logic need2;
        need2 = injected.exists(out_flit[d].id);
        checks++;
        if (need2 ? !out_free2[d][out_flit[d].vc] : !out_free1[d][out_flit[d].vc]) begin
          failures++; $display("flow-control violation dir %0d", d);
        end
        leave(d, out_flit[d]);
      end
      if (ej_valid && ej_ready) leave(2, ej_flit);
      if (ej_valid && !ej_ready) n_ej_stall++;
      if (inj_valid && !inj_ready) begin
        int dir;
        dir = (((int'(inj_flit.dst) - NODE + N) % N) > N / 2) ? 1 : 0;
        if (out_free1[dir][inj_flit.vc] && !out_free2[dir][inj_flit.vc] && !out_valid[dir]) n_bubble++;
      end
      // ring inputs: a new candidate every cycle, sent only when the router has room
      for (int d = 0; d < 2; d++) begin
        int dst;
        if (in_valid[d]) begin
          exp_port[in_flit[d].id] = (int'(in_flit[d].dst) == NODE) ? 2 : d;
          sent++;
        end
        dst = $urandom_range(0, N - 1);
        cand[d]   <= mk(dst, next_id + 32'(d));
        cand_v[d] <= !stop && ($urandom_range(0, 9) < 5);
      end
      next_id <= next_id + 2;
      if (!inj_valid || inj_ready) begin
        int dst;
        dst = $urandom_range(0, N - 2);
        if (dst >= NODE) dst++;
        inj_valid <= !stop && ($urandom_range(0, 9) < 6);
        inj_flit  <= mk(dst, 32'h8000_0000 | next_id);
      end
      for (int d = 0; d < 2; d++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          int r;
          r = $urandom_range(0, 9);
          out_free1[d][v] <= (r < 7);
          out_free2[d][v] <= (r < 4);
        end
      end
      ej_ready <= ($urandom_range(0, 9) < 7);
    end
  end

  initial begin
    cand_v = 0; inj_valid = 0; ej_ready = 0; inj_flit = '0;
    cand[0] = '0; cand[1] = '0;
    for (int d = 0; d < 2; d++) begin out_free1[d] = '0; out_free2[d] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5000) @(posedge clk);
    stop = 1;
    repeat (200) @(posedge clk);
    checks++; if (exp_port.size() != 0 || received != sent) begin
      failures++; $display("%0d flits lost (sent %0d received %0d)", exp_port.size(), sent, received);
    end
    checks++; if (n_bubble == 0) begin failures++; $display("bubble rule never blocked an injection"); end
    checks++; if (n_ej_stall == 0) begin failures++; $display("no ejection stall"); end
    checks++; if (n_out[0] == 0 || n_out[1] == 0 || n_out[2] == 0) begin failures++; $display("a port never used"); end
    $display("sent %0d cw %0d ccw %0d ej %0d bubble-blocked %0d", sent, n_out[0], n_out[1], n_out[2], n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
