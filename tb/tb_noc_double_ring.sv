// tb_noc_double_ring: the full 26-node double ring with 2 VCs under heavy
// random all-to-all traffic and random ejection back-pressure.  Every packet
// carries a unique ID; it must arrive exactly once, at its destination, with
// its payload intact.  After traffic stops the network must drain completely
// (no packet stuck, no deadlock).  A lone packet in an empty network must take
// the shorter ring and be offered for ejection as many cycles after its
// injection as it has hops.
module tb_noc_double_ring;
  import phat_pkg::*;
  localparam int N = 26, NUM_VC = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      inj_valid [N], inj_ready [N], ej_valid [N], ej_ready [N];
  noc_flit_t inj_flit [N], ej_flit [N];

  noc_double_ring #(.N(N), .NUM_VC(NUM_VC)) dut (.*);

  int checks = 0, failures = 0, sent = 0, received = 0;
  int exp_dst [logic [31:0]];
  logic [63:0] exp_data [logic [31:0]];
  logic [31:0] next_id = 0;
  logic stop = 1, pressure = 1;
  longint cyc = 0;
  logic      gen_valid [N];
  noc_flit_t gen_flit  [N];
  logic      lone_v = 0;
  int        lone_src = 0;
  noc_flit_t lone_flit;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      inj_valid[i] = gen_valid[i] || (lone_v && i == lone_src);
      inj_flit[i]  = (lone_v && i == lone_src) ? lone_flit : gen_flit[i];
    end
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (ej_valid[i] && ej_ready[i]) begin
          checks++;
          received++;
          if (!exp_dst.exists(ej_flit[i].id) || exp_dst[ej_flit[i].id] != i ||
              exp_data[ej_flit[i].id] !== ej_flit[i].data) begin
            failures++;
            $display("packet %0d delivered wrongly at node %0d", ej_flit[i].id, i);
          end else begin
            exp_dst.delete(ej_flit[i].id);
            exp_data.delete(ej_flit[i].id);
          end
        end
        if (inj_valid[i] && inj_ready[i]) begin
          exp_dst[inj_flit[i].id]  = int'(inj_flit[i].dst);
          exp_data[inj_flit[i].id] = inj_flit[i].data;
          sent++;
        end
      end
      for (int i = 0; i < N; i++) begin
        if (!gen_valid[i] || (inj_ready[i] && !(lone_v && i == lone_src))) begin
          int dst;
          dst = $urandom_range(0, N - 2);
          if (dst >= i) dst++;
          gen_valid[i]      <= !stop && ($urandom_range(0, 9) < 5);
          gen_flit[i]       <= '0;
          gen_flit[i].dst   <= 5'(dst);
          gen_flit[i].vc    <= 1'($urandom);
          gen_flit[i].id    <= next_id + 32'(i);
          gen_flit[i].data  <= {$urandom, $urandom};
        end
        ej_ready[i] <= !pressure || ($urandom_range(0, 9) < 6);
      end
      next_id <= next_id + 32'(N);
    end
  end

  task automatic lone(input int src, input int dst);
    longint t0;
    int hops;
    hops = (dst - src + N) % N;
    if (hops > N / 2) hops = N - hops;
    @(negedge clk);
    lone_v = 1'b1;
    lone_src = src;
    lone_flit = '{tail: 1'b1, dst: 5'(dst), vc: 1'b0, write: 1'b0, be: '0,
                             addr: '0, data: 64'hCAFE, id: 32'hF000_0000 | 32'(src * 64 + dst)};
    t0 = cyc;
    @(posedge clk);
    #1;
    lone_v = 1'b0;
    while (!ej_valid[dst]) @(posedge clk);
    checks++;
    if (cyc - t0 != longint'(hops)) begin
      failures++;
      $display("lone packet %0d->%0d took %0d cycles, expected %0d", src, dst, cyc - t0, hops);
    end
    @(posedge clk);
  endtask

  initial begin
    foreach (gen_valid[i]) begin gen_valid[i] = 0; gen_flit[i] = '0; ej_ready[i] = 1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    pressure = 0;
    repeat (2) @(posedge clk);
    lone(0, 1);
    lone(3, 16);
    lone(5, 2);
    lone(20, 4);
    repeat (5) @(posedge clk);
    pressure = 1;
    stop = 0;
    repeat (20000) @(posedge clk);
    stop = 1;
    pressure = 0;
    repeat (500) @(posedge clk);
    checks++;
    if (exp_dst.size() != 0) begin failures++; $display("%0d packets never arrived", exp_dst.size()); end
    $display("random traffic: %0d packets sent, %0d received", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
