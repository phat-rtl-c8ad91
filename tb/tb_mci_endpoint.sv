// tb_mci_endpoint: request packets from many source nodes enter the endpoint
// and reach an out-of-order memory controller model; read replies must come
// back as packets addressed to the source node named in the ID, on the reply
// VC, with the data the shadow memory predicts.  Writes must produce no
// packet.  The router side randomly refuses replies to exercise the queue.
module tb_mci_endpoint;
  import phat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      ej_valid, ej_ready, inj_valid, inj_ready;
  noc_flit_t ej_flit, inj_flit;
  logic      mc_req_valid, mc_req_ready, mc_rsp_valid, mc_rsp_ready;
  mc_req_t   mc_req;
  mc_rsp_t   mc_rsp;

  mci_endpoint #(.NUM_VC(2)) dut (.*);
  mc_model #(.SLOTS(6), .LAT_MIN(1), .LAT_MAX(20), .STALL_PCT(20)) u_mc (
    .clk, .rst_n, .req_valid(mc_req_valid), .req_ready(mc_req_ready), .req(mc_req),
    .rsp_valid(mc_rsp_valid), .rsp_ready(mc_rsp_ready), .rsp(mc_rsp));

  int checks = 0, failures = 0, replies = 0, reads = 0, q_full = 0;
  logic stop = 0;
  logic [63:0] shadow [logic [60:0]];
  logic [63:0] expect_data [logic [31:0]];
  logic [23:0] next_tag;

  function automatic logic [63:0] sh(input logic [63:0] a);
    if (shadow.exists(a[63:3])) return shadow[a[63:3]];
    return tb_pkg::mem_init(a);
  endfunction

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (ej_valid && ej_ready) begin
        if (ej_flit.write) begin
          logic [63:0] w;
          w = sh(ej_flit.addr);
          for (int b = 0; b < 8; b++) if (ej_flit.be[b]) w[8*b +: 8] = ej_flit.data[8*b +: 8];
          shadow[ej_flit.addr[63:3]] = w;
        end else begin
          expect_data[ej_flit.id] = sh(ej_flit.addr);
          reads++;
        end
      end
      if (mc_rsp_valid && !mc_rsp_ready) q_full++;
      if (inj_valid && inj_ready) begin
        checks++;
        replies++;
        if (!expect_data.exists(inj_flit.id) || inj_flit.data !== expect_data[inj_flit.id] ||
            inj_flit.dst != inj_flit.id[28:24] || inj_flit.vc != 1'b1 || inj_flit.write) begin
          failures++;
          $display("bad reply id %h data %h dst %0d", inj_flit.id, inj_flit.data, inj_flit.dst);
        end
        expect_data.delete(inj_flit.id);
      end
      inj_ready <= ($urandom_range(0, 9) < 4);
      if (!ej_valid || ej_ready) begin
        ej_valid      <= !stop && ($urandom_range(0, 9) < 7);
        ej_flit       <= '0;
        ej_flit.write <= ($urandom_range(0, 9) < 3);
        ej_flit.addr  <= 64'h2000 + 64'($urandom_range(0, 31)) * 64;
        ej_flit.data  <= {$urandom, $urandom};
        ej_flit.be    <= 8'($urandom);
        ej_flit.id    <= {3'b000, 5'($urandom_range(0, 17)), next_tag};
        next_tag      <= next_tag + 1;
      end
    end
  end

  initial begin
    ej_valid = 0; ej_flit = '0; inj_ready = 0; next_tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (replies >= 1500);
    stop = 1;
    repeat (300) @(posedge clk);
    checks++; if (expect_data.size() != 0) begin failures++; $display("%0d replies missing", expect_data.size()); end
    checks++; if (q_full == 0) begin failures++; $display("reply queue never full"); end
    checks++; if (u_mc.stat_ooo == 0) begin failures++; $display("no out-of-order reply"); end
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
