// tb_imem: fills the instruction memory with a pattern computed from the
// address, reads every bundle back and checks data and the one-cycle fetch
// latency, then overwrites a few bundles and checks that neighbours stay intact
// and that fetch_data holds while fetch_en is low.
module tb_imem;
  localparam int DEPTH = 1024, AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;

  logic           fetch_en, ld_we;
  logic [AW-1:0]  fetch_addr, ld_addr;
  logic [127:0]   fetch_data, ld_data;
  int checks = 0, failures = 0;

  imem dut (.*);

  function automatic logic [127:0] pat(input int a, input int salt);
    return {32'(a * 7 + salt), 32'(a ^ 32'hDEAD_0000), 32'(~a), 32'(a + salt * 3)};
  endfunction

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    fetch_en = 0; ld_we = 0; fetch_addr = 0; ld_addr = 0; ld_data = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); ld_we = 1; ld_addr = AW'(a); ld_data = pat(a, 1);
    end
    @(negedge clk); ld_we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); fetch_en = 1; fetch_addr = AW'(a);
      @(posedge clk); #1;
      check(fetch_data, pat(a, 1), "fetch");
    end
    @(negedge clk); fetch_en = 0; fetch_addr = 10'd5;
    @(posedge clk); #1;
    check(fetch_data, pat(DEPTH - 1, 1), "hold");
    for (int a = 100; a < 104; a++) begin
      @(negedge clk); ld_we = 1; ld_addr = AW'(a); ld_data = pat(a, 9);
    end
    @(negedge clk); ld_we = 0;
    for (int a = 99; a < 105; a++) begin
      @(negedge clk); fetch_en = 1; fetch_addr = AW'(a);
      @(posedge clk); #1;
      check(fetch_data, pat(a, (a >= 100 && a < 104) ? 9 : 1), "rewrite");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
