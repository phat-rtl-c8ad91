// tb_pkg: helpers shared by the testbenches.
// mem_init gives the contents of never-written memory as a function of the
// byte address, so a checker can work out read data without a table.
package tb_pkg;
  function automatic logic [63:0] mem_init(input logic [63:0] a);
    logic [63:0] w;
    w = {a[63:3], 3'b000};
    return {w[31:0] ^ 32'h5A5A_C3C3, ~w[31:0] + 32'h1234_5678};
  endfunction
endpackage
