// tb_elt_mon_out: bound into di_out; counts read cycles per output buffer.
module tb_elt_mon_out (
  input logic clk,
  input logic rst_n,
  input logic rd,
  input logic rsel
);
  always @(posedge clk) if (rst_n && rd) tb_elt_mon_pkg::bump($sformatf("output buffer %0d reads", rsel));
endmodule
