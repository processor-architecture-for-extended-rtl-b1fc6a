// tb_elt_mon_bf: bound into butterfly_pe; counts its operations per matrix
// D_k (analysis and synthesis units with the same k share a counter).
module tb_elt_mon_bf #(
  parameter int unsigned KIDX = 0
) (
  input logic clk,
  input logic rst_n,
  input logic ev
);
  always @(posedge clk) if (rst_n && ev) tb_elt_mon_pkg::bump($sformatf("butterfly D%0d operations", KIDX));
endmodule
