// tb_elt_mon: bound into a design module; counts the cycles in which ev is
// high (outside reset) under the given name (see tb_elt_mon_pkg).
module tb_elt_mon #(
  parameter string NAME = "event"
) (
  input logic clk,
  input logic rst_n,
  input logic ev
);
  always @(posedge clk) if (rst_n && ev) tb_elt_mon_pkg::bump(NAME);
endmodule
