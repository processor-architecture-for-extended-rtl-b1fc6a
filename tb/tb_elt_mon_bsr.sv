// tb_elt_mon_bsr: bound into bsr_delay; counts shifts per delay-line length.
module tb_elt_mon_bsr #(
  parameter int unsigned LEN = 1
) (
  input logic clk,
  input logic rst_n,
  input logic ev
);
  always @(posedge clk) if (rst_n && ev) tb_elt_mon_pkg::bump($sformatf("%0d-word delay shifts", LEN));
endmodule
