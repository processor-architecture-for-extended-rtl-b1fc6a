// tb_elt_mon_dct: bound into dct4_psn; counts the PE operations executed per
// code and the stages that use the perfect-shuffle feedback.
module tb_elt_mon_dct
  import elt_pkg::*;
#(
  parameter int unsigned M = 32
) (
  input logic   clk,
  input logic   rst_n,
  input logic   busy,
  input pe_op_e op,
  input logic [$clog2($clog2(M)+2)-1:0] stage
);
  always @(posedge clk) if (rst_n && busy) begin
    tb_elt_mon_pkg::bump($sformatf("PE operation O%0d", int'(op) + 1));
    if (stage != 0 && int'(stage) < $clog2(M) - 1) tb_elt_mon_pkg::bump("perfect-shuffle feedback");
  end
endmodule
