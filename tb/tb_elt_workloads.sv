// tb_elt_workloads: runs the whole ELT processor (elt_top) in the
// configurations other than the default M = 32, K = 2 that the design is
// meant for:
//  * M = 8, K = 1: the modulated lapped transform at the 8-band size used to
//    illustrate the delay-invert unit;
//  * M = 8, K = 3: the 8-band size with more overlap (three butterfly stages,
//    two double-block delay lines);
//  * M = 16, K = 2, with random idle cycles in the input stream;
//  * M = 64, K = 1: the MLT at a larger size.
// Each run (tb_elt_run) checks subbands against a real-arithmetic model,
// reconstruction, latency and rate. A watchdog ends the test if any run
// hangs.
module tb_elt_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NR = 4;
  int   c [NR];
  int   f [NR];
  logic d [NR];

  tb_elt_run #(.M(8),  .K(1), .NB(24), .GAPS(1'b0), .SEED(11)) r0 (.clk(clk), .checks(c[0]), .failures(f[0]), .finished(d[0]));
  tb_elt_run #(.M(8),  .K(3), .NB(24), .GAPS(1'b0), .SEED(12)) r1 (.clk(clk), .checks(c[1]), .failures(f[1]), .finished(d[1]));
  tb_elt_run #(.M(16), .K(2), .NB(20), .GAPS(1'b1), .SEED(13)) r2 (.clk(clk), .checks(c[2]), .failures(f[2]), .finished(d[2]));
  tb_elt_run #(.M(64), .K(1), .NB(10), .GAPS(1'b0), .SEED(14)) r3 (.clk(clk), .checks(c[3]), .failures(f[3]), .finished(d[3]));

  function automatic int total(input int a [NR]);
    int s = 0;
    for (int i = 0; i < NR; i++) s += a[i];
    return s;
  endfunction

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
