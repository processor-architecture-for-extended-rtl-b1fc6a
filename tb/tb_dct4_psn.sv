// tb_dct4_psn: self-checking test of the constant-geometry DCT-IV engine.
//
// Runs four configurations side by side through tb_dct4_psn_run: M = 8, 32
// and 64 with output scaling, and M = 16 with scaled outputs (SCALE_OUT = 0).
// Each compares every output with a direct evaluation of the DCT-IV sum and
// checks the start-to-done latency.
module tb_dct4_psn;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   c [4];
  int   f [4];
  logic fin [4];
  int   checks;
  int   failures;

  always #5 clk = ~clk;

  tb_dct4_psn_run #(.M(8),  .SCALE_OUT(1'b1)) r8  (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  tb_dct4_psn_run #(.M(32), .SCALE_OUT(1'b1)) r32 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  tb_dct4_psn_run #(.M(64), .SCALE_OUT(1'b1)) r64 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]));
  tb_dct4_psn_run #(.M(16), .SCALE_OUT(1'b0)) r16 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .finished(fin[3]));

  always_comb begin
    checks = 0;
    failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
    end
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
