// tb_di_unit: checks the delay-invert unit on random blocks for M = 8 (the
// example size of the architecture) and M = 32: during the second half of
// each block the unit must deliver pair (x_m, x_{M-1-m}) with m = M/2-1..0,
// and nothing during the first half. Input gaps are inserted at random.
module tb_di_unit;
  import elt_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic  v8 = 0, v32 = 0;
  data_t d8 = '0, d32 = '0;
  logic  ov8, ov32;
  logic [1:0] ix8;
  logic [3:0] ix32;
  data_t a8, b8, a32, b32;

  di_unit #(.M(8))  u8  (.clk, .rst_n, .in_valid(v8),  .in_data(d8),  .out_valid(ov8),  .out_idx(ix8),  .out_a(a8),  .out_b(b8));
  di_unit #(.M(32)) u32 (.clk, .rst_n, .in_valid(v32), .in_data(d32), .out_valid(ov32), .out_idx(ix32), .out_a(a32), .out_b(b32));

  data_t blk [32];

  task automatic run_block(input int m);
    for (int j = 0; j < m; j++) blk[j] = data_t'($urandom);
    for (int j = 0; j < m; j++) begin
      if ($urandom_range(3, 0) == 0) begin
        @(negedge clk);
        v8 = 0; v32 = 0;
      end
      @(negedge clk);
      v8 = (m == 8); v32 = (m == 32);
      if (m == 8) d8 = blk[j]; else d32 = blk[j];
      #1;
      checks++;
      if (j < m / 2) begin
        if ((m == 8 ? ov8 : ov32) !== 1'b0) begin failures++; $display("M=%0d pos %0d: unexpected pair", m, j); end
      end else begin
        int mm;
        mm = m - 1 - j;
        if (m == 8) begin
          if (!(ov8 && ix8 == 2'(mm) && a8 == blk[mm] && b8 == blk[m - 1 - mm])) begin
            failures++; $display("M=8 pos %0d: got v=%0b idx=%0d a=%0d b=%0d", j, ov8, ix8, a8, b8);
          end
        end else begin
          if (!(ov32 && ix32 == 4'(mm) && a32 == blk[mm] && b32 == blk[m - 1 - mm])) begin
            failures++; $display("M=32 pos %0d: got v=%0b idx=%0d a=%0d b=%0d", j, ov32, ix32, a32, b32);
          end
        end
      end
    end
    @(negedge clk);
    v8 = 0; v32 = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < 30; b++) run_block((b % 3 == 2) ? 32 : 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
