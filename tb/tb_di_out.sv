// tb_di_out: writes blocks as pair streams (x_m, x_{M-1-m}), m = M/2-1..0,
// back to back every M cycles (and with pauses), and checks that the serial
// output is x_0 .. x_{M-1} of every block in order, saturated to 16 bits,
// without gaps while blocks arrive back to back.
module tb_di_out;
  import elt_pkg::*;

  localparam int M = 8;
  localparam int H = M / 2;
  localparam int NB = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic iv = 1'b0;
  logic [1:0] ii = '0;
  data_t ia = '0, ib = '0;
  logic ov;
  sample_t od;
  int checks = 0;
  int failures = 0;
  int outs = 0;
  int expq [$];
  int gaps = 0;

  di_out #(.M(M)) dut (.clk, .rst_n, .in_valid(iv), .in_idx(ii), .in_a(ia), .in_b(ib),
                       .out_valid(ov), .out_data(od));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ov) begin
    int e;
    e = expq.pop_front();
    checks++;
    if (od != sample_t'(e)) begin failures++; $display("output %0d: got %0d expected %0d", outs, od, e); end
    outs++;
  end else if (rst_n && outs > 0 && outs % M != 0 && expq.size() > 0) begin
    gaps++;
  end

  initial begin
    data_t x [M];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++) begin
      for (int j = 0; j < M; j++) begin
        x[j] = data_t'(int'($urandom_range(80000, 0)) - 40000);
        expq.push_back(x[j] > 32767 ? 32767 : x[j] < -32768 ? -32768 : int'(x[j]));
      end
      for (int m = H - 1; m >= 0; m--) begin
        @(negedge clk);
        iv = 1; ii = 2'(m); ia = x[m]; ib = x[M - 1 - m];
      end
      @(negedge clk);
      iv = 0;
      repeat (H - 1) @(negedge clk);
      if (b == 20) repeat (30) @(negedge clk);
    end
    repeat (3 * M) @(negedge clk);
    checks++;
    if (outs != NB * M) begin failures++; $display("%0d outputs, expected %0d", outs, NB * M); end
    checks++;
    if (gaps != 0) begin failures++; $display("%0d gaps inside output blocks", gaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
