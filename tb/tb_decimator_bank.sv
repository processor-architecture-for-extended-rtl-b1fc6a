// tb_decimator_bank: sends blocks of M/2 random pairs (index M/2-1 down to 0)
// and checks the collected vector: w_{m+M/2} = (-1)^(m+M/2) u_m and
// w_{M/2-1-m} = (-1)^(M/2-1-m) u_{M-1-m}, and that out_valid pulses exactly
// once per block, right after the last pair.
module tb_decimator_bank;
  import elt_pkg::*;

  localparam int M = 16;
  localparam int H = M / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic iv = 1'b0;
  logic [2:0] ii = '0;
  data_t ia = '0, ib = '0;
  logic ov;
  data_t ovec [M];
  int checks = 0;
  int failures = 0;
  int pulses = 0;

  decimator_bank #(.M(M)) dut (.clk, .rst_n, .in_valid(iv), .in_idx(ii), .in_a(ia), .in_b(ib),
                               .out_valid(ov), .out_vec(ovec));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ov) pulses++;

  initial begin
    data_t u [M];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 20; b++) begin
      for (int j = 0; j < M; j++) u[j] = data_t'(int'($urandom_range(2000000, 0)) - 1000000);
      for (int m = H - 1; m >= 0; m--) begin
        @(negedge clk);
        iv = 1; ii = 3'(m); ia = u[m]; ib = u[M - 1 - m];
        if (m == 0) begin
          @(negedge clk);
          iv = 0;
          checks++;
          if (!ov) begin failures++; $display("block %0d: no out_valid", b); end
          for (int j = 0; j < M; j++) begin
            data_t e;
            e = j >= H ? u[j - H] : u[j + H];
            if (j % 2 == 1) e = -e;
            checks++;
            if (ovec[j] != e) begin failures++; $display("block %0d w[%0d]: got %0d expected %0d", b, j, ovec[j], e); end
          end
        end
      end
      if (b % 2 == 0) repeat (3) @(negedge clk);
    end
    @(negedge clk);
    checks++;
    if (pulses != 20) begin failures++; $display("%0d out_valid pulses, expected 20", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
