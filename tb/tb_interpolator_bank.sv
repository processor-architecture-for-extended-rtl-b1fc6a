// tb_interpolator_bank: loads random vectors c (M = 16) and checks the pair
// stream that follows: M/2 consecutive valid cycles with index M/2-1 .. 0 and
// pair (w_m, w_{M-1-m}) where w = I* round(c * 2/M).
module tb_interpolator_bank;
  import elt_pkg::*;

  localparam int M = 16;
  localparam int H = M / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic iv = 1'b0;
  data_t ivec [M];
  logic ov;
  logic [2:0] oi;
  data_t oa, ob;
  int checks = 0;
  int failures = 0;

  interpolator_bank #(.M(M)) dut (.clk, .rst_n, .in_valid(iv), .in_vec(ivec),
                                  .out_valid(ov), .out_idx(oi), .out_a(oa), .out_b(ob));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int scl(input data_t v);
    // round(v / 8) with ties toward +infinity
    return int'($floor(real'(v) / 8.0 + 0.5));
  endfunction

  initial begin
    data_t c [M];
    for (int j = 0; j < M; j++) ivec[j] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 20; b++) begin
      @(negedge clk);
      for (int j = 0; j < M; j++) begin
        c[j] = data_t'(int'($urandom_range(2000000, 0)) - 1000000);
        ivec[j] = c[j];
      end
      iv = 1;
      @(negedge clk);
      iv = 0;
      for (int m = H - 1; m >= 0; m--) begin
        int ea, eb;
        ea = scl(c[m + H]);
        eb = scl(c[H - 1 - m]);
        checks++;
        if (!(ov && oi == 3'(m) && oa == ea && ob == eb)) begin
          failures++;
          $display("block %0d m %0d: got v=%0b idx=%0d %0d %0d expected %0d %0d", b, m, ov, oi, oa, ob, ea, eb);
        end
        @(negedge clk);
      end
      checks++;
      if (ov) begin failures++; $display("block %0d: stream longer than M/2", b); end
      repeat ($urandom_range(4, 0)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
