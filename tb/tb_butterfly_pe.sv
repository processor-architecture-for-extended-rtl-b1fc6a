// tb_butterfly_pe: drives random pairs into a butterfly unit (M = 32, D_1 of
// K = 2) and checks, one cycle later, out_a = -c a + s b and out_b = s a + c b
// with c, s the cosine and sine of theta_{m,1} computed here, and that the
// valid flag and index travel with the data.
module tb_butterfly_pe;
  import elt_pkg::*;

  localparam int M = 32;
  localparam int K = 2;
  localparam real PI_TB = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic iv = 1'b0;
  logic [3:0] ii = '0;
  data_t ia = '0, ib = '0;
  logic ov;
  logic [3:0] oi;
  data_t oa, ob;
  int checks = 0;
  int failures = 0;

  butterfly_pe #(.M(M), .K(K), .KIDX(1)) dut (
    .clk, .rst_n, .in_valid(iv), .in_idx(ii), .in_a(ia), .in_b(ib),
    .out_valid(ov), .out_idx(oi), .out_a(oa), .out_b(ob));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      int m, a, b;
      bit v;
      real th, ea, eb;
      v = ($urandom_range(3, 0) != 0);
      m = $urandom_range(M / 2 - 1, 0);
      a = int'($urandom_range(200000, 0)) - 100000;
      b = int'($urandom_range(200000, 0)) - 100000;
      iv <= v; ii <= 4'(m); ia <= data_t'(a); ib <= data_t'(b);
      @(posedge clk);
      #1;
      checks++;
      if (ov !== v) begin failures++; $display("valid mismatch at %0d", t); end
      if (v) begin
        th = PI_TB * (real'(2 * m + 1) / real'(4 * M) + 2.0 / real'(4 * K + 4));
        ea = -$cos(th) * a + $sin(th) * b;
        eb =  $sin(th) * a + $cos(th) * b;
        checks++;
        if (oi != 4'(m) || real'(oa) - ea > 16.0 || ea - real'(oa) > 16.0 ||
            real'(ob) - eb > 16.0 || eb - real'(ob) > 16.0) begin
          failures++;
          $display("m=%0d a=%0d b=%0d: got %0d %0d expected %f %f", m, a, b, oa, ob, ea, eb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
