// tb_dct4_rom: reads all stages of the DCT-IV coefficient table for M = 32
// and compares with the schedule of the algorithm, evaluated here: stage 0
// O2/sqrt2, stages 1..n-2 O1 with 2cos((h(p mod 2^i)+1/2) pi/2^(i+1)), stage
// n-1 O3 with 2d_{n-1}^{2p}, 2d_{n-1}^{2p+1}, stages n, n+1 O4/O5 with the
// output factors sin(pi/(2M)(h_M(r)+1/2)). The Hadamard order is built
// here by its recursion.
module tb_dct4_rom;
  import elt_pkg::*;

  localparam int M = 32;
  localparam int N = 5;
  localparam int P = M / 4;
  localparam real PI_TB = 3.14159265358979323846;

  logic [2:0] stage;
  pe_op_e     op;
  coef_t      c1 [P];
  coef_t      c2 [P];
  int checks = 0;
  int failures = 0;
  int h [int][int];   // h[k][t]

  dct4_rom #(.M(M)) dut (.stage, .op, .c1, .c2);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real dd(int i, int t);
    return $cos((real'(h[1 << i][t]) + 0.5) * PI_TB / real'(2 << i));
  endfunction

  task automatic cmp(input coef_t got, input real e, input int s, input int p);
    real g;
    g = real'(got) / 16384.0;
    checks++;
    if (g - e > 1.0 / 16384.0 || e - g > 1.0 / 16384.0) begin
      failures++;
      $display("stage %0d pe %0d: got %f expected %f", s, p, g, e);
    end
  endtask

  initial begin
    h[1][0] = 0;
    for (int k = 1; k < M; k *= 2)
      for (int t = 0; t < k; t++) begin
        h[2 * k][2 * t]     = h[k][t];
        h[2 * k][2 * t + 1] = 2 * k - 1 - h[k][t];
      end
    for (int s = 0; s < N + 2; s++) begin
      pe_op_e eop;
      stage = 3'(s);
      #1;
      eop = s == 0 ? OP_O2 : s < N - 1 ? OP_O1 : s == N - 1 ? OP_O3 : s == N ? OP_O4 : OP_O5;
      checks++;
      if (op != eop) begin failures++; $display("stage %0d: op %0d expected %0d", s, op, eop); end
      for (int p = 0; p < P; p++) begin
        if (s == 0) begin
          cmp(c1[p], 2.0 * dd(0, 0), s, p);
        end else if (s < N - 1) begin
          cmp(c1[p], 2.0 * dd(s, p % (1 << s)), s, p);
        end else if (s == N - 1) begin
          cmp(c1[p], 2.0 * dd(N - 1, 2 * p), s, p);
          cmp(c2[p], 2.0 * dd(N - 1, 2 * p + 1), s, p);
        end else begin
          int r;
          r = 4 * p + (s == N ? 0 : 2);
          cmp(c1[p], $sin(PI_TB / (2 * M) * (h[M][r] + 0.5)), s, p);
          cmp(c2[p], $sin(PI_TB / (2 * M) * (h[M][r + 1] + 0.5)), s, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
