// tb_dct4_psn_run: test runner for one dct4_psn configuration, used by
// tb_dct4_psn. Feeds NVEC vectors (an impulse first, then random ones, odd
// elements negated as the engine expects) and compares each output with a
// direct evaluation of X_k = sum_j x_j cos(pi/M (j+1/2)(k+1/2)); with
// SCALE_OUT = 0 the expected value is X_k / sin(pi/(2M)(h_M(r)+1/2)) for the
// register r that holds output k (r with M-1-h_M(r) = k, h the Hadamard
// order, built here by its recursion). Checks that done rises exactly n+2
// (n without scaling) edges after the edge that takes start.
module tb_dct4_psn_run
  import elt_pkg::*;
#(
  parameter int M         = 8,
  parameter bit SCALE_OUT = 1'b1,
  parameter int NVEC      = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam real PI_TB = 3.14159265358979323846;
  localparam int  N = $clog2(M);

  logic  start = 1'b0;
  logic  busy, done;
  data_t din  [M];
  data_t dout [M];
  real   x [M];
  int    h [int][int];

  dct4_psn #(.M(M), .SCALE_OUT(SCALE_OUT)) dut (.clk, .rst_n, .start, .din, .busy, .done, .dout);

  task automatic check_out(input real got, input int k);
    real ref_v, tol, sa;
    ref_v = 0.0; sa = 0.0;
    for (int j = 0; j < M; j++) begin
      ref_v += x[j] * $cos(PI_TB / M * (j + 0.5) * (k + 0.5));
      sa += (x[j] < 0.0 ? -x[j] : x[j]);
    end
    if (!SCALE_OUT) begin
      for (int r = 0; r < M; r++)
        if (M - 1 - h[M][r] == k) ref_v = ref_v / $sin(PI_TB / (2 * M) * (h[M][r] + 0.5));
      sa = sa * 2.0 * M;
    end
    tol = 2.0 + 2.0e-3 * sa;
    checks++;
    if ((got - ref_v) > tol || (ref_v - got) > tol) begin
      failures++;
      $display("M=%0d SCALE_OUT=%0d X[%0d]: got %f expected %f", M, SCALE_OUT, k, got, ref_v);
    end
  endtask

  initial begin
    int cyc;
    checks = 0; failures = 0; finished = 1'b0;
    h[1][0] = 0;
    for (int k = 1; k < M; k *= 2)
      for (int t = 0; t < k; t++) begin
        h[2 * k][2 * t]     = h[k][t];
        h[2 * k][2 * t + 1] = 2 * k - 1 - h[k][t];
      end
    for (int j = 0; j < M; j++) din[j] = '0;
    @(posedge rst_n);
    @(posedge clk);
    for (int t = 0; t < NVEC; t++) begin
      int amp;
      amp = (t < 4) ? 1000 : (SCALE_OUT ? 32767 : 4000);
      for (int j = 0; j < M; j++) begin
        if (t == 0) x[j] = (j == 3) ? 1000.0 : 0.0;
        else x[j] = real'(int'($urandom_range(2 * amp, 0)) - amp);
      end
      @(negedge clk);
      for (int j = 0; j < M; j++) din[j] = data_t'($rtoi(j % 2 == 1 ? -x[j] : x[j]));
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0;   // counts edges after the one that took start
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != (SCALE_OUT ? N + 2 : N)) begin
        failures++;
        $display("M=%0d latency %0d, expected %0d", M, cyc, SCALE_OUT ? N + 2 : N);
      end
      for (int k = 0; k < M; k++) check_out(real'(dout[k]), k);
    end
    finished = 1'b1;
  end
endmodule
