// tb_elt_synthesis: synthesis part alone at M = 16, K = 1 (the modulated
// lapped transform case). Random subband vectors arrive every M cycles; the
// serial output must equal x_b = D_0 Z1' I* (2/M) C^IV y_b, evaluated here in
// real arithmetic (Z1' delays the lower half of the vector by one block), in
// order and without gaps.
module tb_elt_synthesis;
  import elt_pkg::*;

  localparam int M  = 16;
  localparam int K  = 1;
  localparam int NB = 30;
  localparam int H  = M / 2;
  localparam real PI_TB = 3.14159265358979323846;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    sub_valid = 1'b0;
  data_t   sub_vec [M];
  logic    out_valid;
  sample_t out_data;
  int checks = 0;
  int failures = 0;

  elt_synthesis #(.M(M), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #((NB * M + 1000) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real yin  [NB][M];
  real xref [NB*M];

  function automatic real th(int m, int k);
    return PI_TB * (real'(2 * m + 1) / real'(4 * M) + real'(k + 1) / real'(4 * K + 4));
  endfunction

  task automatic build_reference();
    real c [M];
    real w [M];
    real prev_low [H];
    for (int m = 0; m < H; m++) prev_low[m] = 0.0;
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < M; k++) begin
        c[k] = 0.0;
        for (int j = 0; j < M; j++) c[k] += yin[b][j] * $cos(PI_TB / M * (j + 0.5) * (k + 0.5));
        c[k] = c[k] * 2.0 / M;
      end
      for (int j = 0; j < M; j++) w[j] = c[(j + H) % M];
      for (int m = 0; m < H; m++) begin
        real lo;
        lo = prev_low[m];                    // element M-1-m, one block late
        prev_low[m] = w[M - 1 - m];
        xref[b * M + m]         = -$cos(th(m, 0)) * w[m] + $sin(th(m, 0)) * lo;
        xref[b * M + M - 1 - m] =  $sin(th(m, 0)) * w[m] + $cos(th(m, 0)) * lo;
      end
    end
  endtask

  int outs = 0;
  int gaps = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (real'(out_data) - xref[outs] > 4.0 || xref[outs] - real'(out_data) > 4.0) begin
      failures++;
      $display("output %0d: got %0d expected %f", outs, out_data, xref[outs]);
    end
    outs++;
  end else if (rst_n && outs > 0 && outs < (NB - 1) * M) begin
    gaps++;
  end

  initial begin
    for (int b = 0; b < NB; b++)
      for (int j = 0; j < M; j++) yin[b][j] = real'(int'($urandom_range(8000, 0)) - 4000);
    build_reference();
    for (int j = 0; j < M; j++) sub_vec[j] = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      sub_valid = 1'b1;
      for (int j = 0; j < M; j++) sub_vec[j] = data_t'($rtoi(yin[b][j]));
      @(negedge clk);
      sub_valid = 1'b0;
      repeat (M - 2) @(negedge clk);
    end
    repeat (4 * M) @(negedge clk);
    checks++;
    if (outs != NB * M) begin failures++; $display("%0d outputs, expected %0d", outs, NB * M); end
    checks++;
    if (gaps != 0) begin failures++; $display("%0d gaps in the output stream", gaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
