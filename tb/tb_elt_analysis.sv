// tb_elt_analysis: analysis part at a second size (M = 8, K = 3) so that a
// chain of two z^-M delay lines and three butterflies is exercised. Every
// subband vector is compared with a real-arithmetic model of
// y_b = C^IV I* Z1 D_0 Z2 D_1 Z2 D_2 v_b, and the subband vectors must come
// exactly M cycles apart while the input is continuous.
module tb_elt_analysis;
  import elt_pkg::*;

  localparam int M  = 8;
  localparam int K  = 3;
  localparam int NB = 30;
  localparam int H  = M / 2;
  localparam real PI_TB = 3.14159265358979323846;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    in_valid = 1'b0;
  sample_t in_data = '0;
  logic    sub_valid;
  data_t   sub_vec [M];
  int checks = 0;
  int failures = 0;

  elt_analysis #(.M(M), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #((NB * M + 1000) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xin  [NB*M];
  real yref [NB][M];
  real hist [K][NB][H];

  function automatic real th(int m, int k);
    return PI_TB * (real'(2 * m + 1) / real'(4 * M) + real'(k + 1) / real'(4 * K + 4));
  endfunction

  task automatic build_reference();
    real v [M];
    real u [M];
    real w [M];
    for (int b = 0; b < NB; b++) begin
      for (int j = 0; j < M; j++) v[j] = xin[b * M + j];
      for (int s = 0; s < K; s++) begin
        int kk, dl;
        kk = K - 1 - s;
        for (int m = 0; m < H; m++) begin
          u[m]         = -$cos(th(m, kk)) * v[m] + $sin(th(m, kk)) * v[M - 1 - m];
          u[M - 1 - m] =  $sin(th(m, kk)) * v[m] + $cos(th(m, kk)) * v[M - 1 - m];
        end
        for (int m = 0; m < H; m++) hist[s][b][m] = u[m];
        dl = (s == K - 1) ? 1 : 2;
        for (int m = 0; m < H; m++) v[m] = (b >= dl) ? hist[s][b - dl][m] : 0.0;
        for (int m = H; m < M; m++) v[m] = u[m];
      end
      for (int j = 0; j < M; j++) w[j] = v[(j + H) % M];
      for (int k = 0; k < M; k++) begin
        yref[b][k] = 0.0;
        for (int j = 0; j < M; j++) yref[b][k] += w[j] * $cos(PI_TB / M * (j + 0.5) * (k + 0.5));
      end
    end
  endtask

  int sub_cnt = 0;
  int cyc = 0;
  int last = -1;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && sub_valid) begin
    for (int k = 0; k < M; k++) begin
      real err;
      err = real'(sub_vec[k]) - yref[sub_cnt][k];
      checks++;
      if (err > 8.0 + 2.0e-4 * (yref[sub_cnt][k] < 0.0 ? -yref[sub_cnt][k] : yref[sub_cnt][k]) || -err > 8.0 + 2.0e-4 * (yref[sub_cnt][k] < 0.0 ? -yref[sub_cnt][k] : yref[sub_cnt][k])) begin
        failures++;
        $display("block %0d subband %0d: got %0d expected %f", sub_cnt, k, sub_vec[k], yref[sub_cnt][k]);
      end
    end
    if (last >= 0) begin
      checks++;
      if (cyc - last != M) begin failures++; $display("subband vectors %0d cycles apart", cyc - last); end
    end
    last <= cyc;
    sub_cnt <= sub_cnt + 1;
  end

  initial begin
    for (int t = 0; t < NB * M; t++) xin[t] = real'(int'($urandom_range(60000, 0)) - 30000);
    build_reference();
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < NB * M; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = sample_t'($rtoi(xin[t]));
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3 * M) @(negedge clk);
    checks++;
    if (sub_cnt != NB) begin failures++; $display("%0d subband vectors, expected %0d", sub_cnt, NB); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
