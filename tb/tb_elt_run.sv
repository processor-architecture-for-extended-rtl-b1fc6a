// tb_elt_run: one end-to-end run of elt_top at a given size, used by
// tb_elt_workloads to cover several (M, K) configurations in one simulation.
//
// Streams NB blocks of random samples into elt_top #(M, K). With GAPS = 0 the
// input is continuous; with GAPS = 1 about one cycle in four carries no
// sample. The checks are those of the full-size test:
//  * each subband vector against a real-arithmetic model of
//    y_b = C^IV I* Z1 D_0 Z2 D_1 ... Z2 D_{K-1} v_b, with the angles
//    theta_{m,k} = pi((2m+1)/(4M) + (k+1)/(4K+4));
//  * each output sample against the input delayed by (2K-1) blocks;
//  * the subband latency of K + log2(M) + 4 cycles after a block's last
//    sample, and (continuous input only) one vector every M cycles and a
//    gap-free output stream.
// `finished` rises when the run is over; checks and failures are then final.
module tb_elt_run #(
  parameter int M    = 8,
  parameter int K    = 1,
  parameter int NB   = 16,
  parameter bit GAPS = 1'b0,
  parameter int SEED = 1
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  import elt_pkg::*;

  localparam int  H     = M / 2;
  localparam real PI_TB = 3.14159265358979323846;

  logic    rst_n = 1'b0;
  logic    in_valid = 1'b0;
  sample_t in_data = '0;
  logic    sub_valid;
  data_t   sub_vec [M];
  logic    out_valid;
  sample_t out_data;

  elt_top #(.M(M), .K(K)) dut (.*);

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
        int kk;
        int dl;
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

  int cyc = 0;
  int sub_cnt = 0;
  int out_cnt = 0;
  int in_cnt = 0;
  int last_sub_cyc = -1;
  int out_gaps = 0;
  bit out_started = 0;
  bit in_done = 0;
  int blk_end_cyc [NB];

  initial begin
    checks = 0;
    failures = 0;
    finished = 1'b0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && in_valid) begin
    if (in_cnt % M == M - 1) blk_end_cyc[in_cnt / M] <= cyc;
    in_cnt <= in_cnt + 1;
  end

  always @(posedge clk) begin
    if (rst_n && sub_valid && sub_cnt < NB) begin
      real sa;
      sa = 0.0;
      for (int j = 0; j < M; j++) sa += (yref[sub_cnt][j] < 0 ? -yref[sub_cnt][j] : yref[sub_cnt][j]);
      for (int k = 0; k < M; k++) begin
        real err;
        err = real'(sub_vec[k]) - yref[sub_cnt][k];
        checks++;
        if (err > 8.0 + 8.0e-3 * sa / M || -err > 8.0 + 8.0e-3 * sa / M) begin
          failures++;
          if (failures < 10) $display("M=%0d K=%0d block %0d subband %0d: got %0d expected %f",
                                      M, K, sub_cnt, k, sub_vec[k], yref[sub_cnt][k]);
        end
      end
      checks++;
      if (cyc - blk_end_cyc[sub_cnt] != K + $clog2(M) + 4) begin
        failures++;
        $display("M=%0d K=%0d block %0d: subbands %0d cycles after its last sample, expected %0d",
                 M, K, sub_cnt, cyc - blk_end_cyc[sub_cnt], K + $clog2(M) + 4);
      end
      if (!GAPS && last_sub_cyc >= 0 && !in_done) begin
        checks++;
        if (cyc - last_sub_cyc != M) begin
          failures++;
          $display("M=%0d K=%0d subband rate: %0d cycles between blocks", M, K, cyc - last_sub_cyc);
        end
      end
      last_sub_cyc <= cyc;
      sub_cnt <= sub_cnt + 1;
    end
    if (rst_n && out_valid) begin
      real expv;
      int  src;
      out_started <= 1;
      src = out_cnt - (2 * K - 1) * M;
      expv = (src >= 0 && src < NB * M) ? xin[src] : 0.0;
      if (out_cnt < NB * M) begin
        checks++;
        if (real'(out_data) - expv > 8.0 || expv - real'(out_data) > 8.0) begin
          failures++;
          if (failures < 10) $display("M=%0d K=%0d output %0d: got %0d expected %f", M, K, out_cnt, out_data, expv);
        end
      end
      out_cnt <= out_cnt + 1;
    end else if (!GAPS && rst_n && out_started && !in_done) begin
      out_gaps++;
    end
  end

  initial begin
    process::self().srandom(SEED);
    for (int t = 0; t < NB * M; t++) xin[t] = real'(int'($urandom_range(40000, 0)) - 20000);
    build_reference();
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NB * M; t++) begin
      while (GAPS && $urandom_range(3, 0) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_data  <= sample_t'($rtoi(xin[t]));
      @(posedge clk);
    end
    in_valid <= 1'b0;
    in_done = 1;
    repeat (4 * M + 8) @(posedge clk);
    checks++;
    if (sub_cnt != NB) begin
      failures++;
      $display("M=%0d K=%0d: got %0d subband vectors, expected %0d", M, K, sub_cnt, NB);
    end
    checks++;
    if (out_cnt != NB * M) begin
      failures++;
      $display("M=%0d K=%0d: got %0d output samples, expected %0d", M, K, out_cnt, NB * M);
    end
    checks++;
    if (out_gaps != 0) begin
      failures++;
      $display("M=%0d K=%0d: output stream had %0d gaps", M, K, out_gaps);
    end
    $display("M=%0d K=%0d GAPS=%0d: %0d blocks, %0d checks, %0d failures", M, K, GAPS, NB, checks, failures);
    finished = 1'b1;
  end
endmodule
