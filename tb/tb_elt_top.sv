// tb_elt_top: end-to-end test of the ELT processor at its default size.
//
// Streams NB blocks of random samples (one per cycle, with one stretch of
// idle cycles) into elt_top and checks:
//  * every subband vector against a real-arithmetic model of
//    y_b = C^IV I* Z1 D_0 Z2 D_1 ... Z2 D_{K-1} v_b, with the rotation angles
//    theta_{m,k} = pi((2m+1)/(4M) + (k+1)/(4K+4)) evaluated here directly;
//  * every output sample against the input delayed by (2K-1) blocks
//    (analysis followed by synthesis must reconstruct the input);
//  * the rates: one subband vector per block, and a gap-free output stream
//    once it has started while the input is continuous.
// It also counts how often each mechanism of the design fires (pair forming
// in the DI unit, each butterfly, each delay line, every PE operation code,
// the shuffle feedback, block collection, up-sampling, both output buffers),
// through monitors bound into the design's modules, and counts a failure for
// any that never did.
module tb_elt_top;
  import elt_pkg::*;

  localparam int M  = 32;
  localparam int K  = 2;
  localparam int NB = 24;
  localparam int H  = M / 2;
  localparam real PI_TB = 3.14159265358979323846;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    in_valid = 1'b0;
  sample_t in_data = '0;
  logic    sub_valid;
  data_t   sub_vec [M];
  logic    out_valid;
  sample_t out_data;

  int checks = 0;
  int failures = 0;

  elt_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #((NB * M + 2000) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus and reference model ----------------
  real   xin   [NB*M];
  real   yref  [NB][M];
  real   hist  [K][NB][H];   // upper halves after each butterfly stage

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

  // ---------------- subband and output checkers ----------------
  int sub_cnt = 0;
  int out_cnt = 0;
  int last_sub_cyc = -1;
  int cyc = 0;
  int out_gaps = 0;
  bit out_started = 0;
  bit in_done = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // cycle at which the last sample of each block is taken, and the cycle at
  // which each output sample appears
  int blk_end_cyc [NB];
  int in_cnt = 0;
  int in_cyc [NB*M];
  int lat_out = -1;
  int lat_sub = -1;

  always @(posedge clk) if (rst_n && in_valid) begin
    in_cyc[in_cnt] <= cyc;
    if (in_cnt % M == M - 1) blk_end_cyc[in_cnt / M] <= cyc;
    in_cnt <= in_cnt + 1;
  end

  always @(posedge clk) begin
    if (rst_n && sub_valid) begin
      if (sub_cnt < NB) begin
        for (int k = 0; k < M; k++) begin
          real sa, err;
          sa = 0.0;
          for (int j = 0; j < M; j++) sa += (yref[sub_cnt][j] < 0 ? -yref[sub_cnt][j] : yref[sub_cnt][j]);
          err = real'(sub_vec[k]) - yref[sub_cnt][k];
          checks++;
          if (err > 8.0 + 2.0e-3 * sa / M * 4 || -err > 8.0 + 2.0e-3 * sa / M * 4) begin
            failures++;
            if (failures < 20) $display("block %0d subband %0d: got %0d expected %f", sub_cnt, k, sub_vec[k], yref[sub_cnt][k]);
          end
        end
      end
      if (sub_cnt < NB) begin
        checks++;
        if (lat_sub < 0) lat_sub = cyc - blk_end_cyc[sub_cnt];
        if (cyc - blk_end_cyc[sub_cnt] != K + $clog2(M) + 4) begin
          failures++;
          $display("block %0d: subbands %0d cycles after its last sample, expected %0d",
                   sub_cnt, cyc - blk_end_cyc[sub_cnt], K + $clog2(M) + 4);
        end
      end
      if (last_sub_cyc >= 0 && !in_done && sub_cnt > 2 && sub_cnt < 14) begin
        checks++;
        if (cyc - last_sub_cyc != M) begin
          failures++;
          $display("subband rate: %0d cycles between blocks", cyc - last_sub_cyc);
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
      if (src >= 0 && src < 12 * M) begin
        // constant delay from input sample to reconstructed sample (blocks
        // without input gaps only)
        checks++;
        if (lat_out < 0) lat_out = cyc - in_cyc[src];
        else if (cyc - in_cyc[src] != lat_out) begin
          failures++;
          $display("output %0d: delay %0d cycles, earlier %0d", out_cnt, cyc - in_cyc[src], lat_out);
        end
      end
      if (out_cnt < NB * M) begin
        checks++;
        if (real'(out_data) - expv > 8.0 || expv - real'(out_data) > 8.0) begin
          failures++;
          if (failures < 20) $display("output %0d: got %0d expected %f", out_cnt, out_data, expv);
        end
      end
      out_cnt <= out_cnt + 1;
    end else if (rst_n && out_started && out_cnt > 2 * M && out_cnt < 12 * M) begin
      out_gaps++;
    end
  end

  // ---------------- mechanism counters ----------------
  // Monitors bound into the design's modules count events by name.
  bind di_unit           tb_elt_mon     #(.NAME("DI pairs formed"))  m_di  (.clk(clk), .rst_n(rst_n), .ev(out_valid));
  bind butterfly_pe      tb_elt_mon_bf  #(.KIDX(KIDX))               m_bf  (.clk(clk), .rst_n(rst_n), .ev(out_valid));
  bind bsr_delay         tb_elt_mon_bsr #(.LEN(LEN))                 m_bsr (.clk(clk), .rst_n(rst_n), .ev(shift_en));
  bind dct4_psn          tb_elt_mon_dct #(.M(M))                     m_dct (.clk(clk), .rst_n(rst_n), .busy(busy), .op(op), .stage(stage));
  bind decimator_bank    tb_elt_mon     #(.NAME("blocks decimated")) m_dec (.clk(clk), .rst_n(rst_n), .ev(out_valid));
  bind interpolator_bank tb_elt_mon     #(.NAME("pairs up-sampled")) m_int (.clk(clk), .rst_n(rst_n), .ev(out_valid));
  bind di_out            tb_elt_mon_out                              m_out (.clk(clk), .rst_n(rst_n), .rd(rd), .rsel(rsel));

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < NB * M; t++) xin[t] = real'(int'($urandom_range(40000, 0)) - 20000);
    for (int t = 0; t < M; t++) xin[t] = (t == 5) ? 10000.0 : 0.0;   // impulse in block 0
    build_reference();
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NB * M; t++) begin
      if (t == 16 * M + 7) begin
        in_valid <= 1'b0;                      // idle stretch inside a block
        repeat (5) @(posedge clk);
      end
      in_valid <= 1'b1;
      in_data  <= sample_t'($rtoi(xin[t]));
      @(posedge clk);
    end
    in_valid <= 1'b0;
    in_done = 1;
    repeat (4 * M) @(posedge clk);
    // every input block yields one output block (the first 2K-1 are zero)
    checks++;
    if (sub_cnt != NB) begin
      failures++;
      $display("got %0d subband vectors, expected %0d", sub_cnt, NB);
    end
    checks++;
    if (out_cnt != NB * M) begin
      failures++;
      $display("got %0d output samples, expected %0d", out_cnt, NB * M);
    end
    checks++;
    if (out_gaps != 0) begin
      failures++;
      $display("output stream had %0d gaps", out_gaps);
    end
    $display("subband latency %0d cycles after the last sample of a block; input-to-output delay %0d cycles", lat_sub, lat_out);
    $display("mechanisms:");
    need("DI pairs formed", tb_elt_mon_pkg::get("DI pairs formed"));
    need("butterfly D0 operations", tb_elt_mon_pkg::get("butterfly D0 operations"));
    need("butterfly D1 operations", tb_elt_mon_pkg::get("butterfly D1 operations"));
    need("32-word delay shifts", tb_elt_mon_pkg::get("32-word delay shifts"));
    need("16-word delay shifts", tb_elt_mon_pkg::get("16-word delay shifts"));
    need("PE operation O1", tb_elt_mon_pkg::get("PE operation O1"));
    need("PE operation O2", tb_elt_mon_pkg::get("PE operation O2"));
    need("PE operation O3", tb_elt_mon_pkg::get("PE operation O3"));
    need("PE operation O4", tb_elt_mon_pkg::get("PE operation O4"));
    need("PE operation O5", tb_elt_mon_pkg::get("PE operation O5"));
    need("perfect-shuffle feedback", tb_elt_mon_pkg::get("perfect-shuffle feedback"));
    need("blocks decimated", tb_elt_mon_pkg::get("blocks decimated"));
    need("pairs up-sampled", tb_elt_mon_pkg::get("pairs up-sampled"));
    need("output buffer 0 reads", tb_elt_mon_pkg::get("output buffer 0 reads"));
    need("output buffer 1 reads", tb_elt_mon_pkg::get("output buffer 1 reads"));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
