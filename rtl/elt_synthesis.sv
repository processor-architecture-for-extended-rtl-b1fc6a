// elt_synthesis: synthesis part of the ELT processor (M subbands -> serial output).
//
// The transpose of the analysis structure. For every subband vector y_b it
// computes  x_b = D_{K-1} Z2' ... D_1 Z2' D_0 Z1' I* (2/M) C^IV y_b  and sends
// the M samples of x_b out serially, where Z_i' delays the lower half of the
// vector by i blocks. The D_k are symmetric and self-inverse, and the DCT-IV
// is its own inverse up to the factor M/2, so analysis followed by synthesis
// gives the input back, delayed by 2K-1 blocks (the paraunitary property).
// Dataflow:
//   sign change I~ then dct4_psn   (DCT-IV of the subbands)
//   interpolator_bank              2/M scaling, I*, parallel -> M/2 pairs
//   bsr_delay on the lower line    M/2 words (Z1') before D_0, M words (Z2')
//                                  before each further butterfly
//   butterfly_pe                   D_0, D_1, ..., D_{K-1}
//   di_out                         output delay-invert and switch S
// Interface: sub_valid/sub_vec take one subband vector per block (at most one
// every M cycles); out_valid/out_data give the output stream, one sample per
// cycle. The structure mirrors the analysis part as the architecture states
// ("the transpose structure is used"); the details of the mirror (same DCT-IV
// engine, pair order, 2/M scaling, double-buffered output) are this design's.
module elt_synthesis
  import elt_pkg::*;
#(
  parameter int unsigned M = 32,
  parameter int unsigned K = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sub_valid,
  input  data_t   sub_vec [M],
  output logic    out_valid,
  output sample_t out_data
);
  localparam int unsigned IXW = $clog2(M/2);

  data_t dct_in  [M];
  data_t dct_out [M];
  logic  dct_busy, dct_done;

  always_comb begin
    for (int j = 0; j < M; j++) dct_in[j] = (j % 2) == 1 ? -sub_vec[j] : sub_vec[j];
  end

  dct4_psn #(.M(M)) u_dct (
    .clk, .rst_n, .start(sub_valid), .din(dct_in),
    .busy(dct_busy), .done(dct_done), .dout(dct_out)
  );

  logic           pv   [K+1];
  logic [IXW-1:0] pidx [K+1];
  data_t          pa   [K+1];
  data_t          pb   [K+1];

  interpolator_bank #(.M(M)) u_int (
    .clk, .rst_n, .in_valid(dct_done), .in_vec(dct_out),
    .out_valid(pv[0]), .out_idx(pidx[0]), .out_a(pa[0]), .out_b(pb[0])
  );

  for (genvar j = 0; j < K; j++) begin : g_stage
    data_t bdel;

    // Z1' (z^-M/2 words) before D_0, Z2' (z^-M words) before the others
    bsr_delay #(.LEN(j == 0 ? M / 2 : M)) u_bsr (
      .clk, .rst_n, .shift_en(pv[j]), .din(pb[j]), .dout(bdel)
    );

    butterfly_pe #(.M(M), .K(K), .KIDX(j)) u_bf (
      .clk, .rst_n,
      .in_valid(pv[j]), .in_idx(pidx[j]), .in_a(pa[j]), .in_b(bdel),
      .out_valid(pv[j+1]), .out_idx(pidx[j+1]), .out_a(pa[j+1]), .out_b(pb[j+1])
    );
  end

  di_out #(.M(M)) u_out (
    .clk, .rst_n,
    .in_valid(pv[K]), .in_idx(pidx[K]), .in_a(pa[K]), .in_b(pb[K]),
    .out_valid, .out_data
  );

endmodule
