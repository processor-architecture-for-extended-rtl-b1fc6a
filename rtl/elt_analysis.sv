// elt_analysis: analysis part of the ELT processor (serial input -> M subbands).
//
// Computes, for every block v_b of M consecutive input samples, the subband
// vector  y_b = C^IV I* Z1 D_0 Z2 D_1 ... Z2 D_{K-1} v_b,  the factorized
// polyphase matrix E(z)J of an M-band ELT with overlap factor K.
// Dataflow, all at the input sample rate:
//   di_unit      pairs sample m with sample M-1-m (M/2 pairs per block)
//   butterfly_pe D_{K-1} ... D_0, one pair per cycle, K units in a chain
//   bsr_delay    on the upper line after each butterfly: M words (Z2, two
//                blocks) between butterflies, M/2 words (Z1, one block) after
//                the last; they shift only when their butterfly delivers
//   decimator_bank  collects a block into a parallel vector, applies I*, I~
//   dct4_psn     constant-geometry DCT-IV on M/4 PEs and a shuffle network
// Interface: in_valid/in_data, one sample per cycle (gaps allowed). sub_valid
// pulses once per block with sub_vec[k] = subband k (unnormalized DCT-IV,
// i.e. sqrt(M/2) times the orthonormal value). sub_valid of a block is seen
// high at the (K+n+4)-th rising edge after the edge that takes the block's
// last sample (M = 2^n; 11 edges for M = 32, K = 2). The structure follows
// the architecture; widths, handshakes and the rotation angles are this
// design's choices.
module elt_analysis
  import elt_pkg::*;
#(
  parameter int unsigned M = 32,
  parameter int unsigned K = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    sub_valid,
  output data_t   sub_vec [M]
);
  localparam int unsigned IXW = $clog2(M/2);

  // pair stream at the input of butterfly j (index 0: output of the DI unit)
  // and at its output after the delay line
  logic           pv   [K+1];
  logic [IXW-1:0] pidx [K+1];
  data_t          pa   [K+1];
  data_t          pb   [K+1];

  di_unit #(.M(M)) u_di (
    .clk, .rst_n, .in_valid, .in_data(data_t'(in_data)),
    .out_valid(pv[0]), .out_idx(pidx[0]), .out_a(pa[0]), .out_b(pb[0])
  );

  for (genvar j = 0; j < K; j++) begin : g_stage
    logic           bv;
    logic [IXW-1:0] bidx;
    data_t          ba, bb;

    // stage j applies D_{K-1-j}
    butterfly_pe #(.M(M), .K(K), .KIDX(K - 1 - j)) u_bf (
      .clk, .rst_n,
      .in_valid(pv[j]), .in_idx(pidx[j]), .in_a(pa[j]), .in_b(pb[j]),
      .out_valid(bv), .out_idx(bidx), .out_a(ba), .out_b(bb)
    );

    // Z2 (z^-M words) between butterflies, Z1 (z^-M/2 words) after the last
    bsr_delay #(.LEN(j == K - 1 ? M / 2 : M)) u_bsr (
      .clk, .rst_n, .shift_en(bv), .din(ba), .dout(pa[j+1])
    );

    assign pv[j+1]   = bv;
    assign pidx[j+1] = bidx;
    assign pb[j+1]   = bb;
  end

  data_t dct_in [M];
  logic  dct_start;
  logic  dct_busy;

  decimator_bank #(.M(M)) u_dec (
    .clk, .rst_n,
    .in_valid(pv[K]), .in_idx(pidx[K]), .in_a(pa[K]), .in_b(pb[K]),
    .out_valid(dct_start), .out_vec(dct_in)
  );

  dct4_psn #(.M(M)) u_dct (
    .clk, .rst_n, .start(dct_start), .din(dct_in),
    .busy(dct_busy), .done(sub_valid), .dout(sub_vec)
  );

endmodule
