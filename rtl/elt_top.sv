// elt_top: ELT processor, analysis and synthesis parts.
//
// The analysis part turns a serial input stream into M subband signals (one
// vector per block of M samples); the synthesis part turns subband vectors
// back into a serial stream. Here the subbands of the analysis part feed the
// synthesis part directly and are also brought out, so that the pair forms an
// analysis/synthesis filter bank whose output reproduces the input, delayed
// by 2K-1 blocks of filter delay plus pipelining and output buffering (167
// cycles at M = 32, K = 2 with continuous input). Both parts run at the input
// sample rate: one sample per clock cycle in and out. The delay lines advance
// only when data flows, so the last 2K-1 blocks of a stream come out only
// after 2K-1 further blocks (zeros, for instance) have been fed in.
// Parameters: M subbands (power of two, >= 8), K overlap factor (filters of
// length 2KM). Reset rst_n is synchronous and active low.
module elt_top
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
  output data_t   sub_vec [M],
  output logic    out_valid,
  output sample_t out_data
);
  elt_analysis #(.M(M), .K(K)) u_ana (
    .clk, .rst_n, .in_valid, .in_data, .sub_valid, .sub_vec
  );

  elt_synthesis #(.M(M), .K(K)) u_syn (
    .clk, .rst_n, .sub_valid, .sub_vec, .out_valid, .out_data
  );

endmodule
