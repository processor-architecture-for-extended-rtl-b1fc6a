// interpolator_bank: up-samplers between the synthesis DCT-IV and the
// synthesis butterflies.
//
// Takes the parallel M-vector c of the synthesis DCT-IV, multiplies it by 2/M
// (the DCT-IV applied twice gives M/2 times the identity; M is a power of two
// so this is a rounded arithmetic shift by log2(M)-1), applies the half
// exchange I* (w_m = c_{m+M/2}, w_{M/2+m} = c_m) and sends the vector out as
// M/2 pairs (w_m, w_{M-1-m}), m = M/2-1 .. 0, on M/2 consecutive cycles. This
// is the parallel-to-serial (up-sampling by M) step of the synthesis
// polyphase structure, written in the pair format of the butterflies.
// Interface: in_valid loads in_vec (must not come while a block is still
// being sent, asserted); out_* as for butterfly_pe inputs. The 2/M scaling and
// the handshake are this design's choices.
module interpolator_bank
  import elt_pkg::*;
#(
  parameter int unsigned M = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  data_t                  in_vec [M],
  output logic                   out_valid,
  output logic [$clog2(M/2)-1:0] out_idx,
  output data_t                  out_a,
  output data_t                  out_b
);
  localparam int unsigned H  = M / 2;
  localparam int unsigned SH = $clog2(M) - 1;

  data_t                   w [M];
  logic                    active;
  logic [$clog2(H)-1:0]    idx;

  function automatic data_t scale(input data_t v);
    return data_t'((v + data_t'(1 << (SH - 1))) >>> SH);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      idx    <= '0;
      for (int j = 0; j < M; j++) w[j] <= '0;
    end else if (in_valid) begin
      for (int j = 0; j < M; j++) w[j] <= scale(in_vec[(j + H) % M]);
      active <= 1'b1;
      idx    <= ($clog2(H))'(H - 1);
    end else if (active) begin
      if (idx == '0) active <= 1'b0;
      idx <= idx - 1'b1;
    end
  end

  assign out_valid = active;
  assign out_idx   = idx;
  assign out_a     = w[int'(idx)];
  assign out_b     = w[M - 1 - int'(idx)];

  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) in_valid |-> !active;
  endproperty
  assert property (p_no_overrun);

endmodule
