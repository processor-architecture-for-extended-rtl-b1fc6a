// decimator_bank: down-samplers between the butterfly pipeline and the DCT-IV.
//
// The butterfly pipeline delivers a block as M/2 pairs (u_m, u_{M-1-m}),
// m = M/2-1 .. 0, one pair per valid cycle. This bank gathers them into the
// parallel M-vector needed by the DCT-IV, i.e. it performs the decimation by M
// of the polyphase structure. On the way it applies two fixed matrices:
//   I*  (exchange of the upper and lower halves): u_m -> w_{m+M/2},
//       u_{M-1-m} -> w_{M/2-1-m};
//   I~  (sign change (-1)^j of element j), which the DCT-IV factorization
//       places at the end of the pipelined stage.
// Interface: in_* as produced by butterfly_pe/bsr_delay. When the pair with
// index 0 has been stored, out_valid pulses for one cycle and out_vec holds
// the complete vector until the next block overwrites it (M/2 cycles later).
// The handshake is this design's own; the matrices follow the factorization.
module decimator_bank
  import elt_pkg::*;
#(
  parameter int unsigned M = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [$clog2(M/2)-1:0] in_idx,
  input  data_t                  in_a,
  input  data_t                  in_b,
  output logic                   out_valid,
  output data_t                  out_vec [M]
);
  localparam int unsigned H = M / 2;

  function automatic data_t sgn(input data_t v, input int unsigned j);
    return (j % 2) == 1 ? -v : v;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int j = 0; j < M; j++) out_vec[j] <= '0;
    end else begin
      out_valid <= in_valid && in_idx == '0;
      if (in_valid) begin
        for (int unsigned m = 0; m < H; m++) begin
          if (in_idx == ($clog2(M/2))'(m)) begin
            out_vec[m + H]     <= sgn(in_a, m + H);
            out_vec[H - 1 - m] <= sgn(in_b, H - 1 - m);
          end
        end
      end
    end
  end

endmodule
