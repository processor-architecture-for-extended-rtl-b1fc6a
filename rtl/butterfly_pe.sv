// butterfly_pe: pipeline arithmetic unit for one butterfly matrix D_k.
//
// D_k = [-C_k, S_k J; J S_k, J C_k J] couples element m of a block with
// element M-1-m. For the pair (a, b) = (v_m, v_{M-1-m}) it produces
//   out_a = -cos(theta_m) * a + sin(theta_m) * b      (element m)
//   out_b =  sin(theta_m) * a + cos(theta_m) * b      (element M-1-m)
// One pair is processed per valid cycle, so the M/2 butterflies of a block take
// M/2 cycles, at the input sample rate. D_k is symmetric and its own inverse,
// so the same unit serves the analysis chain and the (transposed) synthesis
// chain. The coefficients come from a rot_rom addressed by the pair index.
//
// Interface: in_* carry one pair and its index m; out_* carry the result one
// clock later (registered), with the index passed along. Using four
// multipliers per butterfly and the rounding in elt_pkg::mulq are this
// design's choices; the text names only "butterfly" and "ROM".
module butterfly_pe
  import elt_pkg::*;
#(
  parameter int unsigned M    = 32,
  parameter int unsigned K    = 2,
  parameter int unsigned KIDX = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [$clog2(M/2)-1:0] in_idx,
  input  data_t                  in_a,
  input  data_t                  in_b,
  output logic                   out_valid,
  output logic [$clog2(M/2)-1:0] out_idx,
  output data_t                  out_a,
  output data_t                  out_b
);
  coef_t c, s;

  rot_rom #(.M(M), .K(K), .KIDX(KIDX)) u_rom (.addr(in_idx), .cos_o(c), .sin_o(s));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_a     <= '0;
      out_b     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx <= in_idx;
        out_a   <= mulq(in_b, s) - mulq(in_a, c);
        out_b   <= mulq(in_a, s) + mulq(in_b, c);
      end
    end
  end

endmodule
