// dct4_rom: operation and coefficient table of the constant-geometry DCT-IV.
//
// For M = 2^n the DCT-IV takes n stages of the PE column, plus two optional
// output-scaling stages. The table gives, per stage, the PE operation and the
// two coefficients of each of the M/4 processor elements p:
//   stage 0        : O2, 2*d_0^0 (= sqrt 2)
//   stage i=1..n-2 : O1, 2*d_i^k with k = p mod 2^i (preceded by a shuffle)
//   stage n-1      : O3, 2*d_{n-1}^{2p}, 2*d_{n-1}^{2p+1}
//   stage n        : O4, s(4p), s(4p+1)
//   stage n+1      : O5, s(4p+2), s(4p+3)
// where d_i^t = cos[(h_{2^i}(t)+1/2) pi / 2^{i+1}] and
// s(r) = sin[pi/(2M) (h_M(r)+1/2)] is the output normalization D*. Stages n
// and n+1 are the optional operations that turn the scaled outputs into true
// DCT-IV values. The schedule and the coefficients follow the algorithm
// listing; the stage-1..n-2 operation is O1 (with the R exchange) as in the
// matrix factorization B_{n-i}.
// Interface: combinational lookup from the stage number.
module dct4_rom
  import elt_pkg::*;
#(
  parameter int unsigned M = 32
) (
  input  logic [$clog2($clog2(M)+2)-1:0] stage,
  output pe_op_e                         op,
  output coef_t                          c1 [M/4],
  output coef_t                          c2 [M/4]
);
  localparam int unsigned N  = $clog2(M);
  localparam int unsigned NS = N + 2;
  localparam int unsigned P  = M / 4;

  typedef coef_t tab_t [NS*P];   // entry (stage, p) at stage*P + p

  function automatic real sfac(input int unsigned r);
    return $sin(PI / real'(2 * M) * (real'(hada(M, r)) + 0.5));
  endfunction

  function automatic tab_t mk(input bit second);
    tab_t t;
    for (int unsigned p = 0; p < P; p++) begin
      t[p] = to_coef(2.0 * dcoef(0, 0));
      for (int unsigned i = 1; i + 1 < N; i++)
        t[i*P+p] = to_coef(2.0 * dcoef(i, p % (1 << i)));
      t[(N-1)*P+p] = to_coef(2.0 * dcoef(N - 1, 2 * p + (second ? 1 : 0)));
      t[N*P+p]     = to_coef(sfac(4 * p + (second ? 1 : 0)));
      t[(N+1)*P+p] = to_coef(sfac(4 * p + 2 + (second ? 1 : 0)));
    end
    return t;
  endfunction

  localparam tab_t T1 = mk(1'b0);
  localparam tab_t T2 = mk(1'b1);

  always_comb begin
    if (stage == 0)                op = OP_O2;
    else if (int'(stage) < N - 1)  op = OP_O1;
    else if (int'(stage) == N - 1) op = OP_O3;
    else if (int'(stage) == N)     op = OP_O4;
    else                           op = OP_O5;
    for (int p = 0; p < P; p++) begin
      c1[p] = int'(stage) < NS ? T1[int'(stage)*P+p] : '0;
      c2[p] = int'(stage) < NS ? T2[int'(stage)*P+p] : '0;
    end
  end

endmodule
