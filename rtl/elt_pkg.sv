// elt_pkg: shared types, constants and constant functions of the ELT processor.
//
// The ELT (extended lapped transform) processor computes an M-band paraunitary
// filter bank as a chain of K butterfly stages (matrices D_k, delays Z_i) followed
// by a type-IV DCT. This package holds what several blocks need:
//  * the fixed-point formats: samples enter as DW-bit integers and are carried
//    internally as IW-bit two's complement integers; every coefficient is a
//    CW-bit signed number with CF fraction bits (range [-2,2), enough for the
//    DCT factors 2d < 2 and for cos/sin of the rotation angles);
//  * the operation codes of the DCT-IV processor element (codes 000..100 as
//    in the architecture description, operations O1..O5);
//  * the index arithmetic of the constant-geometry DCT-IV: Hadamard reordering
//    h_k(t), the input reordering P1, the perfect shuffle, and the coefficients.
// The word widths and the rounding are this design's own choices; the operation
// codes, the coefficient definitions and the permutations follow the algorithm.
package elt_pkg;

  localparam int unsigned DW = 16;   // input / output sample width
  localparam int unsigned IW = 32;   // internal data width
  localparam int unsigned CW = 16;   // coefficient width
  localparam int unsigned CF = 14;   // coefficient fraction bits

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [IW-1:0] data_t;
  typedef logic signed [CW-1:0] coef_t;

  // Operation codes of the 4-input DCT-IV processor element.
  typedef enum logic [2:0] {
    OP_O1 = 3'b000,   // M2 * A(d) * R * x
    OP_O2 = 3'b001,   // M2 * A(d) * x
    OP_O3 = 3'b010,   // M1 * B(d1,d2) * x
    OP_O4 = 3'b011,   // diag(d1, d2, 1, 1) * x
    OP_O5 = 3'b100    // diag(1, 1, d1, d2) * x
  } pe_op_e;

  localparam real PI = 3.14159265358979323846;

  // Round a real coefficient to the CW.CF format.
  function automatic coef_t to_coef(input real r);
    real s;
    s = r * real'(1 << CF);
    return coef_t'(s >= 0.0 ? $rtoi(s + 0.5) : -$rtoi(-s + 0.5));
  endfunction

  // data * coef with round-half-up, result in IW bits.
  function automatic data_t mulq(input data_t d, input coef_t c);
    logic signed [IW+CW-1:0] p;
    p = d * c;
    p = p + (IW+CW)'(1 << (CF-1));
    return data_t'(p >>> CF);
  endfunction

  // Hadamard reordering: h_1(0)=0, h_{2k}(2t)=h_k(t), h_{2k}(2t+1)=2k-1-h_k(t).
  function automatic int unsigned hada(input int unsigned k, input int unsigned t);
    int unsigned h, kk;
    int lg;
    h  = 0;
    lg = int'(lg2(k));
    for (int j = lg - 1; j >= 0; j--) begin
      kk = 1 << (lg - j);
      h  = ((t >> j) & 1) != 0 ? kk - 1 - h : h;
    end
    return h;
  endfunction

  // d_i^t = cos[(h_{2^i}(t) + 1/2) * pi / 2^(i+1)]
  function automatic real dcoef(input int unsigned i, input int unsigned t);
    return $cos((real'(hada(1 << i, t)) + 0.5) * PI / real'(2 << i));
  endfunction

  // Source index of the unshuffle P_{M,2}: y[j] = x[unsh_src(j)].
  function automatic int unsigned unsh_src(input int unsigned m, input int unsigned j);
    return j < m / 2 ? 2 * j : 2 * (j - m / 2) + 1;
  endfunction

  // Source index of the perfect shuffle P^T_{M,2}: y[j] = x[shuf_src(j)].
  function automatic int unsigned shuf_src(input int unsigned m, input int unsigned j);
    return (j % 2) == 0 ? j / 2 : m / 2 + j / 2;
  endfunction

  // Source index of R_M (swap of elements 2 and 3 in every group of four).
  function automatic int unsigned r_src(input int unsigned j);
    return (j & 2) != 0 ? j ^ 1 : j;
  endfunction

  // log2 of a power of two, as a plain loop.
  function automatic int unsigned lg2(input int unsigned m);
    int unsigned l;
    l = 0;
    while ((1 << l) < m) l++;
    return l;
  endfunction

  // Source index of P1 = (P_{M,2} R_M)^(n-2): y[j] = x[p1_src(j)].
  function automatic int unsigned p1_src(input int unsigned m, input int unsigned j);
    int unsigned s;
    s = j;
    for (int unsigned i = 0; i + 2 < lg2(m); i++) s = r_src(unsh_src(m, s));
    return s;
  endfunction

  // Register of the finished DCT-IV that holds natural output index k:
  // register r holds X[M-1-h_M(r)].
  function automatic int unsigned dct_out_src(input int unsigned m, input int unsigned k);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < m; i++) if (m - 1 - hada(m, i) == k) r = i;
    return r;
  endfunction

  // Rotation angle theta_{m,k} of butterfly matrix D_k (free design parameter
  // of the ELT; this default set is this design's own choice).
  function automatic real theta(input int unsigned m, input int unsigned k,
                                input int unsigned bands, input int unsigned kk);
    return PI * (real'(2 * m + 1) / real'(4 * bands) + real'(k + 1) / real'(4 * kk + 4));
  endfunction

endpackage
