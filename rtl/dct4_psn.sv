// dct4_psn: constant-geometry DCT-IV on a perfect-shuffle network.
//
// Computes the unnormalized type-IV DCT  X_k = sum_j x_j cos(pi/M (j+1/2)(k+1/2))
// of an M-point vector whose odd-indexed inputs have already been negated (the
// sign change I~ is done at the end of the butterfly pipeline). A single column
// of M/4 four-point processor elements (dct4_pe) is used n+2 times (M = 2^n):
//   load : regs <= P1(din)                 P1 = (P_{M,2} R_M)^(n-2), wiring
//   s=0  : regs <= PE(regs)                operation O2, factor 2d_0^0
//   s=1..n-2 : regs <= PE(P^T_{M,2}(regs)) shuffle network, operation O1
//   s=n-1: regs <= PE(regs)                operation O3
//   s=n, n+1 : output scaling O4, O5       only when SCALE_OUT = 1
// The perfect shuffle sends PE-column output k to input 2k mod (M-1)
// (output M-1 stays M-1). After the last stage register r holds X[M-1-h_M(r)]
// (h = Hadamard order); the output port is wired back to natural order
// (the reordering J H^T is pure wiring).
//
// Interface: pulse start with din valid; busy is high while the engine runs;
// done pulses for one cycle when dout is valid; dout holds its value until the
// next start. done rises n+2 clock edges after the edge that takes start
// with SCALE_OUT = 1 (n without scaling), well below the M cycles between blocks. With
// SCALE_OUT = 0 output k is X_k / sin(pi/(2M)(h_M(r)+1/2)) for its register r.
// The schedule and the PE operations follow the algorithm; the register bank,
// the stage counter and the start/done handshake are this design's own.
module dct4_psn
  import elt_pkg::*;
#(
  parameter int unsigned M         = 32,
  parameter bit          SCALE_OUT = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  data_t din  [M],
  output logic  busy,
  output logic  done,
  output data_t dout [M]
);
  localparam int unsigned N    = $clog2(M);
  localparam int unsigned P    = M / 4;
  localparam int unsigned LAST = SCALE_OUT ? N + 1 : N - 1;
  localparam int unsigned SW   = $clog2(N + 2);

  data_t           regs  [M];
  data_t           pe_in [M];
  data_t           pe_out[M];
  logic [SW-1:0]   stage;
  pe_op_e          op;
  coef_t           c1 [P];
  coef_t           c2 [P];

  // Index maps of the three fixed wirings, computed once at elaboration.
  typedef int unsigned map_t [M];

  function automatic map_t mk_map(input int unsigned which);
    map_t t;
    for (int unsigned j = 0; j < M; j++)
      t[j] = which == 0 ? p1_src(M, j) : which == 1 ? shuf_src(M, j) : dct_out_src(M, j);
    return t;
  endfunction

  localparam map_t P1_MAP   = mk_map(0);
  localparam map_t SHUF_MAP = mk_map(1);
  localparam map_t OUT_MAP  = mk_map(2);

  dct4_rom #(.M(M)) u_rom (.stage(stage), .op(op), .c1(c1), .c2(c2));

  // Feedback through the perfect-shuffle network only for stages 1..n-2.
  always_comb begin
    for (int j = 0; j < M; j++)
      pe_in[j] = (stage != 0 && int'(stage) < N - 1) ? regs[SHUF_MAP[j]] : regs[j];
  end

  for (genvar p = 0; p < P; p++) begin : g_pe
    dct4_pe u_pe (
      .op(op), .c1(c1[p]), .c2(c2[p]),
      .x(pe_in[4*p +: 4]), .y(pe_out[4*p +: 4])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= '0;
      for (int j = 0; j < M; j++) regs[j] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        for (int j = 0; j < M; j++) regs[j] <= din[P1_MAP[j]];
        busy  <= 1'b1;
        stage <= '0;
      end else if (busy) begin
        regs <= pe_out;
        if (int'(stage) == LAST) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          stage <= stage + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int k = 0; k < M; k++) dout[k] = regs[OUT_MAP[k]];
  end

  // A new block must not arrive while the previous one is still in the column.
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) start |-> !busy;
  endproperty
  assert property (p_no_overrun);

  initial assert (M >= 8 && (1 << N) == M) else $error("M must be a power of two >= 8");

endmodule
