// dct4_pe: 4-input, 4-output processor element of the constant-geometry DCT-IV.
//
// The element has two multipliers and a set of adders and switches; the
// operation code selects how the intermediate results are exchanged:
//   O1 (000): M2 * A(d) * R * x      O2 (001): M2 * A(d) * x
//   O3 (010): M1 * B(d1,d2) * x      O4 (011): diag(d1,d2,1,1) * x
//   O5 (100): diag(1,1,d1,d2) * x
// with A(d) = [1 0 0 1; 0 1 1 0; 0 0 d 0; 0 0 0 d], B = [1 1 0 0; 0 d1 0 0;
// 0 0 1 1; 0 0 0 d2], R swapping x3 and x4, M1 = I2 (x) F2, M2 = F2 (x) I2,
// F2 = [1 1; 1 -1]. O1 and O2 use d1 as d. Written out (x1..x4 = x[0..3]):
//   O1: (x1+x3+d*x4, x2+x4+d*x3, x1+x3-d*x4, x2+x4-d*x3)
//   O2: (x1+x4+d*x3, x2+x3+d*x4, x1+x4-d*x3, x2+x3-d*x4)
//   O3: (x1+x2+d1*x2, x1+x2-d1*x2, x3+x4+d2*x4, x3+x4-d2*x4)
// The block is combinational; the DCT-IV engine registers its outputs. The
// operations and their codes follow the architecture description.
module dct4_pe
  import elt_pkg::*;
(
  input  pe_op_e op,
  input  coef_t  c1,
  input  coef_t  c2,
  input  data_t  x [4],
  output data_t  y [4]
);
  data_t p, q;      // outputs of the two multipliers
  data_t s0, s1;    // pre-additions

  always_comb begin
    // multiplier operand selection
    unique case (op)
      OP_O1:   begin p = mulq(x[3], c1); q = mulq(x[2], c1); end
      OP_O2:   begin p = mulq(x[2], c1); q = mulq(x[3], c1); end
      OP_O3:   begin p = mulq(x[1], c1); q = mulq(x[3], c2); end
      OP_O4:   begin p = mulq(x[0], c1); q = mulq(x[1], c2); end
      default: begin p = mulq(x[2], c1); q = mulq(x[3], c2); end
    endcase
    s0 = '0;
    s1 = '0;
    y  = x;
    unique case (op)
      OP_O1: begin
        s0 = x[0] + x[2]; s1 = x[1] + x[3];
        y[0] = s0 + p; y[1] = s1 + q; y[2] = s0 - p; y[3] = s1 - q;
      end
      OP_O2: begin
        s0 = x[0] + x[3]; s1 = x[1] + x[2];
        y[0] = s0 + p; y[1] = s1 + q; y[2] = s0 - p; y[3] = s1 - q;
      end
      OP_O3: begin
        s0 = x[0] + x[1]; s1 = x[2] + x[3];
        y[0] = s0 + p; y[1] = s0 - p; y[2] = s1 + q; y[3] = s1 - q;
      end
      OP_O4: begin
        y[0] = p; y[1] = q;
      end
      default: begin   // O5
        y[2] = p; y[3] = q;
      end
    endcase
  end

endmodule
