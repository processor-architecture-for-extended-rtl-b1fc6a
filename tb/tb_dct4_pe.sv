// tb_dct4_pe: applies all five operation codes to random inputs and random
// coefficients and compares each output with the matrix products
// O1 = M2 A(d) R x, O2 = M2 A(d) x, O3 = M1 B(d1,d2) x, O4, O5 evaluated here
// from the matrices (not from the expanded formulas of the design).
module tb_dct4_pe;
  import elt_pkg::*;

  pe_op_e op;
  coef_t  c1, c2;
  data_t  x [4];
  data_t  y [4];
  int checks = 0;
  int failures = 0;

  dct4_pe dut (.op, .c1, .c2, .x, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef real mat_t [4][4];

  function automatic mat_t mul(input mat_t a, input mat_t b);
    mat_t r;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      r[i][j] = 0.0;
      for (int k = 0; k < 4; k++) r[i][j] += a[i][k] * b[k][j];
    end
    return r;
  endfunction

  initial begin
    mat_t m1, m2, rr, aa, bb, d4, d5, t;
    real d1, d2;
    m1 = '{'{1,1,0,0}, '{1,-1,0,0}, '{0,0,1,1}, '{0,0,1,-1}};
    m2 = '{'{1,0,1,0}, '{0,1,0,1}, '{1,0,-1,0}, '{0,1,0,-1}};
    rr = '{'{1,0,0,0}, '{0,1,0,0}, '{0,0,0,1}, '{0,0,1,0}};
    for (int it = 0; it < 500; it++) begin
      op = pe_op_e'(it % 5);
      c1 = coef_t'($urandom_range(32767, 0));
      c2 = coef_t'($urandom_range(65535, 0));
      for (int i = 0; i < 4; i++) x[i] = data_t'(int'($urandom_range(2000000, 0)) - 1000000);
      d1 = real'(c1) / 16384.0;
      d2 = real'(c2) / 16384.0;
      aa = '{'{1,0,0,1}, '{0,1,1,0}, '{0,0,d1,0}, '{0,0,0,d1}};
      bb = '{'{1,1,0,0}, '{0,d1,0,0}, '{0,0,1,1}, '{0,0,0,d2}};
      d4 = '{'{d1,0,0,0}, '{0,d2,0,0}, '{0,0,1,0}, '{0,0,0,1}};
      d5 = '{'{1,0,0,0}, '{0,1,0,0}, '{0,0,d1,0}, '{0,0,0,d2}};
      case (op)
        OP_O1:   t = mul(mul(m2, aa), rr);
        OP_O2:   t = mul(m2, aa);
        OP_O3:   t = mul(m1, bb);
        OP_O4:   t = d4;
        default: t = d5;
      endcase
      #1;
      for (int i = 0; i < 4; i++) begin
        real e;
        e = 0.0;
        for (int k = 0; k < 4; k++) e += t[i][k] * real'(x[k]);
        checks++;
        if (real'(y[i]) - e > 1.5 || e - real'(y[i]) > 1.5) begin
          failures++;
          $display("op %0d y[%0d]: got %0d expected %f", op, i, y[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
