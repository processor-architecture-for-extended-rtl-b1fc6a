// tb_rot_rom: reads every entry of the rotation ROMs of both stages (M = 32,
// K = 2) and compares with cos/sin of theta_{m,k} = pi((2m+1)/(4M) +
// (k+1)/(4K+4)) computed here, to within one coefficient LSB.
module tb_rot_rom;
  import elt_pkg::*;

  localparam int M = 32;
  localparam int K = 2;
  localparam real PI_TB = 3.14159265358979323846;

  logic [3:0] addr = '0;
  coef_t c0, s0, c1, s1;
  int checks = 0;
  int failures = 0;

  rot_rom #(.M(M), .K(K), .KIDX(0)) r0 (.addr, .cos_o(c0), .sin_o(s0));
  rot_rom #(.M(M), .K(K), .KIDX(1)) r1 (.addr, .cos_o(c1), .sin_o(s1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input coef_t got, input real expv, input string what, input int m);
    real g;
    g = real'(got) / 16384.0;
    checks++;
    if (g - expv > 1.0 / 16384.0 || expv - g > 1.0 / 16384.0) begin
      failures++;
      $display("%s[%0d]: got %f expected %f", what, m, g, expv);
    end
  endtask

  initial begin
    for (int m = 0; m < M / 2; m++) begin
      real t0, t1;
      addr = 4'(m);
      #1;
      t0 = PI_TB * (real'(2 * m + 1) / real'(4 * M) + 1.0 / real'(4 * K + 4));
      t1 = PI_TB * (real'(2 * m + 1) / real'(4 * M) + 2.0 / real'(4 * K + 4));
      cmp(c0, $cos(t0), "cos0", m);
      cmp(s0, $sin(t0), "sin0", m);
      cmp(c1, $cos(t1), "cos1", m);
      cmp(s1, $sin(t1), "sin1", m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
