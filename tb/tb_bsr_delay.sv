// tb_bsr_delay: checks that the block of shift registers returns, on every
// enabled cycle, the word that entered LEN enabled cycles earlier (zero
// before that), and that it holds still when shift_en is low.
module tb_bsr_delay;
  import elt_pkg::*;

  localparam int LEN = 16;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  en = 1'b0;
  data_t din = '0;
  data_t dout;
  int    checks = 0;
  int    failures = 0;
  data_t hist [$];

  bsr_delay #(.LEN(LEN)) dut (.clk, .rst_n, .shift_en(en), .din, .dout);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      en  <= ($urandom_range(2, 0) != 0);
      din <= data_t'($urandom);
      #1;
      if (en) begin
        data_t expv;
        expv = hist.size() >= LEN ? hist[hist.size() - LEN] : '0;
        checks++;
        if (dout !== expv) begin
          failures++;
          $display("shift %0d: got %0d expected %0d", hist.size(), dout, expv);
        end
        hist.push_back(din);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
