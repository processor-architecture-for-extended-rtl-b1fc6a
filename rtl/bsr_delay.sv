// bsr_delay: block of shift registers (BSR) realizing the block delays Z_i.
//
// In the serial architecture each block of M samples occupies M cycles, but a
// butterfly line carries data only during the M/2 cycles in which its PE is
// loaded. The delay z^{-i} of a whole block on the upper half of the vector is
// therefore a shift register of LEN = i*M/2 words that shifts only on those
// cycles: LEN = M gives z^{-2} (the z^-M box), LEN = M/2 gives z^{-1} (the
// z^-M/2 box).
//
// Interface: when shift_en is high, dout presents (combinationally) the word
// that entered LEN shifts earlier, and din is taken in at the clock edge. No
// latency is added to the line. Registers reset to zero, which gives the zero
// initial state of the filter bank.
module bsr_delay
  import elt_pkg::*;
#(
  parameter int unsigned LEN = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  shift_en,
  input  data_t din,
  output data_t dout
);
  data_t sr [LEN];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) sr[i] <= '0;
    end else if (shift_en) begin
      sr[0] <= din;
      for (int i = 1; i < LEN; i++) sr[i] <= sr[i-1];
    end
  end

  assign dout = sr[LEN-1];

endmodule
