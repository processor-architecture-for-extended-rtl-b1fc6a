// di_unit: delay-invert (DI) unit with its input switch S.
//
// The butterflies of the ELT combine sample m of a block with sample M-1-m.
// With one sample arriving per cycle, the DI unit brings these pairs together
// in time: during the first M/2 valid cycles of a block the switch S steers the
// samples x_0..x_{M/2-1} into a chain of M/2 shift registers; during the next
// M/2 valid cycles a one-hot selector bit walks along the chain and reads the
// stored samples back newest first (output I1: x_{M/2-1}, ..., x_0) while the
// switch passes the live samples straight through (output I2: x_{M/2}, ...,
// x_{M-1}). Each such cycle yields the pair (x_m, x_{M-1-m}), m = M/2-1 .. 0.
//
// Interface: in_valid/in_data carry the serial input (a block is M consecutive
// valid samples, counted from reset). out_valid/out_idx/out_a/out_b give the
// pair combinationally in the same cycle as its second sample (out_a = I1 =
// x_m, out_b = I2 = x_{M-1-m}, out_idx = m). The structure (shift registers,
// walking one-bit selector, switch) follows Fig. 3a of the architecture; the
// sideband index and the block counter are this design's additions.
module di_unit
  import elt_pkg::*;
#(
  parameter int unsigned M = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  data_t                        in_data,
  output logic                         out_valid,
  output logic [$clog2(M/2)-1:0]       out_idx,
  output data_t                        out_a,
  output data_t                        out_b
);
  localparam int unsigned H = M / 2;

  data_t                 sr [H];
  logic [H-1:0]          sel;      // walking one-bit selector
  logic [$clog2(M)-1:0]  pos;      // position of the sample within its block
  logic                  second;   // switch S position: second half of the block

  assign second = pos[$clog2(M)-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos <= '0;
      sel <= H'(1);
      for (int i = 0; i < H; i++) sr[i] <= '0;
    end else if (in_valid) begin
      pos <= pos + 1'b1;
      if (!second) begin
        sr[0] <= in_data;
        for (int i = 1; i < H; i++) sr[i] <= sr[i-1];
        sel <= H'(1);
      end else begin
        sel <= {sel[H-2:0], sel[H-1]};   // rotates back to bit 0 at block end
      end
    end
  end

  // I1: AND-OR read of the register picked by the selector bit.
  always_comb begin
    out_a = '0;
    for (int i = 0; i < H; i++) if (sel[i]) out_a = out_a | sr[i];
  end

  assign out_b     = in_data;
  assign out_valid = in_valid && second;
  assign out_idx   = $clog2(M/2)'(H - 1) - pos[$clog2(M/2)-1:0];

  property p_onehot;
    @(posedge clk) disable iff (!rst_n) $onehot(sel);
  endproperty
  assert property (p_onehot);

endmodule
