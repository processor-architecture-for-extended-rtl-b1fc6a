// di_out: output delay-invert unit and output switch S of the synthesis part.
//
// The last synthesis butterfly produces a block as pairs (x_m, x_{M-1-m}),
// m = M/2-1 .. 0. The lower-half samples thus arrive in reverse order and
// must be inverted, and the upper-half samples must wait until the lower half
// has been sent. Each pair is written to a block buffer at addresses m and
// M-1-m; once a block is complete, the switch reads the buffer out as the
// serial stream x_0, x_1, ..., x_{M-1}, one sample per cycle. Two buffers are
// used in turn so that the next block can be written while one is read.
// Output samples are saturated to DW bits.
// Interface: in_* as produced by butterfly_pe; out_valid/out_data carry the
// serial output. The first sample of a block appears two cycles after its
// last pair is written. The architecture shows a DI unit and a switch here;
// the double buffer realization is this design's own.
module di_out
  import elt_pkg::*;
#(
  parameter int unsigned M = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [$clog2(M/2)-1:0] in_idx,
  input  data_t                  in_a,
  input  data_t                  in_b,
  output logic                   out_valid,
  output sample_t                out_data
);
  localparam int unsigned H = M / 2;

  data_t                buf_q [2][M];
  logic                 wsel;        // buffer being written
  logic [1:0]           full;        // buffer holds a complete block
  logic                 rd;          // readout running
  logic                 rsel;        // buffer being read
  logic [$clog2(M)-1:0] rcnt;

  function automatic sample_t sat(input data_t v);
    if (v > data_t'(2 ** (DW - 1) - 1)) return sample_t'(2 ** (DW - 1) - 1);
    if (v < -data_t'(2 ** (DW - 1)))    return sample_t'(-(2 ** (DW - 1)));
    return sample_t'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wsel      <= 1'b0;
      full      <= '0;
      rd        <= 1'b0;
      rsel      <= 1'b0;
      rcnt      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int b = 0; b < 2; b++) for (int j = 0; j < M; j++) buf_q[b][j] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        buf_q[wsel][int'(in_idx)]           <= in_a;
        buf_q[wsel][M - 1 - int'(in_idx)]  <= in_b;
        if (in_idx == '0) begin
          full[wsel] <= 1'b1;
          wsel       <= ~wsel;
        end
      end
      if (!rd && full != '0) begin
        rd   <= 1'b1;
        rsel <= full[0] ? 1'b0 : 1'b1;
        rcnt <= '0;
      end else if (rd) begin
        out_valid <= 1'b1;
        out_data  <= sat(buf_q[rsel][rcnt]);
        rcnt      <= rcnt + 1'b1;
        if (rcnt == ($clog2(M))'(M - 1)) begin
          // continue with the other buffer without a gap if it is ready
          full[rsel] <= 1'b0;
          if (full[~rsel]) rsel <= ~rsel;
          else             rd   <= 1'b0;
        end
      end
    end
  end

  // The writer must never catch up with a buffer that is still full.
  property p_no_overwrite;
    @(posedge clk) disable iff (!rst_n) (in_valid && in_idx == ($clog2(M/2))'(H - 1)) |-> !full[wsel];
  endproperty
  assert property (p_no_overwrite);

endmodule
