// coarse_counter: the T_COARSE counter of a Nutt-interpolated TDC channel.
//
// Driven by the same clock that samples the delay line, it advances by one
// clock period per cycle. It counts in fine bins (CLK_BINS per period) rather
// than in periods, so that the channel timestamp is simply T_COARSE - T_FINE in
// one unit and wraps cleanly at 2^TS_W bins (the full-scale range). The
// counter itself follows the TDC description; counting in bins and the two
// rollover flags are this design's choices.
//
// After the rising clock edge number k following reset, value = k * CLK_BINS
// (mod 2^TS_W). half is high for the one cycle after value crossed 2^(TS_W-1);
// wrap is high for the one cycle after it wrapped past 2^TS_W.
`timescale 1ps/1fs
module coarse_counter #(
  parameter int TS_W     = 26,
  parameter int CLK_BINS = 1106
) (
  input  logic            clk,
  input  logic            rst,
  output logic [TS_W-1:0] value,
  output logic            half,
  output logic            wrap
);
  logic [TS_W:0] next;
  assign next = {1'b0, value} + (TS_W+1)'(CLK_BINS);

  always_ff @(posedge clk) begin
    if (rst) begin
      value <= '0;
      half  <= 1'b0;
      wrap  <= 1'b0;
    end else begin
      value <= next[TS_W-1:0];
      wrap  <= next[TS_W];
      half  <= !value[TS_W-1] && next[TS_W-1] && !next[TS_W];
    end
  end
endmodule
