// therm_decoder: thermometer-to-binary decoder of the captured delay line.
//
// The captured taps hold a run of ones whose length is the time from the input
// edge to the clock edge. The decoder counts the ones in the whole word, which
// also tolerates isolated "bubbles" (a stray 0 inside the run or a stray 1
// beyond it) that the unequal tap delays of a real chain produce: each bubble
// moves the result by one bin instead of corrupting it. Decoding into binary
// follows the description of the TDL; counting ones is this design's choice of
// decoder.
//
// Purely combinational: cnt = number of ones in therm.
`timescale 1ps/1fs
module therm_decoder #(
  parameter int NTAPS = 1152,
  parameter int CNT_W = $clog2(NTAPS + 1)
) (
  input  logic [NTAPS-1:0] therm,
  output logic [CNT_W-1:0] cnt
);
  always_comb begin
    cnt = '0;
    for (int k = 0; k < NTAPS; k++)
      cnt = cnt + CNT_W'(therm[k]);
  end
endmodule
