// tdl_delay_line: behavioural model of a tapped delay line with its capture
// flip-flops (not synthesizable logic; in the FPGA this is a carry chain).
//
// The input edge ("start") runs down a chain of NTAPS buffers. On every rising
// edge of the sampling clock ("stop") all buffer outputs are captured at once,
// so q[k] is the input as it was (k+1) tap delays before the clock edge. A
// rising input edge therefore shows up as a run of ones at the low end of q
// whose length is the time from the edge to the clock, in taps: the
// thermometer code of the measurement.
//
// The model keeps the last few input transitions with their times and
// evaluates every tap at each clock edge. Each tap delay is TAP_PS; a nonzero
// MISMATCH_PCT spreads the tap delays pseudo-randomly by up to that many
// percent, to give the calibration table something to correct. The tap delay
// is the effective bin of the TDC (2.17 ps); the number of taps is this
// design's choice (enough to cover one 2.4 ns clock period with margin).
//
// Ports: start = pulse input, stop = sampling clock, q = captured taps,
// valid one clock-to-q after each rising edge of stop.
`timescale 1ps/1fs
module tdl_delay_line #(
  parameter int  NTAPS        = 1152,
  parameter real TAP_PS       = 2.17,
  parameter int  MISMATCH_PCT = 0,
  parameter int  SEED         = 1
) (
  input  logic             start,
  input  logic             stop,
  output logic [NTAPS-1:0] q
);
  localparam int HIST = 8;

  real  pos [NTAPS];      // delay from input to the output of tap k, ps
  real  ev_t [HIST];      // times of the last input transitions (newest at 0)
  logic ev_v [HIST];      // input value after each of those transitions
  logic level0;           // input value before the oldest recorded transition

  initial begin
    automatic real acc = 0.0;
    automatic int  s = SEED;
    for (int k = 0; k < NTAPS; k++) begin
      automatic real d = TAP_PS;
      if (MISMATCH_PCT != 0) begin
        s = (s * 1103515245 + 12345) & 32'h7fffffff;
        d = TAP_PS * (1.0 + (real'((s >>> 8) % (2 * MISMATCH_PCT + 1)) - MISMATCH_PCT) / 100.0);
      end
      acc = acc + d;
      pos[k] = acc;
    end
    for (int i = 0; i < HIST; i++) begin
      ev_t[i] = -1.0e12;
      ev_v[i] = 1'b0;
    end
    level0 = 1'b0;
    q = '0;
  end

  always @(start) begin
    level0 = ev_v[HIST-1];
    for (int i = HIST-1; i > 0; i--) begin
      ev_t[i] = ev_t[i-1];
      ev_v[i] = ev_v[i-1];
    end
    ev_t[0] = $realtime;
    ev_v[0] = start;
  end

  // Input value at an earlier time tp.
  function automatic logic value_at(real tp);
    for (int i = 0; i < HIST; i++)
      if (ev_t[i] <= tp) return ev_v[i];
    return level0;
  endfunction

  always @(posedge stop) begin
    automatic real now = $realtime;
    automatic logic [NTAPS-1:0] smp;
    for (int k = 0; k < NTAPS; k++)
      smp[k] = value_at(now - pos[k]);
    q <= smp;
  end

endmodule
