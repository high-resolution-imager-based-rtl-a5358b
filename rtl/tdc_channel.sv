// tdc_channel: one channel of the FPGA time-to-digital converter.
//
// Nutt interpolation: the input pulse is the "start" of a tapped delay line
// whose "stop" is the reference clock, and the same clock drives the coarse
// counter. The delay line gives T_FINE, the time from the input edge to the
// next clock edge; the counter gives T_COARSE, the time of that clock edge; the
// timestamp is T_COARSE - T_FINE, in 2.17 ps bins, modulo the full-scale range.
// This structure follows the TDC description.
//
// Pipeline (one clock each, this design's own split), counted from the clock
// edge e that captured the delay line:
//   e+1  register the captured taps; a new hit is seen when the first tap is 1
//        now and was 0 at the previous capture (the edge entered the line
//        during the last period)
//   e+2  thermometer decode (count of ones)
//   e+3  calibration table look-up
//   e+4  ts = T_COARSE - T_FINE, hit_valid for one cycle
// The pipeline accepts a hit in every cycle, so the pulse-pair resolution is
// set by the input pulse: it must stay high for longer than the delay line
// (NTAPS taps, about 2.5 ns) and low for longer than one clock period. With
// 3.5 ns high and 3.5 ns low that gives the 7 ns dead time of the TDC.
//
// wrap/half report the coarse counter rollovers (see coarse_counter).
// raw_valid/raw_cnt give the uncalibrated ones count of each hit at stage 2,
// for the code-density calibration.
`timescale 1ps/1fs
module tdc_channel #(
  parameter int  NTAPS        = 1152,
  parameter int  CLK_BINS     = 1106,
  parameter int  TS_W         = 26,
  parameter int  FINE_W       = 11,
  parameter real TAP_PS       = 2.17,
  parameter int  MISMATCH_PCT = 0,
  parameter int  SEED         = 1,
  parameter int  ADDR_W       = $clog2(NTAPS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              pulse_in,
  // calibration table write port
  input  logic              cal_wr_en,
  input  logic [ADDR_W-1:0] cal_wr_addr,
  input  logic [FINE_W-1:0] cal_wr_data,
  // raw ones count of each hit, for the calibration engine (stage 2)
  output logic              raw_valid,
  output logic [ADDR_W-1:0] raw_cnt,
  output logic              hit_valid,
  output logic [TS_W-1:0]   hit_ts,
  output logic              half,
  output logic              wrap
);
  logic [NTAPS-1:0]  q;
  logic [TS_W-1:0]   coarse;

  tdl_delay_line #(
    .NTAPS(NTAPS), .TAP_PS(TAP_PS), .MISMATCH_PCT(MISMATCH_PCT), .SEED(SEED)
  ) u_tdl (
    .start(pulse_in), .stop(clk), .q(q)
  );

  coarse_counter #(.TS_W(TS_W), .CLK_BINS(CLK_BINS)) u_coarse (
    .clk(clk), .rst(rst), .value(coarse), .half(half), .wrap(wrap)
  );

  // stage 1: capture and edge detection
  logic [NTAPS-1:0] q1;
  logic             first_d, hit1;
  logic [TS_W-1:0]  ct1;
  always_ff @(posedge clk) begin
    if (rst) begin
      first_d <= 1'b1;   // a line already high at reset is not a hit
      hit1    <= 1'b0;
    end else begin
      first_d <= q[0];
      hit1    <= q[0] && !first_d;
    end
    q1  <= q;
    ct1 <= coarse;
  end

  // stage 2: thermometer decode
  logic [ADDR_W-1:0] raw;
  logic [ADDR_W-1:0] raw2;
  logic              hit2;
  logic [TS_W-1:0]   ct2;
  therm_decoder #(.NTAPS(NTAPS), .CNT_W(ADDR_W)) u_dec (.therm(q1), .cnt(raw));
  always_ff @(posedge clk) begin
    hit2 <= rst ? 1'b0 : hit1;
    raw2 <= raw;
    ct2  <= ct1;
  end
  assign raw_valid = hit2;
  assign raw_cnt   = raw2;

  // stage 3: calibration
  logic [FINE_W-1:0] fine3;
  logic              hit3;
  logic [TS_W-1:0]   ct3;
  fine_calib #(.NTAPS(NTAPS), .FINE_W(FINE_W), .ADDR_W(ADDR_W)) u_cal (
    .clk(clk), .wr_en(cal_wr_en), .wr_addr(cal_wr_addr), .wr_data(cal_wr_data),
    .rd_addr(raw2), .rd_data(fine3)
  );
  always_ff @(posedge clk) begin
    hit3 <= rst ? 1'b0 : hit2;
    ct3  <= ct2;
  end

  // stage 4: Nutt combination
  always_ff @(posedge clk) begin
    hit_valid <= rst ? 1'b0 : hit3;
    hit_ts    <= ct3 - TS_W'(fine3);
  end
endmodule
