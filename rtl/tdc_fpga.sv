// tdc_fpga: the time-to-digital converter FPGA.
//
// Five identical channels share the 2.4 ns reference clock: channel 0 takes
// the START (reference trigger of the experiment) and channels 1..4 take
// STOP1..STOP4, the four ends of the two delay lines of the detector. Each
// channel is a delay line interpolated against the clock plus a coarse
// counter, giving 26-bit timestamps with a 2.17 ps LSB (range 0.1456 ms). The
// readout merges the five hit streams into one word stream towards the
// processing FPGA. Channel count, LSB, range and clock follow the TDC
// description; the readout and word format are this design's own.
//
// All coarse counters are reset together and run in lock-step, so the
// rollover flags of channel 0 stand for all of them.
// The calibration tables are written through one port with a channel select
// (cal_wr_*), or by the code-density engine (cal_engine): a pulse on cal_run
// calibrates the channel given on cal_wr_ch from 2^CAL_LOG2 of its own hits,
// and the engine owns the table port while cal_busy is high.
// Latency from the capturing clock edge to out_valid: 6 cycles when idle.
`timescale 1ps/1fs
module tdc_fpga #(
  parameter int  N_STOP        = 4,
  parameter int  NTAPS         = 1152,
  parameter int  CLK_BINS      = imager_pkg::CLK_BINS,
  parameter real TAP_PS        = 2.17,
  parameter int  MISMATCH_PCT  = 0,
  parameter int  CH_FIFO_DEPTH = 8,
  parameter int  CAL_LOG2      = 20,
  parameter int  ADDR_W        = $clog2(NTAPS + 1)
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               start_in,
  input  logic [N_STOP-1:0]                  stop_in,
  input  logic                               cal_wr_en,
  input  logic [imager_pkg::CH_W-1:0]        cal_wr_ch,
  input  logic [ADDR_W-1:0]                  cal_wr_addr,
  input  logic [imager_pkg::FINE_W-1:0]      cal_wr_data,
  input  logic                               cal_run,
  output logic                               cal_busy,
  output logic                               out_valid,
  input  logic                               out_ready,
  output imager_pkg::ts_word_t               out_word,
  output logic [15:0]                        overflow
);
  import imager_pkg::*;
  localparam int NC = N_STOP + 1;

  logic [NC-1:0]           pulses, hv, halfs, wraps;
  logic [NC-1:0][TS_W-1:0] hts;
  logic [NC-1:0]             rv;
  logic [NC-1:0][ADDR_W-1:0] rc;
  logic                      e_wr;
  logic [CH_W-1:0]           e_ch;
  logic [ADDR_W-1:0]         e_addr;
  logic [FINE_W-1:0]         e_data;
  logic                      t_wr;
  logic [CH_W-1:0]           t_ch;
  logic [ADDR_W-1:0]         t_addr;
  logic [FINE_W-1:0]         t_data;

  // the engine owns the table port while it runs
  assign t_wr   = cal_busy ? e_wr   : cal_wr_en;
  assign t_ch   = cal_busy ? e_ch   : cal_wr_ch;
  assign t_addr = cal_busy ? e_addr : cal_wr_addr;
  assign t_data = cal_busy ? e_data : cal_wr_data;

  cal_engine #(
    .N_CH(NC), .NTAPS(NTAPS), .CLK_BINS(CLK_BINS), .FINE_W(FINE_W),
    .LOG2_HITS(CAL_LOG2), .ADDR_W(ADDR_W)
  ) u_cal (
    .clk(clk), .rst(rst), .run(cal_run), .ch(cal_wr_ch),
    .raw_valid(rv), .raw_cnt(rc), .busy(cal_busy),
    .wr_ch(e_ch), .wr_en(e_wr), .wr_addr(e_addr), .wr_data(e_data)
  );

  assign pulses = {stop_in, start_in};

  for (genvar i = 0; i < NC; i++) begin : g_ch
    tdc_channel #(
      .NTAPS(NTAPS), .CLK_BINS(CLK_BINS), .TS_W(TS_W), .FINE_W(FINE_W),
      .TAP_PS(TAP_PS), .MISMATCH_PCT(MISMATCH_PCT), .SEED(i + 1), .ADDR_W(ADDR_W)
    ) u_ch (
      .clk(clk), .rst(rst), .pulse_in(pulses[i]),
      .cal_wr_en(t_wr && int'(t_ch) == i),
      .cal_wr_addr(t_addr), .cal_wr_data(t_data),
      .raw_valid(rv[i]), .raw_cnt(rc[i]),
      .hit_valid(hv[i]), .hit_ts(hts[i]), .half(halfs[i]), .wrap(wraps[i])
    );
  end

  tdc_readout #(.N_CH(NC), .TS_W(TS_W), .CH_FIFO_DEPTH(CH_FIFO_DEPTH)) u_ro (
    .clk(clk), .rst(rst), .hit_valid(hv), .hit_ts(hts),
    .half(halfs[0]), .wrap(wraps[0]),
    .out_valid(out_valid), .out_ready(out_ready), .out_word(out_word),
    .overflow(overflow)
  );
endmodule
