// imager_top: digital part of a 3-D (X, Y, t) imager with a cross delay line.
//
// The four ends of the two delay lines of the detector (STOP1..STOP4, after
// amplifiers and constant fraction discriminators) and the experiment's
// reference trigger (START) enter the TDC FPGA, which timestamps every pulse
// with 2.17 ps resolution. The timestamp words cross to the processing FPGA
// through a FIFO; there they are extended, optionally referenced to START and
// combined into (X, Y, t) events, which leave on a valid/ready stream towards
// the link to the control computer. The chain TDC FPGA -> FIFO -> processing
// FPGA follows the system description; both FPGAs share one clock here, which
// is this design's simplification.
//
// Settings (cfg, calibration table port) stand for the registers the control
// computer writes; counters report dropped TDC hits, incomplete events,
// duplicate hits and events removed by the time gate.
`timescale 1ps/1fs
module imager_top #(
  parameter int  N_STOP     = 4,
  parameter int  NTAPS      = 1152,
  parameter int  CLK_BINS   = imager_pkg::CLK_BINS,
  parameter real TAP_PS     = 2.17,
  parameter int  FIFO_DEPTH = 1024,
  parameter int  CAL_LOG2   = 20,
  parameter int  ADDR_W     = $clog2(NTAPS + 1)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          start_in,
  input  logic [N_STOP-1:0]             stop_in,
  input  imager_pkg::scdp_cfg_t         cfg,
  input  logic                          cal_wr_en,
  input  logic [imager_pkg::CH_W-1:0]   cal_wr_ch,
  input  logic [ADDR_W-1:0]             cal_wr_addr,
  input  logic [imager_pkg::FINE_W-1:0] cal_wr_data,
  input  logic                          cal_run,
  output logic                          cal_busy,
  output logic                          ev_valid,
  input  logic                          ev_ready,
  output imager_pkg::event_t            ev,
  output logic [15:0]                   tdc_overflow,
  output logic [15:0]                   rejected,
  output logic [15:0]                   dup_hits,
  output logic [15:0]                   gated
);
  import imager_pkg::*;
  localparam int FW = $bits(ts_word_t);
  localparam int AW = $clog2(FIFO_DEPTH);

  logic     t_valid, f_full, f_empty, s_ready;
  ts_word_t t_word, f_word;
  logic [AW:0] f_count;

  tdc_fpga #(
    .N_STOP(N_STOP), .NTAPS(NTAPS), .CLK_BINS(CLK_BINS), .TAP_PS(TAP_PS),
    .ADDR_W(ADDR_W), .CAL_LOG2(CAL_LOG2)
  ) u_tdc (
    .clk(clk), .rst(rst), .start_in(start_in), .stop_in(stop_in),
    .cal_wr_en(cal_wr_en), .cal_wr_ch(cal_wr_ch), .cal_wr_addr(cal_wr_addr),
    .cal_wr_data(cal_wr_data), .cal_run(cal_run), .cal_busy(cal_busy),
    .out_valid(t_valid), .out_ready(!f_full), .out_word(t_word),
    .overflow(tdc_overflow)
  );

  sync_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_link (
    .clk(clk), .rst(rst),
    .wr_en(t_valid && !f_full), .wr_data(t_word), .full(f_full),
    .rd_en(s_ready && !f_empty), .rd_data(f_word), .empty(f_empty),
    .count(f_count)
  );

  fpga_scdp u_scdp (
    .clk(clk), .rst(rst), .cfg(cfg),
    .in_valid(!f_empty), .in_ready(s_ready), .in_word(f_word),
    .out_valid(ev_valid), .out_ready(ev_ready), .out_ev(ev),
    .rejected(rejected), .dup_hits(dup_hits), .gated(gated)
  );
endmodule
