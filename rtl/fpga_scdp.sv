// fpga_scdp: data path of the system control and data processing FPGA.
//
// Timestamp words arriving from the TDC FPGA are first converted into
// extended-format timestamps (epoch extension, optional START reference,
// selectable bin width) by ts_extender and then grouped and combined into
// (X, Y, t) events by event_builder, according to the settings in cfg. The
// event stream goes on to the link to the control computer. This split
// follows the description of the processing FPGA; the settings structure is
// this design's.
//
// All streams are valid/ready; latency from in_valid to out_valid is two
// cycles for the hit that completes an event.
`timescale 1ps/1fs
module fpga_scdp (
  input  logic                  clk,
  input  logic                  rst,
  input  imager_pkg::scdp_cfg_t cfg,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  imager_pkg::ts_word_t  in_word,
  output logic                  out_valid,
  input  logic                  out_ready,
  output imager_pkg::event_t    out_ev,
  output logic [15:0]           rejected,
  output logic [15:0]           dup_hits,
  output logic [15:0]           gated
);
  import imager_pkg::*;

  logic     x_valid, x_ready;
  ext_hit_t x_hit;

  ts_extender u_ext (
    .clk(clk), .rst(rst), .rel_start(cfg.rel_start), .bin_mul(cfg.bin_mul),
    .in_valid(in_valid), .in_ready(in_ready), .in_word(in_word),
    .out_valid(x_valid), .out_ready(x_ready), .out_hit(x_hit)
  );

  event_builder u_evb (
    .clk(clk), .rst(rst), .mode(cfg.mode), .window(cfg.window),
    .gate_en(cfg.gate_en), .gate_lo(cfg.gate_lo), .gate_hi(cfg.gate_hi),
    .in_valid(x_valid), .in_ready(x_ready), .in_hit(x_hit),
    .out_valid(out_valid), .out_ready(out_ready), .out_ev(out_ev),
    .rejected(rejected), .dup_hits(dup_hits), .gated(gated)
  );
endmodule
