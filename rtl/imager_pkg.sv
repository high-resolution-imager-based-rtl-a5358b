// imager_pkg: shared constants and types of the delay-line imager.
//
// The TDC works in units of one fine bin (LSB = 2.17 ps). One period of the
// 2.4 ns reference clock is CLK_BINS = 1106 bins (2400 / 2.17 rounded), and the
// channel timestamp is TS_W = 26 bits wide, i.e. a full-scale range of
// 2^26 * 2.17 ps = 0.1456 ms, which matches the 0.145 ms range of the TDC.
// The channel numbering (0 = START, 1..4 = STOP1..STOP4) follows the channel
// diagram of the TDC; the word formats and marker codes are this design's own.
`timescale 1ps/1fs
package imager_pkg;

  localparam int N_CH     = 5;     // START + four STOPs
  localparam int CH_W     = 3;
  localparam int TS_W     = 26;    // channel timestamp width (FSR 0.1456 ms)
  localparam int CLK_BINS = 1106;  // fine bins per 2.4 ns clock period
  localparam int FINE_W   = 11;    // calibrated fine time width
  localparam int EPOCH_W  = 17;    // rollover epochs: 2^17 * 0.1456 ms = 19 s
  localparam int T_W      = 48;    // extended timestamp width
  localparam int XY_W     = 24;    // signed X / Y coordinate width

  // Channel codes carried in a timestamp word. Codes 0..4 are hit channels.
  localparam logic [CH_W-1:0] CH_START     = 3'd0;
  localparam logic [CH_W-1:0] CH_XA        = 3'd1;  // STOP1: X line, end A
  localparam logic [CH_W-1:0] CH_XB        = 3'd2;  // STOP2: X line, end B
  localparam logic [CH_W-1:0] CH_YA        = 3'd3;  // STOP3: Y line, end A
  localparam logic [CH_W-1:0] CH_YB        = 3'd4;  // STOP4: Y line, end B
  localparam logic [CH_W-1:0] MARK_HALF    = 3'd6;  // coarse time crossed FSR/2
  localparam logic [CH_W-1:0] MARK_WRAP    = 3'd7;  // coarse time wrapped to 0

  // Word sent from the TDC FPGA to the processing FPGA.
  typedef struct packed {
    logic [CH_W-1:0] ch;
    logic [TS_W-1:0] ts;
  } ts_word_t;

  // Extended-format timestamp inside the processing FPGA.
  // t_abs is always the absolute time (used to group hits into events);
  // t is absolute or START-relative according to the settings.
  typedef struct packed {
    logic [CH_W-1:0] ch;
    logic [T_W-1:0]  t_abs;
    logic [T_W-1:0]  t;
  } ext_hit_t;

  // Detector types the processing can be set up for.
  typedef enum logic [1:0] {
    MODE_CDL2D = 2'd0,  // cross delay line: X and Y from four ends
    MODE_DL1D  = 2'd1,  // single delay line: X from two ends
    MODE_RAW   = 2'd2   // multichannel anode: every hit is passed on
  } det_mode_e;

  // Reconstructed event.
  typedef struct packed {
    logic [CH_W-1:0]        ch;   // channel (raw mode), 0 otherwise
    logic signed [XY_W-1:0] x;    // tA,X - tB,X in output bins
    logic signed [XY_W-1:0] y;    // tA,Y - tB,Y in output bins
    logic [T_W-1:0]         t;    // arrival time in output bins
  } event_t;

  // Settings of the processing FPGA (written by the control PC).
  typedef struct packed {
    det_mode_e        mode;
    logic             rel_start;  // 1: times relative to last START
    logic [15:0]      bin_mul;    // output bin = 2.17 ps * 256 / bin_mul
    logic [23:0]      window;     // coincidence window in output bins
    logic             gate_en;    // 1: pass only events with t in the gate
    logic [31:0]      gate_lo;    // gate opens at t = gate_lo (output bins)
    logic [31:0]      gate_hi;    // gate closes after t = gate_hi
  } scdp_cfg_t;

endpackage
