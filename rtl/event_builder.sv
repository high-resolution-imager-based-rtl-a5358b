// event_builder: reconstructs (X, Y, t) events from extended timestamps.
//
// A particle hitting the cross delay line sends a pulse to both ends of each
// line. The difference of the two arrival times at the ends of a line is
// proportional to the position along it: X = tA,X - tB,X and
// Y = tA,Y - tB,Y. Their mean does not depend on the position, so it is used
// as the arrival time: t = (tA,X + tB,X) / 2 (relative to START when the
// extender is set to do so). The position formulas follow the detector
// description; the choice of t and the grouping rule below are this design's.
//
// Grouping: the first STOP hit opens an event at its absolute time (t_abs,
// whatever the time reference of t). Further hits whose absolute time lies
// within +/- window of it are collected, one per channel; a second
// hit on a channel already collected is dropped and counted in dup_hits. As
// soon as every needed channel is present the event is output. A hit outside
// the window closes the open event, which is counted in rejected when it was
// incomplete, and opens a new one.
//
// Modes: MODE_CDL2D needs STOP1..STOP4 (X and Y); MODE_DL1D needs STOP1 and
// STOP2 only (y = 0); MODE_RAW outputs every hit, START included, as an event
// with its channel number, x = y = 0 and t = its time.
//
// Time gate: with gate_en set, an event (or raw hit) is passed on only when
// gate_lo <= t <= gate_hi; the others are dropped and counted in gated. With
// START-relative times this selects a time slice after each trigger. The
// processing is said to support external gating, without details; gating on
// the event time is this design's reading of it.
//
// Streams are valid/ready with one output register; one hit per cycle.
`timescale 1ps/1fs
module event_builder (
  input  logic                       clk,
  input  logic                       rst,
  input  imager_pkg::det_mode_e      mode,
  input  logic [23:0]                window,
  input  logic                       gate_en,
  input  logic [31:0]                gate_lo,
  input  logic [31:0]                gate_hi,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  imager_pkg::ext_hit_t       in_hit,
  output logic                       out_valid,
  input  logic                       out_ready,
  output imager_pkg::event_t         out_ev,
  output logic [15:0]                rejected,
  output logic [15:0]                dup_hits,
  output logic [15:0]                gated
);
  import imager_pkg::*;

  logic             open;
  logic [T_W-1:0]   t_open;
  logic [3:0]       have;           // bit k: channel k+1 collected
  logic [T_W-1:0]   t_ch [4];

  logic [3:0]       need, bitc, have_n;
  logic             is_stop, used, outside;
  logic signed [T_W:0] d;
  logic [T_W-1:0]   tm [4];
  logic [T_W:0]     tsum;
  logic [T_W-1:0]   t_ev;
  logic             pass;

  assign in_ready = !out_valid || out_ready;
  assign need     = (mode == MODE_DL1D) ? 4'b0011 : 4'b1111;
  assign is_stop  = in_hit.ch >= CH_XA && in_hit.ch <= CH_YB;
  assign bitc     = is_stop ? 4'(1 << (in_hit.ch - CH_XA)) : 4'b0000;
  assign used     = (bitc & need) != 4'b0000;
  assign d        = $signed({1'b0, in_hit.t_abs}) - $signed({1'b0, t_open});
  assign outside  = d > $signed({{(T_W-23){1'b0}}, window}) ||
                    d < -$signed({{(T_W-23){1'b0}}, window});
  assign have_n   = ((open && !outside) ? have : 4'b0000) | bitc;

  always_comb begin
    for (int k = 0; k < 4; k++) tm[k] = bitc[k] ? in_hit.t : t_ch[k];
    tsum = {1'b0, tm[0]} + {1'b0, tm[1]};
    t_ev = (mode == MODE_RAW) ? in_hit.t : T_W'(tsum >> 1);
    pass = !gate_en || (t_ev >= T_W'(gate_lo) && t_ev <= T_W'(gate_hi));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      open      <= 1'b0;
      have      <= '0;
      t_open    <= '0;
      out_valid <= 1'b0;
      out_ev    <= '0;
      rejected  <= '0;
      dup_hits  <= '0;
      gated     <= '0;
      for (int k = 0; k < 4; k++) t_ch[k] <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (mode == MODE_RAW) begin
          if (pass) begin
            out_valid <= 1'b1;
            out_ev    <= '{ch: in_hit.ch, x: '0, y: '0, t: t_ev};
          end else if (gated != '1) gated <= gated + 1'b1;
        end else if (used) begin
          if (open && !outside && (have & bitc) != 4'b0000) begin
            if (dup_hits != '1) dup_hits <= dup_hits + 1'b1;
          end else begin
            if (open && outside && rejected != '1) rejected <= rejected + 1'b1;
            if (!open || outside) t_open <= in_hit.t_abs;
            for (int k = 0; k < 4; k++) if (bitc[k]) t_ch[k] <= in_hit.t;
            if ((have_n & need) == need) begin
              open      <= 1'b0;
              have      <= '0;
              if (pass) out_valid <= 1'b1;
              else if (gated != '1) gated <= gated + 1'b1;
              out_ev.ch <= '0;
              out_ev.x  <= XY_W'(tm[0] - tm[1]);
              out_ev.y  <= (mode == MODE_DL1D) ? '0 : XY_W'(tm[2] - tm[3]);
              out_ev.t  <= t_ev;
            end else begin
              open <= 1'b1;
              have <= have_n;
            end
          end
        end
      end
    end
  end
endmodule
