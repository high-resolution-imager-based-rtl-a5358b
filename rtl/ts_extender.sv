// ts_extender: turns TDC words into extended-format timestamps.
//
// The TDC timestamps wrap every 2^26 bins (0.1456 ms). The extender counts the
// wrap markers sent by the TDC and puts the count (EPOCH_W = 17 bits) above the
// 26-bit timestamp, which extends the range to 2^43 bins, about 19 s. A hit
// that was measured just before a wrap can reach the extender after the wrap
// marker; the half-range markers resolve this: a hit in the upper half of the
// range that arrives after a wrap marker but before the next half marker
// belongs to the previous epoch.
//
// The extended time is then either absolute (since the start of acquisition,
// i.e. the last reset) or, with rel_start set, taken relative to the last hit
// on the START channel (START hits themselves keep their absolute time).
// The absolute time is always passed on as well (t_abs), since hits must be
// grouped into events by their absolute time. Finally both are rescaled to the selected output bin width:
//   t_out = (t * bin_mul) >> 8,  output bin = 2.17 ps * 256 / bin_mul,
// so bin_mul = 256 keeps the 2.17 ps bin and larger values give finer bins.
// Extended words with selectable bin width, absolute or referenced to a
// reference signal, follow the description of the processing FPGA; the marker
// scheme and the scaling formula are this design's own.
//
// Streams are valid/ready; one output register, so the latency is one cycle
// and one word is taken per cycle. Marker words are consumed and not output.
`timescale 1ps/1fs
module ts_extender #(
  parameter int EPOCH_W = imager_pkg::EPOCH_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 rel_start,
  input  logic [15:0]          bin_mul,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  imager_pkg::ts_word_t in_word,
  output logic                 out_valid,
  input  logic                 out_ready,
  output imager_pkg::ext_hit_t out_hit
);
  import imager_pkg::*;
  localparam int E_W = EPOCH_W + TS_W;

  logic [EPOCH_W-1:0] epoch;
  logic               upper;       // last marker seen was a half marker
  logic [E_W-1:0]     last_start;
  logic [EPOCH_W-1:0] ep;
  logic [E_W-1:0]     t_ext, t_sel;
  logic [E_W+15:0]    t_mul, t_mul_abs;
  logic               is_hit;

  assign in_ready = !out_valid || out_ready;
  assign is_hit   = (in_word.ch != MARK_HALF) && (in_word.ch != MARK_WRAP);

  always_comb begin
    ep    = (in_word.ts[TS_W-1] && !upper && epoch != '0) ? epoch - 1'b1 : epoch;
    t_ext = {ep, in_word.ts};
    t_sel = (rel_start && in_word.ch != CH_START) ? t_ext - last_start : t_ext;
    t_mul = t_sel * bin_mul;
    t_mul_abs = t_ext * bin_mul;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      epoch      <= '0;
      upper      <= 1'b0;
      last_start <= '0;
      out_valid  <= 1'b0;
      out_hit    <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (in_word.ch == MARK_WRAP) begin
          epoch <= epoch + 1'b1;
          upper <= 1'b0;
        end else if (in_word.ch == MARK_HALF) begin
          upper <= 1'b1;
        end
        if (is_hit) begin
          out_valid  <= 1'b1;
          out_hit.ch <= in_word.ch;
          out_hit.t     <= T_W'(t_mul >> 8);
          out_hit.t_abs <= T_W'(t_mul_abs >> 8);
          if (in_word.ch == CH_START) last_start <= t_ext;
        end
      end
    end
  end
endmodule
