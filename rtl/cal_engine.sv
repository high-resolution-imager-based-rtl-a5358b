// cal_engine: code-density calibration of the fine-time tables.
//
// The taps of a real delay line differ in delay, so the raw ones count of the
// captured line is not linear in time. If hits arrive at random phase with
// respect to the clock, the number of hits that end up with raw count k is
// proportional to the time width of that code. The engine histograms
// 2^LOG2_HITS raw counts of one channel, then turns the histogram into the
// channel's calibration table: with C(k) the number of hits below code k and
// h(k) the hits in it, entry k is the middle of the code in clock bins,
//
//     fine(k) = (2 C(k) + h(k)) * CLK_BINS / 2^(LOG2_HITS + 1).
//
// The need for a calibration that restores linearity is stated for the TDC;
// the code-density method, the hit count and this interface are this
// design's choices.
//
// Interface: a one-cycle pulse on run starts a calibration of channel ch.
// busy stays high until the new table is written. The engine clears its
// histogram (NTAPS+1 cycles), counts hits of the selected channel (one per
// cycle at most; other channels are ignored), and then writes one table entry
// per cycle on wr_en / wr_addr / wr_data (NTAPS+1 cycles). run is ignored
// while busy. The histogram is an array read and written in the same cycle.
`timescale 1ps/1fs
module cal_engine #(
  parameter int N_CH      = imager_pkg::N_CH,
  parameter int NTAPS     = 1152,
  parameter int CLK_BINS  = imager_pkg::CLK_BINS,
  parameter int FINE_W    = imager_pkg::FINE_W,
  parameter int LOG2_HITS = 20,
  parameter int ADDR_W    = $clog2(NTAPS + 1)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          run,
  input  logic [imager_pkg::CH_W-1:0]   ch,
  input  logic [N_CH-1:0]               raw_valid,
  input  logic [N_CH-1:0][ADDR_W-1:0]   raw_cnt,
  output logic                          busy,
  output logic [imager_pkg::CH_W-1:0]   wr_ch,
  output logic                          wr_en,
  output logic [ADDR_W-1:0]             wr_addr,
  output logic [FINE_W-1:0]             wr_data
);
  localparam int HW = LOG2_HITS + 1;                 // histogram counter width
  localparam int PW = HW + 1 + $clog2(CLK_BINS + 1);  // product width

  typedef enum logic [1:0] {IDLE, CLEAR, COLLECT, WRITE} state_e;

  state_e            state;
  logic [HW-1:0]     hist [NTAPS+1];
  logic [ADDR_W-1:0] idx;
  logic [HW-1:0]     n_hits, cum;
  logic              hv;
  logic [ADDR_W-1:0] hc;
  logic [PW-1:0]     prod;

  assign busy = state != IDLE || wr_en;
  assign hv   = raw_valid[wr_ch] && int'(raw_cnt[wr_ch]) <= NTAPS;
  assign hc   = raw_cnt[wr_ch];
  assign prod = PW'({cum, 1'b0} + {1'b0, hist[idx]}) * PW'(CLK_BINS);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      wr_ch  <= '0;
      wr_en  <= 1'b0;
      idx    <= '0;
      n_hits <= '0;
      cum    <= '0;
    end else begin
      wr_en <= 1'b0;
      case (state)
        IDLE: if (run && int'(ch) < N_CH) begin
          state <= CLEAR;
          wr_ch <= ch;
          idx   <= '0;
        end
        CLEAR: begin
          hist[idx] <= '0;
          if (int'(idx) == NTAPS) begin
            state  <= COLLECT;
            n_hits <= '0;
          end else idx <= idx + 1'b1;
        end
        COLLECT: if (hv) begin
          hist[hc] <= hist[hc] + 1'b1;
          if (n_hits == HW'((1 << LOG2_HITS) - 1)) begin
            state <= WRITE;
            idx   <= '0;
            cum   <= '0;
          end
          n_hits <= n_hits + 1'b1;
        end
        WRITE: begin
          wr_en   <= 1'b1;
          wr_addr <= idx;
          wr_data <= FINE_W'(prod >> (LOG2_HITS + 1));
          cum     <= cum + hist[idx];
          if (int'(idx) == NTAPS) state <= IDLE;
          else idx <= idx + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
