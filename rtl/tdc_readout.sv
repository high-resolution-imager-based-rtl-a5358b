// tdc_readout: merges the timestamps of all TDC channels into one word stream.
//
// Every channel writes its hits into a small FIFO of its own, so that hits
// arriving on several channels in the same clock are all kept. A round-robin
// arbiter moves one word per clock from the channel FIFOs to the output, which
// is a valid/ready stream of ts_word_t {channel, timestamp}. When the coarse
// counters cross half of the full-scale range or wrap around, a marker word
// (MARK_HALF / MARK_WRAP) is sent ahead of any pending hit; the processing FPGA
// counts these to extend the timestamps beyond the 0.145 ms range. A hit that
// finds its channel FIFO full is dropped; overflow counts the clock cycles in
// which at least one hit was dropped (saturating).
// The document states only that timestamps go to the processing FPGA through a
// FIFO; buffering, arbitration, markers and the drop policy are this design's.
//
// Timing: a hit accepted in cycle c can leave at the earliest in cycle c+2.
`timescale 1ps/1fs
module tdc_readout #(
  parameter int N_CH          = imager_pkg::N_CH,
  parameter int TS_W          = imager_pkg::TS_W,
  parameter int CH_FIFO_DEPTH = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [N_CH-1:0]           hit_valid,
  input  logic [N_CH-1:0][TS_W-1:0] hit_ts,
  input  logic                      half,
  input  logic                      wrap,
  output logic                      out_valid,
  input  logic                      out_ready,
  output imager_pkg::ts_word_t      out_word,
  output logic [15:0]               overflow
);
  import imager_pkg::*;
  localparam int AW = $clog2(CH_FIFO_DEPTH);

  logic [N_CH-1:0]           f_full, f_empty, f_rd;
  logic [N_CH-1:0][TS_W-1:0] f_data;

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    logic [AW:0] unused_count;
    sync_fifo #(.WIDTH(TS_W), .DEPTH(CH_FIFO_DEPTH)) u_fifo (
      .clk(clk), .rst(rst),
      .wr_en(hit_valid[i] && !f_full[i]), .wr_data(hit_ts[i]), .full(f_full[i]),
      .rd_en(f_rd[i]), .rd_data(f_data[i]), .empty(f_empty[i]), .count(unused_count)
    );
  end

  logic half_pend, wrap_pend;
  logic [$clog2(N_CH)-1:0] rr;       // channel with the highest priority
  logic load;                        // output register can take a word
  logic pick_valid;
  logic [$clog2(N_CH)-1:0] pick;

  assign load = !out_valid || out_ready;

  always_comb begin
    pick_valid = 1'b0;
    pick       = rr;
    for (int k = 0; k < N_CH; k++) begin
      automatic int c = (int'(rr) + k) % N_CH;
      if (!pick_valid && !f_empty[c]) begin
        pick_valid = 1'b1;
        pick       = ($clog2(N_CH))'(c);
      end
    end
  end

  always_comb begin
    f_rd = '0;
    if (load && !half_pend && !wrap_pend && pick_valid) f_rd[pick] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_word  <= '0;
      half_pend <= 1'b0;
      wrap_pend <= 1'b0;
      rr        <= '0;
      overflow  <= '0;
    end else begin
      if (load) begin
        if (wrap_pend) begin
          out_valid <= 1'b1;
          out_word  <= '{ch: MARK_WRAP, ts: '0};
        end else if (half_pend) begin
          out_valid <= 1'b1;
          out_word  <= '{ch: MARK_HALF, ts: '0};
        end else if (pick_valid) begin
          out_valid <= 1'b1;
          out_word  <= '{ch: CH_W'(pick), ts: f_data[pick]};
          rr        <= (int'(pick) == N_CH-1) ? '0 : pick + 1'b1;
        end else begin
          out_valid <= 1'b0;
        end
      end
      // markers: set by the counter flags, cleared when sent
      if (load && wrap_pend)                 wrap_pend <= 1'b0;
      else if (load && half_pend)            half_pend <= 1'b0;
      if (wrap) wrap_pend <= 1'b1;
      if (half) half_pend <= 1'b1;
      if ((hit_valid & f_full) != '0 && overflow != '1) overflow <= overflow + 1'b1;
    end
  end

  a_stable: assert property (@(posedge clk) disable iff (rst)
                             out_valid && !out_ready |=> out_valid && $stable(out_word));
endmodule
