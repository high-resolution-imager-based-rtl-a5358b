// tb_fpga_scdp: feeds TDC words (START and four STOP hits per impact, with
// rollover markers) into the processing data path in START-relative 2-D mode
// and checks each reconstructed (X, Y, t) event, across several rollovers.
`timescale 1ps/1fs
module tb_fpga_scdp;
  import imager_pkg::*;
  logic clk = 0, rst = 1;
  scdp_cfg_t cfg;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  ts_word_t in_word = '0;
  event_t out_ev;
  logic [15:0] rejected, dup_hits, gated;
  ts_word_t wq[$];
  event_t   eq[$];
  int checks = 0, failures = 0, n_ev = 0;

  fpga_scdp dut (.*);

  always #1200 clk = ~clk;

  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (eq.size() == 0) begin
        failures++; $display("FAIL unexpected event");
      end else begin
        automatic event_t e = eq.pop_front();
        n_ev++;
        if (out_ev != e) begin
          failures++;
          $display("FAIL x %0d y %0d t %0d expected x %0d y %0d t %0d",
                   out_ev.x, out_ev.y, out_ev.t, e.x, e.y, e.t);
        end
      end
    end
  end

  initial begin
    longint T = 0, prevT = 0;
    cfg = '{mode: MODE_CDL2D, rel_start: 1'b1, bin_mul: 16'd256, window: 24'd20000,
           gate_en: 1'b0, gate_lo: 32'd0, gate_hi: 32'd0};
    for (int i = 0; i < 300; i++) begin
      automatic int x = $urandom_range(16000, 0) - 8000;
      automatic int y = $urandom_range(16000, 0) - 8000;
      automatic longint ts[5];
      T = prevT + 50000 + $urandom_range(2000000, 0);
      ts[0] = T; ts[1] = T + 15000 + x; ts[2] = T + 15000 - x;
      ts[3] = T + 15000 + y; ts[4] = T + 15000 - y;
      for (int k = 0; k < 5; k++) begin
        for (longint h = (prevT >> (TS_W-1)) + 1; h <= (ts[k] >> (TS_W-1)); h++)
          wq.push_back('{ch: (h % 2 == 1) ? MARK_HALF : MARK_WRAP, ts: '0});
        if (ts[k] > prevT) prevT = ts[k];
        wq.push_back('{ch: 3'(k), ts: TS_W'(ts[k])});
      end
      eq.push_back('{ch: '0, x: XY_W'(2 * x), y: XY_W'(2 * y), t: T_W'(15000)});
    end
    @(negedge clk); rst = 0;
    while (wq.size() != 0) begin
      in_valid = 1; in_word = wq[0];
      out_ready = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (in_ready) void'(wq.pop_front());
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    checks += 2;
    if (eq.size() != 0) begin failures++; $display("FAIL %0d events missing", eq.size()); end
    if (rejected != 0 || dup_hits != 0) begin failures++; $display("FAIL counters %0d %0d", rejected, dup_hits); end
    $display("events=%0d", n_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
