// tb_imager_top: end-to-end test of the imager at its default parameters.
//
// A behavioural stand-in for the detector turns each particle impact at
// (px, py) into four 3.5 ns pulses at the ends of the two delay lines,
// tA = t + H + p and tB = t + H - p (H = half the line transit time), preceded
// by a START pulse. The reconstructed events are compared with X = 2 px,
// Y = 2 py and t = (impact + H - START), converted to 2.17 ps bins (two bins
// of tolerance). The test walks through the mechanisms of the design and
// counts each one:
//   2-D events, START-relative time, a lost pulse (rejected event), a second
//   pulse on a line 7 ns after the first (pulse pair resolved, duplicate
//   dropped), a calibration table rewrite, a finer output bin, 1-D mode, raw
//   mode, a coarse-counter rollover with absolute time beyond 2^26 bins, and
//   TDC buffer overflow under back-pressure from the output, a time gate
//   that passes only events later than a set START-relative time, and a
//   code-density calibration of STOP2 from 2^20 random-phase pulses, after
//   which impacts must still be reconstructed within tolerance.
`timescale 1ps/1fs
module tb_imager_top;
  import imager_pkg::*;
  localparam int  NTAPS = 1152, AW = $clog2(NTAPS + 1);
  localparam real TCLK = 2400.0;
  localparam real TAP  = 2.17;
  localparam int  H    = 10000;          // half transit time of a line, ps

  logic clk = 0, rst = 1, start_in = 0;
  logic [3:0] stop_in = '0;
  scdp_cfg_t cfg;
  logic cal_wr_en = 0;
  logic [CH_W-1:0] cal_wr_ch = '0;
  logic [AW-1:0] cal_wr_addr = '0;
  logic [FINE_W-1:0] cal_wr_data = '0;
  logic cal_run = 0, cal_busy;
  logic ev_valid, ev_ready = 1;
  event_t ev;
  logic [15:0] tdc_overflow, rejected, dup_hits, gated;

  imager_top dut (.*);

  always #(TCLK/2) clk = ~clk;
  realtime t0;
  always @(posedge clk) if (rst) t0 = $realtime;

  typedef struct {
    int ch; real x, y, t; int tol;
  } exp_t;
  exp_t eq[$];
  int checks = 0, failures = 0, n_ev = 0;
  bit ignore = 0;
  int cal_off = 0;          // calibration offset written into STOP1's table
  // mechanism counters
  int m_2d = 0, m_1d = 0, m_raw = 0, m_rej = 0, m_dup = 0, m_pair = 0,
      m_cal = 0, m_fine = 0, m_wrap = 0, m_ovf = 0, m_rel = 0, m_gate = 0,
      m_selfcal = 0;

  always @(posedge clk) begin
    if (!rst && ev_valid && ev_ready) begin
      if (ignore) begin
        n_ev++;
      end else begin
        checks++;
        if (eq.size() == 0) begin
          failures++; $display("FAIL unexpected event x %0d y %0d t %0d", ev.x, ev.y, ev.t);
        end else begin
          // raw hits leave in time order: take the oldest entry of the channel
          automatic int k = 0;
          automatic exp_t e;
          while (k < eq.size() - 1 && eq[k].ch != int'(ev.ch)) k++;
          e = eq[k];
          eq.delete(k);
          begin
            automatic logic signed [XY_W-1:0] ex = ev.x, ey = ev.y;
            automatic real dx = real'(int'(ex)) - e.x, dy = real'(int'(ey)) - e.y,
                           dt = real'(ev.t) - e.t;
            n_ev++;
            if (int'(ev.ch) != e.ch || dx > e.tol || dx < -e.tol || dy > e.tol || dy < -e.tol ||
                dt > e.tol || dt < -e.tol) begin
              failures++;
              $display("FAIL event ch %0d x %0d y %0d t %0d expected ch %0d x %0.1f y %0.1f t %0.1f",
                       ev.ch, ex, ey, ev.t, e.ch, e.x, e.y, e.t);
            end
            if (ev.t >= (1 << TS_W) && !cfg.rel_start) m_wrap++;
          end
        end
      end
    end
  end

  task automatic pulse(int c, realtime at);
    fork begin
      #(at);
      if (c == 0) start_in = 1; else stop_in[c-1] = 1;
      #3500;
      if (c == 0) start_in = 0; else stop_in[c-1] = 0;
    end join_none
  endtask

  // Absolute timestamp the TDC gives an edge at time te (counter in whole
  // clock periods of CLK_BINS bins, minus the delay-line taps to the edge).
  function automatic real abs_bins(realtime te);
    realtime tn = t0 + $ceil((te - t0 + TAP) / TCLK) * TCLK;
    return real'((tn - t0) / TCLK) * CLK_BINS - $floor((tn - te) / TAP);
  endfunction

  // One impact: START now, particle after d0, pulses at the line ends.
  // drop: STOP channel whose pulse is lost (0 = none); pair: STOP channel
  // that gets a second pulse 7 ns after the first (0 = none).
  // d0: particle delay after START (negative: random 10..30 ns).
  task automatic impact(int px, int py, int drop = 0, int pair = 0, real d0 = -1.0);
    realtime ts[5];
    real scale = real'(cfg.bin_mul) / 256.0;
    if (d0 < 0) d0 = 10000 + $urandom_range(20000, 0);
    ts[0] = 0; ts[1] = d0 + H + px; ts[2] = d0 + H - px;
    ts[3] = d0 + H + py; ts[4] = d0 + H - py;
    for (int c = 0; c < 5; c++) if (drop == 0 || c != drop) pulse(c, ts[c]);
    if (pair != 0) pulse(pair, ts[pair] + 7000);
    if (cfg.mode == MODE_RAW) begin
      automatic realtime now = $realtime;
      for (int c = 0; c < 5; c++) begin
        automatic real tb = abs_bins(now + ts[c]) - ((c == 1) ? cal_off : 0);
        if (cfg.rel_start && c != 0) tb -= abs_bins(now);
        eq.push_back('{c, 0.0, 0.0, $floor(tb * scale), 2});
      end
      m_raw++;
    end else if (drop != 0) begin
      m_rej++;
    end else begin
      automatic real xb = 2.0 * px / TAP - cal_off;
      automatic real yb = (cfg.mode == MODE_DL1D) ? 0.0 : 2.0 * py / TAP;
      automatic real tb = cfg.rel_start ? (d0 + H) / TAP - cal_off / 2.0
                                        : (abs_bins($realtime + d0 + H + px) +
                                           abs_bins($realtime + d0 + H - px)) / 2.0 - cal_off / 2.0;
      if (cfg.gate_en && (tb * scale < real'(cfg.gate_lo) || tb * scale > real'(cfg.gate_hi))) begin
        m_gate++;
        return;
      end
      eq.push_back('{0, xb * scale, yb * scale, tb * scale, 2 + int'(scale)});
      if (cfg.mode == MODE_DL1D) m_1d++; else m_2d++;
      if (cfg.rel_start) m_rel++;
      if (cfg.bin_mul != 256) m_fine++;
      if (cal_off != 0) m_cal++;
    end
    if (pair != 0) m_pair++;
  endtask

  function automatic int rpos();
    return $urandom_range(2 * (H - 2000), 0) - (H - 2000);
  endfunction

  task automatic wait_idle(int cycles);
    repeat (cycles) @(posedge clk);
  endtask

  initial begin
    cfg = '{mode: MODE_CDL2D, rel_start: 1'b1, bin_mul: 16'd256, window: 24'd12000,
            gate_en: 1'b0, gate_lo: 32'd0, gate_hi: 32'd0};
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    // 2-D imaging, START-relative time
    for (int i = 0; i < 40; i++) begin impact(rpos(), rpos()); #80000; end
    // lost pulses and 7 ns pulse pairs
    for (int i = 0; i < 10; i++) begin
      impact(rpos(), rpos(), (i % 2 == 0) ? 1 + i / 2 % 4 : 0, (i % 2 == 1) ? 1 + i / 2 % 4 : 0);
      #80000;
    end
    impact(rpos(), rpos()); #80000;
    // calibration table of STOP1 rewritten with +20 bins on every entry
    wait_idle(20);
    for (int a = 0; a <= NTAPS; a++) begin
      @(negedge clk);
      cal_wr_en = 1; cal_wr_ch = 3'd1; cal_wr_addr = AW'(a); cal_wr_data = FINE_W'(a + 20);
    end
    @(negedge clk); cal_wr_en = 0; cal_off = 20;
    for (int i = 0; i < 10; i++) begin impact(rpos(), rpos()); #80000; end
    // finer output bin (2.17 ps / 2)
    wait_idle(20); cfg.bin_mul = 16'd512; cfg.window = 24'd24000;
    for (int i = 0; i < 10; i++) begin impact(rpos(), rpos()); #80000; end
    wait_idle(20); cfg.bin_mul = 16'd256; cfg.window = 24'd12000;
    // single delay line
    cfg.mode = MODE_DL1D;
    for (int i = 0; i < 10; i++) begin impact(rpos(), rpos()); #80000; end
    // multichannel (raw) mode
    wait_idle(20); cfg.mode = MODE_RAW;
    for (int i = 0; i < 10; i++) begin impact(rpos(), rpos()); #80000; end
    wait_idle(20); cfg.mode = MODE_CDL2D;
    // time gate: pass events arriving 30 ns to 1 us after START (13825 to
    // 460829 bins); particles come 10..15 ns or 25..30 ns after START
    wait_idle(20); cfg.gate_en = 1'b1; cfg.gate_lo = 32'd13825; cfg.gate_hi = 32'd460829;
    for (int i = 0; i < 20; i++) begin
      impact(rpos(), rpos(), 0, 0, (i % 2 == 0) ? 10000 + $urandom_range(5000, 0) : 25000 + $urandom_range(5000, 0));
      #80000;
    end
    wait_idle(20); cfg.gate_en = 1'b0;
    // run past the 2^26-bin rollover of the coarse counters (0.1456 ms),
    // then measure in absolute time
    while ($realtime - t0 < 150.0e6) begin impact(rpos(), rpos()); #3000000; end
    wait_idle(20); cfg.rel_start = 1'b0;
    for (int i = 0; i < 10; i++) begin impact(rpos(), rpos()); #80000; end
    wait_idle(20); cfg.rel_start = 1'b1;
    // back-pressure: output blocked while all channels fire every 7 ns
    wait_idle(50);
    checks++;
    if (eq.size() != 0) begin failures++; $display("FAIL %0d events missing", eq.size()); eq.delete(); end
    ev_ready = 0; cfg.mode = MODE_RAW;
    for (int i = 0; i < 450; i++) begin
      for (int c = 0; c < 5; c++) pulse(c, 0);
      #7000;
    end
    wait_idle(20);
    if (tdc_overflow != 0) m_ovf++;
    ignore = 1; ev_ready = 1;
    wait_idle(3000);
    ignore = 0; cfg.mode = MODE_CDL2D;
    for (int i = 0; i < 5; i++) begin impact(rpos(), rpos()); #80000; end
    // code-density calibration of STOP2 while its pulses arrive at random phase
    wait_idle(50);
    ignore = 1; cfg.mode = MODE_RAW;
    @(negedge clk); cal_wr_ch = 3'd2; cal_run = 1;
    @(negedge clk); cal_run = 0;
    begin
      automatic int n_cal = 0;
      while (cal_busy) begin
        // 3.5 ns high, at least 3.5 ns low, random phase to the clock
        pulse(2, 0);
        #(7000 + $urandom_range(2400, 0));
        n_cal++;
      end
      $display("calibration took %0d pulses", n_cal);
    end
    wait_idle(3000);
    ignore = 0; cfg.mode = MODE_CDL2D;
    for (int i = 0; i < 10; i++) begin impact(rpos(), rpos()); #80000; m_selfcal++; end
    wait_idle(50);
    checks += 4;
    if (eq.size() != 0) begin failures++; $display("FAIL %0d events missing", eq.size()); end
    if (int'(rejected) < 5) begin failures++; $display("FAIL rejected %0d", rejected); end
    // a second pulse either arrives while its event is still open (duplicate)
    // or after it completed (it then opens an event that is rejected)
    if (int'(dup_hits) + int'(rejected) != m_rej + m_pair) begin
      failures++; $display("FAIL duplicates %0d + rejected %0d, expected %0d", dup_hits, rejected, m_rej + m_pair);
    end
    m_dup = int'(dup_hits);
    if (tdc_overflow == 0) begin failures++; $display("FAIL no TDC overflow"); end
    checks++;
    if (int'(gated) != m_gate) begin failures++; $display("FAIL gated %0d expected %0d", gated, m_gate); end
    $display("mechanisms: 2d=%0d rel=%0d 1d=%0d raw=%0d rejected=%0d pair=%0d dup=%0d cal=%0d fine_bin=%0d wrap=%0d overflow=%0d gate=%0d selfcal=%0d",
             m_2d, m_rel, m_1d, m_raw, m_rej, m_pair, m_dup, m_cal, m_fine, m_wrap, m_ovf, m_gate, m_selfcal);
    begin
      automatic int m[13] = '{m_2d, m_rel, m_1d, m_raw, m_rej, m_pair, m_dup, m_cal, m_fine, m_wrap, m_ovf, m_gate,
                              m_selfcal};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("events=%0d sim_time=%0t", n_ev, $realtime);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
