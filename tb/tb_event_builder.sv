// tb_event_builder: generates particle impacts at random positions, turns each
// into the four end-of-line hit times of a cross delay line (plus START hits),
// and checks the reconstructed X = tA,X - tB,X, Y = tA,Y - tB,Y and
// t = (tA,X + tB,X) / 2. Some impacts lose a hit (must be rejected) or get a
// repeated hit (must be counted as duplicate). The 1-D and raw modes are run
// as well, and each mode is run again with the time gate set to a slice of
// the run: events outside it must be dropped and counted. The consumer stalls
// at random.
`timescale 1ps/1fs
module tb_event_builder;
  import imager_pkg::*;
  logic clk = 0, rst = 1;
  det_mode_e mode = MODE_CDL2D;
  logic [23:0] window = 24'd20000;
  logic gate_en = 0;
  logic [31:0] gate_lo = 32'd10000000, gate_hi = 32'd30000000;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  ext_hit_t in_hit = '0;
  event_t out_ev;
  logic [15:0] rejected, dup_hits, gated;
  ext_hit_t hq[$];
  event_t   eq[$];
  int checks = 0, failures = 0, exp_rej = 0, exp_dup = 0, exp_gated = 0, n_ev = 0;

  event_builder dut (.*);

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
          $display("FAIL event ch %0d x %0d y %0d t %0d expected ch %0d x %0d y %0d t %0d",
                   out_ev.ch, out_ev.x, out_ev.y, out_ev.t, e.ch, e.x, e.y, e.t);
        end
      end
    end
  end

  task automatic add(logic [2:0] ch, longint t);
    hq.push_back('{ch: ch, t_abs: T_W'(t), t: T_W'(t)});
  endtask

  // expected output of one event or raw hit, after the time gate
  task automatic expect_ev(event_t e);
    if (gate_en && (e.t < T_W'(gate_lo) || e.t > T_W'(gate_hi))) exp_gated++;
    else eq.push_back(e);
  endtask

  task automatic build(det_mode_e m, int n);
    longint t0 = 1000000;
    for (int i = 0; i < n; i++) begin
      automatic int x = $urandom_range(16000, 0) - 8000;
      automatic int y = $urandom_range(16000, 0) - 8000;
      automatic int d = 10000;
      automatic int kind = $urandom_range(9, 0);   // 0: lose a hit, 1: duplicate
      automatic longint ta[5];
      automatic int order[4] = '{1, 2, 3, 4};
      t0 += 100000 + $urandom_range(100000, 0);
      ta[0] = t0 - 5000;
      ta[1] = t0 + d + x; ta[2] = t0 + d - x;
      ta[3] = t0 + d + y; ta[4] = t0 + d - y;
      add(CH_START, ta[0]);
      if (m == MODE_RAW) expect_ev('{ch: CH_START, x: '0, y: '0, t: T_W'(ta[0])});
      order.shuffle();
      for (int k = 0; k < 4; k++) begin
        automatic int c = order[k];
        if (kind == 0 && c == 1) continue;         // lost X A hit
        add(3'(c), ta[c]);
        if (m == MODE_RAW) expect_ev('{ch: 3'(c), x: '0, y: '0, t: T_W'(ta[c])});
        if (kind == 1 && k == 0 && (m == MODE_CDL2D || c <= 2)) begin
          add(3'(c), ta[c] + 3000);                // repeated hit
          if (m == MODE_RAW) expect_ev('{ch: 3'(c), x: '0, y: '0, t: T_W'(ta[c] + 3000)});
          else exp_dup++;
        end
      end
      if (m != MODE_RAW) begin
        if (kind == 0) exp_rej++;
        else expect_ev('{ch: '0, x: XY_W'(2 * x), y: (m == MODE_DL1D) ? '0 : XY_W'(2 * y),
                            t: T_W'(t0 + d)});
      end
    end
    // a final lone hit far away closes a pending incomplete event
    add(CH_XA, t0 + 10000000);
  endtask

  task automatic run(det_mode_e m, logic g);
    @(negedge clk); rst = 1; mode = m; gate_en = g;
    @(negedge clk); rst = 0;
    exp_rej = 0; exp_dup = 0; exp_gated = 0;
    build(m, 300);
    if (m == MODE_RAW) expect_ev('{ch: CH_XA, x: '0, y: '0, t: hq[hq.size()-1].t});
    while (hq.size() != 0) begin
      in_valid = 1; in_hit = hq[0];
      out_ready = ($urandom_range(4, 0) != 0);
      @(posedge clk);
      if (in_ready) void'(hq.pop_front());
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    checks += 4;
    if (int'(gated) != exp_gated || (g && exp_gated == 0)) begin
      failures++; $display("FAIL gated %0d expected %0d", gated, exp_gated);
    end
    if (eq.size() != 0) begin failures++; $display("FAIL %0d events missing", eq.size()); end
    if (m != MODE_RAW && int'(rejected) != exp_rej) begin
      failures++; $display("FAIL rejected %0d expected %0d", rejected, exp_rej);
    end
    if (m != MODE_RAW && int'(dup_hits) != exp_dup) begin
      failures++; $display("FAIL duplicates %0d expected %0d", dup_hits, exp_dup);
    end
    $display("mode %s gate %0d: rejected %0d duplicates %0d gated %0d", m.name(), g, rejected, dup_hits, gated);
    eq.delete();
  endtask

  initial begin
    for (int g = 0; g < 2; g++) begin
      run(MODE_CDL2D, g[0]);
      run(MODE_DL1D, g[0]);
      run(MODE_RAW, g[0]);
    end
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
