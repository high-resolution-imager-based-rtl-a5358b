// tb_ts_extender: builds a stream of hits with known 43-bit absolute times
// that cross many 2^26 rollovers, inserts the half/wrap markers the TDC would
// send (sometimes a hit measured just before a wrap arrives just after its
// marker), and checks the extended output for absolute and START-relative
// mode and for several bin-width settings, with a randomly stalling consumer.
`timescale 1ps/1fs
module tb_ts_extender;
  import imager_pkg::*;
  localparam int E_W = EPOCH_W + TS_W;
  logic clk = 0, rst = 1;
  logic rel_start = 0;
  logic [15:0] bin_mul = 16'd256;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  ts_word_t in_word = '0;
  ext_hit_t out_hit;
  ts_word_t wq[$];           // words to send
  longint   exp_q[$];        // expected output times
  longint   exp_a[$];        // expected absolute times
  logic [2:0] exp_ch[$];
  int checks = 0, failures = 0, n_late = 0;

  ts_extender dut (.*);

  always #1200 clk = ~clk;

  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        automatic longint e = exp_q.pop_front();
        automatic logic [2:0] ec = exp_ch.pop_front();
        automatic longint ea = exp_a.pop_front();
        if (out_hit.t != T_W'(e) || out_hit.ch != ec || out_hit.t_abs != T_W'(ea)) begin
          failures++;
          $display("FAIL ch %0d t %0d expected ch %0d t %0d", out_hit.ch, out_hit.t, ec, T_W'(e));
        end
      end
    end
  end

  function automatic longint scaled(longint t, int mul);
    return ((t & ((64'd1 << E_W) - 1)) * mul) >> 8;
  endfunction

  // Build the word stream for one run; T runs from 0 upwards.
  task automatic build(int n, bit rel, int mul);
    longint T = 0, prevT = 0, tstart = 0;
    for (int i = 0; i < n; i++) begin
      automatic logic [2:0] ch = 3'($urandom_range(4, 0));
      automatic bit late = 0;
      T = prevT + $urandom_range(1 << 24, 1);
      // a hit just below a wrap boundary that is overtaken by the marker
      if (($urandom_range(7, 0) == 0) && ((T >> TS_W) != (prevT >> TS_W))) begin
        T = ((T >> TS_W) << TS_W) - $urandom_range(50, 1);
        if (T <= prevT) T = prevT + 1;
        late = ((T >> TS_W) == (prevT >> TS_W));
      end
      if (late) begin
        // markers that are due at the boundary just above T
        automatic longint b = ((T >> TS_W) + 1) << TS_W;
        if (((prevT >> (TS_W-1)) & 1) == 0 && ((T >> (TS_W-1)) & 1) == 1)
          wq.push_back('{ch: MARK_HALF, ts: '0});
        wq.push_back('{ch: MARK_WRAP, ts: '0});
        n_late++;
        prevT = b;   // the wrap has been signalled
      end else begin
        for (longint h = (prevT >> (TS_W-1)) + 1; h <= (T >> (TS_W-1)); h++)
          wq.push_back('{ch: (h % 2 == 1) ? MARK_HALF : MARK_WRAP, ts: '0});
        prevT = T;
      end
      wq.push_back('{ch: ch, ts: TS_W'(T)});
      exp_ch.push_back(ch);
      exp_q.push_back(scaled((rel && ch != CH_START) ? T - tstart : T, mul));
      exp_a.push_back(scaled(T, mul));
      if (ch == CH_START) tstart = T;
    end
  endtask

  task automatic run(bit rel, int mul);
    @(negedge clk); rst = 1; rel_start = rel; bin_mul = 16'(mul);
    @(negedge clk); rst = 0;
    build(400, rel, mul);
    while (wq.size() != 0) begin
      in_valid = 1; in_word = wq[0];
      out_ready = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (in_ready) void'(wq.pop_front());
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    exp_q.delete(); exp_ch.delete(); exp_a.delete();
  endtask

  initial begin
    run(0, 256);
    run(1, 256);
    run(0, 512);
    run(1, 300);
    checks++;
    if (n_late == 0) begin failures++; $display("FAIL no late hit exercised"); end
    $display("late=%0d", n_late);
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
