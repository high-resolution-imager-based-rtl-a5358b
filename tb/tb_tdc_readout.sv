// tb_tdc_readout: random hits on five channels with a randomly stalling
// consumer. Checks that every hit comes out once, with its channel and
// timestamp, in order within its channel; that half/wrap flags produce marker
// words, each ahead of every hit that arrives after its flag; that round-robin serves all channels under full load; and that hits
// beyond the per-channel buffer are dropped and counted when the output is
// blocked.
`timescale 1ps/1fs
module tb_tdc_readout;
  import imager_pkg::*;
  localparam int NC = 5, TW = 26, D = 8;
  logic clk = 0, rst = 1;
  logic [NC-1:0] hit_valid = '0;
  logic [NC-1:0][TW-1:0] hit_ts = '0;
  logic half = 0, wrap = 0, out_valid, out_ready = 0;
  ts_word_t out_word;
  logic [15:0] overflow;
  logic [TW-1:0] q[NC][$];
  int qm[NC][$];             // markers flagged before each hit arrived
  int n_half_exp = 0, n_wrap_exp = 0, n_half = 0, n_wrap = 0;
  int checks = 0, failures = 0, n_out = 0;

  tdc_readout #(.N_CH(NC), .TS_W(TW), .CH_FIFO_DEPTH(D)) dut (.*);

  always #1200 clk = ~clk;

  // consumer / checker on the output stream
  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (out_word.ch == MARK_HALF) n_half++;
      else if (out_word.ch == MARK_WRAP) n_wrap++;
      else if (int'(out_word.ch) >= NC || q[out_word.ch].size() == 0) begin
        failures++; $display("FAIL unexpected word ch %0d", out_word.ch);
      end else begin
        automatic logic [TW-1:0] e = q[out_word.ch].pop_front();
        automatic int mk = qm[out_word.ch].pop_front();
        n_out++;
        checks++;
        if (n_half + n_wrap < mk) begin
          failures++; $display("FAIL hit on ch %0d overtook a marker", out_word.ch);
        end
        if (e != out_word.ts) begin
          failures++;
          $display("FAIL ch %0d ts %h expected %h", out_word.ch, out_word.ts, e);
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // phase 1: random traffic, at most 2 hits per channel per 6 cycles
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      out_ready = ($urandom_range(3, 0) != 0);
      for (int c = 0; c < NC; c++) begin
        hit_valid[c] = ($urandom_range(9, 0) == 0);
        hit_ts[c] = TW'($urandom);
        if (hit_valid[c]) begin
          q[c].push_back(hit_ts[c]);
          qm[c].push_back(n_half_exp + n_wrap_exp);
        end
      end
      half = (i % 700 == 100);
      wrap = (i % 700 == 450);
      n_half_exp += half; n_wrap_exp += wrap;
    end
    @(negedge clk); hit_valid = '0; half = 0; wrap = 0; out_ready = 1;
    repeat (50) @(negedge clk);
    checks++;
    if (overflow != 0) begin failures++; $display("FAIL overflow %0d without drops", overflow); end
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (q[c].size() != 0) begin failures++; $display("FAIL ch %0d lost %0d", c, q[c].size()); end
    end
    checks++;
    if (n_half != n_half_exp || n_wrap != n_wrap_exp) begin
      failures++; $display("FAIL markers %0d/%0d %0d/%0d", n_half, n_half_exp, n_wrap, n_wrap_exp);
    end
    // phase 2: blocked output, 12 hits into channel 2 -> 8 kept (plus one in
    // the output register), 3 dropped
    out_ready = 0;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      hit_valid = 5'b00100; hit_ts[2] = TW'(i);
      if (i < D + 1) begin q[2].push_back(TW'(i)); qm[2].push_back(0); end
    end
    @(negedge clk); hit_valid = '0;
    checks++;
    if (overflow != 3) begin failures++; $display("FAIL overflow %0d expected 3", overflow); end
    out_ready = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (q[2].size() != 0) begin failures++; $display("FAIL kept hits missing %0d", q[2].size()); end
    $display("words=%0d", n_out);
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
