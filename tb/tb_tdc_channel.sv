// tb_tdc_channel: sends pulses (3.5 ns high) at random times to one channel
// with a 2.4 ns clock and checks every timestamp against the true pulse time
// divided by the bin (within one bin), the pipeline latency (4 to 5 clocks
// after the pulse), that pulse pairs 7 ns apart are both measured, and that a
// rewritten calibration entry changes the fine time as written.
`timescale 1ps/1fs
module tb_tdc_channel;
  localparam int  NTAPS = 1152, CLK_BINS = 1106, TS_W = 26, FINE_W = 11;
  localparam int  AW = $clog2(NTAPS + 1);
  localparam real TCLK = 2400.0;
  localparam real TAP  = TCLK / CLK_BINS;  // bin consistent with the clock

  logic clk = 0, rst = 1, pulse = 0;
  logic cal_wr_en = 0;
  logic [AW-1:0] cal_wr_addr = '0;
  logic [FINE_W-1:0] cal_wr_data = '0;
  logic hit_valid, half, wrap, raw_valid;
  logic [AW-1:0] raw_cnt;
  int n_raw = 0, n_hv = 0;
  logic [TS_W-1:0] hit_ts;
  int checks = 0, failures = 0, n_pairs = 0, n_cal = 0;
  realtime t0;             // clock edge at which the counter was zero
  realtime pend[$];        // pulse times waiting for their timestamp
  int      cal_off[$];     // expected calibration offset of each pulse

  tdc_channel #(.NTAPS(NTAPS), .CLK_BINS(CLK_BINS), .TS_W(TS_W), .FINE_W(FINE_W),
                .TAP_PS(TAP)) dut (
    .clk(clk), .rst(rst), .pulse_in(pulse),
    .cal_wr_en(cal_wr_en), .cal_wr_addr(cal_wr_addr), .cal_wr_data(cal_wr_data),
    .raw_valid(raw_valid), .raw_cnt(raw_cnt),
    .hit_valid(hit_valid), .hit_ts(hit_ts), .half(half), .wrap(wrap)
  );

  always #(TCLK/2) clk = ~clk;

  always @(posedge clk) if (rst) t0 = $realtime;

  // every hit shows its raw ones count two cycles before hit_valid
  always @(posedge clk) begin
    #1;
    if (raw_valid) begin
      n_raw++;
      checks++;
      if (raw_cnt == '0 || int'(raw_cnt) > NTAPS) begin failures++; $display("FAIL raw count %0d", raw_cnt); end
    end
    if (hit_valid) n_hv++;
  end

  // checker
  always @(posedge clk) begin
    #1;
    if (hit_valid) begin
      realtime te, lat;
      real exp_ts, err;
      int off;
      checks += 2;
      if (pend.size() == 0) begin
        failures++; $display("FAIL unexpected hit");
      end else begin
        te = pend.pop_front();
        off = cal_off.pop_front();
        exp_ts = (te - t0) / TAP - off;
        err = real'(hit_ts) - exp_ts;
        if (err > 1.01 || err < -1.01) begin
          failures++;
          $display("FAIL pulse at %0t: ts %0d expected %0.1f", te, hit_ts, exp_ts);
        end
        lat = $realtime - 1 - te;
        if (lat < 4 * TCLK || lat > 5 * TCLK + 2 * TAP) begin
          failures++; $display("FAIL latency %0t", lat);
        end
      end
    end
  end

  task automatic send(realtime high, realtime low, int off = 0);
    pulse = 1; pend.push_back($realtime); cal_off.push_back(off);
    #(high);
    pulse = 0;
    #(low);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    // isolated pulses at random phases
    for (int i = 0; i < 150; i++) begin
      #($urandom_range(9000, 0));
      send(3500, 3500);
    end
    // pulse pairs with 7 ns spacing
    for (int i = 0; i < 40; i++) begin
      #($urandom_range(5000, 0));
      send(3500, 3500);
      send(3500, 3500);
      n_pairs++;
    end
    // calibration: make raw counts 300..700 read 37 bins more
    repeat (10) @(posedge clk);
    for (int a = 300; a <= 700; a++) begin
      @(negedge clk);
      cal_wr_en = 1; cal_wr_addr = AW'(a); cal_wr_data = FINE_W'(a + 37);
    end
    @(negedge clk); cal_wr_en = 0;
    for (int i = 0; i < 20; i++) begin
      // pulse 1000 ps before a rising edge: about 461 bins, inside the range
      @(posedge clk);
      #(TCLK - 1000 + $urandom_range(100, 0));
      send(3500, 6000, 37);
      n_cal++;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (pend.size() != 0) begin failures++; $display("FAIL %0d pulses lost", pend.size()); end
    $display("pairs=%0d calibrated=%0d", n_pairs, n_cal);
    checks++;
    if (n_raw != n_hv) begin failures++; $display("FAIL %0d raw counts for %0d hits", n_raw, n_hv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
