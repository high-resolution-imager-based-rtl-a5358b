// tb_delay_scan: the two bench measurements of the TDC, at default parameters.
//
// Fine range scan: one pulse generator drives Channel 4 directly and Channel 3
// through a delay that is stepped from 0 to 10 ns in 10 ps steps; each step is
// fired at a random phase of the 2.4 ns clock. The measured difference of the
// two timestamps must be within 1.5 bins of delay / 2.17 ps.
// Wide range scan: the same with delays from 0 to 1 us in 20 ns steps, which
// makes the coarse counter carry most of the interval. Here the expected value
// uses the true output bin, one clock period / 1106 = 2.169982 ps: reading
// the bins as exactly 2.17 ps would add a scale error of 8 ppm (about 4 bins
// at 1 us). The error must again stay within 1.5 bins; the largest error up
// to 500 ns is reported in ps, as the integral nonlinearity of the model.
// The testbench also reports the largest and rms error of the fine scan.
`timescale 1ps/1fs
module tb_delay_scan;
  import imager_pkg::*;
  localparam real TCLK = 2400.0;
  localparam real TAP  = 2.17;
  localparam real BIN  = TCLK / CLK_BINS;   // output bin of the counter
  logic clk = 0, rst = 1, start_in = 0;
  logic [3:0] stop_in = '0;
  logic out_valid;
  ts_word_t out_word;
  logic [15:0] overflow;
  int checks = 0, failures = 0;
  logic [TS_W-1:0] ts3[$], ts4[$];

  tdc_fpga dut (
    .clk(clk), .rst(rst), .start_in(start_in), .stop_in(stop_in),
    .cal_wr_en(1'b0), .cal_wr_ch('0), .cal_wr_addr('0), .cal_wr_data('0),
    .cal_run(1'b0), .cal_busy(),
    .out_valid(out_valid), .out_ready(1'b1), .out_word(out_word),
    .overflow(overflow)
  );

  always #(TCLK/2) clk = ~clk;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      if (out_word.ch == 3'd3) ts3.push_back(out_word.ts);
      if (out_word.ch == 3'd4) ts4.push_back(out_word.ts);
    end
  end

  // fire Channel 4 now and Channel 3 after delay; return the measured delay
  task automatic measure(realtime delay, output real meas);
    fork
      begin stop_in[3] = 1; #3500; stop_in[3] = 0; end
      begin #(delay); stop_in[2] = 1; #3500; stop_in[2] = 0; end
    join
    repeat (12) @(posedge clk);
    if (ts3.size() != 1 || ts4.size() != 1) begin
      failures++;
      $display("FAIL delay %0t: %0d / %0d hits", delay, ts3.size(), ts4.size());
      meas = -1.0e9;
    end else begin
      meas = real'(int'($signed(ts3[0] - ts4[0])));
    end
    ts3.delete(); ts4.delete();
  endtask

  initial begin
    real meas, err, max_err = 0.0, sum2 = 0.0, inl = 0.0;
    int n = 0;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    for (int step = 0; step <= 1000; step++) begin
      #($urandom_range(2400, 0));
      measure(step * 10.0, meas);
      err = meas - step * 10.0 / TAP;
      checks++;
      if (err > 1.5 || err < -1.5) begin
        failures++;
        $display("FAIL fine scan %0d ps: measured %0.0f bins, expected %0.1f", step * 10, meas, step * 10.0 / TAP);
      end
      if (err > max_err) max_err = err;
      if (-err > max_err) max_err = -err;
      sum2 += err * err; n++;
    end
    $display("fine scan: %0d steps, max error %0.2f bins, rms %0.2f bins", n, max_err, $sqrt(sum2 / n));
    for (int step = 0; step <= 50; step++) begin
      #($urandom_range(2400, 0));
      measure(step * 20000.0, meas);
      err = meas - step * 20000.0 / BIN;
      checks++;
      if (err > 1.5 || err < -1.5) begin
        failures++;
        $display("FAIL wide scan %0d ns: measured %0.0f bins, expected %0.1f", step * 20, meas, step * 20000.0 / BIN);
      end
      if (step <= 25 && err * BIN > inl) inl = err * BIN;
      if (step <= 25 && -err * BIN > inl) inl = -err * BIN;
    end
    $display("wide scan: largest error up to 500 ns %0.2f ps", inl);
    checks++;
    if (overflow != 0) begin failures++; $display("FAIL overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
