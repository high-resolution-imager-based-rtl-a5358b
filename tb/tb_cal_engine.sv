// tb_cal_engine: feeds the calibration engine with raw codes from a model
// delay line whose taps have random widths, and checks the table it writes.
//
// The model line has 64 taps; a clock period is 60 bins. For a hit at a
// random time d before the clock, the raw code is the number of taps whose
// cumulative delay is at most d. The expected entry for code k is the middle
// of the interval of d that gives code k, clipped to the period. With 2^14
// hits the statistical error is below 0.3 bins, so each written entry must be
// within 1.5 bins of it (the engine truncates). Two runs are made, one per
// channel with different tap widths, with hits on the other channel at the
// same time (they must be ignored) and a second run request while busy (it
// must be ignored). The test also checks that every entry is written once, in
// order, to the right channel, and that busy lasts clear + hits + write.
`timescale 1ps/1fs
module tb_cal_engine;
  localparam int NC = 2, NT = 64, CB = 60, L = 14, AW = $clog2(NT + 1), FW = 11;
  logic clk = 0, rst = 1, run = 0;
  logic [2:0] ch = '0;
  logic [NC-1:0] raw_valid = '0;
  logic [NC-1:0][AW-1:0] raw_cnt = '0;
  logic busy, wr_en;
  logic [2:0] wr_ch;
  logic [AW-1:0] wr_addr;
  logic [FW-1:0] wr_data;
  int checks = 0, failures = 0, n_wr = 0;
  real pos [NT];
  real expv [NT+1];

  cal_engine #(.N_CH(NC), .NTAPS(NT), .CLK_BINS(CB), .LOG2_HITS(L)) dut (.*);

  always #1200 clk = ~clk;

  // tap widths: mean 1.25 bins (the line is 80 bins, longer than the period),
  // spread +/- spread_pct %
  task automatic make_line(int spread_pct);
    real acc = 0.0;
    for (int k = 0; k < NT; k++) begin
      acc += 1.25 * (1.0 + (real'($urandom_range(2 * spread_pct, 0)) - spread_pct) / 100.0);
      pos[k] = acc;
    end
    for (int k = 0; k <= NT; k++) begin
      automatic real lo = (k == 0) ? 0.0 : pos[k-1];
      automatic real hi = (k == NT) ? 1.0e9 : pos[k];
      if (lo > CB) lo = CB;
      if (hi > CB) hi = CB;
      expv[k] = (lo + hi) / 2.0;
    end
  endtask

  function automatic int code(real d);
    int c = 0;
    while (c < NT && pos[c] <= d) c++;
    return c;
  endfunction

  always @(posedge clk) begin
    if (!rst && wr_en) begin
      automatic real err = real'(wr_data) - expv[wr_addr];
      checks++;
      if (int'(wr_addr) != n_wr || wr_ch != ch || err > 1.5 || err < -1.5) begin
        failures++;
        $display("FAIL write ch %0d addr %0d data %0d expected ch %0d addr %0d data %0.2f",
                 wr_ch, wr_addr, wr_data, ch, n_wr, expv[n_wr]);
      end
      n_wr++;
    end
  end

  task automatic calibrate(int c, int spread_pct);
    int cycles = 0;
    make_line(spread_pct);
    n_wr = 0;
    @(negedge clk); ch = 3'(c); run = 1;
    @(negedge clk); run = 0;
    repeat (NT + 1) @(negedge clk);                // histogram clearing
    for (int i = 0; i < (1 << L); i++) begin
      raw_valid = '0;
      raw_valid[c] = 1;
      raw_cnt[c] = AW'(code(real'($urandom_range(999999, 0)) * CB / 1.0e6));
      raw_valid[1 - c] = ($urandom_range(1, 0) == 1);
      raw_cnt[1 - c] = AW'(NT);                    // would spoil the top entry
      if (i == 100) begin run = 1; ch = 3'(1 - c); end
      @(negedge clk);
      run = 0; ch = 3'(c);
    end
    raw_valid = '0;
    while (busy) begin @(negedge clk); cycles++; end
    checks += 2;
    if (n_wr != NT + 1) begin failures++; $display("FAIL %0d writes", n_wr); end
    // after the last hit only the NT+1 writes and their output register remain
    if (cycles != NT + 2) begin failures++; $display("FAIL busy %0d cycles after the hits", cycles); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    calibrate(1, 60);
    calibrate(0, 0);
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
