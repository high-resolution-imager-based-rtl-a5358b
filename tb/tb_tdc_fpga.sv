// tb_tdc_fpga: sends 3.5 ns pulses at random times on START and STOP1..STOP4
// (several channels often at the same moment) and checks that every pulse
// comes out of the TDC once, on the right channel, with a timestamp within
// one bin of its true time, and that no hit is dropped. Finally it sends
// single pulses into an idle TDC and checks the latency: the word is valid in
// the sixth cycle after the clock edge that captured the pulse. Last, it runs
// the code-density calibration of Channel 2 with 2^8 hits and checks that
// the engine takes the clearing, the hits and the table write (NTAPS+1
// cycles each for clear and write) and then releases the table port.
`timescale 1ps/1fs
module tb_tdc_fpga;
  import imager_pkg::*;
  localparam int  NTAPS = 1152, AW = $clog2(NTAPS + 1);
  localparam real TCLK = 2400.0;
  localparam real TAP  = TCLK / CLK_BINS;
  localparam int  CAL_LOG2 = 8;
  logic clk = 0, rst = 1, start_in = 0;
  logic [3:0] stop_in = '0;
  logic out_valid, out_ready = 1;
  ts_word_t out_word;
  logic [15:0] overflow;
  logic cal_run = 0, cal_busy;
  bit skip2 = 0;             // Channel 2 under calibration: accuracy not checked
  realtime t0;
  realtime pend[5][$];
  int checks = 0, failures = 0, n_hits = 0;

  tdc_fpga #(.TAP_PS(TAP), .CAL_LOG2(CAL_LOG2)) dut (
    .clk(clk), .rst(rst), .start_in(start_in), .stop_in(stop_in),
    .cal_wr_en(1'b0), .cal_wr_ch(3'd2), .cal_wr_addr('0), .cal_wr_data('0),
    .cal_run(cal_run), .cal_busy(cal_busy),
    .out_valid(out_valid), .out_ready(out_ready), .out_word(out_word),
    .overflow(overflow)
  );

  always #(TCLK/2) clk = ~clk;
  always @(posedge clk) if (rst) t0 = $realtime;

  always @(posedge clk) begin
    if (!rst && out_valid && out_ready && out_word.ch < 5) begin
      checks++;
      if (pend[out_word.ch].size() == 0) begin
        failures++; $display("FAIL unexpected hit on %0d", out_word.ch);
      end else begin
        automatic realtime te = pend[out_word.ch].pop_front();
        automatic real err = real'(out_word.ts) - (te - t0) / TAP;
        n_hits++;
        if ((err > 1.01 || err < -1.01) && !(skip2 && out_word.ch == 3'd2)) begin
          failures++;
          $display("FAIL ch %0d ts %0d expected %0.1f", out_word.ch, out_word.ts, (te - t0) / TAP);
        end
      end
    end
  end

  task automatic pulse(int c);
    pend[c].push_back($realtime);
    if (c == 0) start_in = 1; else stop_in[c-1] = 1;
    #3500;
    if (c == 0) start_in = 0; else stop_in[c-1] = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      automatic logic [4:0] sel = 5'($urandom_range(31, 1));
      #($urandom_range(5000, 0));
      for (int c = 0; c < 5; c++)
        if (sel[c]) fork automatic int cc = c; pulse(cc); join_none
      #7000;
    end
    #50000;
    for (int i = 0; i < 20; i++) begin
      automatic int c = $urandom_range(4, 0), n = 0;
      @(negedge clk);
      #($urandom_range(2300, 100));
      fork pulse(c); join_none
      @(posedge clk);                       // capturing edge
      @(negedge clk);
      while (!(out_valid && out_word.ch == 3'(c))) begin @(negedge clk); n++; end
      checks++;
      if (n != 6) begin failures++; $display("FAIL latency %0d cycles", n); end
      #10000;
    end
    // code-density calibration of Channel 2
    begin
      automatic int cycles = 0;
      skip2 = 1;
      @(negedge clk); cal_run = 1;
      @(negedge clk); cal_run = 0;
      checks++;
      if (!cal_busy) begin failures++; $display("FAIL calibration did not start"); end
      repeat (NTAPS + 1) @(negedge clk);
      for (int i = 0; i < (1 << CAL_LOG2); i++) begin
        #($urandom_range(2400, 0));
        fork pulse(2); join_none
        #7000;
      end
      while (cal_busy && cycles < 10000) begin @(negedge clk); cycles++; end
      checks++;
      // the last hit is counted 4 cycles after the end of its 3.5 ns pulse
      if (cycles < NTAPS + 1 || cycles > NTAPS + 8) begin
        failures++; $display("FAIL calibration ended %0d cycles after the last pulse", cycles);
      end
      #50000;
      skip2 = 0;
    end
    for (int c = 0; c < 5; c++) begin
      checks++;
      if (pend[c].size() != 0) begin failures++; $display("FAIL ch %0d lost %0d", c, pend[c].size()); end
    end
    checks++;
    if (overflow != 0) begin failures++; $display("FAIL overflow"); end
    $display("hits=%0d", n_hits);
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
