// tb_coarse_counter: runs a reduced counter (12 bits, 100 bins per clock)
// through several rollovers and checks the value after every clock against
// k * CLK_BINS mod 2^TS_W, and the one-cycle half and wrap flags.
`timescale 1ps/1fs
module tb_coarse_counter;
  localparam int TS_W = 12, CLK_BINS = 100;
  logic clk = 0, rst = 1;
  logic [TS_W-1:0] value;
  logic half, wrap;
  int checks = 0, failures = 0, n_half = 0, n_wrap = 0;

  coarse_counter #(.TS_W(TS_W), .CLK_BINS(CLK_BINS)) dut (.*);

  always #1200 clk = ~clk;

  initial begin
    longint exp_abs, prev_abs;
    repeat (3) @(posedge clk);
    rst <= 0;
    prev_abs = 0;
    for (int k = 1; k <= 200; k++) begin
      @(posedge clk); #1;
      exp_abs = longint'(k) * CLK_BINS;
      checks++;
      if (value != TS_W'(exp_abs)) begin
        failures++;
        $display("FAIL k=%0d value=%0d exp=%0d", k, value, exp_abs % (1 << TS_W));
      end
      checks++;
      if (wrap != ((exp_abs >> TS_W) != (prev_abs >> TS_W))) begin
        failures++; $display("FAIL wrap at k=%0d", k);
      end
      checks++;
      if (half != (((exp_abs >> (TS_W-1)) != (prev_abs >> (TS_W-1))) &&
                   ((exp_abs >> (TS_W-1)) & 1) == 1)) begin
        failures++; $display("FAIL half at k=%0d", k);
      end
      n_half += half; n_wrap += wrap;
      prev_abs = exp_abs;
    end
    checks++;
    if (n_wrap < 3 || n_half < 3) begin
      failures++; $display("FAIL too few rollovers %0d %0d", n_half, n_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
