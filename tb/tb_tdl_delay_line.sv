// tb_tdl_delay_line: sends single edges at random times against a 2.4 ns
// sampling clock and checks that each capture holds a clean run of ones whose
// length is the edge-to-clock time divided by the tap delay, and that a line
// without a new edge stays all ones (input high) or all zeros (input low).
`timescale 1ps/1fs
module tb_tdl_delay_line;
  localparam int  NTAPS = 1152;
  localparam real TAP = 2.17;
  logic start = 0, stop = 0;
  logic [NTAPS-1:0] q;
  int checks = 0, failures = 0;
  realtime te;

  tdl_delay_line #(.NTAPS(NTAPS), .TAP_PS(TAP)) dut (.start(start), .stop(stop), .q(q));

  always #1200 stop = ~stop;

  function automatic int ones(logic [NTAPS-1:0] v);
    int n = 0;
    foreach (v[k]) if (v[k]) n++;
    return n;
  endfunction

  initial begin
    for (int i = 0; i < 100; i++) begin
      realtime tclk;
      int m, exp_m;
      logic clean;
      @(posedge stop);
      #($urandom_range(2390, 5));
      start = 1; te = $realtime;
      @(posedge stop); tclk = $realtime;
      #1;
      m = ones(q);
      exp_m = int'((tclk - te) / TAP - 0.5);     // floor
      clean = (q == (({{NTAPS{1'b0}}, 1'b1} << m) - 1));
      checks++;
      if (!clean || m < exp_m - 1 || m > exp_m + 1) begin
        failures++;
        $display("FAIL edge %0t clk %0t ones %0d expected %0d clean %0b", te, tclk, m, exp_m, clean);
      end
      repeat (2) @(posedge stop);
      #1;
      checks++;
      if (q != '1) begin failures++; $display("FAIL line not all ones"); end
      start = 0;
      repeat (3) @(posedge stop);
      #1;
      checks++;
      if (q != '0) begin failures++; $display("FAIL line not all zeros"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
