// tb_therm_decoder: drives thermometer codes of every run length, with and
// without bubbles, and arbitrary words, and compares the decoded count with a reference popcount.
`timescale 1ps/1fs
module tb_therm_decoder;
  localparam int NTAPS = 1152;
  localparam int CW = $clog2(NTAPS + 1);
  logic [NTAPS-1:0] therm;
  logic [CW-1:0]    cnt;
  int checks = 0, failures = 0;

  therm_decoder #(.NTAPS(NTAPS)) dut (.therm(therm), .cnt(cnt));

  function automatic int ref_count(logic [NTAPS-1:0] v);
    int n = 0;
    foreach (v[k]) if (v[k]) n++;
    return n;
  endfunction

  initial begin
    for (int m = 0; m <= NTAPS; m += 7) begin
      therm = '0;
      for (int k = 0; k < m; k++) therm[k] = 1'b1;
      #1;
      checks++;
      if (int'(cnt) != m) begin
        failures++;
        $display("FAIL run %0d decoded %0d", m, cnt);
      end
    end
    for (int i = 0; i < 200; i++) begin
      automatic int m = $urandom_range(NTAPS - 4, 4);
      therm = '0;
      for (int k = 0; k < m; k++) therm[k] = 1'b1;
      therm[m - 1 - $urandom_range(2, 0)] = 1'b0;   // bubble inside the run
      therm[m + $urandom_range(2, 1)]     = 1'b1;   // stray one beyond it
      #1;
      checks++;
      if (int'(cnt) != ref_count(therm)) begin
        failures++;
        $display("FAIL bubble run %0d decoded %0d", m, cnt);
      end
    end
    // arbitrary words, including the all-ones line
    for (int i = 0; i < 100; i++) begin
      for (int k = 0; k < NTAPS; k++) therm[k] = (i == 0) ? 1'b1 : 1'($urandom);
      #1;
      checks++;
      if (int'(cnt) != ref_count(therm)) begin
        failures++;
        $display("FAIL random word decoded %0d expected %0d", cnt, ref_count(therm));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
