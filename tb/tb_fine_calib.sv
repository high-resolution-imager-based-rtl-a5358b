// tb_fine_calib: checks the identity contents after power-up, then writes
// random entries and reads them back, checking the one-cycle read latency.
`timescale 1ps/1fs
module tb_fine_calib;
  localparam int NTAPS = 1152, FINE_W = 11, AW = $clog2(NTAPS + 1);
  logic clk = 0;
  logic wr_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [FINE_W-1:0] wr_data = '0, rd_data;
  logic [FINE_W-1:0] model [NTAPS+1];
  int checks = 0, failures = 0;

  fine_calib #(.NTAPS(NTAPS), .FINE_W(FINE_W)) dut (.*);

  always #1200 clk = ~clk;

  task automatic check_read(int a);
    rd_addr <= AW'(a);
    @(posedge clk); #1;
    checks++;
    if (rd_data != model[a]) begin
      failures++;
      $display("FAIL addr %0d read %0d expected %0d", a, rd_data, model[a]);
    end
  endtask

  initial begin
    for (int i = 0; i <= NTAPS; i++) model[i] = FINE_W'(i);
    @(posedge clk);
    for (int i = 0; i < 50; i++) check_read($urandom_range(NTAPS, 0));
    for (int i = 0; i < 300; i++) begin
      automatic int a = $urandom_range(NTAPS, 0);
      automatic logic [FINE_W-1:0] d = FINE_W'($urandom);
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = d;
      model[a] = d;
      @(negedge clk);
      wr_en = 0;
    end
    for (int i = 0; i <= NTAPS; i += 3) check_read(i);
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
