// tb_sync_fifo: random pushes and pops on a 16-deep FIFO against a queue
// model; checks data order, full/empty, count, and that it fills completely.
`timescale 1ps/1fs
module tb_sync_fifo;
  localparam int WIDTH = 29, DEPTH = 16;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH):0] count;
  logic [WIDTH-1:0] q[$];
  int checks = 0, failures = 0, n_full = 0;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #1200 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int bias = (i / 500) % 2;       // alternate fill / drain phases
      automatic logic w = ($urandom_range(99, 0) < (bias ? 70 : 30)) && !full;
      automatic logic r = ($urandom_range(99, 0) < (bias ? 30 : 70)) && !empty;
      checks++;
      if (int'(count) != q.size() || full != (q.size() == DEPTH) || empty != (q.size() == 0)) begin
        failures++;
        $display("FAIL status count=%0d model=%0d", count, q.size());
      end
      if (!empty) begin
        checks++;
        if (rd_data != q[0]) begin
          failures++; $display("FAIL data %h expected %h", rd_data, q[0]);
        end
      end
      n_full += full;
      wr_en <= w; rd_en <= r;
      wr_data <= WIDTH'($urandom);
      @(posedge clk);
      if (r) void'(q.pop_front());
      if (w) q.push_back(wr_data);
      wr_en <= 0; rd_en <= 0;
      #1;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
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
