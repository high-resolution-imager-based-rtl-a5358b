// sync_fifo: first-in first-out buffer, single clock.
//
// Used as the link that carries timestamp words from the TDC FPGA to the
// processing FPGA, and as the small per-channel buffer inside the TDC readout.
// A FIFO between the two FPGAs is what the system description names; depth,
// width, the single clock and the show-ahead read are this design's choices.
//
// Show-ahead: rd_data is the oldest word whenever empty is low; rd_en pops it.
// wr_en while full and rd_en while empty are protocol errors (asserted).
// count is the fill level. Reset empties the FIFO.
`timescale 1ps/1fs
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 1024,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en && !full) wp <= (int'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      if (rd_en && !empty) rp <= (int'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(wr_en && !full) - (AW+1)'(rd_en && !empty);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));
endmodule
