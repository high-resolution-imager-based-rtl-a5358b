// fine_calib: calibration table of a TDC channel.
//
// The raw bin count of the delay line is only proportional to time if all taps
// have the same delay; in a real carry chain they differ by up to several
// times. The table maps each raw count (0..NTAPS) to the calibrated fine time
// in LSB units, which restores linearity. The need for calibration is taken
// from the TDC description; how the table is filled (for instance from a
// code-density histogram computed by software) is left to the user, and at
// power-up it holds the identity map, correct for a uniform line.
//
// One write port (wr_en, wr_addr, wr_data) and one registered read port: data
// for rd_addr appears on rd_data one clock later.
`timescale 1ps/1fs
module fine_calib #(
  parameter int NTAPS  = 1152,
  parameter int FINE_W = 11,
  parameter int ADDR_W = $clog2(NTAPS + 1)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [FINE_W-1:0] wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [FINE_W-1:0] rd_data
);
  logic [FINE_W-1:0] lut [NTAPS+1];

  initial begin
    for (int i = 0; i <= NTAPS; i++) lut[i] = FINE_W'(i);
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_addr) <= NTAPS) lut[wr_addr] <= wr_data;
    rd_data <= (int'(rd_addr) <= NTAPS) ? lut[rd_addr] : '1;
  end
endmodule
