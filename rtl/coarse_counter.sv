// Free-running binary coarse time counter of a channel.
//
// Counts rising clock edges from reset and wraps at 2**W. With the 15-bit
// width of the chip and a 320 MHz clock it spans 102.4 us. The counter is the
// coarse part of every timestamp; the TDC controller samples it when a TDC
// reports a hit. Width follows the chip description; the synchronous `clear`
// (used to align all channels) is this design's addition.
//
// Ports: clk, rst_n, clear, count[W-1:0] (value after the latest edge).
module coarse_counter #(
  parameter int unsigned W = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  output logic [W-1:0] count
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else            count <= count + 1'b1;

endmodule
