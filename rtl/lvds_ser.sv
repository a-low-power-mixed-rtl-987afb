// Serialiser of one output link, double data rate: two bits per clock
// period, 640 Mbit/s at 320 MHz.
//
// Each payload word is sent as a frame of 17 clock periods: a start symbol
// (bit 1 then bit 0), then the 32 data bits, most significant first. Between
// frames the line stays at 0, so a receiver finds the start of a frame at the
// first 1 after idle; frames may follow back to back. In every period the
// first bit is driven while the clock is high and the second while it is
// low: `tx = clk ? bit_a : bit_b` stands for the DDR output cell in front of
// the LVDS driver, so the clock is used as data here on purpose. The DDR rate
// follows the chip description; the framing is this design's own.
//
// Ports: in_valid/in_data/in_ready (valid/ready), tx (serial DDR output),
// bit_a/bit_b (the pair of the current period), busy.
module lvds_ser #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  output logic         bit_a,
  output logic         bit_b,
  output logic         tx,
  output logic         busy
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned NSYM = W / 2;   // data periods per frame

  logic [W-1:0]              sr;
  logic [$clog2(NSYM+1)-1:0] left;        // data periods still to send

  assign busy     = (left != 0);
  assign in_ready = (left == 0);
  assign tx       = clk ? bit_a : bit_b;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sr    <= '0;
      left  <= '0;
      bit_a <= 1'b0;
      bit_b <= 1'b0;
    end else if (in_valid && in_ready) begin
      // start symbol
      bit_a <= 1'b1;
      bit_b <= 1'b0;
      sr    <= in_data;
      left  <= ($clog2(NSYM+1))'(NSYM);
    end else if (busy) begin
      bit_a <= sr[W-1];
      bit_b <= sr[W-2];
      sr    <= sr << 2;
      left  <= left - 1'b1;
    end else begin
      bit_a <= 1'b0;
      bit_b <= 1'b0;
    end

endmodule
