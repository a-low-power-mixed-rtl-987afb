// Synchroniser for the handshake signals between the channels and the
// End-of-Column.
//
// The asynchronous input is sampled by two flip-flops, one on the rising and
// one on the falling clock edge. Their outputs are ORed, so whichever sample
// sees the input first passes it on, and two more rising-edge flip-flops
// follow. A rising input therefore reaches the output between 1.5 and 2.5
// clock periods after it changes: 1.5 periods if it arrives just before a
// falling edge, 2.5 if just after one. A falling input is passed on once both
// first-stage samples have seen it (2 to 2.5 periods, minus the time to the
// later edge). The four-flop structure, the opposite clock edge of the second
// first-stage flop and the delay range follow the described circuit; the OR
// function is read from that delay range, and the active-low asynchronous
// reset is an addition of this design.
//
// Ports: clk, rst_n (async, active low), async_in, sync_out.
module sync_dual_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic sync_out
);
  timeunit 1ns; timeprecision 1ps;

  logic q_pos, q_neg, q_mid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q_pos <= 1'b0;
    else        q_pos <= async_in;

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) q_neg <= 1'b0;
    else        q_neg <= async_in;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q_mid    <= 1'b0;
      sync_out <= 1'b0;
    end else begin
      q_mid    <= q_pos | q_neg;
      sync_out <= q_mid;
    end

endmodule
