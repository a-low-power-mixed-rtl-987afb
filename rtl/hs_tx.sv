// Column side of the channel-to-End-of-Column handshake.
//
// The word leaving the bottom channel of a column is handed to the
// End-of-Column with a four-phase request/acknowledge handshake and bundled
// data: the word is latched and held on `data`, `req` rises, and the sender
// waits for `ack` to rise, lowers `req`, and waits for `ack` to fall before it
// takes the next word. `ack` is brought into this clock domain by the
// dual-edge synchroniser, as the chip does for these handshake signals. The
// synchroniser use follows the chip description; the four-phase protocol and
// bundled data are this design's choice.
//
// Ports: in_valid/in_data/in_ready (valid/ready from the chain), req, data,
// ack (asynchronous).
module hs_tx
  import alcor_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  payload_t in_data,
  output logic     in_ready,
  output logic     req,
  output payload_t data,
  input  logic     ack
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [1:0] {IDLE, WAIT_ACK, WAIT_NACK} hs_state_e;
  hs_state_e st;
  logic      ack_s;

  sync_dual_edge u_sync (.clk, .rst_n, .async_in(ack), .sync_out(ack_s));

  assign in_ready = (st == IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st   <= IDLE;
      req  <= 1'b0;
      data <= '0;
    end else begin
      unique case (st)
        IDLE:      if (in_valid && !ack_s) begin
                     data <= in_data;
                     req  <= 1'b1;
                     st   <= WAIT_ACK;
                   end
        WAIT_ACK:  if (ack_s) begin
                     req <= 1'b0;
                     st  <= WAIT_NACK;
                   end
        WAIT_NACK: if (!ack_s) st <= IDLE;
        default:   st <= IDLE;
      endcase
    end

  a_data_held: assert property (@(posedge clk) disable iff (!rst_n) req |=> $stable(data));

endmodule
