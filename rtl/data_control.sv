// Data control of a channel: payload generator, channel FIFO and the
// multiplexer that merges this channel's data into the readout chain.
//
// Payload generator: each cycle it takes the finished TDC measurement with
// the lowest index, builds a 32-bit payload (channel ID, TDC number, 15-bit
// coarse and 9-bit fine time) and writes it to the FIFO (32 bits x 4), if
// the FIFO has room; `res_ack` tells the TDC controller the result was taken.
// Chain multiplexer: the channels of a column form a chain; data from the
// channel above (`up_*`) and this channel's FIFO share one output register
// towards the channel below (`dn_*`). When both have a word the two sources
// take turns, so neither can starve the other. All three parts follow the
// channel block diagram; the payload bit layout, the fixed priority among
// the TDCs and the alternating arbitration are this design's choices.
//
// Handshakes are valid/ready: a word moves when valid and ready are both
// high at a rising clock edge. `up_ready` depends combinationally on
// `dn_ready`. Latency: TDC result to FIFO 1 cycle, FIFO to output 1 cycle.
module data_control
  import alcor_pkg::*;
#(
  parameter int unsigned N          = NTDC,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [CHID_W-1:0]          ch_id,
  // finished measurements from the TDC controller
  input  logic [N-1:0]               res_valid,
  input  logic [N-1:0][COARSE_W-1:0] res_coarse,
  input  logic [N-1:0][FINE_W-1:0]   res_fine,
  output logic [N-1:0]               res_ack,
  // from the channel above
  input  logic                       up_valid,
  input  payload_t                   up_data,
  output logic                       up_ready,
  // to the channel below
  output logic                       dn_valid,
  output payload_t                   dn_data,
  input  logic                       dn_ready,
  // status
  output logic                       fifo_full
);
  timeunit 1ns; timeprecision 1ps;

  payload_t pl;
  logic     push;
  payload_t fifo_q;
  logic     fifo_empty, fifo_pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_cnt;

  // Payload generator.
  always_comb begin
    res_ack = '0;
    pl      = '0;
    push    = 1'b0;
    for (int i = N - 1; i >= 0; i--)
      if (res_valid[i]) begin
        pl.ch_id  = ch_id;
        pl.tdc_id = TDCID_W'(i);
        pl.coarse = res_coarse[i];
        pl.fine   = res_fine[i];
        push      = 1'b1;
      end
    if (push && !fifo_full)
      for (int i = 0; i < N; i++)
        if (res_valid[i] && pl.tdc_id == TDCID_W'(i)) res_ack[i] = 1'b1;
  end

  sync_fifo #(.W(PAYLOAD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en  (push && !fifo_full),
    .wr_data(pl),
    .rd_en  (fifo_pop),
    .rd_data(fifo_q),
    .full   (fifo_full),
    .empty  (fifo_empty),
    .count  (fifo_cnt)
  );

  // Chain multiplexer with one output register.
  logic load, take_local, last_local;
  assign load = !dn_valid || dn_ready;
  always_comb begin
    if (!fifo_empty && up_valid) take_local = !last_local;
    else                         take_local = !fifo_empty;
  end
  assign fifo_pop = load && take_local;
  assign up_ready = load && !take_local;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dn_valid   <= 1'b0;
      dn_data    <= '0;
      last_local <= 1'b0;
    end else if (load) begin
      if (take_local) begin
        dn_valid   <= 1'b1;
        dn_data    <= fifo_q;
        last_local <= 1'b1;
      end else if (up_valid) begin
        dn_valid   <= 1'b1;
        dn_data    <= up_data;
        last_local <= 1'b0;
      end else begin
        dn_valid   <= 1'b0;
      end
    end

  a_dn_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                dn_valid && !dn_ready |=> dn_valid && $stable(dn_data));

endmodule
