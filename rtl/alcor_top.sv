// Digital top of a 32-channel SiPM readout chip for cryogenic operation.
//
// NCOL columns of NROW channels (4 x 8 = 32 by default). Within a column the
// channels form two chains: readout data flows from the top channel down to
// the bottom one (each channel merges its own FIFO into the stream) and
// configuration bits flow from the bottom channel up. The bottom channel of
// each column hands its words to the End-of-Column through a four-phase
// handshake whose request and acknowledge are synchronised on each side; the
// End-of-Column sends each column's words on one double-data-rate serial
// link and drives the configuration chains from its SPI port. The top of each
// configuration chain returns to the End-of-Column for read-back.
//
// Channel c*NROW + r sits in column c, row r (row 0 next to the
// End-of-Column) and carries that number as its channel ID. Every channel
// takes two asynchronous discriminator triggers (`trg`) from its analog front
// end and drives that front end's settings (`ana_cfg`); the front ends and
// the LVDS drivers behind `tx` are analog and outside this RTL. One clock
// (40-320 MHz) runs the whole digital part.
//
// The channel count, the four links, the SPI port, the synchronised
// handshake and the channel chains follow the chip description; the 4 x 8
// arrangement and one link per column are this design's assumptions.
module alcor_top
  import alcor_pkg::*;
#(
  parameter int unsigned NCOL        = 4,
  parameter int unsigned NROW        = 8,
  parameter int unsigned DEAD_CYCLES = 48,
  parameter int unsigned BIN_PS      = 50,
  parameter int unsigned FIFO_DEPTH  = 4
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               coarse_clear,
  // analog front ends
  input  logic [NCOL*NROW-1:0][1:0]          trg,
  output logic [NCOL*NROW-1:0][ANA_W-1:0]    ana_cfg,
  // SPI configuration
  input  logic                               sclk,
  input  logic                               cs_n,
  input  logic                               mosi,
  output logic                               miso,
  // serial links, DDR, to the LVDS drivers
  output logic [NCOL-1:0]                    tx,
  output logic [NCOL-1:0]                    tx_busy,
  // status
  output logic [NCOL*NROW-1:0]               fifo_full
);
  timeunit 1ns; timeprecision 1ps;

  logic [NCOL-1:0]     cfg_shift, cfg_update, cfg_ret;
  logic                cfg_data;
  logic [NCOL-1:0]     col_req, col_ack;
  payload_t [NCOL-1:0] col_data;

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    // index r: signals entering channel r from below (cfg) / leaving it downwards (data)
    logic     [NROW:0] cfg_chain;
    logic     [NROW:0] d_valid, d_ready;
    payload_t [NROW:0] d_data;

    assign cfg_chain[0]  = cfg_data;
    assign cfg_ret[c]    = cfg_chain[NROW];
    assign d_valid[NROW] = 1'b0;           // nothing above the top channel
    assign d_data[NROW]  = '0;

    for (genvar r = 0; r < NROW; r++) begin : g_row
      channel #(.DEAD_CYCLES(DEAD_CYCLES), .BIN_PS(BIN_PS), .FIFO_DEPTH(FIFO_DEPTH)) u_ch (
        .clk, .rst_n,
        .ch_id       (CHID_W'(c * NROW + r)),
        .trg         (trg[c*NROW + r]),
        .ana_cfg     (ana_cfg[c*NROW + r]),
        .coarse_clear,
        .cfg_shift   (cfg_shift[c]),
        .cfg_update  (cfg_update[c]),
        .cfg_in      (cfg_chain[r]),
        .cfg_out     (cfg_chain[r+1]),
        .up_valid    (d_valid[r+1]),
        .up_data     (d_data[r+1]),
        .up_ready    (d_ready[r+1]),
        .dn_valid    (d_valid[r]),
        .dn_data     (d_data[r]),
        .dn_ready    (d_ready[r]),
        .fifo_full   (fifo_full[c*NROW + r])
      );
    end

    hs_tx u_hs (
      .clk, .rst_n,
      .in_valid(d_valid[0]), .in_data(d_data[0]), .in_ready(d_ready[0]),
      .req(col_req[c]), .data(col_data[c]), .ack(col_ack[c])
    );
  end

  eoc #(.NCOL(NCOL)) u_eoc (
    .clk, .rst_n,
    .col_req, .col_data, .col_ack,
    .cfg_shift, .cfg_update, .cfg_data, .cfg_ret,
    .sclk, .cs_n, .mosi, .miso,
    .tx, .tx_busy
  );

endmodule
