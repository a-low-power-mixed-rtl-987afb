// End-of-Column (EoC): the interface between the channel columns and the
// outside of the chip.
//
// For every column it runs the receiving side of the four-phase handshake:
// the column's `req` passes through a dual-edge synchroniser; when it is
// high and the column's word buffer is free, the bundled data word is
// latched and `ack` is raised; `ack` is lowered once `req` has fallen. The
// buffered word is then sent off-chip on the column's own double-data-rate
// link (one link per column, four links). The SPI configuration port is part
// of the EoC and drives the configuration chains of the columns.
// The EoC's role, the SPI port, the four DDR links and the synchronised
// handshake follow the chip description; the one-link-per-column mapping and
// the one-word buffer are this design's choices.
module eoc
  import alcor_pkg::*;
#(
  parameter int unsigned NCOL = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // columns
  input  logic [NCOL-1:0]     col_req,
  input  payload_t [NCOL-1:0] col_data,
  output logic [NCOL-1:0]     col_ack,
  // configuration chains
  output logic [NCOL-1:0]     cfg_shift,
  output logic [NCOL-1:0]     cfg_update,
  output logic                cfg_data,
  input  logic [NCOL-1:0]     cfg_ret,
  // SPI
  input  logic                sclk,
  input  logic                cs_n,
  input  logic                mosi,
  output logic                miso,
  // links, DDR
  output logic [NCOL-1:0]     tx,
  output logic [NCOL-1:0]     tx_busy
);
  timeunit 1ns; timeprecision 1ps;

  spi_cfg #(.NCOL(NCOL)) u_spi (
    .clk, .rst_n, .sclk, .cs_n, .mosi, .miso,
    .cfg_shift, .cfg_update, .cfg_data, .cfg_ret
  );

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    logic     req_s;
    logic     buf_valid, ser_ready;
    payload_t buf_q;
    logic     bit_a, bit_b;

    sync_dual_edge u_sync (.clk, .rst_n, .async_in(col_req[c]), .sync_out(req_s));

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        col_ack[c] <= 1'b0;
        buf_valid  <= 1'b0;
        buf_q      <= '0;
      end else begin
        if (buf_valid && ser_ready) buf_valid <= 1'b0;
        if (req_s && !col_ack[c] && !buf_valid) begin
          buf_q      <= col_data[c];
          buf_valid  <= 1'b1;
          col_ack[c] <= 1'b1;
        end else if (!req_s && col_ack[c]) begin
          col_ack[c] <= 1'b0;
        end
      end

    lvds_ser #(.W(PAYLOAD_W)) u_ser (
      .clk, .rst_n,
      .in_valid(buf_valid), .in_data(buf_q), .in_ready(ser_ready),
      .bit_a, .bit_b, .tx(tx[c]), .busy(tx_busy[c])
    );
  end

endmodule
