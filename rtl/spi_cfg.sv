// SPI configuration port of the End-of-Column.
//
// An SPI slave, mode 0 (data valid on the rising SCLK edge), most
// significant bit first, sampled with the system clock: SCLK, CS_N and MOSI
// each pass through a dual-edge synchroniser (equal latency keeps them
// aligned) and rising SCLK edges are detected in the clock domain. SCLK must
// therefore be slower than about a quarter of the system clock.
//
// Frame, CS_N low: an 8-bit header, then any number of data bits.
//   header[7]   update: at the end of the frame copy the shifted words into
//               the active configuration of every channel of the column
//   header[6:2] reserved
//   header[1:0] column
// Each data bit is shifted into the column's configuration chain (one
// `cfg_shift` pulse with the bit on `cfg_data`). While data bits flow, MISO
// shows the bit at the end of the chain, so a frame reads back what it
// pushes out. Only the existence of an SPI configuration port comes from the
// chip description; the frame format is this design's own.
module spi_cfg #(
  parameter int unsigned NCOL = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sclk,
  input  logic            cs_n,
  input  logic            mosi,
  output logic            miso,
  output logic [NCOL-1:0] cfg_shift,
  output logic [NCOL-1:0] cfg_update,
  output logic            cfg_data,
  input  logic [NCOL-1:0] cfg_ret
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned CW = (NCOL > 1) ? $clog2(NCOL) : 1;

  logic sclk_s, sel_s, mosi_s, sclk_d, sel_d;
  logic [7:0] hdr;
  logic [3:0] nbits;          // header bits received, saturates at 8
  logic       hdr_done;
  logic [CW-1:0] col;

  sync_dual_edge u_sclk (.clk, .rst_n, .async_in(sclk), .sync_out(sclk_s));
  sync_dual_edge u_cs   (.clk, .rst_n, .async_in(~cs_n), .sync_out(sel_s));
  sync_dual_edge u_mosi (.clk, .rst_n, .async_in(mosi), .sync_out(mosi_s));

  // sel_s is the synchronised chip select, active high.
  assign hdr_done = (nbits == 4'd8);
  assign col      = CW'(hdr[1:0]);
  assign miso     = hdr_done ? cfg_ret[col] : 1'b0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sclk_d     <= 1'b0;
      sel_d     <= 1'b0;
      hdr        <= '0;
      nbits      <= '0;
      cfg_shift  <= '0;
      cfg_update <= '0;
      cfg_data   <= 1'b0;
    end else begin
      sclk_d     <= sclk_s;
      sel_d     <= sel_s;
      cfg_shift  <= '0;
      cfg_update <= '0;
      if (sel_s && !sel_d) begin
        nbits <= '0;                                   // frame starts
      end else if (!sel_s && sel_d) begin
        if (hdr_done && hdr[7]) cfg_update[col] <= 1'b1; // frame ends
        nbits <= '0;
      end else if (sel_s && sclk_s && !sclk_d) begin
        if (!hdr_done) begin
          hdr   <= {hdr[6:0], mosi_s};
          nbits <= nbits + 1'b1;
        end else begin
          cfg_shift[col] <= 1'b1;
          cfg_data       <= mosi_s;
        end
      end
    end

endmodule
