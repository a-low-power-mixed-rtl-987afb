// Channel configuration control. The configuration words of the channels of
// a column form one shift register: bits enter the bottom channel from the
// End-of-Column and leave the top of each channel towards the channel above.
// While `cfg_shift` is high, every clock shifts one bit (`cfg_in` enters at
// the least significant end, the most significant bit leaves on `cfg_out`).
// A one-cycle `cfg_update` copies the shifted word into the active
// configuration used by the channel, so shifting never disturbs a running
// channel. Reset clears both words, which leaves the channel disabled.
// The bottom-to-top chain follows the channel block diagram; the separate
// shift and update strobes and the reset values are this design's choices.
//
// Ports: clk, rst_n, cfg_shift, cfg_update, cfg_in, cfg_out, cfg (active).
module chan_cfg
  import alcor_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cfg_shift,
  input  logic      cfg_update,
  input  logic      cfg_in,
  output logic      cfg_out,
  output chan_cfg_t cfg
);
  timeunit 1ns; timeprecision 1ps;

  logic [CFG_W-1:0] shadow;

  assign cfg_out = shadow[CFG_W-1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      shadow <= '0;
      cfg    <= '0;
    end else begin
      if (cfg_shift)  shadow <= {shadow[CFG_W-2:0], cfg_in};
      if (cfg_update) cfg    <= chan_cfg_t'(shadow);
    end

endmodule
