// Shared types and constants of the SiPM readout chip.
//
// The timestamp is a 15-bit coarse count of the system clock plus a 9-bit
// fine code from a time-to-digital converter (TDC); each channel has four
// TDCs. A hit becomes one 32-bit payload word. The widths of the coarse and
// fine parts, the TDC count and the payload width follow the chip
// description. The bit order of the payload, the reserved top bit and the
// layout of the channel configuration word are this design's own choices.
package alcor_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned COARSE_W  = 15;  // binary coarse counter
  localparam int unsigned FINE_W    = 9;   // TDC fine code
  localparam int unsigned NTDC      = 4;   // TDCs per channel
  localparam int unsigned TDCID_W   = 2;
  localparam int unsigned CHID_W    = 5;   // 32 channels
  localparam int unsigned PAYLOAD_W = 32;
  localparam int unsigned ANA_W     = 16;  // opaque analog settings per channel

  // Operating mode of a channel.
  typedef enum logic {
    MODE_SPC = 1'b0,   // single photon counting: every TDC on its own
    MODE_TOT = 1'b1    // time over threshold: TDC0/1 rising, TDC2/3 trailing edge
  } mode_e;

  // One hit as sent off-chip, most significant field first.
  typedef struct packed {
    logic                rsvd;    // always 0
    logic [CHID_W-1:0]   ch_id;
    logic [TDCID_W-1:0]  tdc_id;
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine;
  } payload_t;

  // Configuration of one channel, shifted in through the channel chain.
  // The bit shifted in first ends in the most significant bit.
  typedef struct packed {
    logic [ANA_W-1:0] ana;      // gains, shaping times, thresholds (to the analog front end)
    logic [NTDC-1:0]  tdc_en;   // which TDCs may be used
    logic             trg_sel;  // 0: trigger 1 (high gain), 1: trigger 2 (low gain)
    mode_e            mode;
    logic             ch_en;
  } chan_cfg_t;

  localparam int unsigned CFG_W = $bits(chan_cfg_t);

endpackage
