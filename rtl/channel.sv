// Digital part of one readout channel, with its four TDCs.
//
// Two discriminator triggers (`trg`, asynchronous) come from the analog front
// end. The TDC controller routes the selected trigger to the TDCs according
// to the mode held in the channel configuration; each TDC measures the fine
// time of an edge, the coarse counter gives the coarse time, and the data
// control turns every measurement into a 32-bit payload, queues it in a
// 4-word FIFO and merges it into the column's readout chain. Configuration
// bits pass through the channel from the channel below to the channel above.
// The analog settings of the configuration are brought out on `ana_cfg`.
// The partition into these blocks follows the channel block diagram.
//
// Interfaces: readout chain in from above (up_*) and out to below (dn_*),
// valid/ready; configuration chain cfg_in -> cfg_out with broadcast
// cfg_shift/cfg_update strobes; `coarse_clear` restarts the coarse counter.
// The TDCs are behavioural models, so this module simulates but does not
// synthesize as a whole.
module channel
  import alcor_pkg::*;
#(
  parameter int unsigned DEAD_CYCLES = 48,   // TDC dead time, 150 ns at 320 MHz
  parameter int unsigned BIN_PS      = 50,   // TDC bin
  parameter int unsigned FIFO_DEPTH  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CHID_W-1:0] ch_id,
  input  logic [1:0]        trg,
  output logic [ANA_W-1:0]  ana_cfg,
  input  logic              coarse_clear,
  // configuration chain
  input  logic              cfg_shift,
  input  logic              cfg_update,
  input  logic              cfg_in,
  output logic              cfg_out,
  // readout chain
  input  logic              up_valid,
  input  payload_t          up_data,
  output logic              up_ready,
  output logic              dn_valid,
  output payload_t          dn_data,
  input  logic              dn_ready,
  output logic              fifo_full
);
  timeunit 1ns; timeprecision 1ps;

  chan_cfg_t                    cfg;
  logic [COARSE_W-1:0]          coarse;
  logic [NTDC-1:0]              tdc_hit, tdc_arm, tdc_hit_flag, tdc_done;
  logic [NTDC-1:0][FINE_W-1:0]  tdc_fine;
  logic [NTDC-1:0]              res_valid, res_ack;
  logic [NTDC-1:0][COARSE_W-1:0] res_coarse;
  logic [NTDC-1:0][FINE_W-1:0]  res_fine;

  assign ana_cfg = cfg.ana;

  chan_cfg u_cfg (
    .clk, .rst_n, .cfg_shift, .cfg_update, .cfg_in, .cfg_out, .cfg
  );

  coarse_counter #(.W(COARSE_W)) u_coarse (
    .clk, .rst_n, .clear(coarse_clear), .count(coarse)
  );

  tdc_ctrl #(.N(NTDC)) u_ctrl (
    .clk, .rst_n,
    .ch_en(cfg.ch_en), .mode(cfg.mode), .trg_sel(cfg.trg_sel), .tdc_en(cfg.tdc_en),
    .trg,
    .tdc_hit, .tdc_arm, .tdc_hit_flag, .tdc_done, .tdc_fine,
    .coarse,
    .res_valid, .res_coarse, .res_fine, .res_ack
  );

  for (genvar i = 0; i < NTDC; i++) begin : g_tdc
    tdc_model #(.FINE_W(FINE_W), .BIN_PS(BIN_PS), .DEAD_CYCLES(DEAD_CYCLES)) u_tdc (
      .clk, .rst_n,
      .arm     (tdc_arm[i]),
      .hit     (tdc_hit[i]),
      .hit_flag(tdc_hit_flag[i]),
      .done    (tdc_done[i]),
      .fine    (tdc_fine[i])
    );
  end

  data_control #(.N(NTDC), .FIFO_DEPTH(FIFO_DEPTH)) u_data (
    .clk, .rst_n, .ch_id,
    .res_valid, .res_coarse, .res_fine, .res_ack,
    .up_valid, .up_data, .up_ready,
    .dn_valid, .dn_data, .dn_ready,
    .fifo_full
  );

endmodule
