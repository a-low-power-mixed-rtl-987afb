// TDC controller of a channel: routes the discriminator trigger to the four
// TDCs, decides which TDC is armed for the next edge according to the mode,
// samples the coarse counter when a TDC reports a hit and holds each finished
// measurement until the payload generator takes it.
//
// Single photon counting (MODE_SPC): the four TDCs work on their own. Exactly
// one free, enabled TDC is armed at a time, chosen round-robin; once it
// reports a hit the next free one is armed, so up to four hits can be in
// conversion together.
// Time over threshold (MODE_TOT): TDC0 and TDC1 measure the rising edge of
// the trigger and TDC2 and TDC3 its trailing edge (they see the inverted
// trigger). TDCs are armed in pairs (0,2) or (1,3), and a new pair is armed
// only when no TDC is waiting for an edge, so every trailing-edge result
// belongs to the rising-edge result before it.
//
// Each TDC goes FREE -> ARMED -> CONV (hit seen, coarse sampled) -> PEND
// (fine code held, res_valid high) -> FREE when res_ack is high. A TDC that is
// not free cannot be armed, so a full FIFO downstream holds TDCs and later
// hits are lost. Clearing ch_en disarms armed TDCs and restarts the
// round-robin order at TDC0 (pair 0,2 in ToT mode). The split of the TDCs
// by mode follows the chip description; the arming order, the pairing rule
// and the trigger selection bit are this design's own.
//
// The coarse value stored is the counter value after the clock edge at which
// the TDC ended its fine measurement, so hit time = coarse * Tclk - fine * bin.
module tdc_ctrl
  import alcor_pkg::*;
#(
  parameter int unsigned N = NTDC
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // configuration
  input  logic                         ch_en,
  input  mode_e                        mode,
  input  logic                         trg_sel,
  input  logic [N-1:0]                 tdc_en,
  // discriminator triggers (asynchronous)
  input  logic [1:0]                   trg,
  // TDC side
  output logic [N-1:0]                 tdc_hit,
  output logic [N-1:0]                 tdc_arm,
  input  logic [N-1:0]                 tdc_hit_flag,
  input  logic [N-1:0]                 tdc_done,
  input  logic [N-1:0][FINE_W-1:0]     tdc_fine,
  // coarse counter
  input  logic [COARSE_W-1:0]          coarse,
  // finished measurements
  output logic [N-1:0]                 res_valid,
  output logic [N-1:0][COARSE_W-1:0]   res_coarse,
  output logic [N-1:0][FINE_W-1:0]     res_fine,
  input  logic [N-1:0]                 res_ack
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [1:0] {FREE, ARMED, CONV, PEND} tstate_e;

  tstate_e          st [N];
  logic [N-1:0]     is_free, is_armed;
  logic [$clog2(N)-1:0] rr;            // round-robin start point
  logic [N-1:0]     arm_set;
  logic [$clog2(N)-1:0] arm_idx;
  logic             trg_s;

  // Trigger routing: trailing-edge TDCs see the inverted trigger in ToT mode.
  assign trg_s = trg[trg_sel];
  always_comb
    for (int i = 0; i < N; i++)
      tdc_hit[i] = (mode == MODE_TOT && i >= N/2) ? ~trg_s : trg_s;

  always_comb
    for (int i = 0; i < N; i++) begin
      is_free[i]  = (st[i] == FREE) && tdc_en[i];
      is_armed[i] = (st[i] == ARMED);
      tdc_arm[i]  = is_armed[i];
      res_valid[i] = (st[i] == PEND);
    end

  // Choice of the TDC (SPC) or pair (ToT) to arm next.
  always_comb begin
    arm_set = '0;
    arm_idx = rr;
    if (ch_en && is_armed == '0) begin
      if (mode == MODE_SPC) begin
        for (int k = N - 1; k >= 0; k--) begin
          automatic logic [$clog2(N)-1:0] i = rr + k[$clog2(N)-1:0];
          if (is_free[i]) begin
            arm_set = '0;
            arm_set[i] = 1'b1;
            arm_idx = i;
          end
        end
      end else begin
        for (int k = N/2 - 1; k >= 0; k--) begin
          automatic int p = (int'(rr) + k) % (N/2);
          if (is_free[p] && is_free[p + N/2]) begin
            arm_set = '0;
            arm_set[p] = 1'b1;
            arm_set[p + N/2] = 1'b1;
            arm_idx = p[$clog2(N)-1:0];
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < N; i++) st[i] <= FREE;
      rr         <= '0;
      res_coarse <= '0;
      res_fine   <= '0;
    end else begin
      if (!ch_en)              rr <= '0;
      else if (arm_set != '0) rr <= arm_idx + 1'b1;
      for (int i = 0; i < N; i++) begin
        if (tdc_hit_flag[i]) begin
          st[i]         <= CONV;
          res_coarse[i] <= coarse;
        end else begin
          unique case (st[i])
            FREE:  if (arm_set[i]) st[i] <= ARMED;
            ARMED: if (!ch_en || !tdc_en[i]) st[i] <= FREE;
            CONV:  if (tdc_done[i]) begin
                     st[i]       <= PEND;
                     res_fine[i] <= tdc_fine[i];
                   end
            PEND:  if (res_ack[i]) st[i] <= FREE;
          endcase
        end
      end
    end

endmodule
