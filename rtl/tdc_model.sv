// Behavioural model of one time-to-digital converter (TDC) of a channel,
// covering the converter and its fine-code readout. Not synthesizable: the
// real part is a mixed-signal circuit whose insides are not given here.
//
// While `arm` is high and the TDC is idle, a rising edge on `hit` starts a
// conversion. The fine code is the time from that edge to the next rising
// clock edge, in nbin of BIN_PS picoseconds, saturated to FINE_W bits. On
// that clock edge the model raises `hit_flag` for one cycle, so that the
// controller can sample the coarse counter; the fine code appears on `fine`
// with a one-cycle `done` pulse DEAD_CYCLES clock cycles later. The TDC then
// accepts a new hit. The 9-bit code, the 50 ps bin and the 150 ns dead time
// at 320 MHz (48 cycles) follow the chip description; the hit_flag/done
// protocol is this design's own.
//
// Timing is measured with $realtime in nanoseconds (timeunit 1 ns).
module tdc_model #(
  parameter int unsigned FINE_W      = 9,
  parameter int unsigned BIN_PS      = 50,
  parameter int unsigned DEAD_CYCLES = 48
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              arm,
  input  logic              hit,
  output logic              hit_flag,
  output logic              done,
  output logic [FINE_W-1:0] fine
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned FINE_MAX = (1 << FINE_W) - 1;

  realtime t_hit;
  logic    hit_tgl  = 1'b0;   // toggled by an accepted hit
  logic    seen_tgl;          // copy taken in the clock domain
  logic    busy;              // converting
  int unsigned cnt;

  // Hit capture: only when armed, idle and no hit is waiting for the clock.
  always @(posedge hit)
    if (rst_n && arm && !busy && (hit_tgl == seen_tgl)) begin
      t_hit   = $realtime;
      hit_tgl = ~hit_tgl;
    end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_tgl <= hit_tgl;
      busy     <= 1'b0;
      hit_flag <= 1'b0;
      done     <= 1'b0;
      fine     <= '0;
      cnt      <= 0;
    end else begin
      hit_flag <= 1'b0;
      done     <= 1'b0;
      if (!busy && (hit_tgl != seen_tgl)) begin
        automatic real nbin = ($realtime - t_hit) * 1000.0 / real'(BIN_PS);
        automatic int unsigned code = $rtoi(nbin);
        seen_tgl <= hit_tgl;
        busy     <= 1'b1;
        hit_flag <= 1'b1;
        fine     <= FINE_W'((code > FINE_MAX) ? FINE_MAX : code);
        cnt      <= DEAD_CYCLES - 1;
      end else if (busy) begin
        if (cnt == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          cnt <= cnt - 1;
        end
      end
    end
  end

endmodule
