// Clock-frequency sweep of the dual-edge synchroniser: 40, 80, 160, 200 and
// 250 MHz, as in the bench measurement of this circuit. At each frequency an
// asynchronous input toggles 300 times at random phases (its own period is
// unrelated to the clock), and the delay from each rising input to the
// synchronised output is recorded. Checked at every frequency: all delays
// within 1.5..2.5 clock periods, the smallest within 2% of 1.5 periods and
// the largest within 2% of 2.5 periods. The measured minimum delay per
// frequency is printed.
module tb_sync_sweep;
  timeunit 1ns; timeprecision 100fs;

  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0, dout;
  real  half = 12.5;
  int   checks = 0, failures = 0;

  sync_dual_edge dut (.clk, .rst_n, .async_in(din), .sync_out(dout));

  always #(half) clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    real freqs[5] = '{40.0, 80.0, 160.0, 200.0, 250.0};
    foreach (freqs[f]) begin
      automatic real T = 1000.0 / freqs[f];
      real dmin, dmax, t0;
      dmin = 1.0e9;
      dmax = 0.0;
      rst_n = 1'b0;
      din   = 1'b0;
      half  = T / 2.0;
      #(3.0 * T);
      rst_n = 1'b1;
      #(3.0 * T);
      for (int k = 0; k < 300; k++) begin
        #(T * (3.0 + real'($urandom_range(0, 10000)) / 1000.0));
        t0 = $realtime;
        din = 1'b1;
        @(posedge dout);
        if ($realtime - t0 < dmin) dmin = $realtime - t0;
        if ($realtime - t0 > dmax) dmax = $realtime - t0;
        #(T * (3.0 + real'($urandom_range(0, 10000)) / 1000.0));
        din = 1'b0;
        @(negedge dout);
      end
      $display("%0.0f MHz: min delay %0.3f ns (%0.3f periods), max %0.3f ns (%0.3f periods)",
               freqs[f], dmin, dmin / T, dmax, dmax / T);
      check(dmin >= 1.5 * T - 0.001 && dmax <= 2.5 * T + 0.001, $sformatf("%0.0f MHz: delays within 1.5..2.5 periods", freqs[f]));
      check(dmin <= 1.53 * T, $sformatf("%0.0f MHz: minimum near 1.5 periods", freqs[f]));
      check(dmax >= 2.47 * T, $sformatf("%0.0f MHz: maximum near 2.5 periods", freqs[f]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
