// Testbench of the dual-edge synchroniser.
//
// The input toggles at pseudo-random times, away from the clock edges. For
// every change the expected output time is worked out from the clock edge
// times alone: a rise is caught by whichever of the next rising or falling
// edge comes first; from a falling-edge catch it takes 0.5 + 1 more periods
// to reach the output, from a rising-edge catch 2 periods. A fall needs both
// samples, so it counts from the later of the two edges. The measured delay
// must match within 10 ps and lie in the 1.5..2.5 period window for rises.
module tb_sync_dual_edge;
  timeunit 1ns; timeprecision 100fs;

  localparam real T = 3.125;     // 320 MHz
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0, dout;
  int checks = 0, failures = 0;

  sync_dual_edge dut (.clk, .rst_n, .async_in(din), .sync_out(dout));

  always #(T/2) clk = ~clk;

  initial begin
    #(T * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Clock starts at time 0 low, rises at T/2 + k*T, falls at k*T.
  function automatic real next_rise(real t);
    real k = $floor((t - T/2) / T) + 1.0;
    return T/2 + k * T;
  endfunction
  function automatic real next_fall(real t);
    real k = $floor(t / T) + 1.0;
    return k * T;
  endfunction

  task automatic one_change(input real offset, input logic val);
    real t0, tr, tf, texp, tout;
    // move to a time `offset` after a falling edge
    @(negedge clk);
    #(offset);
    t0 = $realtime;
    din = val;
    tr = next_rise(t0);
    tf = next_fall(t0);
    if (val) texp = (tf < tr) ? tf + 1.5 * T : tr + 2.0 * T;
    else     texp = (tf > tr) ? tf + 1.5 * T : tr + 2.0 * T;
    @(dout == val);
    tout = $realtime;
    checks++;
    if (tout - texp > 0.010 || texp - tout > 0.010) begin
      failures++;
      $display("val=%0d t0=%0.3f out at %0.3f expected %0.3f", val, t0, tout, texp);
    end
    if (val) begin
      checks++;
      if (tout - t0 < 1.5 * T - 0.010 || tout - t0 > 2.5 * T + 0.010) begin
        failures++;
        $display("rise delay %0.3f ns outside 1.5..2.5 periods", tout - t0);
      end
    end
    repeat (3) @(posedge clk);
  endtask

  real mind = 1e9, maxd = 0.0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // edge cases named in the description: just before / just after the falling edge
    one_change(T - 0.02, 1'b1);   // just before a falling edge: 1.5 periods
    one_change(0.3, 1'b0);
    one_change(0.02, 1'b1);       // just after a falling edge: 2.5 periods
    one_change(0.3, 1'b0);
    for (int i = 0; i < 400; i++) begin
      automatic real off = 0.01 + (T - 0.02) * real'($urandom_range(0, 1000)) / 1000.0;
      one_change(off, ~din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
