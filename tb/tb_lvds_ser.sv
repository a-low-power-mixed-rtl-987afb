// Testbench of the DDR link serialiser.
//
// A receiver model samples `tx` in the middle of each clock half period
// (two bits per period, 640 Mbit/s at 320 MHz), waits for the first 1 after
// idle, checks that a 0 follows (start symbol), and collects the next 32
// bits, most significant first. Checked: words arrive unchanged and in
// order, back-to-back frames start exactly 17 clock periods apart, and the
// line is 0 between frames.
module tb_lvds_ser;
  timeunit 1ns; timeprecision 100fs;

  localparam real T = 3.125;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_ready, bit_a, bit_b, tx, busy;
  logic [31:0] in_data = '0;
  logic [31:0] sent[$], recv[$];
  int checks = 0, failures = 0, n_b2b = 0;

  lvds_ser #(.W(32)) dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .bit_a, .bit_b, .tx, .busy);

  always #(T/2) clk = ~clk;

  initial begin
    #(T * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", msg, $realtime); end
  endtask

  // bit stream sampled at the middle of each half period
  logic bitq[$];
  initial forever begin
    @(posedge clk); #(T/4); bitq.push_back(tx);
    @(negedge clk); #(T/4); bitq.push_back(tx);
  end

  // receiver
  real last_start = -1.0;
  initial forever begin
    logic b;
    logic [31:0] w;
    real t;
    wait (bitq.size() > 0);
    b = bitq.pop_front();
    if (b) begin
      t = $realtime;
      wait (bitq.size() > 0);
      check(bitq.pop_front() == 1'b0, "start symbol is 1,0");
      for (int k = 31; k >= 0; k--) begin
        wait (bitq.size() > 0);
        w[k] = bitq.pop_front();
      end
      recv.push_back(w);
      if (last_start > 0.0 && t - last_start < 17.5 * T) begin
        check(t - last_start > 16.5 * T, "frames 17 periods apart");
        n_b2b++;
      end
      last_start = t;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) sent.push_back(in_data);
    if (!in_valid || in_ready) begin
      in_valid <= ($urandom_range(0, 99) < 70);
      in_data  <= $urandom;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4000) @(posedge clk);
    force in_valid = 1'b0;
    repeat (40) @(posedge clk);
    check(sent.size() > 100, "enough frames");
    check(sent.size() == recv.size(), $sformatf("sent %0d received %0d", sent.size(), recv.size()));
    for (int k = 0; k < sent.size() && k < recv.size(); k++)
      check(sent[k] == recv[k], $sformatf("word %0d %h vs %h", k, recv[k], sent[k]));
    check(n_b2b > 0, "back-to-back frames seen");
    $display("frames=%0d back_to_back=%0d", sent.size(), n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
