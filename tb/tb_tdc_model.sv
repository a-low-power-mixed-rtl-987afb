// Testbench of the TDC behavioural model.
//
// Hits are placed at random offsets inside a clock period. The expected fine
// code is the time to the next rising clock edge divided by 50 ps, worked
// out from the testbench's own clock edge times. Checked: hit_flag on that
// edge, the code, `done` exactly 48 cycles later (150 ns dead time at
// 320 MHz), that a hit while not armed or during the dead time is ignored.
module tb_tdc_model;
  timeunit 1ns; timeprecision 100fs;

  localparam real T = 3.125;
  localparam int DEAD = 48;
  logic clk = 1'b0, rst_n = 1'b0, arm = 1'b0, hit = 1'b0;
  logic hit_flag, done;
  logic [8:0] fine;
  int checks = 0, failures = 0;

  tdc_model #(.FINE_W(9), .BIN_PS(50), .DEAD_CYCLES(DEAD)) dut (.clk, .rst_n, .arm, .hit, .hit_flag, .done, .fine);

  always #(T/2) clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #(T * 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $realtime); end
  endtask

  initial begin
    real off, t_hit, t_edge;
    int exp_code, c0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // not armed: ignored
    @(negedge clk); hit = 1'b1; #0.5 hit = 1'b0;
    repeat (3) begin @(posedge clk); #0.1; check(!hit_flag, "hit while not armed"); end
    for (int n = 0; n < 200; n++) begin
      @(posedge clk); arm = 1'b1;
      @(posedge clk);
      off = 0.02 + (T - 0.04) * real'($urandom_range(0, 1000)) / 1000.0;
      #(off);
      t_hit = $realtime;
      hit = 1'b1;
      @(posedge clk);
      t_edge = $realtime;
      exp_code = $rtoi((t_edge - t_hit) * 1000.0 / 50.0);
      #0.1;
      c0 = cyc;
      check(hit_flag, "hit_flag on first edge after hit");
      check(fine == 9'(exp_code), $sformatf("fine %0d expected %0d", fine, exp_code));
      hit = 1'b0;
      // second hit during the dead time must be ignored
      #(T * 5); hit = 1'b1; #1 hit = 1'b0;
      @(posedge done);
      #0.1;
      check(cyc - c0 == DEAD, $sformatf("dead time %0d cycles", cyc - c0));
      check(fine == 9'(exp_code), "fine held at done");
      @(posedge clk); #0.1;
      check(!done && !hit_flag, "single pulses");
      arm = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
