// Testbench of the coarse counter: counts edges from reset with an
// independent reference count, checks the wrap from 2**15-1 to 0 (after
// 32768 edges) and the synchronous clear.
module tb_coarse_counter;
  timeunit 1ns; timeprecision 100fs;

  localparam real T = 3.125;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [14:0] count;
  int unsigned ref_cnt;
  int checks = 0, failures = 0;
  bit wrapped = 1'b0;

  coarse_counter #(.W(15)) dut (.clk, .rst_n, .clear, .count);

  always #(T/2) clk = ~clk;

  initial begin
    #(T * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (count != 0) begin failures++; $display("not 0 in reset"); end
    @(negedge clk) rst_n = 1'b1;
    ref_cnt = 0;
    for (int i = 0; i < 40000; i++) begin
      @(posedge clk);
      if (i == 35000) clear <= 1'b1;
      else            clear <= 1'b0;
      #0.1;
      ref_cnt = (clear === 1'b0 && i == 35001) ? 0 : (ref_cnt + 1) % 32768;
      if (i == 32767) wrapped = (count == 0);
      checks++;
      if (count != 15'(ref_cnt)) begin
        failures++;
        if (failures < 10) $display("edge %0d: count %0d expected %0d", i, count, ref_cnt);
      end
    end
    checks++;
    if (!wrapped) begin failures++; $display("no wrap to 0 after 32768 edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
