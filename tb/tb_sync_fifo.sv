// Testbench of the channel FIFO (32 bits x 4): random writes and reads
// against a queue reference model; checks data order, full/empty flags and
// the count, and that writes while full are dropped (the testbench only
// writes to a full FIFO when it also reads, which is allowed).
module tb_sync_fifo;
  timeunit 1ns; timeprecision 100fs;

  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [31:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [2:0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty_rd = 0;
  logic [31:0] model[$];

  sync_fifo #(.W(32), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .full, .empty, .count);

  always #1.5625 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", msg, $realtime); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // compare state
      check(count == 3'(model.size()), $sformatf("count %0d vs %0d", count, model.size()));
      check(full == (model.size() == DEPTH), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      if (full) n_full++;
      // choose next operation, biased to fill or drain in phases
      rd_en   = !empty && ($urandom_range(0, 99) < ((i / 200) % 2 ? 70 : 30));
      wr_en   = ($urandom_range(0, 99) < ((i / 200) % 2 ? 30 : 70)) && (!full || rd_en);
      wr_data = $urandom;
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    check(n_full > 0, "FIFO became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
