// Testbench of the column side of the channel-to-End-of-Column handshake.
//
// A receiver model in the testbench answers `req` with `ack` after a random
// delay, asynchronous to the clock, and records the bundled word while req
// is high. Checked: words arrive once each and in order, `data` is stable
// while `req` is high, req only rises while ack is low and only falls after
// ack has risen (four-phase rule), and a new word is only taken (in_ready)
// after ack has fallen.
module tb_hs_tx;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 100fs;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, req, ack = 1'b0;
  payload_t in_data = '0, data;
  payload_t sent[$], recv[$];
  int checks = 0, failures = 0;

  hs_tx dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .req, .data, .ack);

  always #1.5625 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", msg, $realtime); end
  endtask

  // receiver model
  initial forever begin
    @(posedge req);
    check(!ack, "req rises only while ack low");
    #(1.0 + real'($urandom_range(0, 3000)) / 1000.0 * 5.0);
    recv.push_back(data);
    ack = 1'b1;
    @(negedge req);
    #(1.0 + real'($urandom_range(0, 3000)) / 1000.0 * 5.0);
    ack = 1'b0;
  end

  // data stability and four-phase order
  payload_t held;
  logic     req_q = 1'b0;
  always @(posedge clk) begin
    if (req_q && req) check(data == held, "data stable while req high");
    req_q <= req;
    held  <= data;
  end
  always @(negedge req) check(ack, "req falls only after ack");

  // source
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      sent.push_back(in_data);
      check(!ack, "word taken only after ack fell");
    end
    if (!in_valid || in_ready) begin
      in_valid <= ($urandom_range(0, 99) < 60);
      in_data  <= payload_t'($urandom);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    @(negedge clk) in_valid = 1'b0;
    force in_valid = 1'b0;
    repeat (50) @(posedge clk);
    check(sent.size() > 50, "enough words");
    check(sent.size() == recv.size(), $sformatf("sent %0d received %0d", sent.size(), recv.size()));
    for (int k = 0; k < sent.size() && k < recv.size(); k++)
      check(sent[k] == recv[k], $sformatf("word %0d", k));
    $display("words=%0d", sent.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
