// Testbench of one channel (digital part with its four TDC models).
//
// The channel is configured through its configuration chain, then driven
// with trigger edges at random points of the clock period. For each edge
// that should be measured, the expected payload (channel ID, TDC number,
// coarse = edges counted by the testbench since reset up to the first edge
// after the hit, fine = time to that edge in 50 ps bins) is queued and
// compared with the words leaving the channel (the generator serves the
// TDCs by number, so words of different TDCs may leave out of hit order). Words from a
// channel above are merged in and must pass unchanged. Scenarios: single
// photon counting with four hits inside one dead time (all four TDCs busy,
// the fifth lost), time over threshold on trigger 2, and back-pressure from
// below long enough to fill the FIFO. The analog settings must appear on
// ana_cfg after the update.
module tb_channel;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 100fs;

  localparam real T = 3.125;
  localparam logic [4:0] ID = 5'd9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] trg = '0;
  logic [ANA_W-1:0] ana_cfg;
  logic cfg_shift = 1'b0, cfg_update = 1'b0, cfg_in = 1'b0, cfg_out;
  logic up_valid = 1'b0, up_ready, dn_valid, dn_ready = 1'b1, fifo_full;
  payload_t up_data = '0, dn_data;
  int checks = 0, failures = 0, n_full = 0, n_lost = 0, n_up = 0;
  int unsigned tbcnt = 0;
  payload_t exp_q[$], exp_up[$];

  channel dut (.clk, .rst_n, .ch_id(ID), .trg, .ana_cfg, .coarse_clear(1'b0),
    .cfg_shift, .cfg_update, .cfg_in, .cfg_out,
    .up_valid, .up_data, .up_ready, .dn_valid, .dn_data, .dn_ready, .fifo_full);

  always #(T/2) clk = ~clk;
  always @(posedge clk) if (rst_n) tbcnt <= tbcnt + 1;

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

  always @(posedge clk) if (rst_n) begin
    if (fifo_full) n_full++;
    if (up_valid && up_ready) exp_up.push_back(up_data);
    if (dn_valid && dn_ready) begin
      if (dn_data.ch_id == ID) begin
        // results of different TDCs may leave in another order than the hits
        automatic int idx[$] = exp_q.find_first_index(x) with (x == dn_data);
        check(idx.size() == 1, $sformatf("unexpected payload %h", dn_data));
        if (idx.size() == 1) exp_q.delete(idx[0]);
      end else begin
        check(exp_up.size() > 0 && dn_data == exp_up[0], "upstream word passed unchanged");
        if (exp_up.size() > 0) void'(exp_up.pop_front());
        n_up++;
      end
    end
  end

  task automatic configure(input chan_cfg_t c);
    logic [CFG_W-1:0] w = c;
    for (int b = CFG_W - 1; b >= 0; b--) begin
      @(negedge clk); cfg_in = w[b]; cfg_shift = 1'b1;
    end
    @(negedge clk) cfg_shift = 1'b0; cfg_update = 1'b1;
    @(negedge clk) cfg_update = 1'b0;
  endtask

  task automatic edge_at(input int which, input logic val, input int tdc);
    real t0, t1;
    payload_t p;
    @(posedge clk);
    #(0.02 + (T - 0.04) * real'($urandom_range(0, 1000)) / 1000.0);
    t0 = $realtime;
    trg[which] = val;
    @(posedge clk);
    t1 = $realtime;
    #0.1;
    if (tdc >= 0) begin
      p.rsvd = 1'b0; p.ch_id = ID; p.tdc_id = 2'(tdc);
      p.coarse = 15'(tbcnt); p.fine = 9'($rtoi((t1 - t0) * 1000.0 / 50.0));
      exp_q.push_back(p);
    end
  endtask

  initial begin
    chan_cfg_t c;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // --- single photon counting, trigger 1, all TDCs
    c = '0; c.ch_en = 1'b1; c.mode = MODE_SPC; c.trg_sel = 1'b0; c.tdc_en = 4'hF; c.ana = 16'hA5C3;
    configure(c);
    check(ana_cfg == 16'hA5C3, "analog settings after update");
    repeat (3) @(posedge clk);
    for (int k = 0; k < 5; k++) begin
      edge_at(0, 1'b1, k < 4 ? k : -1);
      edge_at(0, 1'b0, -1);
    end
    n_lost++;
    // an upstream word in the middle
    @(negedge clk) up_valid = 1'b1; up_data = {1'b0, 5'd30, 2'd1, 15'd1234, 9'd77};
    @(posedge clk); while (!up_ready) @(posedge clk);
    @(negedge clk) up_valid = 1'b0;
    repeat (70) @(posedge clk);
    check(exp_q.size() == 0, "SPC payloads delivered");
    // --- back-pressure: hits while the output is blocked fill the FIFO
    @(negedge clk) dn_ready = 1'b0;
    for (int r = 0; r < 2; r++) begin
      for (int k = 0; k < 4; k++) begin
        edge_at(0, 1'b1, k);             // round-robin wraps back to TDC0
        edge_at(0, 1'b0, -1);
      end
      repeat (60) @(posedge clk);
    end
    check(fifo_full, "FIFO full under back-pressure");
    // output register and FIFO hold five words, TDC1..3 hold results: TDC0 takes one more hit
    edge_at(0, 1'b1, 0); edge_at(0, 1'b0, -1);
    repeat (60) @(posedge clk);
    // now every TDC holds a result: the next hit is lost
    edge_at(0, 1'b1, -1); edge_at(0, 1'b0, -1);
    n_lost++;
    repeat (5) @(posedge clk);
    @(negedge clk) dn_ready = 1'b1;
    repeat (80) @(posedge clk);
    check(exp_q.size() == 0, "payloads after back-pressure delivered");
    // --- time over threshold on trigger 2
    c.ch_en = 1'b0;
    configure(c);
    c.ch_en = 1'b1; c.mode = MODE_TOT; c.trg_sel = 1'b1;
    configure(c);
    repeat (3) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      edge_at(1, 1'b1, k % 2);
      repeat (3 + k) @(posedge clk);
      edge_at(1, 1'b0, 2 + k % 2);
      repeat (60) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "ToT payloads delivered");
    check(n_full > 0 && n_lost > 0 && n_up > 0, "every mechanism exercised");
    $display("full=%0d up=%0d", n_full, n_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
