// Testbench of the channel data control.
//
// Four result sources stand in for the TDC controller and an upstream
// source for the channel above; the channel below takes words with a random
// ready. Expected payloads are built here from the field layout (reserved 0,
// channel ID, TDC number, coarse, fine). Checked: every local result and
// every upstream word reaches the output once, in order per source; the
// generator takes the lowest-numbered result first and one per cycle; the
// output alternates between the two sources while both have data. Counted
// mechanisms: FIFO full, both sources competing, output stalled.
module tb_data_control;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 100fs;

  localparam logic [4:0] MY_ID = 5'd13, UP_ID = 5'd22;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] res_valid, res_ack;
  logic [3:0][14:0] res_coarse;
  logic [3:0][8:0]  res_fine;
  logic up_valid = 1'b0, up_ready, dn_valid, dn_ready = 1'b0, fifo_full;
  payload_t up_data = '0, dn_data;
  int checks = 0, failures = 0;
  int n_full = 0, n_both = 0, n_stall = 0, n_alt = 0;
  int pend_cnt[4];
  payload_t exp_local[$], exp_up[$];
  int up_sent = 0, local_got = 0, up_got = 0;
  int phase = 0;

  data_control #(.N(4), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .ch_id(MY_ID),
    .res_valid, .res_coarse, .res_fine, .res_ack,
    .up_valid, .up_data, .up_ready,
    .dn_valid, .dn_data, .dn_ready, .fifo_full);

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

  // result sources: each keeps a count of pending results; value depends on a sequence number
  int seq[4];
  always_comb
    for (int i = 0; i < 4; i++) begin
      res_valid[i]  = pend_cnt[i] > 0;
      res_coarse[i] = 15'(seq[i] * 97 + i * 1000);
      res_fine[i]   = 9'(seq[i] * 13 + i);
    end

  logic last_was_local;
  bit   have_last = 1'b0;
  always @(posedge clk) if (rst_n) begin
    // generator checks
    if (res_valid != 0 && !fifo_full) begin
      automatic int lo = 0;
      while (!res_valid[lo]) lo++;
      check(res_ack == (4'b1 << lo), $sformatf("ack %b for valid %b", res_ack, res_valid));
    end else begin
      check(res_ack == 0, "no ack when nothing to take or FIFO full");
    end
    if (fifo_full) n_full++;
    if (up_valid && exp_local.size() > 0) n_both++;
    if (dn_valid && !dn_ready) n_stall++;
    for (int i = 0; i < 4; i++)
      if (res_ack[i]) begin
        automatic payload_t p;
        p.rsvd = 1'b0; p.ch_id = MY_ID; p.tdc_id = 2'(i);
        p.coarse = res_coarse[i]; p.fine = res_fine[i];
        exp_local.push_back(p);
        pend_cnt[i] <= pend_cnt[i] - 1;
        seq[i] <= seq[i] + 1;
      end
    // upstream source
    if (up_valid && up_ready) begin
      exp_up.push_back(up_data);
      up_sent++;
    end
    // output sink
    if (dn_valid && dn_ready) begin
      automatic bit is_local = (dn_data.ch_id == MY_ID);
      if (is_local) begin
        check(exp_local.size() > 0 && dn_data == exp_local[0], "local payload order/content");
        if (exp_local.size() > 0) void'(exp_local.pop_front());
        local_got++;
      end else begin
        check(exp_up.size() > 0 && dn_data == exp_up[0], "upstream word order/content");
        if (exp_up.size() > 0) void'(exp_up.pop_front());
        up_got++;
      end
      if (phase == 2 && have_last) begin
        check(is_local != last_was_local, "alternation while both sources busy");
        n_alt++;
      end
      last_was_local = is_local;
      have_last = 1'b1;
    end
  end

  // upstream and sink drivers
  always @(posedge clk) begin
    if (!up_valid || up_ready) begin
      if (phase == 2 || $urandom_range(0, 99) < 40) begin
        up_valid <= 1'b1;
        up_data  <= {1'b0, UP_ID, 2'($urandom), 15'($urandom), 9'($urandom)};
      end else up_valid <= 1'b0;
    end
    dn_ready <= (phase == 2) ? 1'b1 : ($urandom_range(0, 99) < 50);
  end

  initial begin
    for (int i = 0; i < 4; i++) begin pend_cnt[i] = 0; seq[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 0: bursts of results on all TDCs, random traffic
    for (int k = 0; k < 40; k++) begin
      @(posedge clk);
      for (int i = 0; i < 4; i++) if ($urandom_range(0, 99) < 30) pend_cnt[i] <= pend_cnt[i] + 1;
      repeat ($urandom_range(0, 6)) @(posedge clk);
    end
    repeat (300) @(posedge clk);
    // phase 2: both sources saturated, sink always ready
    phase = 2;
    have_last = 1'b0;
    for (int i = 0; i < 4; i++) pend_cnt[i] = pend_cnt[i] + 10;
    repeat (60) @(posedge clk);
    phase = 3;
    repeat (400) @(posedge clk);
    @(negedge clk) up_valid = 1'b0;
    repeat (200) @(posedge clk);
    check(exp_local.size() == 0 && exp_up.size() <= 1, "all words delivered");
    check(n_full > 0 && n_both > 0 && n_stall > 0 && n_alt > 0, "every mechanism exercised");
    $display("local=%0d up=%0d full=%0d both=%0d stall=%0d alt=%0d", local_got, up_got, n_full, n_both, n_stall, n_alt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
