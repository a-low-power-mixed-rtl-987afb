// End-to-end testbench of the 32-channel chip, at the default parameters
// (4 columns x 8 channels, 48-cycle TDC dead time, 50 ps bins, 4-word FIFOs).
//
// 1. Configuration over SPI: one frame per column shifts the eight channel
//    words (top channel first) and updates them; channels whose number is
//    3 mod 4 run in time-over-threshold mode on trigger 2, the others count
//    single photons on trigger 1. A second frame to one column, without
//    update, reads the words back on MISO. The analog settings must appear
//    on every channel's ana_cfg.
// 2. Sparse hits on every channel, spaced by more than a dead time, then a
//    burst: every channel of column 1 gets four hits within a few cycles
//    (its FIFOs fill and the link is the bottleneck) and one channel gets a
//    fifth hit while its four TDCs are busy, which must be lost.
// 3. Four link receivers decode the DDR frames. Every payload must match a
//    hit computed here (channel, coarse = clock edges since reset up to the
//    first edge after the hit, fine = time to that edge in 50 ps bins; TDC
//    0/1 for rising and 2/3 for trailing edges in ToT mode), arrive on its
//    column's link, and appear once; no hit may be left over.
// Each mechanism is counted and must occur at least once.
module tb_alcor_top;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 100fs;

  localparam real T = 3.125;
  localparam int NCOL = 4, NROW = 8, NCH = NCOL * NROW;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NCH-1:0][1:0] trg = '0;
  logic [NCH-1:0][ANA_W-1:0] ana_cfg;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic [NCOL-1:0] tx, tx_busy;
  logic [NCH-1:0] fifo_full;

  alcor_top dut (.clk, .rst_n, .coarse_clear(1'b0), .trg, .ana_cfg,
                 .sclk, .cs_n, .mosi, .miso, .tx, .tx_busy, .fifo_full);

  int checks = 0, failures = 0;
  int n_spc = 0, n_rise = 0, n_fall = 0, n_lost = 0, n_full = 0, n_merge = 0, n_b2b = 0, n_readback = 0;
  int unsigned tbcnt = 0;

  typedef struct { payload_t p; int cls; } exp_t;   // cls 0: any TDC, 1: TDC0/1, 2: TDC2/3
  exp_t exp_q[$];
  int n_recv = 0;

  always #(T/2) clk = ~clk;
  always @(posedge clk) if (rst_n) tbcnt <= tbcnt + 1;
  always @(posedge clk) if (rst_n && fifo_full != '0) n_full++;

  initial begin
    #(T * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s at %0t", msg, $realtime); end
  endtask

  function automatic chan_cfg_t cfg_of(int ch);
    chan_cfg_t c = '0;
    c.ch_en   = 1'b1;
    c.mode    = (ch % 4 == 3) ? MODE_TOT : MODE_SPC;
    c.trg_sel = (ch % 4 == 3);
    c.tdc_en  = 4'hF;
    c.ana     = ANA_W'(ch * 16'h0111 + 16'h8000);
    return c;
  endfunction

  // ---------------- SPI master (mode 0, 40 ns SCLK)
  task automatic spi_frame(input logic [7:0] hdr, input logic bits[$], output logic rd[$]);
    logic all[$];
    rd.delete();
    for (int k = 7; k >= 0; k--) all.push_back(hdr[k]);
    foreach (bits[k]) all.push_back(bits[k]);
    #7.1 cs_n = 1'b0;
    #20;
    foreach (all[k]) begin
      mosi = all[k];
      #20 sclk = 1'b1;
      if (k >= 8) rd.push_back(miso);
      #20 sclk = 1'b0;
    end
    #20 cs_n = 1'b1;
    #60;
  endtask

  function automatic void col_bits(int c, ref logic bits[$]);
    bits.delete();
    for (int r = NROW - 1; r >= 0; r--) begin
      automatic logic [CFG_W-1:0] w = cfg_of(c * NROW + r);
      for (int b = CFG_W - 1; b >= 0; b--) bits.push_back(w[b]);
    end
  endfunction

  // ---------------- trigger edges
  task automatic edge_at(input int ch, input int which, input logic val, input int cls, input bit expect_it);
    real t0, t1;
    exp_t e;
    @(posedge clk);
    #(0.02 + (T - 0.04) * real'($urandom_range(0, 1000)) / 1000.0);
    t0 = $realtime;
    trg[ch][which] = val;
    @(posedge clk);
    t1 = $realtime;
    #0.1;
    if (expect_it) begin
      e.p.rsvd = 1'b0; e.p.ch_id = CHID_W'(ch); e.p.tdc_id = '0;
      e.p.coarse = COARSE_W'(tbcnt);
      e.p.fine = FINE_W'($rtoi((t1 - t0) * 1000.0 / 50.0));
      e.cls = cls;
      exp_q.push_back(e);
    end
  endtask

  // one hit (SPC) or one pulse (ToT) on a channel
  task automatic pulse(input int ch, input int width, input bit expect_it);
    if (cfg_of(ch).mode == MODE_TOT) begin
      edge_at(ch, 1, 1'b1, 1, expect_it);
      repeat (width) @(posedge clk);
      edge_at(ch, 1, 1'b0, 2, expect_it);
    end else begin
      edge_at(ch, 0, 1'b1, 0, expect_it);
      repeat (width) @(posedge clk);
      edge_at(ch, 0, 1'b0, 0, 1'b0);
    end
  endtask

  // ---------------- link receivers
  for (genvar c = 0; c < NCOL; c++) begin : g_rx
    logic bq[$];
    real last_start = -1.0;
    initial forever begin
      @(posedge clk); #(T/4); bq.push_back(tx[c]);
      @(negedge clk); #(T/4); bq.push_back(tx[c]);
    end
    initial forever begin
      logic [31:0] w;
      real t;
      wait (bq.size() > 0);
      if (bq.pop_front()) begin
        t = $realtime;
        wait (bq.size() > 0);
        check(bq.pop_front() == 1'b0, "start symbol");
        for (int k = 31; k >= 0; k--) begin wait (bq.size() > 0); w[k] = bq.pop_front(); end
        if (last_start > 0.0 && t - last_start < 17.5 * T) n_b2b++;
        last_start = t;
        receive(c, payload_t'(w));
      end
    end
  end

  task automatic receive(input int c, input payload_t p);
    int idx[$];
    n_recv++;
    check(p.rsvd == 1'b0, "reserved bit 0");
    check(int'(p.ch_id) / NROW == c, $sformatf("channel %0d on link %0d", p.ch_id, c));
    if (int'(p.ch_id) % NROW != 0) n_merge++;
    idx = exp_q.find_first_index(e) with (e.p.ch_id == p.ch_id && e.p.coarse == p.coarse && e.p.fine == p.fine);
    check(idx.size() == 1, $sformatf("unexpected payload %h", p));
    if (idx.size() == 1) begin
      automatic int cls = exp_q[idx[0]].cls;
      if (cls == 0) begin n_spc++; check(cfg_of(p.ch_id).mode == MODE_SPC, "SPC channel"); end
      if (cls == 1) begin n_rise++; check(p.tdc_id inside {2'd0, 2'd1}, "rising edge on TDC0/1"); end
      if (cls == 2) begin n_fall++; check(p.tdc_id inside {2'd2, 2'd3}, "trailing edge on TDC2/3"); end
      exp_q.delete(idx[0]);
    end
  endtask

  initial begin
    logic bits[$], rd[$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // 1. configuration
    for (int c = 0; c < NCOL; c++) begin
      col_bits(c, bits);
      spi_frame({1'b1, 5'b0, 2'(c)}, bits, rd);
    end
    for (int ch = 0; ch < NCH; ch++)
      check(ana_cfg[ch] == cfg_of(ch).ana, $sformatf("analog settings of channel %0d", ch));
    col_bits(2, bits);
    begin
      logic zeros[$];
      foreach (bits[k]) zeros.push_back(1'b0);
      spi_frame({1'b0, 5'b0, 2'd2}, zeros, rd);
    end
    check(rd.size() == bits.size(), "read-back length");
    for (int k = 0; k < bits.size() && k < rd.size(); k++)
      if (rd[k] == bits[k]) n_readback++;
    check(n_readback == bits.size(), $sformatf("read-back %0d of %0d bits", n_readback, bits.size()));
    check(ana_cfg[16] == cfg_of(16).ana, "frame without update leaves the active settings");

    // 2a. sparse hits on all channels, in parallel
    for (int ch = 0; ch < NCH; ch++) begin
      fork
        automatic int c = ch;
        begin
          repeat (c * 3) @(posedge clk);
          for (int k = 0; k < 4; k++) begin
            pulse(c, $urandom_range(2, 8), 1'b1);
            repeat (60 + $urandom_range(0, 40)) @(posedge clk);
          end
        end
      join_none
    end
    wait fork;
    repeat (400) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("sparse hits delivered (%0d left)", exp_q.size()));

    // 2b. burst on column 1 (channels 8..15): four hits each within one dead time
    for (int ch = NROW; ch < 2 * NROW; ch++) begin
      fork
        automatic int c = ch;
        begin
          automatic int nh = (c == NROW) ? 5 : (cfg_of(c).mode == MODE_TOT ? 2 : 4);
          for (int k = 0; k < nh; k++) begin
            pulse(c, 1, k < 4);
            // a ToT pair is re-armed three cycles after the trailing edge
            if (cfg_of(c).mode == MODE_TOT) repeat (3) @(posedge clk);
          end
        end
      join_none
    end
    wait fork;
    n_lost++;   // fifth hit on channel 8 expected to be lost (checked by the empty queue below)
    repeat (2000) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("burst hits delivered (%0d left)", exp_q.size()));
    foreach (exp_q[k]) $display("left: %h cls %0d", exp_q[k].p, exp_q[k].cls);

    $display("payloads=%0d spc=%0d tot_rise=%0d tot_fall=%0d lost=%0d fifo_full_cycles=%0d merged=%0d back_to_back=%0d readback_bits=%0d",
             n_recv, n_spc, n_rise, n_fall, n_lost, n_full, n_merge, n_b2b, n_readback);
    check(n_spc > 0,  "SPC hits measured");
    check(n_rise > 0 && n_fall > 0, "ToT edges measured");
    check(n_full > 0, "a channel FIFO filled");
    check(n_merge > 0, "words merged from upper channels");
    check(n_b2b > 0, "back-to-back link frames");
    check(n_readback > 0, "configuration read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
