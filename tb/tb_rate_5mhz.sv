// Rate workload on the full 32-channel chip at its default parameters:
// single photon counting with random (exponentially spaced) hits at an
// average of 5 MHz per channel, the design rate of the chip.
//
// Phase 1: the top channel of every column (the far end of each readout
// chain) runs at 5 MHz for 20 us. The links have ample room, so at least 98%
// of the hits must arrive (the rest can only be hits that found all four
// TDCs inside their 150 ns dead time).
// Phase 2: all 32 channels run at 5 MHz for 12 us. This is more than the four
// links can carry (32 x 5 MHz against 4 x 18.8 Mword/s), so the links must
// run saturated (at least 90% of one frame per 17 clock periods during the
// loaded window) and hits are lost at the channel inputs.
// In both phases every received word must match a hit generated here
// (channel, coarse, fine), once. Delivered fractions are printed.
module tb_rate_5mhz;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 100fs;

  localparam real T = 3.125;
  localparam int NCOL = 4, NROW = 8, NCH = 32;
  localparam real MEAN_NS = 200.0;   // 5 MHz
  localparam real MIN_NS  = 10.0;    // discriminator pulse plus recovery

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NCH-1:0][1:0] trg = '0;
  logic [NCH-1:0][ANA_W-1:0] ana_cfg;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic [NCOL-1:0] tx, tx_busy;
  logic [NCH-1:0] fifo_full;

  alcor_top dut (.clk, .rst_n, .coarse_clear(1'b0), .trg, .ana_cfg,
                 .sclk, .cs_n, .mosi, .miso, .tx, .tx_busy, .fifo_full);

  int checks = 0, failures = 0;
  int unsigned tbcnt = 0;
  int pend [bit [28:0]];           // {ch, coarse, fine} -> hits not yet received
  int n_hits = 0, n_recv = 0, n_bad = 0;
  int link_words [NCOL];
  bit running = 1'b0;
  bit active [NCH];

  always #(T/2) clk = ~clk;
  always @(posedge clk) if (rst_n) tbcnt <= tbcnt + 1;

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

  // SPI master, mode 0
  task automatic spi_frame(input logic [7:0] hdr, input logic bits[$]);
    logic all[$];
    for (int k = 7; k >= 0; k--) all.push_back(hdr[k]);
    foreach (bits[k]) all.push_back(bits[k]);
    #7.1 cs_n = 1'b0;
    #20;
    foreach (all[k]) begin
      mosi = all[k];
      #20 sclk = 1'b1;
      #20 sclk = 1'b0;
    end
    #20 cs_n = 1'b1;
    #60;
  endtask

  // hit generator of one channel
  for (genvar ch = 0; ch < NCH; ch++) begin : g_hit
    initial begin
      real gap, t0, t1;
      forever begin
        wait (running && active[ch]);
        gap = MIN_NS - (MEAN_NS - MIN_NS) * $ln(1.0 - real'($urandom_range(0, 999999)) / 1.0e6);
        #(gap);
        if (running && active[ch]) begin
          t0 = $realtime;
          trg[ch][0] = 1'b1;
          @(posedge clk);
          t1 = $realtime;
          #0.1;
          pend[{5'(ch), 15'(tbcnt), 9'($rtoi((t1 - t0) * 1000.0 / 50.0))}]++;
          n_hits++;
          #(4.0 - (t1 + 0.1 - t0) > 0.1 ? 4.0 - (t1 + 0.1 - t0) : 0.1);
          trg[ch][0] = 1'b0;
        end
      end
    end
  end

  // link receivers
  for (genvar c = 0; c < NCOL; c++) begin : g_rx
    logic bq[$];
    initial forever begin
      @(posedge clk); #(T/4); bq.push_back(tx[c]);
      @(negedge clk); #(T/4); bq.push_back(tx[c]);
    end
    initial forever begin
      payload_t p;
      logic [31:0] w;
      wait (bq.size() > 0);
      if (bq.pop_front()) begin
        wait (bq.size() > 0);
        void'(bq.pop_front());
        for (int k = 31; k >= 0; k--) begin wait (bq.size() > 0); w[k] = bq.pop_front(); end
        p = payload_t'(w);
        n_recv++;
        link_words[c]++;
        if (int'(p.ch_id) / NROW != c || !pend.exists({p.ch_id, p.coarse, p.fine}) ||
            pend[{p.ch_id, p.coarse, p.fine}] == 0) begin
          n_bad++;
          if (n_bad < 10) $display("unmatched word %h on link %0d", p, c);
        end else begin
          pend[{p.ch_id, p.coarse, p.fine}]--;
        end
      end
    end
  end

  initial begin
    logic bits[$];
    int h0, r0, w0 [NCOL];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int c = 0; c < NCOL; c++) begin
      bits.delete();
      for (int r = NROW - 1; r >= 0; r--) begin
        chan_cfg_t cf = '0;
        logic [CFG_W-1:0] w;
        cf.ch_en = 1'b1; cf.mode = MODE_SPC; cf.trg_sel = 1'b0; cf.tdc_en = 4'hF;
        w = cf;
        for (int b = CFG_W - 1; b >= 0; b--) bits.push_back(w[b]);
      end
      spi_frame({1'b1, 5'b0, 2'(c)}, bits);
    end
    repeat (10) @(posedge clk);

    // phase 1: one channel per column, at the top of the chain
    foreach (active[ch]) active[ch] = (ch % NROW == NROW - 1);
    running = 1'b1;
    #20000;
    running = 1'b0;
    #3000;
    $display("phase 1: hits %0d, received %0d (%0.1f%%), unmatched %0d",
             n_hits, n_recv, 100.0 * n_recv / n_hits, n_bad);
    check(n_hits > 300, "enough hits in phase 1");
    check(n_recv >= 0.98 * n_hits, "phase 1: at least 98% of the hits delivered");
    check(n_bad == 0, "phase 1: every word matches a hit");

    // phase 2: every channel
    pend.delete();
    h0 = n_hits; r0 = n_recv;
    foreach (active[ch]) active[ch] = 1'b1;
    running = 1'b1;
    #2000;                         // let the chains fill
    foreach (w0[c]) w0[c] = link_words[c];
    #10000;
    for (int c = 0; c < NCOL; c++) begin
      automatic int frames = link_words[c] - w0[c];
      automatic real cap = 10000.0 / (17.0 * T);
      $display("phase 2: link %0d carried %0d words in 10 us (capacity %0.0f)", c, frames, cap);
      check(frames >= 0.9 * cap, $sformatf("phase 2: link %0d saturated", c));
    end
    running = 1'b0;
    #6000;
    $display("phase 2: hits %0d, received %0d (%0.1f%%, %0.2f MHz per channel), unmatched %0d",
             n_hits - h0, n_recv - r0, 100.0 * (n_recv - r0) / (n_hits - h0),
             (n_recv - r0) / 32.0 / 12.0, n_bad);
    check(n_recv - r0 < n_hits - h0, "phase 2: the links limit the rate");
    check(n_bad == 0, "phase 2: every word matches a hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
