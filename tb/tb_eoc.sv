// Testbench of the End-of-Column.
//
// Four column sender models drive the four-phase handshake (req with
// bundled data, wait for ack, drop req, wait for ack to drop) asynchronously
// to the clock; four link receiver models decode the DDR frames (start
// symbol 1,0 then 32 bits MSB first). Checked: every word of column c comes
// out, unchanged and in order, on link c; the handshake rules hold; a word
// waits for its link when the link is still sending (counted, must occur).
// An SPI frame checks that the configuration port is wired to the columns.
module tb_eoc;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 100fs;

  localparam real T = 3.125;
  localparam int NW = 40;     // words per column
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] col_req = '0, col_ack, cfg_shift, cfg_update, cfg_ret = '0, tx, tx_busy;
  payload_t [3:0] col_data = '0;
  logic cfg_data, sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  int checks = 0, failures = 0, n_wait = 0, n_shift = 0, n_upd = 0;
  payload_t sent [4][$], recv [4][$];

  eoc #(.NCOL(4)) dut (.clk, .rst_n, .col_req, .col_data, .col_ack,
    .cfg_shift, .cfg_update, .cfg_data, .cfg_ret, .sclk, .cs_n, .mosi, .miso, .tx, .tx_busy);

  always #(T/2) clk = ~clk;

  initial begin
    #(T * 200000);
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
    n_shift += $countones(cfg_shift);
    n_upd   += $countones(cfg_update);
  end

  for (genvar c = 0; c < 4; c++) begin : g_c
    // sender
    initial begin
      @(posedge rst_n);
      for (int k = 0; k < NW; k++) begin
        automatic real t_req;
        #(0.3 + real'($urandom_range(0, 20)) * 0.77);
        col_data[c] = payload_t'($urandom);
        sent[c].push_back(col_data[c]);
        col_req[c] = 1'b1;
        t_req = $realtime;
        @(posedge col_ack[c]);
        if ($realtime - t_req > 4.0 * T) n_wait++;
        #(0.5 + real'($urandom_range(0, 10)) * 0.31);
        col_req[c] = 1'b0;
        @(negedge col_ack[c]);
      end
    end
    always @(posedge col_ack[c]) check(col_req[c], "ack rises only while req high");
    // receiver
    logic bq[$];
    initial forever begin
      @(posedge clk); #(T/4); bq.push_back(tx[c]);
      @(negedge clk); #(T/4); bq.push_back(tx[c]);
    end
    initial forever begin
      logic [31:0] w;
      wait (bq.size() > 0);
      if (bq.pop_front()) begin
        wait (bq.size() > 0);
        check(bq.pop_front() == 1'b0, "start symbol");
        for (int k = 31; k >= 0; k--) begin wait (bq.size() > 0); w[k] = bq.pop_front(); end
        recv[c].push_back(payload_t'(w));
      end
    end
  end

  initial begin
    logic [7:0] hdr = 8'h82;       // update, column 2
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // SPI: header plus 5 data bits to column 2
    #13 cs_n = 1'b0;
    for (int k = 0; k < 13; k++) begin
      mosi = (k < 8) ? hdr[7 - k] : 1'b1;
      #20 sclk = 1'b1;
      #20 sclk = 1'b0;
    end
    #20 cs_n = 1'b1;
    #(T * 20);
    check(n_shift == 5, $sformatf("SPI data bits reached the column: %0d", n_shift));
    check(n_upd == 1, "SPI update reached the column");
    wait (recv[0].size() == NW && recv[1].size() == NW && recv[2].size() == NW && recv[3].size() == NW);
    #(T * 40);
    for (int c = 0; c < 4; c++) begin
      check(recv[c].size() == NW, $sformatf("link %0d words %0d", c, recv[c].size()));
      for (int k = 0; k < NW; k++) check(recv[c][k] == sent[c][k], $sformatf("link %0d word %0d", c, k));
    end
    check(n_wait > 0, "a word waited for its link");
    $display("waits=%0d", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
