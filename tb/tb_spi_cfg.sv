// Testbench of the SPI configuration port.
//
// An SPI master (mode 0, SCLK period 50 ns, asynchronous to the 320 MHz
// clock) sends frames: a header (update flag, column) and a random number of
// data bits. The four column chains are modelled as plain 12-bit shift
// registers. Checked: only the addressed chain shifts, exactly once per data
// bit and with the right bits; MISO returns the bits leaving the chain;
// one update pulse reaches the addressed column at the end of a frame
// exactly when the update flag is set.
module tb_spi_cfg;
  timeunit 1ns; timeprecision 100fs;

  localparam int L = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic [3:0] cfg_shift, cfg_update, cfg_ret;
  logic cfg_data;
  logic [L-1:0] chain [4];
  int n_upd [4];
  int checks = 0, failures = 0;

  spi_cfg #(.NCOL(4)) dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .cfg_shift, .cfg_update, .cfg_data, .cfg_ret);

  always #1.5625 clk = ~clk;

  for (genvar c = 0; c < 4; c++) begin : g_ch
    assign cfg_ret[c] = chain[c][L-1];
    always @(posedge clk) begin
      if (cfg_shift[c]) chain[c] <= {chain[c][L-2:0], cfg_data};
      if (cfg_update[c]) n_upd[c]++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", msg, $realtime); end
  endtask

  // One frame; returns the bits read on MISO during the data phase.
  task automatic frame(input logic [7:0] hdr, input logic bits[$], output logic rd[$]);
    logic all[$];
    rd.delete();
    for (int k = 7; k >= 0; k--) all.push_back(hdr[k]);
    foreach (bits[k]) all.push_back(bits[k]);
    #7.3 cs_n = 1'b0;
    #25;
    foreach (all[k]) begin
      mosi = all[k];
      #25 sclk = 1'b1;
      if (k >= 8) rd.push_back(miso);
      #25 sclk = 1'b0;
    end
    #25 cs_n = 1'b1;
    #100;
  endtask

  initial begin
    logic bits[$], rd[$];
    logic [L-1:0] prev [4];
    int ub [4];
    for (int c = 0; c < 4; c++) begin chain[c] = '0; n_upd[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int f = 0; f < 40; f++) begin
      automatic int col = $urandom_range(0, 3);
      automatic logic upd = $urandom_range(0, 1);
      automatic int n = $urandom_range(1, 20);
      logic [L-1:0] expc;
      bits.delete();
      for (int k = 0; k < n; k++) bits.push_back(1'($urandom));
      for (int c = 0; c < 4; c++) begin prev[c] = chain[c]; ub[c] = n_upd[c]; end
      frame({upd, 5'b0, 2'(col)}, bits, rd);
      // expected chain and read-back
      expc = prev[col];
      for (int k = 0; k < n; k++) begin
        check(rd[k] == expc[L-1], $sformatf("frame %0d miso bit %0d", f, k));
        expc = {expc[L-2:0], bits[k]};
      end
      for (int c = 0; c < 4; c++) begin
        check(chain[c] == (c == col ? expc : prev[c]), $sformatf("frame %0d chain %0d", f, c));
        check(n_upd[c] - ub[c] == ((c == col && upd) ? 1 : 0), $sformatf("frame %0d update %0d", f, c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
