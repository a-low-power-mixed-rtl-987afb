// Testbench of the channel configuration control: a chain of three
// instances, as in a column. Random words are shifted in (the word for the
// top channel first), the active configuration must not change until the
// update strobe, then every channel must hold its own word. Shifting again
// returns the old words on the chain output, in order.
module tb_chan_cfg;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 100fs;

  localparam int NCH = 3;
  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0, update = 1'b0, din = 1'b0;
  logic [NCH:0] chain;
  chan_cfg_t cfg [NCH];
  logic [CFG_W-1:0] words [NCH], words2 [NCH];
  int checks = 0, failures = 0;

  assign chain[0] = din;
  for (genvar i = 0; i < NCH; i++) begin : g
    chan_cfg u (.clk, .rst_n, .cfg_shift(shift), .cfg_update(update), .cfg_in(chain[i]),
                .cfg_out(chain[i+1]), .cfg(cfg[i]));
  end

  always #1.5625 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $realtime); end
  endtask

  // shift all words, top channel's word first, MSB first; collect what leaves
  task automatic load(input logic [CFG_W-1:0] w [NCH], output logic [CFG_W-1:0] out [NCH]);
    for (int c = NCH - 1; c >= 0; c--)
      for (int b = CFG_W - 1; b >= 0; b--) begin
        @(negedge clk);
        din = w[c][b]; shift = 1'b1;
        out[c][b] = chain[NCH];
        @(posedge clk);
      end
    @(negedge clk) shift = 1'b0;
  endtask

  initial begin
    logic [CFG_W-1:0] dump [NCH];
    repeat (2) @(posedge clk);
    for (int c = 0; c < NCH; c++) check(cfg[c] == '0, "reset value");
    rst_n = 1'b1;
    for (int rep = 0; rep < 5; rep++) begin
      for (int c = 0; c < NCH; c++) words[c] = CFG_W'({$urandom, $urandom});
      load(words, dump);
      if (rep > 0)
        for (int c = 0; c < NCH; c++) check(dump[c] == words2[c], "old word shifted out");
      for (int c = 0; c < NCH; c++)
        check(rep == 0 ? cfg[c] == '0 : cfg[c] == chan_cfg_t'(words2[c]), "active word unchanged before update");
      @(negedge clk) update = 1'b1;
      @(negedge clk) update = 1'b0;
      for (int c = 0; c < NCH; c++) begin
        check(cfg[c] == chan_cfg_t'(words[c]), $sformatf("channel %0d word after update", c));
        words2[c] = words[c];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
